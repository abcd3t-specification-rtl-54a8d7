// readout_controller: token-passing serial readout of one chip in a chain.
//
// Chips of a module are chained. The token travels from the master chip
// through the slaves; data travels the other way, each chip forwarding on its
// data output what arrives on its data input, so that everything reaches the
// master, whose output also drives the LED (optical link) output.
//
// A chip that holds the token sends, one bit per clock on dout:
//   chip header (its geographical id), an error record if any error flag is
//   set, one hit record per channel accepted by the data compression logic, and
//   a chip trailer; then it passes the token on (one-cycle pulse on tkout).
// The master takes the token itself whenever its readout buffer holds an event
// and the previous token has come back from the end of the chain (the last
// chip's token output is looped back to the master's token input) and DRAIN
// further cycles have passed. The token returns in one cycle but the last
// chip's data needs one cycle per chip to reach the master through the
// forwarding registers; the drain time lets it arrive before the master sends
// again, so chains of up to DRAIN chips never collide on the line. A slave
// takes it when the token pulse arrives. A slave that gets the token with an
// empty buffer reports the no-data error and sends no hits.
//
// On taking the token the oldest buffered event is copied into a local
// register and removed from the buffer, so that the buffer can go on accepting
// (and, when full, overwriting) events during the scan.
//
// Redundancy: each chip has two token inputs and two data inputs (from the
// nearest neighbour and from the one beyond it) and drives both of its token
// and data outputs identically; in_sel chooses the inputs, so the chain can be
// reconfigured around a failed chip.
//
// Timing: dout and tkout are registered. The first header bit leaves two
// cycles after the token is taken; records follow without gaps while hits are
// available, with '0' filling any wait for the compression scan.
//
// Token passing, forwarding towards the master, the LED output of the master,
// the duplicated inputs for bypassing a failed chip and the reported error
// kinds follow the document. The record encoding, the token pulse, the token
// loop back to the master, the drain time and the detection of the configuration error (the
// chip has not been configured since reset) are this design's choices.
module readout_controller
  import abcd_pkg::*;
#(
  parameter int unsigned NCHAN = 128,
  parameter int unsigned DRAIN = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic [5:0]            chip_id,
  input  logic                  master,
  input  logic                  in_sel,
  input  logic                  configured,
  // readout buffer
  input  logic                  buf_empty,
  input  logic [NCHAN-1:0][2:0] head_hits,
  input  logic                  head_ovf,
  input  logic                  buf_error,
  output logic                  buf_rd,
  // data compression
  output logic                  cmp_start,
  output logic [NCHAN-1:0][2:0] cmp_hits,
  input  logic                  cmp_busy,
  input  logic                  hit_valid,
  input  logic [6:0]            hit_chan,
  input  logic [2:0]            hit_pat,
  output logic                  hit_ready,
  // chain
  input  logic                  tokin0,
  input  logic                  tokin1,
  input  logic                  din0,
  input  logic                  din1,
  output logic                  tkout0,
  output logic                  tkout1,
  output logic                  dout0,
  output logic                  dout1,
  output logic                  ledout,
  output logic                  reading      // this chip holds the token
);

  typedef enum logic [3:0] {
    ST_IDLE, ST_HDR, ST_ERR, ST_CMP, ST_HITS, ST_TRL, ST_TOK, ST_WAIT, ST_DRAIN
  } state_e;

  localparam int unsigned DW = $clog2(DRAIN + 2);

  state_e              state;
  logic [REC_W-1:0]    sh_data;
  logic [3:0]          sh_cnt;
  logic                free;         // a new record may be loaded this cycle
  logic                tok_in, din_sel, take;
  logic                have_data;
  err_flags_t          err_q;
  logic                dout_q, tok_q;
  logic                load;
  logic [REC_W-1:0]    load_data;
  logic [3:0]          load_len;
  logic [DW-1:0]       drain_cnt;

  always_comb begin
    tok_in  = in_sel ? tokin1 : tokin0;
    din_sel = in_sel ? din1 : din0;
    free    = (sh_cnt <= 4'd1);
    take    = (state == ST_IDLE) && (master ? !buf_empty : tok_in);
    buf_rd  = take && !buf_empty;
    cmp_start = (state == ST_CMP);
    hit_ready = (state == ST_HITS) && free;

    load      = 1'b0;
    load_data = '0;
    load_len  = '0;
    unique case (state)
      ST_HDR: if (free) begin
        load = 1'b1; load_len = 4'(HEADER_LEN);
        load_data = {HEADER_CODE, chip_id, 3'b000};
      end
      ST_ERR: if (free) begin
        load = 1'b1; load_len = 4'(ERROR_LEN);
        load_data = {ERROR_CODE, err_q, 4'b0000};
      end
      ST_HITS: if (hit_valid && hit_ready) begin
        load = 1'b1; load_len = 4'(HIT_LEN);
        load_data = {HIT_CODE, hit_chan, hit_pat};
      end
      ST_TRL: if (free) begin
        load = 1'b1; load_len = 4'(TRAILER_LEN);
        load_data = {TRAILER_CODE, 8'h00};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      sh_data   <= '0;
      sh_cnt    <= '0;
      err_q     <= '0;
      have_data <= 1'b0;
      tok_q     <= 1'b0;
      dout_q    <= 1'b0;
      drain_cnt <= '0;
    end else begin
      // output shifter
      dout_q <= (sh_cnt != 0) ? sh_data[REC_W-1] : din_sel;
      if (load) begin
        sh_data <= load_data;
        sh_cnt  <= load_len;
      end else if (sh_cnt != 0) begin
        sh_data <= sh_data << 1;
        sh_cnt  <= sh_cnt - 1'b1;
      end

      tok_q <= 1'b0;
      unique case (state)
        ST_IDLE: if (take) begin
          have_data <= !buf_empty;
          err_q     <= '{no_data: buf_empty, overflow: head_ovf && !buf_empty,
                         buffer_error: buf_error, config_error: !configured};
          state     <= ST_HDR;
        end
        ST_HDR:  if (free) state <= (|err_q) ? ST_ERR : (have_data ? ST_CMP : ST_TRL);
        ST_ERR:  if (free) state <= have_data ? ST_CMP : ST_TRL;
        ST_CMP:  state <= ST_HITS;
        ST_HITS: if (!cmp_busy) state <= ST_TRL;
        ST_TRL:  if (free) state <= ST_TOK;
        ST_TOK:  if (sh_cnt == 0) begin
          tok_q <= 1'b1;
          state <= master ? ST_WAIT : ST_IDLE;
        end
        ST_WAIT: if (tok_in) begin
          drain_cnt <= DW'(DRAIN);
          state     <= ST_DRAIN;
        end
        ST_DRAIN: begin
          if (drain_cnt <= 1) state <= ST_IDLE;
          drain_cnt <= drain_cnt - 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Event copy taken with the token.
  always_ff @(posedge clk) begin
    if (!rst_n)    cmp_hits <= '0;
    else if (take) cmp_hits <= head_hits;
  end

  always_comb begin
    dout0   = dout_q;
    dout1   = dout_q;
    tkout0  = tok_q;
    tkout1  = tok_q;
    ledout  = master && dout_q;
    reading = (state != ST_IDLE) && (state != ST_WAIT) && (state != ST_DRAIN);
  end

  // The compression logic is only started when idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) cmp_start |-> !cmp_busy);

endmodule
