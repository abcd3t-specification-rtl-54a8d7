// readout_buffer: derandomizing buffer between the pipeline and the readout.
//
// Triggered events (a 3-bit hit pattern per channel) are written at random
// times by wr and taken out one at a time by rd, in arrival order. The buffer
// is a circular memory of EVENTS entries with a write pointer, a read pointer
// and an occupancy counter.
//
// Overflow: an event written while the buffer is full replaces the oldest
// event (both pointers advance) and is stored with its overflow flag set, so
// the readout of that event reports that earlier data was lost. A write and a
// read in the same cycle on a full buffer do not overflow.
//
// Buffer error: the counter and the pointer difference are kept independently
// and compared every cycle; if they ever disagree (the buffer has lost track of
// its contents, e.g. after an upset) buffer_error is set and stays set until
// reset.
//
// Interface: head_hits/head_ovf show the oldest event whenever empty is low; rd
// removes it at the clock edge. rd on an empty buffer is ignored.
//
// The overwrite-oldest behaviour and the two error conditions follow the
// document; the depth of 8 events and the detection method for the
// bookkeeping error are this design's choices.
module readout_buffer #(
  parameter int unsigned NCHAN  = 128,
  parameter int unsigned EVENTS = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr,
  input  logic [NCHAN-1:0][2:0] wr_hits,
  input  logic                  rd,
  output logic [NCHAN-1:0][2:0] head_hits,
  output logic                  head_ovf,
  output logic                  empty,
  output logic                  full,
  output logic                  overwrite,     // pulse: the oldest event was just overwritten
  output logic                  buffer_error
);

  localparam int unsigned AW = (EVENTS > 1) ? $clog2(EVENTS) : 1;
  localparam int unsigned CW = $clog2(EVENTS + 1);

  logic [NCHAN-1:0][2:0] mem [EVENTS];
  logic                  ovf_flag [EVENTS];
  logic [AW-1:0]         wp, rp;
  logic [CW-1:0]         count;
  logic                  do_wr, do_rd, do_ovw;
  int unsigned           ptr_diff;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (int'(p) == EVENTS - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    empty     = (count == '0);
    full      = (int'(count) == EVENTS);
    do_rd     = rd && !empty;
    do_wr     = wr;
    do_ovw    = wr && full && !do_rd;
    head_hits = mem[rp];
    head_ovf  = ovf_flag[rp];
    overwrite = do_ovw;
    ptr_diff  = (int'(wp) >= int'(rp)) ? int'(wp) - int'(rp) : int'(wp) + EVENTS - int'(rp);
  end

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem[wp]      <= wr_hits;
      ovf_flag[wp] <= do_ovw;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd || do_ovw) rp <= inc(rp);
      if (do_wr && !do_rd && !do_ovw) count <= count + 1'b1;
      else if (do_rd && !do_wr)       count <= count - 1'b1;
    end
  end

  // Bookkeeping check: occupancy from the counter against the pointers.
  always_ff @(posedge clk) begin
    if (!rst_n) buffer_error <= 1'b0;
    else if ((int'(count) > EVENTS) ||
             ((count == '0 || int'(count) == EVENTS) ? (ptr_diff != 0) : (ptr_diff != int'(count))))
      buffer_error <= 1'b1;
  end

endmodule
