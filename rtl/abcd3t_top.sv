// abcd3t_top: digital part of a 128-channel binary silicon-strip readout chip.
//
// Data path, one clock per bunch crossing:
//   disc (comparator outputs) -> input_register (level or edge sensing)
//   -> pipeline (holds every crossing until the L1 trigger decision)
//   -> readout_buffer (derandomizer, 3-bit pattern per channel per trigger)
//   -> data_compression (keeps channels matching the selected criterion)
//   -> readout_controller (token passing, serial records on dout/ledout).
// Control: config_register (mode bits, latency, DAC codes, master/slave and
// redundancy selection), trim_register (4-bit trim code per channel) and
// calibration_control (strobe for one of four calibration lines).
//
// The analogue front end, the DACs, the calibration chopper and strobe delay,
// the pad cells and the command decoder are not part of this RTL. Their
// connections are ports: comparator outputs come in on disc; DAC codes, trim
// codes and calibration strobes go out; the decoded commands (l1, cal_cmd,
// soft_reset, configuration and trim writes) come in as single-cycle pulses,
// and the command line chosen by select is passed out (com) for the decoder.
// The select pin also chooses between the two clock inputs.
//
// Reset: resetB (active low, used as a synchronous reset by every register) or
// soft_reset, which takes effect one cycle after it is seen.
// Timing: a comparator output sampled at clock edge n is the central bit of an
// event for an l1 pulse sampled at edge n + latency + 3.
//
// The block structure, channel count, redundant clock/command/token/data
// inputs and outputs, and the LED output follow the document; the decoded
// command interface and the sizes noted in each block are this design's
// choices.
module abcd3t_top
  import abcd_pkg::*;
#(
  parameter int unsigned NCHAN      = 128,
  parameter int unsigned PIPE_DEPTH = 132,
  parameter int unsigned BUF_EVENTS = 8
) (
  // clock, command and static pins
  input  logic                  clk0,
  input  logic                  clk1,
  input  logic                  select,
  input  logic                  com0,
  input  logic                  com1,
  output logic                  com,
  input  logic                  resetB,
  input  logic                  masterB,
  input  logic [5:0]            id,
  // decoded commands
  input  logic                  l1,
  input  logic                  cal_cmd,
  input  logic                  soft_reset,
  input  logic                  cfg_wr,
  input  cfg_t                  cfg_wdata,
  input  logic                  trim_wr,
  input  logic [6:0]            trim_addr,
  input  logic [3:0]            trim_wdata,
  // front end
  input  logic [NCHAN-1:0]      disc,
  output logic [7:0]            thr_dac,
  output logic [7:0]            cal_dac,
  output logic [5:0]            strobe_delay,
  output logic [1:0]            trim_range,
  output logic [NCHAN-1:0][3:0] trim,
  output logic [3:0]            cal_line,
  output logic [NCHAN-1:0]      cal_inject,
  // token and data chain
  input  logic                  tokin0,
  input  logic                  tokin1,
  input  logic                  din0,
  input  logic                  din1,
  output logic                  tkout0,
  output logic                  tkout1,
  output logic                  dout0,
  output logic                  dout1,
  output logic                  ledout,
  // status
  output logic                  reading,
  output logic                  buf_full,
  output logic                  buf_overwrite,
  output logic                  buf_error
);

  logic clk, rst_n, soft_q;
  cfg_t cfg;
  logic configured;

  always_comb begin
    clk = select ? clk1 : clk0;
    com = select ? com1 : com0;
  end

  // resetB acts directly; the soft reset command is registered first.
  always_ff @(posedge clk) soft_q <= soft_reset;
  always_comb rst_n = resetB && !soft_q;

  config_register u_cfg (
    .clk(clk), .rst_n(rst_n), .masterB(masterB),
    .wr(cfg_wr), .wdata(cfg_wdata), .cfg(cfg), .configured(configured)
  );

  trim_register #(.NCHAN(NCHAN), .TRIM_W(4)) u_trim (
    .clk(clk), .rst_n(rst_n), .wr(trim_wr), .addr(trim_addr), .wdata(trim_wdata), .trim(trim)
  );

  calibration_control #(.NCHAN(NCHAN)) u_cal (
    .clk(clk), .rst_n(rst_n), .cal_cmd(cal_cmd), .cal_addr(cfg.cal_addr),
    .cal_line(cal_line), .cal_inject(cal_inject)
  );

  always_comb begin
    thr_dac      = cfg.thr_dac;
    cal_dac      = cfg.cal_dac;
    strobe_delay = cfg.strobe_delay;
    trim_range   = cfg.trim_range;
  end

  // data path
  logic [NCHAN-1:0]      hits;
  logic                  ev_valid;
  logic [NCHAN-1:0][2:0] ev_hits, head_hits, cmp_hits;
  logic                  buf_rd, buf_empty, head_ovf;
  logic                  cmp_start, cmp_busy, hit_valid, hit_ready;
  logic [6:0]            hit_chan;
  logic [2:0]            hit_pat;


  input_register #(.NCHAN(NCHAN)) u_inreg (
    .clk(clk), .rst_n(rst_n), .edge_en(cfg.edge_en), .disc(disc), .hits(hits)
  );

  pipeline #(.NCHAN(NCHAN), .DEPTH(PIPE_DEPTH), .LAT_W(LAT_W)) u_pipe (
    .clk(clk), .rst_n(rst_n), .din(hits), .latency(cfg.latency), .l1(l1),
    .ev_valid(ev_valid), .ev_hits(ev_hits)
  );

  readout_buffer #(.NCHAN(NCHAN), .EVENTS(BUF_EVENTS)) u_buf (
    .clk(clk), .rst_n(rst_n), .wr(ev_valid), .wr_hits(ev_hits), .rd(buf_rd),
    .head_hits(head_hits), .head_ovf(head_ovf), .empty(buf_empty), .full(buf_full),
    .overwrite(buf_overwrite), .buffer_error(buf_error)
  );

  data_compression #(.NCHAN(NCHAN)) u_cmp (
    .clk(clk), .rst_n(rst_n), .mode(cfg.mode), .start(cmp_start), .hits(cmp_hits),
    .busy(cmp_busy), .hit_valid(hit_valid), .hit_chan(hit_chan), .hit_pat(hit_pat),
    .hit_ready(hit_ready)
  );

  readout_controller #(.NCHAN(NCHAN)) u_ro (
    .clk(clk), .rst_n(rst_n),
    .chip_id(id), .master(cfg.master), .in_sel(cfg.in_sel), .configured(configured),
    .buf_empty(buf_empty), .head_hits(head_hits), .head_ovf(head_ovf),
    .buf_error(buf_error), .buf_rd(buf_rd),
    .cmp_start(cmp_start), .cmp_hits(cmp_hits), .cmp_busy(cmp_busy),
    .hit_valid(hit_valid), .hit_chan(hit_chan), .hit_pat(hit_pat), .hit_ready(hit_ready),
    .tokin0(tokin0), .tokin1(tokin1), .din0(din0), .din1(din1),
    .tkout0(tkout0), .tkout1(tkout1), .dout0(dout0), .dout1(dout1),
    .ledout(ledout), .reading(reading)
  );

endmodule
