// pipeline: L1 trigger latency buffer of the binary readout.
//
// Every clock cycle the hit vector of all channels is written into a circular
// memory of DEPTH words. A read port, LAT cycles behind the write pointer,
// feeds a three-stage shift register, so the samples of three consecutive
// clock cycles are always at hand. When l1 is high at a clock edge, those three
// samples are copied out as one event: per channel a 3-bit hit pattern whose
// bit 2 is the oldest sample, bit 1 the triggered cycle and bit 0 the cycle
// after it (the triggered cycle "together with its neighbours").
//
// Timing: an l1 sampled at clock edge T selects as its central bit the hit
// vector written at edge T - latency - 2; ev_valid and ev_hits appear after edge
// T for one cycle. latency is clamped to 1..DEPTH. Back-to-back triggers are
// accepted. The memory is not reset: the first DEPTH cycles after power-up
// read old contents, as a real pipeline does.
//
// Storing the sampled data until the trigger decision and copying the triggered
// cycle with its neighbours follow the document. The depth (132 cells), the
// 8-bit latency code and the exact latency offset are this design's choices.
module pipeline #(
  parameter int unsigned NCHAN = 128,
  parameter int unsigned DEPTH = 132,
  parameter int unsigned LAT_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NCHAN-1:0]      din,
  input  logic [LAT_W-1:0]      latency,
  input  logic                  l1,
  output logic                  ev_valid,
  output logic [NCHAN-1:0][2:0] ev_hits
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [NCHAN-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, ra;
  logic [NCHAN-1:0] r1, r2, r3;
  int unsigned      lat_c;

  // Latency clamped to the range the memory can hold.
  always_comb begin
    lat_c = int'(latency);
    if (lat_c < 1)     lat_c = 1;
    if (lat_c > DEPTH) lat_c = DEPTH;
    if (int'(wp) >= lat_c) ra = AW'(int'(wp) - lat_c);
    else                   ra = AW'(int'(wp) + DEPTH - lat_c);
  end

  // Memory: write this cycle's hits, read the word LAT cycles old (read before
  // write, so a latency of DEPTH reads the word about to be replaced).
  always_ff @(posedge clk) begin
    mem[wp] <= din;
    r1      <= mem[ra];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0;
      r2 <= '0;
      r3 <= '0;
    end else begin
      wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      r2 <= r1;
      r3 <= r2;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev_valid <= 1'b0;
      ev_hits  <= '0;
    end else begin
      ev_valid <= l1;
      if (l1)
        for (int c = 0; c < NCHAN; c++) ev_hits[c] <= {r3[c], r2[c], r1[c]};
    end
  end

endmodule
