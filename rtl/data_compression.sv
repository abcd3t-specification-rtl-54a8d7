// data_compression: selects the channels of an event that are worth sending.
//
// After start, the 3-bit hit patterns of channels 0 to NCHAN-1 are examined in
// channel order against the criterion chosen by mode (bit 2 of a pattern is
// the oldest sample):
//   hit   (00): 1XX or X1X or XX1     level (01): X1X
//   edge  (10): 01X                   test  (11): XXX, every channel
// A channel that meets the criterion is offered to the readout as
// (hit_chan, hit_pat) with hit_valid; the scan waits while hit_valid is high
// and hit_ready low. Channels that do not match produce nothing and cost no
// time: each cycle a priority encoder finds the lowest matching channel at or
// above the scan pointer, so the scan jumps over empty channels.
//
// Interface: hits must stay stable while busy is high. busy rises the cycle
// after start and falls when no matching channel remains and the last offered
// hit has been taken. With a ready consumer an event with k matching channels
// keeps busy high for k+1 cycles; the j-th match is offered j cycles after
// start.
//
// The criteria table and the channel-by-channel examination follow the
// document; the handshake, the scan order (channel 0 first) and skipping
// non-matching channels in the same cycle are this design's choices (the
// latter keeps the readout time proportional to the number of hits, which the
// buffer-loss requirement at low occupancy needs).
module data_compression
  import abcd_pkg::*;
#(
  parameter int unsigned NCHAN = 128
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cmp_mode_e             mode,
  input  logic                  start,
  input  logic [NCHAN-1:0][2:0] hits,
  output logic                  busy,
  output logic                  hit_valid,
  output logic [6:0]            hit_chan,
  output logic [2:0]            hit_pat,
  input  logic                  hit_ready
);

  localparam int unsigned CW = $clog2(NCHAN + 1);

  logic             scanning;
  logic [CW-1:0]    ptr;        // first channel not yet examined
  logic [NCHAN-1:0] match;
  logic             found;
  logic [CW-1:0]    next;

  // Criterion per channel, then the lowest match at or above ptr.
  always_comb begin
    for (int c = 0; c < NCHAN; c++) match[c] = cmp_match(mode, hits[c]);
    found = 1'b0;
    next  = '0;
    for (int c = NCHAN - 1; c >= 0; c--)
      if (match[c] && c >= int'(ptr)) begin
        found = 1'b1;
        next  = CW'(c);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scanning  <= 1'b0;
      ptr       <= '0;
      hit_valid <= 1'b0;
      hit_chan  <= '0;
      hit_pat   <= '0;
    end else if (scanning) begin
      if (!hit_valid || hit_ready) begin
        hit_valid <= found;
        if (found) begin
          hit_chan <= 7'(next);
          hit_pat  <= hits[next];
          ptr      <= next + 1'b1;
          if (int'(next) == NCHAN - 1) scanning <= 1'b0;
        end else begin
          scanning <= 1'b0;
        end
      end
    end else begin
      if (hit_ready) hit_valid <= 1'b0;
      if (start) begin
        scanning <= 1'b1;
        ptr      <= '0;
      end
    end
  end

  always_comb busy = scanning || hit_valid;

  // An offered hit stays unchanged until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      hit_valid && !hit_ready |=> hit_valid && $stable(hit_chan) && $stable(hit_pat);
  endproperty
  a_hold: assert property (p_hold);

  initial assert (NCHAN <= 128) else $error("channel address is 7 bits wide");

endmodule
