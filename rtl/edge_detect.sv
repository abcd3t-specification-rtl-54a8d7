// edge_detect: one-cycle hit pulses for the pipeline input.
//
// A discriminator may stay on for several clock cycles after a hit. With the
// detector enabled, each channel's output is '1' only in the first cycle of a
// run of '1's on its input (the onset of the hit), so exactly one '1' enters
// the pipeline per hit however long the discriminator responds. With it
// disabled the input passes unchanged (level sensing).
//
// Interface: d is the sampled discriminator state of this cycle, q the value to
// write into the pipeline in the same cycle (combinational from d and the
// previous sample, which is held in a register). en comes from the
// configuration register.
//
// The document speaks of detecting the "high to low" transition but also of one
// '1' per hit independent of the discriminator's response time; this design
// marks the start of the hit (the input's change from no-hit to hit), which is
// what keeps the recorded time fixed relative to the hit. The on/off bit
// follows the document; the reset value of the history register (no hit) is
// this design's choice.
module edge_detect #(
  parameter int unsigned NCHAN = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [NCHAN-1:0] d,
  output logic [NCHAN-1:0] q
);

  logic [NCHAN-1:0] prev;

  always_ff @(posedge clk) begin
    if (!rst_n) prev <= '0;
    else        prev <= d;
  end

  always_comb q = en ? (d & ~prev) : d;

endmodule
