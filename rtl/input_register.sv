// input_register: samples the discriminator outputs once per clock cycle.
//
// At each rising clock edge the 128 comparator outputs are captured in a
// register; the captured vector is passed through the edge detector, which
// either forwards it (level sensing) or reduces every hit to a single
// one-cycle '1' (edge sensing), as selected by the configuration bit edge_en.
// hits is the value written into the pipeline in that cycle.
//
// Timing: a comparator output that is high at clock edge n appears on hits in
// cycle n (after that edge) in both modes. Sampling at the start of each cycle
// and the two sensing modes follow the document; the reset value (no hits) is
// this design's choice.
module input_register #(
  parameter int unsigned NCHAN = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             edge_en,
  input  logic [NCHAN-1:0] disc,
  output logic [NCHAN-1:0] hits
);

  logic [NCHAN-1:0] sampled;

  always_ff @(posedge clk) begin
    if (!rst_n) sampled <= '0;
    else        sampled <= disc;
  end

  edge_detect #(.NCHAN(NCHAN)) u_edge (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (edge_en),
    .d    (sampled),
    .q    (hits)
  );

endmodule
