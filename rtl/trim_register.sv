// trim_register: per-channel threshold-trim codes.
//
// Each channel's discriminator has a 4-bit trim DAC that corrects its offset.
// The codes are held here, one TRIM_W-bit register per channel, and written one
// channel at a time: wr high at a clock edge stores wdata for channel addr.
// trim presents all codes continuously to the DACs. Reset clears every code.
// Writes to an address at or above NCHAN are ignored.
//
// The 4-bit resolution and the individual addressing follow the document; the
// write port and the reset value are this design's choices.
module trim_register #(
  parameter int unsigned NCHAN  = 128,
  parameter int unsigned TRIM_W = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,
  input  logic [6:0]                 addr,
  input  logic [TRIM_W-1:0]          wdata,
  output logic [NCHAN-1:0][TRIM_W-1:0] trim
);

  always_ff @(posedge clk) begin
    if (!rst_n) trim <= '0;
    else if (wr && int'(addr) < NCHAN) trim[addr] <= wdata;
  end

endmodule
