// calibration_control: internal calibration strobe for one group of channels.
//
// The calibration capacitors of every fourth channel share one of four
// calibration lines: line g serves channels g, g+4, g+8, ... . A calibration
// command (cal_cmd high at a clock edge) makes the line chosen by the 2-bit
// calibration address (CALD1, CALD0) strobe the chopper for PULSE cycles,
// starting on the next cycle; cal_inject shows, per channel, whether its
// capacitor is being pulsed. A command that arrives during a strobe restarts it
// with the new address.
//
// The four groups, the binary group address and the command trigger follow the
// document. The fine, clock-phase delay of the strobe (at least two clock
// periods of range) is an analogue delay line outside this block; its code is
// passed through the configuration. The strobe length is this design's choice.
module calibration_control #(
  parameter int unsigned NCHAN = 128,
  parameter int unsigned PULSE = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cal_cmd,
  input  logic [1:0]       cal_addr,
  output logic [3:0]       cal_line,
  output logic [NCHAN-1:0] cal_inject
);

  localparam int unsigned PW = $clog2(PULSE + 1);

  logic [PW-1:0] left;
  logic [1:0]    grp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left <= '0;
      grp  <= '0;
    end else if (cal_cmd) begin
      left <= PW'(PULSE);
      grp  <= cal_addr;
    end else if (left != 0) begin
      left <= left - 1'b1;
    end
  end

  always_comb begin
    cal_line = '0;
    if (left != 0) cal_line[grp] = 1'b1;
    for (int c = 0; c < NCHAN; c++) cal_inject[c] = cal_line[c % 4];
  end

endmodule
