// config_register: configuration and DAC-code storage of the chip.
//
// Holds the configuration word cfg (see abcd_pkg::cfg_t): compression
// criterion, edge-detection enable, trim-DAC range, calibration address,
// master/slave role, choice of redundant token/data inputs, pipeline latency,
// and the codes of the threshold DAC (2.5 mV per step, 256 steps for the
// 0-640 mV range), the calibration DAC (0.625 mV per step, 256 steps for the
// 0-160 mV range) and the calibration strobe delay.
//
// A write (wr high at a clock edge) loads the whole word from wdata and sets
// configured, which stays set until reset; until then the readout reports a
// configuration error. At reset the master bit takes its value from the
// masterB pin (low = master) and every other field its default.
//
// The fields and the DAC ranges follow the document; the DAC code widths
// follow from its ranges and steps. The word layout, whole-word writes, the
// strobe-delay code width and the reset defaults are this design's choices.
module config_register
  import abcd_pkg::*;
#(
  parameter logic [LAT_W-1:0] LATENCY_RST = LAT_W'(128)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic masterB,
  input  logic wr,
  input  cfg_t wdata,
  output cfg_t cfg,
  output logic configured
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg <= '{mode: CMP_LEVEL, edge_en: 1'b0, trim_range: 2'b00, cal_addr: 2'b00,
               master: !masterB, in_sel: 1'b0, latency: LATENCY_RST,
               thr_dac: '0, cal_dac: '0, strobe_delay: '0};
      configured <= 1'b0;
    end else if (wr) begin
      cfg        <= wdata;
      configured <= 1'b1;
    end
  end

endmodule
