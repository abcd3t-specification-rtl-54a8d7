// abcd_pkg: types and constants shared by the digital part of the 128-channel
// binary strip readout chip.
//
// It holds the compression criteria of the data-compression logic (the four
// modes and their 3-bit pattern tests follow the document's table), the error
// flags the chip reports, the configuration word, and the field codes of the
// serial readout packet. The packet format and the configuration layout are
// this design's own choices: the document lists the information but not the bit
// layout.
package abcd_pkg;

  localparam int unsigned HIT_BITS  = 3;     // hit pattern bits per channel per trigger
  localparam int unsigned LAT_W     = 8;     // pipeline latency code width
  localparam int unsigned DAC_W     = 8;     // threshold and calibration DAC code width
  localparam int unsigned SDEL_W    = 6;     // calibration strobe delay code width

  // Data compression criteria, mode(1:0). Pattern bit 2 is the oldest sample.
  typedef enum logic [1:0] {
    CMP_HIT   = 2'b00,   // 1XX or X1X or XX1
    CMP_LEVEL = 2'b01,   // X1X
    CMP_EDGE  = 2'b10,   // 01X
    CMP_TEST  = 2'b11    // XXX
  } cmp_mode_e;

  // Error flags sent in the error record of a chip's readout.
  typedef struct packed {
    logic no_data;       // token received with no event in the readout buffer
    logic overflow;      // oldest event(s) overwritten because the buffer was full
    logic buffer_error;  // buffer bookkeeping lost, needs a reset
    logic config_error;  // chip has not been configured since reset
  } err_flags_t;

  // Configuration word.
  typedef struct packed {
    cmp_mode_e               mode;          // compression criterion
    logic                    edge_en;       // edge detection on the pipeline input
    logic [1:0]              trim_range;    // trim DAC range select
    logic [1:0]              cal_addr;      // CALD1, CALD0: calibration group
    logic                    master;        // chip is the master of its chain
    logic                    in_sel;        // 0: token/data from input 0, 1: from input 1
    logic [LAT_W-1:0]        latency;       // pipeline latency in clock cycles
    logic [DAC_W-1:0]        thr_dac;       // threshold DAC code, 2.5 mV per step
    logic [DAC_W-1:0]        cal_dac;       // calibration DAC code, 0.625 mV per step
    logic [SDEL_W-1:0]       strobe_delay;  // calibration strobe delay code
  } cfg_t;

  // Serial packet records, sent MSB first. Every record begins with a '1';
  // the line is '0' between records, so a receiver skips zeros and decodes
  // each record from its leading bits:
  //   hit record  : 1 1 channel[6:0] pattern[2:0]            (12 bits)
  //   chip header : 1 0 1 id[5:0]                              (9 bits)
  //   error record: 1 0 0 1 no_data overflow buf_err cfg_err   (8 bits)
  //   chip trailer: 1 0 0 0                                    (4 bits)
  localparam int unsigned REC_W       = 12;
  localparam int unsigned HIT_LEN     = 12;
  localparam int unsigned HEADER_LEN  = 9;
  localparam int unsigned ERROR_LEN   = 8;
  localparam int unsigned TRAILER_LEN = 4;
  localparam logic [1:0]  HIT_CODE     = 2'b11;
  localparam logic [2:0]  HEADER_CODE  = 3'b101;
  localparam logic [3:0]  ERROR_CODE   = 4'b1001;
  localparam logic [3:0]  TRAILER_CODE = 4'b1000;

  // Compression test of Table "Data Compression Criteria"; p[2] is the oldest bit.
  function automatic logic cmp_match(cmp_mode_e m, logic [HIT_BITS-1:0] p);
    unique case (m)
      CMP_HIT:   return |p;
      CMP_LEVEL: return p[1];
      CMP_EDGE:  return !p[2] && p[1];
      default:   return 1'b1;
    endcase
  endfunction

endpackage
