// rec_decoder: testbench receiver for the serial readout records.
//
// Samples line at every rising clock edge. Zeros between records are skipped;
// a '1' starts a record, whose kind follows from its leading bits:
//   11 + channel[6:0] + pattern[2:0]  -> kind 0 (hit),     val = {channel, pattern}
//   101 + id[5:0]                     -> kind 1 (header),  val = id
//   1001 + flags[3:0]                 -> kind 2 (error),   val = flags
//   1000                              -> kind 3 (trailer), val = 0
// A decoded record is presented on rec_kind/rec_val with rec_valid high for
// one cycle after its last bit.
module rec_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        line,
  output logic        rec_valid,
  output logic [1:0]  rec_kind,
  output logic [15:0] rec_val
);
  logic [15:0] acc;
  int          n, need;
  logic [1:0]  kind;
  bit          known;

  always @(posedge clk) begin
    rec_valid <= 1'b0;
    if (!rst_n) begin
      n = 0; known = 0;
    end else if (n == 0) begin
      if (line) begin acc = 16'd1; n = 1; known = 0; end
    end else begin
      acc = {acc[14:0], line};
      n++;
      if (!known) begin
        if (n == 2 && line)  begin kind = 2'd0; need = 12; known = 1; end
        if (n == 3 && line)  begin kind = 2'd1; need = 9;  known = 1; end
        if (n == 4)          begin kind = line ? 2'd2 : 2'd3; need = line ? 8 : 4; known = 1; end
      end
      if (known && n == need) begin
        rec_valid <= 1'b1;
        rec_kind  <= kind;
        case (kind)
          2'd0: rec_val <= {6'd0, acc[9:0]};
          2'd1: rec_val <= {10'd0, acc[5:0]};
          2'd2: rec_val <= {12'd0, acc[3:0]};
          default: rec_val <= '0;
        endcase
        n = 0;
      end
    end
  end
endmodule
