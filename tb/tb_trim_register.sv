// tb_trim_register: individually addressed 4-bit trim codes. Random writes,
// including addresses beyond the last channel, are mirrored in an array and
// all codes are compared after every write; reset must clear them.
module tb_trim_register;
  localparam int unsigned N = 128;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [6:0] addr = '0;
  logic [3:0] wdata = '0;
  logic [N-1:0][3:0] trim, model;
  int checks = 0, failures = 0;

  trim_register #(.NCHAN(N), .TRIM_W(4)) dut (.clk(clk), .rst_n(rst_n), .wr(wr), .addr(addr),
                                             .wdata(wdata), .trim(trim));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr = ($urandom_range(0, 1) == 0);
      addr = 7'($urandom);
      wdata = 4'($urandom);
      @(posedge clk);
      if (wr) model[addr] = wdata;
      #1;
      checks++;
      if (trim != model) begin failures++; if (failures < 5) $display("mismatch after write %0d", i); end
    end
    @(negedge clk); wr = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    checks++;
    if (trim != '0) begin failures++; $display("reset does not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
