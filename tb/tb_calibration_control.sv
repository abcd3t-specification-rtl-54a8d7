// tb_calibration_control: each calibration address strobes only its own line,
// for PULSE cycles starting the cycle after the command, and only the channels
// c with c mod 4 equal to the address see the strobe.
module tb_calibration_control;
  localparam int unsigned N = 128, P = 4;
  logic clk = 0, rst_n = 0, cal_cmd = 0;
  logic [1:0] cal_addr = '0;
  logic [3:0] cal_line;
  logic [N-1:0] cal_inject, expv;
  int checks = 0, failures = 0;

  calibration_control #(.NCHAN(N), .PULSE(P)) dut (.clk(clk), .rst_n(rst_n), .cal_cmd(cal_cmd),
      .cal_addr(cal_addr), .cal_line(cal_line), .cal_inject(cal_inject));
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 8) $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int a;
      a = $urandom_range(0, 3);
      @(negedge clk);
      check(cal_line == 0 && cal_inject == 0, "strobe while idle");
      cal_addr = 2'(a); cal_cmd = 1;
      @(negedge clk);
      cal_cmd = 0; cal_addr = 2'($urandom);   // address may change after the command
      for (int k = 0; k < P; k++) begin
        for (int c = 0; c < N; c++) expv[c] = (c % 4 == a);
        check(cal_line == (4'b1 << a), $sformatf("line for address %0d", a));
        check(cal_inject == expv, "channel group");
        @(negedge clk);
      end
      check(cal_line == 0, "strobe too long");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
