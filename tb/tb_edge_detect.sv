// tb_edge_detect: random hit streams through the edge detector in both modes.
// Reference: with the detector on, q = d & ~(d of the previous cycle); off,
// q = d. The previous value is tracked by the testbench.
module tb_edge_detect;
  localparam int unsigned N = 128;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] d = '0, q, prev_m;
  int checks = 0, failures = 0;

  edge_detect #(.NCHAN(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      en = (cyc >= 200);
      for (int c = 0; c < N; c++) d[c] = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (q !== (en ? (d & ~prev_m) : d)) begin
        failures++;
        if (failures < 5) $display("cycle %0d en=%0d mismatch", cyc, en);
      end
      @(posedge clk);
      prev_m = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
