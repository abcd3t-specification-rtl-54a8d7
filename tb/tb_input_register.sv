// tb_input_register: comparator outputs sampled once per clock, level and edge
// sensing. A long hit (several cycles high) must give a single '1' in edge mode
// and a '1' in every cycle in level mode, one cycle after the sampling edge.
module tb_input_register;
  localparam int unsigned N = 128;
  logic clk = 0, rst_n = 0, edge_en = 0;
  logic [N-1:0] disc = '0, hits;
  logic [N-1:0] hist [0:1023];
  int checks = 0, failures = 0;

  input_register #(.NCHAN(N)) dut (.clk(clk), .rst_n(rst_n), .edge_en(edge_en), .disc(disc), .hits(hits));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Hit runs of random length per channel.
  function automatic logic [N-1:0] next_disc(logic [N-1:0] cur);
    logic [N-1:0] n;
    for (int c = 0; c < N; c++)
      n[c] = cur[c] ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 7) == 0);
    return n;
  endfunction

  initial begin
    logic [N-1:0] expv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hist[0] = '0;
    for (int cyc = 1; cyc < 600; cyc++) begin
      @(negedge clk);
      edge_en = (cyc >= 300);
      disc = next_disc(disc);
      hist[cyc] = disc;
      @(posedge clk);       // disc sampled here
      #1;
      expv = edge_en ? (hist[cyc] & ~hist[cyc-1]) : hist[cyc];
      checks++;
      if (hits !== expv) begin
        failures++;
        if (failures < 5) $display("cycle %0d edge=%0d mismatch", cyc, edge_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
