// tb_pipeline: random hit vectors enter the pipeline every cycle and random L1
// triggers pick events out of it, at several latencies including the largest
// the memory holds. Reference: for an l1 sampled at edge T the event holds,
// per channel, the inputs written at edges T-L-3, T-L-2 and T-L-1, oldest in
// bit 2; ev_valid must be high exactly in the cycle after each trigger.
module tb_pipeline;
  localparam int unsigned N = 128, D = 132;
  logic clk = 0, rst_n = 0, l1 = 0;
  logic [N-1:0] din = '0;
  logic [7:0] latency = 8'd10;
  logic ev_valid;
  logic [N-1:0][2:0] ev_hits, expv;
  logic [N-1:0] hist [0:8191];
  int checks = 0, failures = 0, triggers = 0;

  pipeline #(.NCHAN(N), .DEPTH(D), .LAT_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .latency(latency), .l1(l1),
    .ev_valid(ev_valid), .ev_hits(ev_hits));

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_phase(int lat, int cycles);
    int t;
    @(negedge clk);
    latency = 8'(lat);
    l1 = 0;
    t = 0;
    for (int k = 0; k < cycles; k++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) din[c] = ($urandom_range(0, 3) == 0);
      // triggers only once the delay line holds valid data for this latency
      l1 = (k > D + 4) && ($urandom_range(0, 3) == 0);
      @(posedge clk);
      t = cycle_no;
      hist[t % 8192] = din;
      #1;
      if (l1) begin
        triggers++;
        for (int c = 0; c < N; c++)
          expv[c] = {hist[(t - lat - 3) % 8192][c], hist[(t - lat - 2) % 8192][c], hist[(t - lat - 1) % 8192][c]};
        checks++;
        if (!ev_valid || ev_hits !== expv) begin
          failures++;
          if (failures < 5) $display("lat %0d edge %0d: wrong event (valid=%0d)", lat, t, ev_valid);
        end
      end else begin
        checks++;
        if (ev_valid) begin
          failures++;
          if (failures < 5) $display("lat %0d edge %0d: event without trigger", lat, t);
        end
      end
    end
  endtask

  int cycle_no = 0;
  always @(posedge clk) cycle_no <= cycle_no + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_phase(10, 600);
    run_phase(1, 400);
    run_phase(D, 700);
    run_phase(77, 600);
    $display("triggers checked: %0d", triggers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
