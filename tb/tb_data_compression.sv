// tb_data_compression: random events scanned in all four modes, with the
// consumer sometimes stalling. Reference: the list of (channel, pattern) of
// every channel whose pattern meets the criterion, computed here from the
// criteria table, in channel order. With a consumer that is always ready the
// scan must keep busy high for one cycle more than the number of matching
// channels: non-matching channels cost no time.
module tb_data_compression;
  import abcd_pkg::*;
  localparam int unsigned N = 128;
  logic clk = 0, rst_n = 0, start = 0, hit_ready = 1;
  cmp_mode_e mode = CMP_HIT;
  logic [N-1:0][2:0] hits = '0;
  logic busy, hit_valid;
  logic [6:0] hit_chan;
  logic [2:0] hit_pat;
  int checks = 0, failures = 0, stalls = 0;
  int got[$];

  data_compression #(.NCHAN(N)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .start(start), .hits(hits), .busy(busy),
    .hit_valid(hit_valid), .hit_chan(hit_chan), .hit_pat(hit_pat), .hit_ready(hit_ready));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_match(int m, logic [2:0] p);
    case (m)
      0: return p != 3'b000;
      1: return p[1] == 1'b1;
      2: return p[2] == 1'b0 && p[1] == 1'b1;
      default: return 1'b1;
    endcase
  endfunction

  always @(posedge clk) if (hit_valid && hit_ready) got.push_back({hit_chan, hit_pat});
  always @(posedge clk) if (hit_valid && !hit_ready) stalls++;

  task automatic run_event(int m, int occ, bit stall);
    int expq[$];
    int cyc;
    mode = cmp_mode_e'(m);
    for (int c = 0; c < N; c++)
      for (int b = 0; b < 3; b++) hits[c][b] = ($urandom_range(0, 99) < occ);
    expq = {};
    for (int c = 0; c < N; c++) if (ref_match(m, hits[c])) expq.push_back({7'(c), hits[c]});
    got = {};
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy) begin
      hit_ready = stall ? ($urandom_range(0, 2) == 0) : 1'b1;
      @(negedge clk);
      cyc++;
    end
    hit_ready = 1;
    checks++;
    if (got != expq) begin
      failures++;
      if (failures < 5) $display("mode %0d: %0d hits sent, %0d expected", m, got.size(), expq.size());
    end
    if (!stall) begin
      checks++;
      if (cyc != expq.size() + 1) begin
        failures++;
        $display("mode %0d: scan took %0d cycles", m, cyc);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      run_event(i % 4, (i < 20) ? 5 : 40, 1'b0);
      run_event(i % 4, 30, 1'b1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("consumer never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
