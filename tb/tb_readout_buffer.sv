// tb_readout_buffer: random writes and reads against a queue model of the
// derandomizer. The model overwrites its oldest entry and marks the new one
// when a write meets a full buffer without a read; head, flags, empty, full and
// the overwrite pulse are compared every cycle. Bursts of writes force
// overflow. Finally the occupancy counter is disturbed from outside to check
// that the bookkeeping error is raised, held, and cleared only by reset.
module tb_readout_buffer;
  localparam int unsigned N = 128, E = 8;
  typedef struct { logic [N-1:0][2:0] hits; logic ovf; } ent_t;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [N-1:0][2:0] wr_hits = '0, head_hits;
  logic head_ovf, empty, full, overwrite, buffer_error;
  ent_t q[$];
  int checks = 0, failures = 0, n_ovw = 0;

  readout_buffer #(.NCHAN(N), .EVENTS(E)) dut (
    .clk(clk), .rst_n(rst_n), .wr(wr), .wr_hits(wr_hits), .rd(rd),
    .head_hits(head_hits), .head_ovf(head_ovf), .empty(empty), .full(full),
    .overwrite(overwrite), .buffer_error(buffer_error));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("%t: %s", $time, what);
    end
  endtask

  task automatic step(int pw, int pr);
    bit m_rd, m_ovw;
    ent_t e;
    @(negedge clk);
    wr = ($urandom_range(0, 99) < pw);
    rd = ($urandom_range(0, 99) < pr);
    for (int c = 0; c < N; c++) wr_hits[c] = 3'($urandom);
    #1;
    m_rd  = rd && q.size() > 0;
    m_ovw = wr && q.size() == E && !m_rd;
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == E), "full");
    check(overwrite == m_ovw, "overwrite pulse");
    if (q.size() > 0) begin
      check(head_hits == q[0].hits, "head data");
      check(head_ovf == q[0].ovf, "head overflow flag");
    end
    check(!buffer_error, "spurious buffer error");
    @(posedge clk);
    if (m_rd) void'(q.pop_front());
    if (m_ovw) begin void'(q.pop_front()); n_ovw++; end
    if (wr) begin e.hits = wr_hits; e.ovf = m_ovw; q.push_back(e); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (600) step(50, 50);
    repeat (300) step(90, 20);     // bursts: overflow
    repeat (300) step(10, 80);     // drain
    repeat (200) step(60, 60);
    $display("overwrites seen: %0d", n_ovw);
    check(n_ovw > 0, "no overflow was exercised");
    // bookkeeping error
    @(negedge clk); wr = 0; rd = 0;
    if (q.size() == 3) force dut.count = 4'd5;
    else               force dut.count = 4'd3;
    @(negedge clk);
    release dut.count;
    repeat (3) @(negedge clk);
    check(buffer_error, "buffer error not flagged");
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!buffer_error && empty, "reset does not clear the buffer error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
