// tb_readout_controller: token passing, record output, error reporting and
// forwarding of one chip, with the compression logic attached and the
// readout buffer replaced by a queue.
//
// The serial output is decoded by rec_decoder and compared record by record
// with packets built here from the events and flags: header (chip id), error
// record when a flag is set, one hit record per channel matching the level
// criterion, trailer. As master the chip must start on its own when an event
// is queued, pass the token as a one-cycle pulse after its trailer, forward a
// downstream chip's records arriving on the selected data input, copy its
// output to ledout, wait for the token to come back and then for the drain
// time before starting again. As a slave it must
// ignore the unselected token input, answer an empty buffer with the no-data
// error, and report overflow, buffer-error and configuration-error flags.
module tb_readout_controller;
  import abcd_pkg::*;
  localparam int unsigned N = 128;
  typedef struct { logic [N-1:0][2:0] hits; logic ovf; } ent_t;

  logic clk = 0, rst_n = 0;
  logic [5:0] chip_id = 6'd17;
  logic master = 1, in_sel = 0, configured = 1, buf_error = 0;
  logic tokin0 = 0, tokin1 = 0, din0 = 0, din1 = 0;
  logic tkout0, tkout1, dout0, dout1, ledout, reading;
  logic buf_empty, head_ovf, buf_rd;
  logic [N-1:0][2:0] head_hits, cmp_hits;
  logic cmp_start, cmp_busy, hit_valid, hit_ready;
  logic [6:0] hit_chan;
  logic [2:0] hit_pat;
  logic rec_valid;
  logic [1:0] rec_kind;
  logic [15:0] rec_val;
  ent_t q[$];
  int expq[$];
  int checks = 0, failures = 0, tokens = 0, cyc = 0, tok_cyc = -1, trl_cyc = -1;

  readout_controller #(.NCHAN(N)) dut (
    .clk(clk), .rst_n(rst_n), .chip_id(chip_id), .master(master), .in_sel(in_sel),
    .configured(configured), .buf_empty(buf_empty), .head_hits(head_hits),
    .head_ovf(head_ovf), .buf_error(buf_error), .buf_rd(buf_rd),
    .cmp_start(cmp_start), .cmp_hits(cmp_hits), .cmp_busy(cmp_busy),
    .hit_valid(hit_valid), .hit_chan(hit_chan), .hit_pat(hit_pat), .hit_ready(hit_ready),
    .tokin0(tokin0), .tokin1(tokin1), .din0(din0), .din1(din1),
    .tkout0(tkout0), .tkout1(tkout1), .dout0(dout0), .dout1(dout1),
    .ledout(ledout), .reading(reading));

  data_compression #(.NCHAN(N)) u_cmp (
    .clk(clk), .rst_n(rst_n), .mode(CMP_LEVEL), .start(cmp_start), .hits(cmp_hits),
    .busy(cmp_busy), .hit_valid(hit_valid), .hit_chan(hit_chan), .hit_pat(hit_pat),
    .hit_ready(hit_ready));

  rec_decoder u_dec (.clk(clk), .rst_n(rst_n), .line(dout0), .rec_valid(rec_valid),
                     .rec_kind(rec_kind), .rec_val(rec_val));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer model
  always_comb begin
    buf_empty = (q.size() == 0);
    head_hits = buf_empty ? '0 : q[0].hits;
    head_ovf  = buf_empty ? 1'b0 : q[0].ovf;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (buf_rd && q.size() > 0) void'(q.pop_front());
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  // output monitor
  always @(posedge clk) if (cyc > 2) begin
    if (rec_valid) begin
      check(expq.size() > 0 && expq[0] == int'({rec_kind, rec_val}),
            $sformatf("record kind %0d val %0h unexpected", rec_kind, rec_val));
      if (expq.size() > 0) void'(expq.pop_front());
      if (rec_kind == 2'd3) trl_cyc = cyc;
    end
    if (tkout0 && rst_n) begin
      tokens++;
      tok_cyc = cyc;
    end
    check(tkout0 == tkout1 && dout0 == dout1, "duplicated outputs differ");
    check(ledout == (master && dout0), "led output");
  end

  function automatic void expect_packet(logic [5:0] id, logic [3:0] flags, bit has, ent_t e);
    expq.push_back({2'd1, 16'(id)});
    if (flags != 0) expq.push_back({2'd2, 16'(flags)});
    if (has)
      for (int c = 0; c < N; c++)
        if (e.hits[c][1]) expq.push_back({2'd0, 6'd0, 7'(c), e.hits[c]});
    expq.push_back({2'd3, 16'd0});
  endfunction

  function automatic ent_t rand_event(int occ);
    ent_t e;
    for (int c = 0; c < N; c++)
      for (int b = 0; b < 3; b++) e.hits[c][b] = ($urandom_range(0, 99) < occ);
    e.ovf = 0;
    return e;
  endfunction

  // Drive a downstream chip's packet onto a data input, one bit per cycle.
  task automatic send_downstream(bit which, logic [5:0] id);
    logic [8:0] hdr;
    logic [3:0] trl;
    hdr = {3'b101, id};
    trl = 4'b1000;
    expq.push_back({2'd1, 16'(id)});
    expq.push_back({2'd3, 16'd0});
    for (int i = 8; i >= 0; i--) begin
      @(negedge clk);
      if (which) din1 = hdr[i]; else din0 = hdr[i];
    end
    for (int i = 3; i >= 0; i--) begin
      @(negedge clk);
      if (which) din1 = trl[i]; else din0 = trl[i];
    end
    @(negedge clk); din0 = 0; din1 = 0;
  endtask

  task automatic wait_token(int limit);
    int t0;
    int n_before;
    n_before = tokens;
    t0 = cyc;
    while (tokens == n_before && cyc - t0 < limit) @(posedge clk);
    check(tokens == n_before + 1, "token not passed");
    // the token follows the last trailer bit
    @(negedge clk);
    check(tok_cyc - trl_cyc <= 2 && tok_cyc >= trl_cyc, "token not right after the trailer");
  endtask

  task automatic pulse_token(bit which);
    @(negedge clk);
    if (which) tokin1 = 1; else tokin0 = 1;
    @(negedge clk);
    tokin0 = 0; tokin1 = 0;
  endtask

  initial begin
    ent_t e;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // master: three events, token loop back on input 0
    master = 1; in_sel = 0;
    for (int k = 0; k < 3; k++) begin
      e = rand_event(k == 0 ? 2 : 10);
      if (k == 2) e.ovf = 1;
      @(negedge clk);
      q.push_back(e);
      expect_packet(chip_id, {1'b0, e.ovf, 1'b0, 1'b0}, 1, e);
      wait_token(2000);
      // while waiting for the token, forward a downstream packet
      send_downstream(1'b0, 6'd18);
      check(q.size() == 0, "event not removed from the buffer");
      // a further event must wait for the token to return
      if (k == 1) begin
        @(negedge clk);
        q.push_back(rand_event(5));
        repeat (20) @(posedge clk);
        check(expq.size() == 0 && !reading, "master started without the token back");
        pulse_token(1'b0);
        // data of the last chips may still be on its way: wait the drain time
        repeat (12) begin
          @(posedge clk);
          check(!reading, "master started inside the drain time");
        end
        expect_packet(chip_id, 4'b0000, 1, q[0]);
        wait_token(2000);
      end
      pulse_token(1'b0);
    end

    // slave on redundant inputs
    @(negedge clk);
    master = 0; in_sel = 1;
    // token on the unselected input is ignored
    pulse_token(1'b0);
    repeat (15) @(posedge clk);
    check(!reading && expq.size() == 0, "slave took token from the unselected input");
    // empty buffer: no-data error
    expect_packet(chip_id, 4'b1000, 0, e);
    pulse_token(1'b1);
    wait_token(200);
    // forwarding from data input 1
    send_downstream(1'b1, 6'd20);
    // buffer error and configuration error with data
    e = rand_event(8);
    @(negedge clk);
    q.push_back(e);
    buf_error = 1; configured = 0;
    expect_packet(chip_id, 4'b0011, 1, e);
    pulse_token(1'b1);
    wait_token(2000);
    buf_error = 0; configured = 1;
    repeat (30) @(posedge clk);
    check(expq.size() == 0, "records missing");
    check(tokens == 6, "wrong number of tokens");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
