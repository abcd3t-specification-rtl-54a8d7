// tb_abcd3t_top: a module of three chips (master M, slaves S1 and S2) at the
// default sizes, read out end to end.
//
// Chain wiring: M passes the token to S1 (token 0) and, for the bypass, to S2
// (token 1); S1 passes to S2; S2's token outputs loop back to M. Data flows
// S2 -> S1 -> M (data 0) or S2 -> M (data 1). M's data output is decoded.
//
// A front-end model drives each chip's comparator outputs with random hits of
// 1-3 cycles, or with the calibration strobe of its group. The testbench keeps
// the history of every chip's comparator outputs and, for each L1 trigger,
// computes the expected 3-bit patterns (sample at edge T-latency-3 and its
// two neighbours, edge-processed in edge mode). Every decoded packet is checked
// against that: chip order in the chain, error flags, and the hit records
// selected by the compression mode. During a trigger burst events may be lost
// to overflow; then each read event must be a later triggered one, and the
// number of lost events must equal the number of overflow flags.
//
// Mechanisms that must each occur at least once: level/hit/edge/test
// compression, edge detection, compression stall, token passing and
// forwarding, readout buffer overflow, no-data error, configuration error,
// buffer error, calibration strobe, trim write, bypass of a failed chip, and
// clock/command input selection.
module tb_abcd3t_top;
  import abcd_pkg::*;
  localparam int unsigned N = 128, LAT = 40, HM = 1 << 14;
  localparam logic [5:0] ID [3] = '{6'd5, 6'd6, 6'd7};

  logic clk = 0;
  logic select = 0, com0 = 0, com1 = 0;
  logic [2:0] com, resetB = '0, l1 = '0, cal_cmd = '0, soft_reset = '0, cfg_wr = '0, trim_wr = '0;
  cfg_t cfg_wdata;
  logic [6:0] trim_addr = '0;
  logic [3:0] trim_wdata = '0;
  logic [N-1:0] disc [3];
  logic [N-1:0][3:0] trim [3];
  logic [N-1:0] cal_inject [3];
  logic [3:0] cal_line [3];
  logic [7:0] thr_dac [3], cal_dac [3];
  logic [5:0] strobe_delay [3];
  logic [1:0] trim_range [3];
  logic [2:0] tk0, tk1, do0, do1, led, reading, bfull, bovw, berr;

  for (genvar k = 0; k < 3; k++) begin : g_chip
    logic t0, t1, d0, d1;
    abcd3t_top dut (
      .clk0(clk), .clk1(clk), .select(select), .com0(com0), .com1(com1), .com(com[k]),
      .resetB(resetB[k]), .masterB(k != 0), .id(ID[k]),
      .l1(l1[k]), .cal_cmd(cal_cmd[k]), .soft_reset(soft_reset[k]),
      .cfg_wr(cfg_wr[k]), .cfg_wdata(cfg_wdata),
      .trim_wr(trim_wr[k]), .trim_addr(trim_addr), .trim_wdata(trim_wdata),
      .disc(disc[k]), .thr_dac(thr_dac[k]), .cal_dac(cal_dac[k]), .strobe_delay(strobe_delay[k]),
      .trim_range(trim_range[k]), .trim(trim[k]), .cal_line(cal_line[k]), .cal_inject(cal_inject[k]),
      .tokin0(t0), .tokin1(t1), .din0(d0), .din1(d1),
      .tkout0(tk0[k]), .tkout1(tk1[k]), .dout0(do0[k]), .dout1(do1[k]), .ledout(led[k]),
      .reading(reading[k]), .buf_full(bfull[k]), .buf_overwrite(bovw[k]), .buf_error(berr[k]));
  end
  // chain
  assign g_chip[0].t0 = tk0[2];  assign g_chip[0].t1 = tk1[2];
  assign g_chip[0].d0 = do0[1];  assign g_chip[0].d1 = do1[2];
  assign g_chip[1].t0 = tk0[0];  assign g_chip[1].t1 = 1'b0;
  assign g_chip[1].d0 = do0[2];  assign g_chip[1].d1 = 1'b0;
  assign g_chip[2].t0 = tk0[1];  assign g_chip[2].t1 = tk1[0];
  assign g_chip[2].d0 = 1'b0;    assign g_chip[2].d1 = 1'b0;

  logic rec_valid;
  logic [1:0] rec_kind;
  logic [15:0] rec_val;
  rec_decoder u_dec (.clk(clk), .rst_n(resetB[0]), .line(do0[0]), .rec_valid(rec_valid),
                     .rec_kind(rec_kind), .rec_val(rec_val));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- front-end model and history ----------------
  int cyc = 0;
  bit random_hits = 1, edge_mode = 0;
  logic [N-1:0] dh [3][HM];
  bit eh [HM];
  int run [3][N];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int k = 0; k < 3; k++) dh[k][cyc % HM] = disc[k];
    eh[cyc % HM] = edge_mode;
  end

  always @(negedge clk) begin
    for (int k = 0; k < 3; k++)
      for (int c = 0; c < N; c++) begin
        if (random_hits) begin
          if (run[k][c] > 0) run[k][c]--;
          else if ($urandom_range(0, 99) < 2) run[k][c] = $urandom_range(1, 3);
          disc[k][c] = (run[k][c] > 0) || cal_inject[k][c];
        end else begin
          run[k][c] = 0;
          disc[k][c] = cal_inject[k][c];
        end
      end
  end

  function automatic logic [N-1:0] proc(int k, int n);
    return eh[n % HM] ? (dh[k][n % HM] & ~dh[k][(n - 1) % HM]) : dh[k][n % HM];
  endfunction

  // ---------------- expected events ----------------
  typedef logic [N-1:0][2:0] ev_t;
  ev_t evq [3][$];
  int  triggered [3], read_ev [3], lost [3], flagged [3], nodata_exp [3];
  int  lat_k [3] = '{128, 128, 128};   // latency in use: reset value until configured
  bit  allow_skip = 0, configured [3];
  cmp_mode_e cur_mode = CMP_LEVEL;
  int chain [$] = '{0, 1, 2};
  int next_idx = 0;

  // L1 sampled at edge T by chip k: central bit = comparator sample of edge T-LAT-3.
  always @(posedge clk) begin
    for (int k = 0; k < 3; k++)
      if (l1[k] && resetB[k]) begin
        ev_t e;
        for (int c = 0; c < N; c++)
          e[c] = {proc(k, cyc - lat_k[k] - 4)[c], proc(k, cyc - lat_k[k] - 3)[c], proc(k, cyc - lat_k[k] - 2)[c]};
        evq[k].push_back(e);
        triggered[k]++;
      end
  end

  function automatic void sel_hits(ev_t e, ref int q[$]);
    q = {};
    for (int c = 0; c < N; c++) if (cmp_match(cur_mode, e[c])) q.push_back(int'({7'(c), e[c]}));
  endfunction

  // mechanism counters
  int m_mode [4], m_edge, m_stall, m_token, m_fwd, m_ovf, m_nodata, m_cfgerr, m_buferr,
      m_cal, m_trim, m_bypass, m_select, m_lost;

  // ---------------- packet assembly and check ----------------
  int p_id, p_flags;
  int p_hits [$];
  bit in_pkt = 0;

  task automatic finish_packet();
    int k, exp_hits[$];
    k = -1;
    for (int i = 0; i < 3; i++) if (ID[i] == p_id) k = i;
    check(k >= 0, "unknown chip id");
    if (k < 0) return;
    check(k == chain[next_idx], $sformatf("chip %0d out of chain order", k));
    next_idx = (next_idx + 1) % chain.size();
    if (k != 0) m_fwd++;
    if (chain.size() == 2 && k == 2) m_bypass++;
    check(p_flags[0] == !configured[k], "configuration error flag");
    if (p_flags[0]) m_cfgerr++;
    if (p_flags[3]) begin
      m_nodata++;
      check(p_hits.size() == 0, "hits sent with no-data error");
      check(nodata_exp[k] > 0 || allow_skip, "unexpected no-data error");
      if (nodata_exp[k] > 0) nodata_exp[k]--;
      return;
    end
    check(evq[k].size() > 0, $sformatf("chip %0d sent an event that was never triggered", k));
    if (evq[k].size() == 0) return;
    if (p_flags[1]) begin
      m_buferr++;
      void'(evq[k].pop_front());
      read_ev[k]++;
      return;
    end
    if (p_flags[2]) begin m_ovf++; flagged[k]++; end
    if (allow_skip) begin
      int skipped;
      skipped = 0;
      forever begin
        sel_hits(evq[k][0], exp_hits);
        if (exp_hits == p_hits || evq[k].size() == 1) break;
        void'(evq[k].pop_front());
        skipped++;
      end
      lost[k] += skipped;
    end else begin
      sel_hits(evq[k][0], exp_hits);
    end
    check(exp_hits == p_hits, $sformatf("chip %0d: %0d hit records, %0d expected", k, p_hits.size(), exp_hits.size()));
    void'(evq[k].pop_front());
    read_ev[k]++;
    m_mode[cur_mode]++;
    if (edge_mode) m_edge++;
  endtask

  always @(posedge clk) if (cyc > 2) begin
    if (rec_valid) begin
      case (rec_kind)
        2'd1: begin check(!in_pkt, "header inside packet"); in_pkt = 1; p_id = rec_val; p_flags = 0; p_hits = {}; end
        2'd2: begin check(in_pkt, "error record outside packet"); p_flags = rec_val; end
        2'd0: begin check(in_pkt, "hit outside packet"); p_hits.push_back(rec_val); end
        default: begin check(in_pkt, "trailer outside packet"); in_pkt = 0; finish_packet(); end
      endcase
    end
    check(led[0] == do0[0] && led[1] == 1'b0 && led[2] == 1'b0, "LED output");
    if (g_chip[0].dut.u_cmp.hit_valid && !g_chip[0].dut.u_cmp.hit_ready) m_stall++;
    m_token += $countones(tk0);
  end

  // ---------------- stimulus helpers ----------------
  function automatic cfg_t mk_cfg(bit master, bit in_sel, cmp_mode_e mode, bit edge_en, logic [1:0] cal_addr);
    cfg_t c;
    c = '0;
    c.mode = mode; c.edge_en = edge_en; c.trim_range = 2'b01; c.cal_addr = cal_addr;
    c.master = master; c.in_sel = in_sel; c.latency = 8'(LAT);
    c.thr_dac = 8'd40; c.cal_dac = 8'd64; c.strobe_delay = 6'd3;
    return c;
  endfunction

  task automatic configure(int k, cfg_t c);
    @(negedge clk);
    cfg_wdata = c; cfg_wr[k] = 1;
    @(negedge clk);
    cfg_wr[k] = 0;
    configured[k] = 1;
    lat_k[k] = int'(c.latency);
  endtask

  task automatic set_all(cmp_mode_e mode, bit edge_en, bit bypass, logic [1:0] cal_addr, bit [2:0] which);
    cur_mode = mode;
    edge_mode = edge_en;
    for (int k = 0; k < 3; k++)
      if (which[k]) configure(k, mk_cfg(k == 0, bypass && k != 1, mode, edge_en, cal_addr));
    repeat (LAT + 10) @(negedge clk);   // pipeline refilled under the new settings
  endtask

  task automatic trigger(bit [2:0] which);
    @(negedge clk);
    l1 = which;
    @(negedge clk);
    l1 = '0;
  endtask

  task automatic wait_quiet();
    int q, t0;
    q = 0; t0 = cyc;
    while (q < 400 && cyc - t0 < 60000) begin
      @(posedge clk);
      if (reading == 0 && !do0[0]) q++; else q = 0;
    end
    check(q >= 400, "readout did not finish");
  endtask

  // ---------------- test sequence ----------------
  initial begin
    cfg_wdata = '0;
    for (int k = 0; k < 3; k++) begin disc[k] = '0; configured[k] = 0; end
    repeat (4) @(negedge clk);
    resetB = '1;
    repeat (3) @(negedge clk);
    check(g_chip[0].dut.u_cfg.cfg.master && !g_chip[1].dut.u_cfg.cfg.master, "master pin default");

    // level mode, S2 left unconfigured (configuration error)
    cur_mode = CMP_LEVEL;
    configure(0, mk_cfg(1, 0, CMP_LEVEL, 0, 2'd0));
    configure(1, mk_cfg(0, 0, CMP_LEVEL, 0, 2'd0));
    repeat (200) @(negedge clk);
    check(thr_dac[0] == 8'd40 && cal_dac[1] == 8'd64 && strobe_delay[0] == 6'd3 && trim_range[1] == 2'b01,
          "DAC codes at the outputs");
    for (int i = 0; i < 3; i++) begin
      trigger(3'b111);
      repeat ($urandom_range(0, 200)) @(negedge clk);
    end
    wait_quiet();

    // each compression mode, edge detection in edge mode
    set_all(CMP_HIT, 0, 0, 2'd0, 3'b111);
    for (int i = 0; i < 2; i++) trigger(3'b111);
    wait_quiet();
    set_all(CMP_EDGE, 1, 0, 2'd0, 3'b111);
    for (int i = 0; i < 3; i++) begin trigger(3'b111); repeat (7) @(negedge clk); end
    wait_quiet();
    set_all(CMP_TEST, 0, 0, 2'd0, 3'b111);
    trigger(3'b111);
    wait_quiet();
    set_all(CMP_LEVEL, 0, 0, 2'd2, 3'b111);

    // calibration: group 2, front end driven only by the strobe
    random_hits = 0;
    repeat (LAT + 10) @(negedge clk);
    begin
      int c0;
      @(negedge clk);
      cal_cmd = 3'b111;
      @(posedge clk); c0 = cyc;
      @(negedge clk); cal_cmd = '0;
      // L1 whose central bit is the comparator sample at edge c0+2
      while (cyc < c0 + 2 + LAT + 3) @(negedge clk);
      l1 = 3'b111;
      @(negedge clk); l1 = '0;
    end
    wait_quiet();
    begin
      bit ok;
      ok = 1;
      for (int c = 0; c < N; c++) if (dh[0][(cyc - 1) % HM][c]) ok = 0;   // strobe over
      check(ok, "calibration strobe still on");
    end
    random_hits = 1;

    // trim codes
    for (int i = 0; i < 20; i++) begin
      int k, a, v;
      k = $urandom_range(0, 2); a = $urandom_range(0, N - 1); v = $urandom_range(0, 15);
      @(negedge clk);
      trim_wr[k] = 1; trim_addr = 7'(a); trim_wdata = 4'(v);
      @(negedge clk);
      trim_wr = '0;
      check(trim[k][a] == 4'(v), "trim code at the output");
      m_trim++;
    end

    // no data: only the master sees the trigger
    repeat (LAT + 10) @(negedge clk);
    nodata_exp[1] = 1; nodata_exp[2] = 1;
    trigger(3'b001);
    wait_quiet();

    // trigger burst: overflow
    allow_skip = 1;
    @(negedge clk);
    l1 = 3'b111;
    repeat (12) @(negedge clk);
    l1 = '0;
    wait_quiet();
    allow_skip = 0;
    for (int k = 0; k < 3; k++) begin
      check(evq[k].size() == 0, $sformatf("chip %0d: events left unread", k));
      check(lost[k] == flagged[k], $sformatf("chip %0d: %0d lost, %0d flagged", k, lost[k], flagged[k]));
      evq[k] = {};
    end
    // 12 back-to-back triggers into 8-event buffers: the master has already taken
    // the first event when the rest arrive, the slaves have not
    check(lost[0] == 3 && lost[1] == 4 && lost[2] == 4, "overflow losses differ from the buffer depth");

    // clock and command input selection
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      select = i[0]; com0 = $urandom; com1 = $urandom;
      #1;
      check(com == {3{select ? com1 : com0}}, "command input select");
      m_select++;
    end
    select = 1;
    trigger(3'b111);
    wait_quiet();
    select = 0;

    // bypass: S1 fails, M and S2 use their second token/data inputs
    @(negedge clk);
    resetB[1] = 0;
    configured[1] = 0;
    lat_k[1] = 128;
    chain = '{0, 2};
    next_idx = 0;
    set_all(CMP_LEVEL, 0, 1, 2'd0, 3'b101);
    for (int i = 0; i < 3; i++) begin trigger(3'b111); repeat ($urandom_range(0, 300)) @(negedge clk); end
    wait_quiet();

    // buffer bookkeeping error in M, then a soft reset of M
    @(negedge clk);
    force g_chip[0].dut.u_buf.wp = g_chip[0].dut.u_buf.wp + 3'd1;
    @(negedge clk);
    release g_chip[0].dut.u_buf.wp;
    @(negedge clk);
    check(berr[0], "buffer error not raised");
    trigger(3'b111);
    wait_quiet();
    @(negedge clk); soft_reset[0] = 1;
    @(negedge clk); soft_reset[0] = 0;
    configured[0] = 0; lat_k[0] = 128;
    repeat (2) @(negedge clk);
    check(!berr[0], "soft reset does not clear the buffer error");

    for (int k = 0; k < 3; k++) check(evq[k].size() == 0, $sformatf("chip %0d: events left unread", k));

    $display("modes hit/level/edge/test: %0d %0d %0d %0d", m_mode[0], m_mode[1], m_mode[2], m_mode[3]);
    $display("edge-mode events %0d, stalls %0d, tokens %0d, forwarded %0d, overflow flags %0d",
             m_edge, m_stall, m_token, m_fwd, m_ovf);
    $display("no-data %0d, config errors %0d, buffer errors %0d, calibration %0d, trim %0d, bypass %0d, select %0d",
             m_nodata, m_cfgerr, m_buferr, m_cal, m_trim, m_bypass, m_select);
    check(m_mode[0] > 0 && m_mode[1] > 0 && m_mode[2] > 0 && m_mode[3] > 0, "a compression mode never ran");
    check(m_edge > 0, "edge mode never ran");
    check(m_stall > 0, "compression never stalled");
    check(m_token > 0 && m_fwd > 0, "no token passing or forwarding");
    check(m_ovf > 0, "overflow never happened");
    check(m_nodata > 0, "no-data error never happened");
    check(m_cfgerr > 0, "configuration error never happened");
    check(m_buferr > 0, "buffer error never happened");
    check(m_cal > 0, "calibration never happened");
    check(m_trim > 0 && m_select > 0 && m_bypass > 0, "trim, select or bypass never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // calibration check: strobed channels of the chosen group only
  always @(posedge clk)
    for (int k = 0; k < 3; k++)
      if (cyc > 2 && cal_line[k] != 0) begin
        bit grp_ok;
        grp_ok = 1;
        for (int c = 0; c < N; c++) if (cal_inject[k][c] != (c % 4 == 2)) grp_ok = 0;
        check(grp_ok && cal_line[k] == 4'b0100, "calibration group");
        if (k == 0) m_cal++;
      end
endmodule
