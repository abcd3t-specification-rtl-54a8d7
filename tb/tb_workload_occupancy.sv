// tb_workload_occupancy: buffer loss at low occupancy on a six-chip link.
//
// Six chips (one master, five slaves) share one data link. Every strip is hit
// in a crossing with probability OCC_PPM (default 1%), each hit lasting one
// crossing. L1 triggers arrive at random with probability 1/TRIG_GAP per cycle
// (default 1/400: 100 kHz at a 40 MHz crossing clock). The testbench decodes
// the master's output, counts events read and overflow flags per chip, and
// requires that:
//   - every trigger is accounted for (events read + overflow losses = triggers),
//   - no chip reports a no-data, buffer or configuration error,
//   - the fraction of events lost to full buffers is below 1%.
// The run ends once NTRIG triggers have been sent and the chain is idle.
module tb_workload_occupancy;
  import abcd_pkg::*;
  localparam int unsigned N = 128, NC = 6, NTRIG = 2500, TRIG_GAP = 400, OCC_PPM = 10000;

  logic clk = 0, resetB = 0, l1 = 0, cfg_wr = 0;
  logic [NC-1:0] cfg_sel = '0;
  cfg_t cfg_wdata = '0;
  logic [N-1:0] disc [NC];
  logic [NC-1:0] tk0, do0, reading;
  int checks = 0, failures = 0, cyc = 0;

  for (genvar k = 0; k < NC; k++) begin : g_chip
    logic [NC-1:0] unused;
    abcd3t_top dut (
      .clk0(clk), .clk1(clk), .select(1'b0), .com0(1'b0), .com1(1'b0), .com(),
      .resetB(resetB), .masterB(k != 0), .id(6'(k + 32)),
      .l1(l1), .cal_cmd(1'b0), .soft_reset(1'b0),
      .cfg_wr(cfg_wr && cfg_sel[k]), .cfg_wdata(cfg_wdata),
      .trim_wr(1'b0), .trim_addr(7'd0), .trim_wdata(4'd0),
      .disc(disc[k]), .thr_dac(), .cal_dac(), .strobe_delay(), .trim_range(), .trim(),
      .cal_line(), .cal_inject(),
      .tokin0(k == 0 ? tk0[NC-1] : tk0[k-1]), .tokin1(1'b0),
      .din0(k == NC - 1 ? 1'b0 : do0[(k + 1) % NC]), .din1(1'b0),
      .tkout0(tk0[k]), .tkout1(), .dout0(do0[k]), .dout1(), .ledout(),
      .reading(reading[k]), .buf_full(), .buf_overwrite(), .buf_error());
  end

  logic rec_valid;
  logic [1:0] rec_kind;
  logic [15:0] rec_val;
  rec_decoder u_dec (.clk(clk), .rst_n(resetB), .line(do0[0]), .rec_valid(rec_valid),
                     .rec_kind(rec_kind), .rec_val(rec_val));

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%t: %s", $time, what); end
  endtask

  // front end: 1% of strips hit per crossing
  always @(negedge clk)
    for (int k = 0; k < NC; k++)
      for (int c = 0; c < N; c++) disc[k][c] = ($urandom_range(0, 999_999) < OCC_PPM);

  int triggers = 0, read_ev [NC], lost [NC], errs = 0, hits = 0, cur = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 2 && rec_valid) begin
      case (rec_kind)
        2'd1: begin cur = int'(rec_val) - 32; check(cur >= 0 && cur < NC, "chip id"); end
        2'd2: begin
          if (rec_val[2]) lost[cur]++;
          if (rec_val[3] || rec_val[1] || rec_val[0]) errs++;
        end
        2'd0: hits++;
        default: if (cur >= 0 && cur < NC) read_ev[cur]++;
      endcase
    end
  end

  initial begin
    int lost_all, q;
    repeat (3) @(negedge clk);
    resetB = 1;
    for (int k = 0; k < NC; k++) begin
      cfg_wdata = '0;
      cfg_wdata.mode = CMP_LEVEL;
      cfg_wdata.master = (k == 0);
      cfg_wdata.latency = 8'd128;
      cfg_sel = NC'(1) << k;
      cfg_wr = 1;
      @(negedge clk);
      cfg_wr = 0;
    end
    repeat (300) @(negedge clk);
    while (triggers < NTRIG) begin
      l1 = ($urandom_range(0, TRIG_GAP - 1) == 0);
      if (l1) triggers++;
      @(negedge clk);
    end
    l1 = 0;
    q = 0;
    while (q < 500) begin
      @(posedge clk);
      if (reading == 0 && !do0[0]) q++; else q = 0;
    end
    lost_all = 0;
    for (int k = 0; k < NC; k++) begin
      check(read_ev[k] + lost[k] == triggers,
            $sformatf("chip %0d: %0d read + %0d lost != %0d triggers", k, read_ev[k], lost[k], triggers));
      lost_all += lost[k];
    end
    check(errs == 0, "error flags reported");
    $display("cycles %0d, triggers %0d, hit records %0d (%.2f per chip-event), events lost %0d of %0d (%.3f%%)",
             cyc, triggers, hits, real'(hits) / (NC * triggers), lost_all, NC * triggers,
             100.0 * lost_all / (NC * triggers));
    check(lost_all * 100 < NC * triggers, "buffer loss not below 1%");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
