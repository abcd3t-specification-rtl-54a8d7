// tb_config_register: reset defaults (master bit from the masterB pin), whole
// word writes, and the configured flag that stays set until reset.
module tb_config_register;
  import abcd_pkg::*;
  logic clk = 0, rst_n = 0, masterB = 1, wr = 0, configured;
  cfg_t wdata, cfg, model;
  int checks = 0, failures = 0;

  config_register dut (.clk(clk), .rst_n(rst_n), .masterB(masterB), .wr(wr),
                       .wdata(wdata), .cfg(cfg), .configured(configured));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%t: %s", $time, what); end
  endtask

  task automatic do_reset(logic mB);
    @(negedge clk); masterB = mB; rst_n = 0;
    @(negedge clk); rst_n = 1;
    check(!configured, "configured after reset");
    check(cfg.master == !mB, "master default from masterB");
    check(cfg.mode == CMP_LEVEL && cfg.edge_en == 0 && cfg.in_sel == 0 && cfg.latency == 8'd128
          && cfg.thr_dac == 0 && cfg.cal_dac == 0, "reset defaults");
  endtask

  initial begin
    do_reset(1'b1);
    do_reset(1'b0);
    model = cfg;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr = ($urandom_range(0, 3) == 0);
      wdata = cfg_t'({$urandom, $urandom});
      @(posedge clk);
      if (wr) model = wdata;
      #1;
      check(cfg == model, "register contents");
      check(configured, "configured flag");
      if (i == 0) begin @(negedge clk); wr = 1; wdata = cfg_t'({$urandom, $urandom}); @(posedge clk); model = wdata; #1; end
    end
    do_reset(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
