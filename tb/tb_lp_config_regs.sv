// tb_lp_config_regs: loads random configurations through the serial chain,
// checks that the shadow outputs keep the old values while shifting, take the
// new ones on update, that fields land in the documented order, and that
// cfg_so returns the shifted bits.
module tb_lp_config_regs;
  import presto_pkg::*;
  logic clk = 1'b0, rst_n;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic cfg_shift, cfg_si, cfg_update, cfg_so;
  lp_cfg_t cfg, cur, nxt, prev_bits;

  lp_config_regs dut (.clk, .rst_n, .cfg_shift, .cfg_si, .cfg_update, .cfg_so, .cfg);

  initial begin
    rst_n = 0; cfg_shift = 0; cfg_si = 0; cfg_update = 0;
    @(negedge clk); rst_n = 1;
    cur = '0; prev_bits = '0;
    checks++; if (cfg !== '0) begin failures++; $display("reset value"); end
    for (int t = 0; t < 50; t++) begin
      nxt.switching   = 4'($urandom);
      nxt.hold        = 4'($urandom);
      nxt.toggle      = 4'($urandom);
      nxt.init_toggle = 1'($urandom);
      nxt.offset      = 4'($urandom);
      for (int b = CFG_W - 1; b >= 0; b--) begin
        cfg_shift = 1; cfg_si = nxt[b];
        #1;
        checks++;
        if (cfg_so !== prev_bits[b]) begin failures++; $display("cfg_so wrong"); end
        @(negedge clk);
        checks++;
        if (cfg !== cur) begin failures++; $display("shadow changed during shift"); end
      end
      cfg_shift = 0; cfg_update = 1; @(negedge clk); cfg_update = 0;
      cur = nxt; prev_bits = nxt;
      checks++;
      if (cfg.switching !== nxt.switching || cfg.hold !== nxt.hold || cfg.toggle !== nxt.toggle ||
          cfg.init_toggle !== nxt.init_toggle || cfg.offset !== nxt.offset) begin
        failures++; $display("load %0d: got %h expected %h", t, cfg, nxt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
