// tb_mode_control: test of the toggle/hold phase control.
// Decompressor mode: random configurations and pattern starts, compared cycle
// by cycle with a model of the T flip-flop and counter (phase = register+1
// cycles, a 0000 register skips its phase). PRPG mode: compared cycle by
// cycle with a model of the weighted T input, and the mean toggle and hold
// phase lengths are checked against 1/p(code) within 10 percent.
module tb_mode_control;
  import presto_pkg::*;
  logic clk = 1'b0, rst_n;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic decomp, advance, init, toggle_mode;
  lp_cfg_t cfg;
  logic [9:0] rnd;

  mode_control dut (.clk, .rst_n, .decomp, .advance, .init, .cfg, .rnd, .toggle_mode);

  function automatic real p_of(int k);
    real q = 1.0;
    for (int i = 0; i < 4; i++) if (k[i]) q = q * (1.0 - 1.0 / real'(2 ** (i + 1)));
    return 1.0 - q;
  endfunction

  function automatic logic wl(logic [9:0] r, logic [3:0] c);
    return (c[0] & r[0]) | (c[1] & r[1] & r[2]) | (c[2] & r[3] & r[4] & r[5]) |
           (c[3] & r[6] & r[7] & r[8] & r[9]);
  endfunction

  logic m_tff;
  int   m_cnt;
  int   skips, expiries;

  task automatic check_out(string where);
    checks++;
    if (toggle_mode !== m_tff) begin
      failures++;
      if (failures < 8) $display("%s: toggle_mode %b expected %b", where, toggle_mode, m_tff);
    end
  endtask

  initial begin
    logic [3:0] cur, nxt;
    logic t;
    int run, tk, hk;
    real sum_t, sum_h;
    int n_t, n_h;
    rst_n = 0; decomp = 0; advance = 0; init = 0; cfg = '0; rnd = '0;
    @(negedge clk); rst_n = 1;
    m_tff = 1;
    check_out("reset");
    // ---------------- decompressor mode ----------------
    decomp = 1; skips = 0; expiries = 0;
    for (int p = 0; p < 400; p++) begin
      cfg.hold = 4'($urandom); cfg.toggle = 4'($urandom);
      if (p % 5 == 0) cfg.hold = 4'd0;
      cfg.init_toggle = 1'($urandom); cfg.offset = 4'($urandom);
      init = 1; advance = 0; @(negedge clk); init = 0;
      m_tff = cfg.init_toggle; m_cnt = int'(cfg.offset);
      check_out("init");
      for (int c = 0; c < 80; c++) begin
        advance = ($urandom_range(0, 7) != 0);
        rnd = 10'($urandom);
        @(negedge clk);
        if (advance) begin
          if (m_cnt == 0) begin
            expiries++;
            cur = m_tff ? cfg.toggle : cfg.hold;
            nxt = m_tff ? cfg.hold : cfg.toggle;
            if (nxt == 0) begin skips++; m_cnt = int'(cur); end
            else begin m_tff = !m_tff; m_cnt = int'(nxt); end
          end else m_cnt--;
        end
        check_out("decomp");
      end
    end
    checks++; if (skips == 0 || expiries == 0) begin failures++; $display("no skip/expiry seen"); end
    // ---------------- PRPG mode, exact ----------------
    decomp = 0; advance = 1;
    for (int c = 0; c < 20000; c++) begin
      if (c % 1000 == 0) begin cfg.hold = 4'($urandom); cfg.toggle = 4'($urandom); end
      rnd = 10'($urandom);
      init = ($urandom_range(0, 63) == 0);
      #1;
      cur = m_tff ? cfg.toggle : cfg.hold;
      t = wl(rnd, cur) | (!m_tff & (cur == 0));
      @(negedge clk);
      if (t) m_tff = !m_tff;
      check_out("prpg");
    end
    init = 0;
    // ---------------- PRPG mode, mean phase lengths ----------------
    for (int trial = 0; trial < 4; trial++) begin
      tk = (trial == 0) ? 1 : (trial == 1) ? 14 : (trial == 2) ? 4 : 15;
      hk = (trial == 0) ? 2 : (trial == 1) ? 15 : (trial == 2) ? 8 : 6;
      cfg.toggle = 4'(tk); cfg.hold = 4'(hk);
      sum_t = 0; sum_h = 0; n_t = 0; n_h = 0; run = 0;
      for (int c = 0; c < 60000; c++) begin
        logic prev_mode;
        prev_mode = toggle_mode;
        rnd = 10'($urandom);
        @(negedge clk);
        run++;
        if (toggle_mode != prev_mode) begin
          if (c > 100) begin
            if (prev_mode) begin sum_t += run; n_t++; end
            else begin sum_h += run; n_h++; end
          end
          run = 0;
        end
      end
      checks++;
      if (n_t == 0 || (sum_t / n_t) < 0.9 / p_of(tk) || (sum_t / n_t) > 1.1 / p_of(tk)) begin
        failures++; $display("toggle code %0d mean %f expected %f", tk, sum_t / n_t, 1.0 / p_of(tk));
      end
      checks++;
      if (n_h == 0 || (sum_h / n_h) < 0.9 / p_of(hk) || (sum_h / n_h) > 1.1 / p_of(hk)) begin
        failures++; $display("hold code %0d mean %f expected %f", hk, sum_h / n_h, 1.0 / p_of(hk));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
