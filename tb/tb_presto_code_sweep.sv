// tb_presto_code_sweep: statistical sweep of the generator's programming
// space at the default size (N = 32, S = 64), in PRPG mode.
//
// Part 1 - switching codes 1..15 with Toggle = 0000 (no hold phases): for
//   each code, over 150 patterns, the measured fraction of 1s in the control
//   register must be within 0.05 of p(k), and the measured fraction of active
//   scan chains (chains with at least one enabled phase-shifter tap) within
//   0.045 of 1-(1-p(k))^3, the value for three independent taps.
// Part 2 - a set of hold/toggle code pairs with switching code 1111: the
//   fraction of shift cycles spent in toggle phases must be within 0.035 of
//   (1/p(t)) / (1/p(t) + 1/p(h)), the duty cycle implied by geometric phases.
// The control register and latch enables are observed hierarchically.
module tb_presto_code_sweep;
  import presto_pkg::*;
  localparam int N = 32, S = 64, C = 2, SHIFT_LEN = 64;

  logic clk = 1'b0, rst_n;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic decomp = 1'b0, shift_en, pattern_start, det_ctrl = 1'b0, ctrl_si = 1'b0;
  logic seed_load = 1'b0, cfg_shift, cfg_si, cfg_update, cfg_so, toggle_mode, lp_off;
  logic [C-1:0] channels = '0;
  logic [N-1:0] seed = '0;
  logic [S-1:0] chains;

  presto_top dut (.*);

  function automatic real p_of(int k);
    real q = 1.0;
    for (int i = 0; i < 4; i++) if (k[i]) q = q * (1.0 - 1.0 / real'(2 ** (i + 1)));
    return 1.0 - q;
  endfunction

  // chains whose three taps include at least one enabled latch: found by
  // driving the phase shifter's structure through the top's latch enables
  function automatic int active_chains(logic [N-1:0] en);
    int n = 0;
    for (int j = 0; j < S; j++) begin
      int t, a;
      t = j % N; a = 1 + (j / N) % (N / 2 - 1);
      if (en[t] | en[(t + a) % N] | en[(t + 2 * a + 1) % N]) n++;
    end
    return n;
  endfunction

  task automatic load_cfg(lp_cfg_t v);
    logic [CFG_W-1:0] bits;
    bits = v;
    for (int b = CFG_W - 1; b >= 0; b--) begin
      cfg_shift = 1; cfg_si = bits[b]; @(negedge clk);
    end
    cfg_shift = 0; cfg_update = 1; @(negedge clk); cfg_update = 0;
  endtask

  int toggle_cycles, total_cycles;
  task automatic pattern();
    pattern_start = 1; @(negedge clk); pattern_start = 0;
    for (int c = 0; c < SHIFT_LEN; c++) begin
      shift_en = 1;
      total_cycles++;
      if (toggle_mode) toggle_cycles++;
      @(negedge clk);
    end
    shift_en = 0;
  endtask

  initial begin
    lp_cfg_t cf;
    int ones, act, pats;
    real frac, afrac, aexp, duty, dexp;
    int hk [6];
    int tk [6];
    hk = '{1, 2, 4, 8, 12, 15};
    tk = '{1, 8, 2, 15, 4, 3};
    rst_n = 0; shift_en = 0; pattern_start = 0; cfg_shift = 0; cfg_si = 0; cfg_update = 0;
    @(negedge clk); rst_n = 1;

    // Part 1
    for (int k = 1; k < 16; k++) begin
      cf = '0; cf.switching = 4'(k); cf.toggle = 4'd0; cf.hold = 4'd1;
      load_cfg(cf);
      pattern();                           // flush the previous weight
      ones = 0; act = 0; pats = 150;
      for (int p = 0; p < pats; p++) begin
        pattern();
        ones += $countones(dut.u_ctrl.ctrl);
        act  += active_chains(dut.latch_en);
      end
      frac  = real'(ones) / real'(pats * N);
      afrac = real'(act) / real'(pats * S);
      aexp  = 1.0 - (1.0 - p_of(k)) ** 3;
      checks++;
      if (frac < p_of(k) - 0.05 || frac > p_of(k) + 0.05) begin
        failures++; $display("code %0d: control 1s %f expected %f", k, frac, p_of(k));
      end
      checks++;
      if (afrac < aexp - 0.045 || afrac > aexp + 0.045) begin
        failures++; $display("code %0d: active chains %f expected %f", k, afrac, aexp);
      end
      $display("switching %2d: p=%f control 1s=%f active chains=%5.2f of %0d (model %5.2f)",
               k, p_of(k), frac, afrac * S, S, aexp * S);
    end

    // Part 2
    for (int i = 0; i < 6; i++) begin
      cf = '0; cf.switching = 4'd15; cf.hold = 4'(hk[i]); cf.toggle = 4'(tk[i]);
      load_cfg(cf);
      toggle_cycles = 0; total_cycles = 0;
      for (int p = 0; p < 150; p++) pattern();
      duty = real'(toggle_cycles) / real'(total_cycles);
      dexp = (1.0 / p_of(tk[i])) / (1.0 / p_of(tk[i]) + 1.0 / p_of(hk[i]));
      checks++;
      if (duty < dexp - 0.035 || duty > dexp + 0.035) begin
        failures++; $display("hold %0d toggle %0d: duty %f expected %f", hk[i], tk[i], duty, dexp);
      end
      $display("hold %2d toggle %2d: toggle duty cycle %f (model %f)", hk[i], tk[i], duty, dexp);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
