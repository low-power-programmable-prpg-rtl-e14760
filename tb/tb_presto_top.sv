// tb_presto_top: end-to-end test of the PRESTO generator at its default size
// (N = 32, S = 64, 2 channels).
//
// A cycle-accurate reference model of the whole generator (LFSR, weighted
// logic V and H, shift and control registers, T flip-flop, down counter, hold
// latches, phase shifter, configuration chain) runs beside the design; every
// cycle all 64 scan-chain inputs, the phase flag and the chain output are
// compared. Test patterns of 64 shift cycles are applied in four phases:
//   1. low-power function off (switching code 0000): chains toggle freely;
//   2. PRPG mode with several switching/hold/toggle codes: the fraction of 1s
//      loaded into the control register is checked against p(code), and the
//      scan-input transition rate must fall well below that of phase 1;
//   3. PRPG mode with deterministic control data (det_ctrl);
//   4. decompressor mode with random per-pattern configurations, control data
//      and channel data, including Hold = 0000 (hold phase skipped).
// Each mechanism (LP off, hold phase, toggle phase, control reload, weighted
// and deterministic control, channel injection, counter expiry, phase skip,
// configuration update, seed load) is counted and must occur at least once.
module tb_presto_top;
  import presto_pkg::*;
  localparam int N = 32, S = 64, C = 2, SHIFT_LEN = 64;

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

  logic decomp, shift_en, pattern_start, det_ctrl, ctrl_si, seed_load;
  logic cfg_shift, cfg_si, cfg_update, cfg_so, toggle_mode, lp_off;
  logic [C-1:0] channels;
  logic [N-1:0] seed;
  logic [S-1:0] chains;

  presto_top dut (.*);

  // ---------------- reference model ----------------
  logic [N-1:0]     m_lfsr, m_sreg, m_ctrl, m_held;
  logic [CFG_W-1:0] m_chain;
  lp_cfg_t          m_cfg;
  logic             m_tff;
  int               m_cnt;

  // mechanism counters
  int n_lpoff, n_hold, n_toggle, n_reload, n_weighted, n_det, n_inject;
  int n_expire, n_skip, n_cfgupd, n_seed;

  // PRPG bits read by weighted logic V and H, in AND-gate input order
  localparam int V_POS [10] = '{16, 31, 18, 5, 14, 22, 6, 24, 2, 11};
  localparam int H_POS [10] = '{8, 25, 19, 9, 26, 10, 3, 21, 30, 28};

  function automatic logic wl(logic [9:0] r, logic [3:0] c);
    return (c[0] & r[0]) | (c[1] & r[1] & r[2]) | (c[2] & r[3] & r[4] & r[5]) |
           (c[3] & r[6] & r[7] & r[8] & r[9]);
  endfunction

  function automatic real p_of(int k);
    real q = 1.0;
    for (int i = 0; i < 4; i++) if (k[i]) q = q * (1.0 - 1.0 / real'(2 ** (i + 1)));
    return 1.0 - q;
  endfunction

  // Phase shifter: output j = latch t ^ latch t+a ^ latch t+2a+1 (mod N),
  // t = j mod N, a = 1 + (j div N) mod (N/2-1).
  function automatic logic [S-1:0] ps(logic [N-1:0] v);
    logic [S-1:0] o;
    for (int j = 0; j < S; j++) begin
      int t, a;
      t = j % N; a = 1 + (j / N) % (N / 2 - 1);
      o[j] = v[t] ^ v[(t + a) % N] ^ v[(t + 2 * a + 1) % N];
    end
    return o;
  endfunction

  logic [N-1:0] m_q;
  logic [S-1:0] m_chains, prev_chains;
  logic         m_lpoff;

  // combinational part of the model, evaluated after inputs settle
  task automatic model_outputs();
    logic [N-1:0] en;
    m_lpoff = (m_cfg.switching == 0) && !decomp;
    en = m_lpoff ? '1 : (m_tff ? m_ctrl : '0);
    m_q = (en & m_lfsr) | (~en & m_held);
    m_chains = ps(m_q);
  endtask

  task automatic compare();
    checks++;
    if (chains !== m_chains || toggle_mode !== m_tff || cfg_so !== m_chain[CFG_W-1] ||
        lp_off !== m_lpoff) begin
      failures++;
      if (failures < 6)
        $display("%0t mismatch: chains %h/%h tff %b/%b so %b/%b lpoff %b/%b", $time,
                 chains, m_chains, toggle_mode, m_tff, cfg_so, m_chain[CFG_W-1], lp_off, m_lpoff);
    end
  endtask

  // state update of the model at a clock edge (inputs as sampled)
  task automatic model_step();
    logic [9:0] rv, rh;
    logic [N-1:0] nl;
    logic [3:0] cur, nxt;
    logic t;
    for (int i = 0; i < 10; i++) begin rv[i] = m_lfsr[V_POS[i]]; rh[i] = m_lfsr[H_POS[i]]; end
    // T flip-flop and counter
    cur = m_tff ? m_cfg.toggle : m_cfg.hold;
    nxt = m_tff ? m_cfg.hold : m_cfg.toggle;
    t = 1'b0;
    if (pattern_start && decomp) begin
      m_tff = m_cfg.init_toggle; m_cnt = int'(m_cfg.offset);
    end else if (shift_en) begin
      if (decomp) begin
        if (m_cnt == 0) begin
          n_expire++;
          if (nxt == 0) begin n_skip++; m_cnt = int'(cur); end
          else begin t = 1; m_cnt = int'(nxt); end
        end else m_cnt--;
      end else t = wl(rh, cur) | (!m_tff & (cur == 0));
      if (t) m_tff = !m_tff;
    end
    // hold latches
    m_held = (pattern_start && decomp) ? '0 : m_q;
    // shift and control registers
    if (pattern_start) begin m_ctrl = m_sreg; n_reload++; end
    if (shift_en) begin
      if (decomp || det_ctrl) begin m_sreg = {m_sreg[N-2:0], ctrl_si}; n_det++; end
      else begin m_sreg = {m_sreg[N-2:0], wl(rv, m_cfg.switching)}; n_weighted++; end
    end
    // configuration
    if (cfg_update) begin m_cfg = lp_cfg_t'(m_chain); n_cfgupd++; end
    if (cfg_shift) m_chain = {m_chain[CFG_W-2:0], cfg_si};
    // PRPG
    if (seed_load) begin m_lfsr = seed; n_seed++; end
    else if (shift_en) begin
      nl = {m_lfsr[N-2:0], m_lfsr[31] ^ m_lfsr[21] ^ m_lfsr[1] ^ m_lfsr[0]};
      if (decomp) begin
        nl[0] ^= channels[0]; nl[16] ^= channels[1];
        if (channels != 0) n_inject++;
      end
      m_lfsr = nl;
    end
    if (shift_en) begin
      if (m_lpoff) n_lpoff++;
      else if (m_tff) n_toggle++;
      else n_hold++;
    end
  endtask

  // one clock: inputs already applied; compare, then advance design and model
  int transitions, shift_cycles;
  task automatic cycle();
    #1;
    model_outputs();
    compare();
    if (shift_en) begin
      transitions += $countones(chains ^ prev_chains);
      shift_cycles++;
      prev_chains = chains;
    end
    @(posedge clk);
    model_step();
    @(negedge clk);
  endtask

  task automatic idle_inputs();
    shift_en = 0; pattern_start = 0; cfg_shift = 0; cfg_update = 0; seed_load = 0;
    channels = '0; ctrl_si = 0; cfg_si = 0;
  endtask

  task automatic load_cfg(lp_cfg_t v);
    logic [CFG_W-1:0] bits;
    bits = v;
    idle_inputs();
    for (int b = CFG_W - 1; b >= 0; b--) begin
      cfg_shift = 1; cfg_si = bits[b];
      cycle();
    end
    cfg_shift = 0; cfg_update = 1;
    cycle();
    cfg_update = 0;
  endtask

  // one test pattern: pattern_start pulse, then SHIFT_LEN shift cycles
  int ones_loaded, bits_loaded;
  task automatic pattern(bit rand_ctrl);
    idle_inputs();
    pattern_start = 1;
    cycle();
    pattern_start = 0;
    ones_loaded += $countones(m_ctrl); bits_loaded += N;
    for (int c = 0; c < SHIFT_LEN; c++) begin
      shift_en = 1;
      ctrl_si  = rand_ctrl ? 1'($urandom) : 1'b0;
      channels = decomp ? C'($urandom) : '0;
      cycle();
    end
    idle_inputs();
  endtask

  initial begin
    lp_cfg_t cf;
    real rate_off, rate_lp, frac;
    int sw_codes [4];
    sw_codes = '{1, 4, 14, 15};
    rst_n = 0; decomp = 0; det_ctrl = 0; seed = '0;
    idle_inputs();
    @(negedge clk);
    rst_n = 1;
    m_lfsr = 32'h7F4A_7C15;  // reset seed of the PRPG
    m_sreg = '1; m_ctrl = '1; m_held = '0; m_chain = '0;
    m_cfg = '0; m_tff = 1; m_cnt = 0; prev_chains = '0;
    {n_lpoff, n_hold, n_toggle, n_reload, n_weighted, n_det, n_inject} = '0;
    {n_expire, n_skip, n_cfgupd, n_seed} = '0;
    // seed load
    idle_inputs(); seed = 32'hACE1_2468; seed_load = 1; cycle(); seed_load = 0;

    // 1. LP off
    transitions = 0; shift_cycles = 0;
    cf = '0; cf.hold = 4'd2; cf.toggle = 4'd1;
    load_cfg(cf);
    for (int p = 0; p < 20; p++) pattern(0);
    rate_off = real'(transitions) / real'(shift_cycles * S);

    // 2. PRPG mode, weighted control
    for (int k = 0; k < 4; k++) begin
      cf.switching = 4'(sw_codes[k]); cf.hold = 4'd4; cf.toggle = 4'd2;
      load_cfg(cf);
      pattern(0);              // fills the shift register with the new weight
      ones_loaded = 0; bits_loaded = 0; transitions = 0; shift_cycles = 0;
      for (int p = 0; p < 60; p++) pattern(0);
      frac = real'(ones_loaded) / real'(bits_loaded);
      rate_lp = real'(transitions) / real'(shift_cycles * S);
      checks++;
      if (frac < p_of(sw_codes[k]) - 0.06 || frac > p_of(sw_codes[k]) + 0.06) begin
        failures++;
        $display("switching %0d: control-register 1s %f, expected %f", sw_codes[k], frac, p_of(sw_codes[k]));
      end
      checks++;
      if (rate_lp > 0.8 * rate_off) begin
        failures++;
        $display("switching %0d: transition rate %f not below LP-off rate %f", sw_codes[k], rate_lp, rate_off);
      end
      $display("switching code %0d: control 1s %f (p=%f), scan-input transition rate %f (LP off %f)",
               sw_codes[k], frac, p_of(sw_codes[k]), rate_lp, rate_off);
    end

    // 3. deterministic control data in PRPG mode
    det_ctrl = 1;
    for (int p = 0; p < 10; p++) pattern(1);
    det_ctrl = 0;

    // 4. decompressor mode
    decomp = 1;
    for (int p = 0; p < 60; p++) begin
      cf.switching = 4'($urandom); cf.hold = 4'($urandom); cf.toggle = 4'($urandom);
      if (p % 4 == 0) cf.hold = 4'd0;
      cf.init_toggle = 1'($urandom); cf.offset = 4'($urandom);
      load_cfg(cf);
      pattern(1);
    end
    decomp = 0;

    if (n_lpoff == 0)    begin failures++; $display("LP off never seen"); end
    if (n_hold == 0)     begin failures++; $display("hold phase never seen"); end
    if (n_toggle == 0)   begin failures++; $display("toggle phase never seen"); end
    if (n_reload == 0)   begin failures++; $display("control reload never seen"); end
    if (n_weighted == 0) begin failures++; $display("weighted control never seen"); end
    if (n_det == 0)      begin failures++; $display("deterministic control never seen"); end
    if (n_inject == 0)   begin failures++; $display("channel injection never seen"); end
    if (n_expire == 0)   begin failures++; $display("counter expiry never seen"); end
    if (n_skip == 0)     begin failures++; $display("phase skip never seen"); end
    if (n_cfgupd == 0)   begin failures++; $display("config update never seen"); end
    if (n_seed == 0)     begin failures++; $display("seed load never seen"); end
    checks += 11;
    $display("mechanisms: lp_off=%0d hold=%0d toggle=%0d reload=%0d weighted=%0d det=%0d inject=%0d expire=%0d skip=%0d cfg_update=%0d seed=%0d",
             n_lpoff, n_hold, n_toggle, n_reload, n_weighted, n_det, n_inject, n_expire, n_skip, n_cfgupd, n_seed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
