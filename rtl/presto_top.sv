// presto_top: PRESTO low-power programmable PRPG with test-compression mode.
//
// Data path: the N-bit PRPG feeds N hold latches, and a phase shifter XORs
// three latch outputs into each of the S scan chain inputs. A latch passes its
// PRPG bit only when both its control-register bit and the T flip-flop
// (toggle phase) allow it; otherwise it freezes, and the scan chains whose
// phase-shifter taps are all frozen receive a constant value, cutting shift
// power. The control register is reloaded once per pattern (pattern_start)
// from a shift register filled by weighted logic V, whose probability of a 1
// is set by the 4-bit switching code; code 0000 turns the low-power function
// off (all latches transparent).
//
// Two modes, chosen by `decomp`:
//   0 - LBIST PRPG: V fills the shift register (or ctrl_si when det_ctrl is
//       high); weighted logic H, programmed by the Hold/Toggle codes, ends
//       hold and toggle phases at random.
//   1 - LP decompressor: V and H are disabled. Control data come
//       deterministically through ctrl_si, tester channels are XORed into the
//       PRPG, and a down counter preset from the Hold/Toggle registers times
//       the phases. pattern_start loads the T flip-flop and counter from the
//       configuration and clears the hold latches.
// Configuration (codes, initial mode, offset) is shifted in through cfg_si
// and applied with cfg_update (shadow registers).
//
// Timing: one PRPG step, one shift-register bit and one phase decision per
// clock with shift_en high; chains[] is combinational from registered state
// and the PRPG, valid in the same cycle. pattern_start is a one-cycle pulse
// before the first shift cycle of a pattern. Async active-low reset.
// Structure follows the document (its Figs. 1-3); sizes N, S, CHANNELS, the
// merging of both modes in one circuit and the port protocol are this
// design's choices.
module presto_top
  import presto_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned S        = 64,
  parameter int unsigned CHANNELS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                decomp,        // 1 = LP decompressor mode
  input  logic                shift_en,      // scan shift cycle
  input  logic                pattern_start, // one-cycle pulse per test pattern
  input  logic                det_ctrl,      // PRPG mode: control data from ctrl_si
  input  logic                ctrl_si,       // deterministic control data
  input  logic [CHANNELS-1:0] channels,      // tester channels (decompressor mode)
  input  logic                seed_load,
  input  logic [N-1:0]        seed,
  input  logic                cfg_shift,
  input  logic                cfg_si,
  input  logic                cfg_update,
  output logic                cfg_so,
  output logic [S-1:0]        chains,        // scan chain serial inputs
  output logic                toggle_mode,   // 1 = toggle phase, 0 = hold phase
  output logic                lp_off         // switching code 0000 in PRPG mode
);
  lp_cfg_t                cfg;
  logic [N-1:0]           state;
  logic [N-1:0]           ctrl;
  logic [N-1:0]           latch_en;
  logic [N-1:0]           latch_q;
  logic [WL_RND_W-1:0]    rnd_v, rnd_h;
  logic                   w_v, sw_zero;

  lp_config_regs u_cfg (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_shift (cfg_shift),
    .cfg_si    (cfg_si),
    .cfg_update(cfg_update),
    .cfg_so    (cfg_so),
    .cfg       (cfg)
  );

  prpg_lfsr #(.N(N), .CHANNELS(CHANNELS)) u_prpg (
    .clk      (clk),
    .rst_n    (rst_n),
    .seed_load(seed_load),
    .seed     (seed),
    .advance  (shift_en),
    .inject   (decomp ? channels : '0),
    .state    (state)
  );

  // Weighted logic V and H read spread-out PRPG bits (presto_pkg WL_*_POS).
  always_comb begin
    for (int unsigned i = 0; i < WL_RND_W; i++) begin
      rnd_v[i] = state[WL_V_POS[i] % N];
      rnd_h[i] = state[WL_H_POS[i] % N];
    end
  end

  weighted_logic u_wl_v (
    .rnd      (rnd_v),
    .code     (cfg.switching),
    .w        (w_v),
    .code_zero(sw_zero)
  );

  control_shift_register #(.N(N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .shift      (shift_en),
    .det_sel    (decomp || det_ctrl),
    .weighted_in(w_v),
    .det_in     (ctrl_si),
    .reload     (pattern_start),
    .ctrl       (ctrl)
  );

  mode_control u_mode (
    .clk        (clk),
    .rst_n      (rst_n),
    .decomp     (decomp),
    .advance    (shift_en),
    .init       (pattern_start),
    .cfg        (cfg),
    .rnd        (rnd_h),
    .toggle_mode(toggle_mode)
  );

  assign lp_off   = sw_zero && !decomp;
  assign latch_en = lp_off ? '1 : (ctrl & {N{toggle_mode}});

  hold_latch_bank #(.N(N)) u_latch (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (state),
    .en   (latch_en),
    .clear(pattern_start && decomp),
    .q    (latch_q)
  );

  phase_shifter #(.N(N), .S(S)) u_ps (
    .in_bits(latch_q),
    .chains (chains)
  );

endmodule
