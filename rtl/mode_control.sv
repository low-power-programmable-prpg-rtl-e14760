// mode_control: toggle/hold phase control of the PRESTO generator.
//
// A T flip-flop (toggle_mode) splits each scan shift into alternating toggle
// phases (1: hold latches follow the control register) and hold phases
// (0: every hold latch frozen). Four 2-input multiplexers pass the Toggle code
// while in a toggle phase and the Hold code while in a hold phase.
//
// PRPG mode (decomp = 0): the selected code drives weighted logic H; each
//   shift cycle the T flip-flop toggles when H outputs 1, so a phase with code
//   k lasts 1/p(k) cycles on average. Toggle code 0000 never ends a toggle
//   phase (hold phases off); Hold code 0000 ends a hold phase after one cycle.
// Decompressor mode (decomp = 1): H is not used. At pattern start (`init`)
//   the T flip-flop takes cfg.init_toggle and the down counter cfg.offset.
//   Each shift cycle with the counter at zero ends the phase: the T flip-flop
//   toggles and the counter loads the register of the phase being entered
//   (Hold when entering hold, Toggle when entering toggle), so a phase lasts
//   register+1 cycles. If that register is 0000 the phase is skipped: the
//   flip-flop stays and the counter reloads the current phase's register.
//
// Timing: toggle_mode is registered and changes on the edge after the
// deciding shift cycle. Async active-low reset puts it in toggle mode.
// The T flip-flop, multiplexers, weighted logic and counter follow the
// document; the handling of code 0000 and reset values are this design's.
module mode_control
  import presto_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                decomp,
  input  logic                advance,
  input  logic                init,
  input  lp_cfg_t             cfg,
  input  logic [WL_RND_W-1:0] rnd,
  output logic                toggle_mode
);
  code_t code_sel;     // code of the current phase (multiplexers)
  code_t code_next;    // code of the phase that would be entered
  logic  w_h, h_zero;
  logic  cnt_zero;
  logic  skip;
  logic  t_in;
  code_t reload_val;

  assign code_sel  = toggle_mode ? cfg.toggle : cfg.hold;
  assign code_next = toggle_mode ? cfg.hold   : cfg.toggle;

  weighted_logic u_wl_h (
    .rnd      (rnd),
    .code     (code_sel),
    .w        (w_h),
    .code_zero(h_zero)
  );

  assign skip       = (code_next == '0);
  assign reload_val = skip ? code_sel : code_next;

  down_counter #(.W(CODE_W)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (init && decomp),
    .offset    (cfg.offset),
    .en        (advance && decomp),
    .reload_val(reload_val),
    .zero      (cnt_zero)
  );

  always_comb begin
    if (decomp) t_in = advance && cnt_zero && !skip;
    else        t_in = advance && (w_h || (!toggle_mode && h_zero));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                toggle_mode <= 1'b1;
    else if (init && decomp)   toggle_mode <= cfg.init_toggle;
    else if (t_in)             toggle_mode <= !toggle_mode;
  end

endmodule
