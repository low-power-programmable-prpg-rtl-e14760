// presto_pkg: types and constants shared by the PRESTO low-power PRPG.
//
// The generator is programmed through three 4-bit codes (switching, hold,
// toggle) plus two per-pattern values used only in decompressor mode: the
// initial state of the T flip-flop and the initial value (offset) of the
// phase down counter. These are bundled in lp_cfg_t, which is also the order
// of the serial configuration chain (MSB of the struct shifted in first).
// The 4-bit code width follows the document; the offset and initial-mode
// fields are this design's packaging of the per-pattern decompressor data.
package presto_pkg;

  localparam int unsigned CODE_W = 4;

  // Number of PRPG bits one weighted-logic block consumes: its four AND gates
  // have 1, 2, 3 and 4 inputs.
  localparam int unsigned WL_RND_W = 10;

  typedef logic [CODE_W-1:0] code_t;

  typedef struct packed {
    code_t switching;    // weight of 1s shifted into the control shift register
    code_t hold;         // hold-phase code (PRPG mode) / hold length-1 (decompressor)
    code_t toggle;       // toggle-phase code (PRPG mode) / toggle length-1 (decompressor)
    logic  init_toggle;  // decompressor: T flip-flop value at pattern start (1 = toggle)
    code_t offset;       // decompressor: down-counter value at pattern start
  } lp_cfg_t;

  localparam int unsigned CFG_W = $bits(lp_cfg_t);

  // PRPG bit positions (taken mod N) feeding the weighted logic blocks, in
  // weighted_logic rnd[] order: rnd[0] is the 1/2 gate, rnd[2:1] the 1/4
  // gate, rnd[5:3] the 1/8 gate, rnd[9:6] the 1/16 gate. Because the LFSR
  // state mostly shifts, adjacent positions would feed a gate the same bits
  // again one cycle later; such reuse clusters the 1s, which stretches the
  // hold/toggle phases well past 1/p and packs the control register's 1s
  // together. The positions below are spread so that, for N = 32, measured
  // mean phase lengths stay within about 5 % of 1/p and the number of active
  // scan chains within about 0.03*S of S*(1-(1-p)^3) (found by simulation
  // over all codes). V and H use disjoint bits.
  typedef int unsigned pos10_t [WL_RND_W];
  localparam pos10_t WL_V_POS = '{16, 31, 18, 5, 14, 22, 6, 24, 2, 11};
  localparam pos10_t WL_H_POS = '{8, 25, 19, 9, 26, 10, 3, 21, 30, 28};

  // Feedback taps (bit indices, 0-based) of a maximal-length external-XOR LFSR
  // whose state shifts towards the MSB: new bit0 = XOR of the tapped bits.
  // Taps are from the standard table of primitive trinomials/pentanomials.
  function automatic logic [63:0] lfsr_taps(input int unsigned n);
    logic [63:0] t;
    t = '0;
    case (n)
      8:       begin t[7] = 1'b1; t[5] = 1'b1; t[4] = 1'b1; t[3] = 1'b1; end
      16:      begin t[15] = 1'b1; t[14] = 1'b1; t[12] = 1'b1; t[3] = 1'b1; end
      24:      begin t[23] = 1'b1; t[22] = 1'b1; t[21] = 1'b1; t[16] = 1'b1; end
      32:      begin t[31] = 1'b1; t[21] = 1'b1; t[1] = 1'b1; t[0] = 1'b1; end
      48:      begin t[47] = 1'b1; t[46] = 1'b1; t[20] = 1'b1; t[19] = 1'b1; end
      64:      begin t[63] = 1'b1; t[62] = 1'b1; t[60] = 1'b1; t[59] = 1'b1; end
      default: begin t[n-1] = 1'b1; t[0] = 1'b1; end
    endcase
    return t;
  endfunction

endpackage
