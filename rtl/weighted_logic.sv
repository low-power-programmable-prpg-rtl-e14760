// weighted_logic: programmable-probability bit source of the PRESTO generator.
//
// Four AND gates with 1, 2, 3 and 4 inputs, fed by distinct PRPG bits, output
// 1 with probability 1/2, 1/4, 1/8 and 1/16. Code bit i enables the gate of
// probability 2^-(i+1); the enabled gates are ORed, so a code k gives
//   p(k) = 1 - prod_{i: k[i]=1} (1 - 2^-(i+1)),
// e.g. p(0001) = 0.5, p(1110) = 0.38476563, p(1111) = 0.69238281.
// A four-input NOR flags code 0000 (code_zero), which the users of this block
// take as "low-power function off" (switching code) or as a special phase code.
//
// Purely combinational. The same block is used twice in the generator: as V,
// feeding the control shift register, and as H, driving the T flip-flop.
// The gate structure and probabilities follow the document; the assignment of
// the 0.5 gate to code bit 0 follows its listed p1, p14 and p15 values.
module weighted_logic
  import presto_pkg::*;
(
  input  logic [WL_RND_W-1:0] rnd,
  input  code_t               code,
  output logic                w,
  output logic                code_zero
);
  logic [CODE_W-1:0] g;

  always_comb begin
    g[0] = rnd[0];         // p = 1/2
    g[1] = &rnd[2:1];      // p = 1/4
    g[2] = &rnd[5:3];      // p = 1/8
    g[3] = &rnd[9:6];      // p = 1/16
    w         = |(g & code);
    code_zero = ~|code;
  end

endmodule
