// prpg_lfsr: the n-bit pseudo-random pattern generator at the heart of the
// PRESTO generator.
//
// An external-XOR (Fibonacci) LFSR: on every cycle with `advance` high the
// state shifts one position towards the MSB and bit 0 receives the XOR of the
// tapped bits (primitive polynomial from presto_pkg::lfsr_taps; for N = 32 it
// is x^32 + x^22 + x^2 + x + 1). When the generator works as a test data
// decompressor, `inject` carries one bit per tester channel; channel c is
// XORed into state bit c*N/CHANNELS on the same step, so deterministic data
// can steer the state. In PRPG mode `inject` is held at zero.
//
// Timing: state is registered; it changes on the rising clock edge after
// `advance` (or `seed_load`, which wins) is sampled high. Asynchronous
// active-low reset loads SEED.
//
// The document allows an LFSR or a ring generator and gives no size; the
// LFSR, N = 32, the seed and the injection points are this design's choices.
module prpg_lfsr #(
  parameter int unsigned N        = 32,
  parameter int unsigned CHANNELS = 2,
  parameter logic [N-1:0] SEED    = N'(64'h9E37_79B9_7F4A_7C15)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                seed_load,
  input  logic [N-1:0]        seed,
  input  logic                advance,
  input  logic [CHANNELS-1:0] inject,
  output logic [N-1:0]        state
);
  import presto_pkg::*;

  localparam logic [63:0] TAPS = lfsr_taps(N);

  logic [N-1:0] nxt;

  always_comb begin
    logic fb;
    fb  = ^(state & TAPS[N-1:0]);
    nxt = {state[N-2:0], fb};
    for (int unsigned c = 0; c < CHANNELS; c++) begin
      nxt[(c * N) / CHANNELS] ^= inject[c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= SEED;
    else if (seed_load) state <= seed;
    else if (advance)   state <= nxt;
  end

  initial begin
    assert (N >= 8 && N <= 64) else $error("prpg_lfsr: N must be 8..64");
    assert (CHANNELS >= 1 && CHANNELS <= N) else $error("prpg_lfsr: bad CHANNELS");
  end

endmodule
