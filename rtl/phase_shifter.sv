// phase_shifter: XOR network from the hold latches to the scan chains.
//
// Every one of the S outputs is the XOR of three different latch outputs.
// Output j uses latches t, t+a and t+2a+1 (all mod N), with t = j mod N and
// a = 1 + (j div N) mod (N/2 - 1); the three indices are always distinct, and
// the (t, a) pairs are all different for S <= N*(N/2-1), so no two chains
// share the same combination. Purely combinational.
//
// Three inputs per output follow the document; the tap pattern is this
// design's own, since the document does not list one.
module phase_shifter #(
  parameter int unsigned N = 32,
  parameter int unsigned S = 64
) (
  input  logic [N-1:0] in_bits,
  output logic [S-1:0] chains
);
  typedef int unsigned idx3_t [3];

  function automatic idx3_t taps_of(input int unsigned j);
    idx3_t r;
    int unsigned t, a;
    t    = j % N;
    a    = 1 + (j / N) % (N / 2 - 1);
    r[0] = t;
    r[1] = (t + a) % N;
    r[2] = (t + 2 * a + 1) % N;
    return r;
  endfunction

  for (genvar j = 0; j < S; j++) begin : g_out
    localparam idx3_t TAP = taps_of(j);
    assign chains[j] = in_bits[TAP[0]] ^ in_bits[TAP[1]] ^ in_bits[TAP[2]];
  end

  initial begin
    assert (N >= 6) else $error("phase_shifter: N must be at least 6");
    assert (S <= N * (N / 2 - 1)) else $error("phase_shifter: S too large for unique taps");
  end

endmodule
