// hold_latch_bank: the n hold latches placed between the PRPG and the phase
// shifter.
//
// A latch whose enable is high is transparent: its output follows the PRPG bit
// in the same cycle. A latch whose enable is low keeps the last value it
// passed, so the phase-shifter outputs that depend only on frozen latches stay
// constant and their scan chains see no transitions.
//
// The latches are modelled in synchronous logic: q = en ? d : held, and held
// captures q on every rising edge. This behaves as a latch that is open during
// the cycle and closes at the clock edge, without inferring level-sensitive
// storage. `clear` (pattern start in decompressor mode) sets every held value
// to 0 on the next edge; during the clear cycle q still follows en/d.
// Async active-low reset clears the held values. The latch function follows
// the document; the synchronous modelling and the clear value are this
// design's choices.
module hold_latch_bank #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  input  logic [N-1:0] en,
  input  logic         clear,
  output logic [N-1:0] q
);
  logic [N-1:0] held;

  assign q = (en & d) | (~en & held);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     held <= '0;
    else if (clear) held <= '0;
    else            held <= q;
  end

endmodule
