// down_counter: phase-length counter of the PRESTO decompressor.
//
// A W-bit parallel down counter. `init` (pattern start) loads the offset,
// which fixes the length of the first phase. While `en` is high the counter
// decrements; when it stands at zero, `zero` is high, and on that step it
// loads reload_val (the Toggle or Hold register, chosen by the caller) instead
// of wrapping. The same zero signal toggles the T flip-flop, so a loaded value
// v gives a phase of v+1 enabled cycles.
//
// Timing: count is registered, zero is a combinational decode of it; init has
// priority over en. Async active-low reset clears the count. Structure follows
// the document; reset value and init priority are this design's choices.
module down_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [W-1:0] offset,
  input  logic         en,
  input  logic [W-1:0] reload_val,
  output logic         zero
);
  logic [W-1:0] count;

  assign zero = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (init) count <= offset;
    else if (en)   count <= zero ? reload_val : count - 1'b1;
  end

endmodule
