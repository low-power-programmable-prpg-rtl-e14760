// control_shift_register: the shift register and control register that decide
// which hold latches may toggle.
//
// Each shift cycle one bit enters the n-bit shift register at bit 0: the output
// of weighted logic V (pseudo-random with the probability chosen by the
// switching code) or, when det_sel is high, a deterministic bit from det_in.
// Once per test pattern (`reload`, a one-cycle pulse at pattern start) the
// shift register is copied into the control register, whose bits enable the
// hold latches: 1 = latch transparent (toggle), 0 = latch frozen.
//
// Timing: both registers update on the rising edge; ctrl changes on the edge
// that samples reload high. If reload and shift coincide, the control register
// takes the shift register value from before that shift.
// Async active-low reset sets both registers to all ones (no latch frozen),
// which is this design's choice; the structure follows the document.
module control_shift_register #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         det_sel,
  input  logic         weighted_in,
  input  logic         det_in,
  input  logic         reload,
  output logic [N-1:0] ctrl
);
  logic [N-1:0] sreg;
  logic         si;

  assign si = det_sel ? det_in : weighted_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg <= '1;
      ctrl <= '1;
    end else begin
      if (shift)  sreg <= {sreg[N-2:0], si};
      if (reload) ctrl <= sreg;
    end
  end

endmodule
