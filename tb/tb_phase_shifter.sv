// tb_phase_shifter: structural test of the phase shifter through its outputs.
// With one-hot inputs it recovers each output's tap set and checks that every
// output depends on exactly three inputs, that no two outputs share a tap set
// and that every input is used; random inputs check linearity (XOR network).
module tb_phase_shifter;
  localparam int N = 32, S = 64;
  int checks = 0, failures = 0;

  logic [N-1:0] in_bits;
  logic [S-1:0] chains;
  logic [N-1:0] col [S];

  phase_shifter #(.N(N), .S(S)) dut (.in_bits, .chains);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] used;
    logic [S-1:0] expct;
    in_bits = '0; #1;
    checks++; if (chains !== '0) begin failures++; $display("nonzero output for zero input"); end
    for (int j = 0; j < S; j++) col[j] = '0;
    for (int b = 0; b < N; b++) begin
      in_bits = N'(1) << b; #1;
      for (int j = 0; j < S; j++) col[j][b] = chains[j];
    end
    used = '0;
    for (int j = 0; j < S; j++) begin
      used |= col[j];
      checks++;
      if ($countones(col[j]) != 3) begin failures++; $display("output %0d has %0d taps", j, $countones(col[j])); end
      for (int k = 0; k < j; k++) begin
        checks++;
        if (col[k] == col[j]) begin failures++; $display("outputs %0d and %0d identical", k, j); end
      end
    end
    checks++; if (used !== '1) begin failures++; $display("unused inputs %h", ~used); end
    for (int t = 0; t < 500; t++) begin
      in_bits = $urandom; #1;
      for (int j = 0; j < S; j++) expct[j] = ^(in_bits & col[j]);
      checks++;
      if (chains !== expct) begin failures++; $display("nonlinear response"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
