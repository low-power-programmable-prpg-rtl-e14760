// tb_weighted_logic: exhaustive test of the weighted logic.
// For every code, counts how many of the 1024 input combinations give a 1 and
// compares with 1024 * p(code), p = 1 - prod over set bits i of (1 - 2^-(i+1)),
// and checks the values p(1) = 0.5, p(14) = 0.38476563, p(15) = 0.69238281 and
// the code-0000 flag.
module tb_weighted_logic;
  import presto_pkg::*;
  int checks = 0, failures = 0;

  logic [9:0] rnd;
  code_t      code;
  logic       w, code_zero;

  weighted_logic dut (.rnd, .code, .w, .code_zero);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real p_of(int k);
    real q = 1.0;
    for (int i = 0; i < 4; i++) if (k[i]) q = q * (1.0 - 1.0 / real'(2 ** (i + 1)));
    return 1.0 - q;
  endfunction

  initial begin
    int ones;
    real p;
    for (int k = 0; k < 16; k++) begin
      code = 4'(k);
      ones = 0;
      for (int r = 0; r < 1024; r++) begin
        rnd = 10'(r);
        #1;
        ones += int'(w);
        checks++;
        if (code_zero !== (k == 0)) begin failures++; $display("code_zero wrong for %0d", k); end
      end
      p = real'(ones) / 1024.0;
      checks++;
      if (p != p_of(k)) begin
        failures++;
        $display("code %0d: p=%f expected %f", k, p, p_of(k));
      end
      if (k == 1)  begin checks++; if (p != 0.5)  begin failures++; $display("p1 %f", p); end end
      if (k == 14) begin checks++; if (p < 0.384765 || p > 0.384766) begin failures++; $display("p14 %f", p); end end
      if (k == 15) begin checks++; if (p < 0.692382 || p > 0.692383) begin failures++; $display("p15 %f", p); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
