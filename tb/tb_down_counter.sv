// tb_down_counter: checks phase lengths of the down counter: after init with
// offset o, zero is first seen after exactly o enabled cycles, and after each
// reload with value v the next zero comes v+1 enabled cycles later; stalls
// (en low) freeze it.
module tb_down_counter;
  logic clk = 1'b0, rst_n;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic init, en, zero;
  logic [3:0] offset, reload_val;

  down_counter #(.W(4)) dut (.clk, .rst_n, .init, .offset, .en, .reload_val, .zero);

  initial begin
    int m;
    rst_n = 0; init = 0; en = 0; offset = 0; reload_val = 0;
    @(negedge clk); rst_n = 1;
    checks++; if (!zero) begin failures++; $display("reset value"); end
    for (int t = 0; t < 300; t++) begin
      offset = 4'($urandom); init = 1; @(negedge clk); init = 0;
      m = int'(offset);
      for (int c = 0; c < 60; c++) begin
        en = $urandom_range(0, 3) != 0;
        reload_val = 4'($urandom);
        #1;
        checks++;
        if (zero !== (m == 0)) begin
          failures++;
          if (failures < 5) $display("t %0d c %0d: zero %b model %0d", t, c, zero, m);
        end
        @(negedge clk);
        if (en) m = (m == 0) ? int'(reload_val) : m - 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
