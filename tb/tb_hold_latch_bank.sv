// tb_hold_latch_bank: random test of the hold latches against a reference
// model: transparent when enabled (same cycle), frozen at the last passed
// value when disabled, cleared by `clear`.
module tb_hold_latch_bank;
  localparam int N = 32;
  logic clk = 1'b0, rst_n;
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] d, en, q, m_held, m_q;
  logic clear;

  hold_latch_bank #(.N(N)) dut (.clk, .rst_n, .d, .en, .clear, .q);

  initial begin
    rst_n = 0; d = '0; en = '0; clear = 0;
    @(negedge clk); rst_n = 1; m_held = '0;
    for (int i = 0; i < 5000; i++) begin
      d = $urandom; en = $urandom & $urandom; clear = ($urandom_range(0, 31) == 0);
      #1;
      for (int b = 0; b < N; b++) m_q[b] = en[b] ? d[b] : m_held[b];
      checks++;
      if (q !== m_q) begin
        failures++;
        if (failures < 5) $display("cycle %0d q %h expected %h", i, q, m_q);
      end
      @(negedge clk);
      m_held = clear ? '0 : m_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
