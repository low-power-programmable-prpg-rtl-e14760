// tb_control_shift_register: random test of the shift/control register pair
// against a reference model: serial input mux, shifting, per-pattern reload,
// simultaneous shift and reload, reset value.
module tb_control_shift_register;
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

  logic shift, det_sel, weighted_in, det_in, reload;
  logic [N-1:0] ctrl, m_sreg, m_ctrl;

  control_shift_register #(.N(N)) dut (.clk, .rst_n, .shift, .det_sel,
    .weighted_in, .det_in, .reload, .ctrl);

  initial begin
    logic si;
    rst_n = 0; shift = 0; det_sel = 0; weighted_in = 0; det_in = 0; reload = 0;
    @(negedge clk); rst_n = 1;
    m_sreg = '1; m_ctrl = '1;
    checks++; if (ctrl !== '1) begin failures++; $display("reset value"); end
    for (int i = 0; i < 5000; i++) begin
      shift = 1'($urandom_range(0, 1)); det_sel = 1'($urandom_range(0, 1));
      weighted_in = 1'($urandom_range(0, 1)); det_in = 1'($urandom_range(0, 1));
      reload = ($urandom_range(0, 15) == 0);
      @(negedge clk);
      si = det_sel ? det_in : weighted_in;
      if (reload) m_ctrl = m_sreg;
      if (shift) m_sreg = {m_sreg[N-2:0], si};
      checks++;
      if (ctrl !== m_ctrl) begin
        failures++;
        if (failures < 5) $display("cycle %0d ctrl %h expected %h", i, ctrl, m_ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
