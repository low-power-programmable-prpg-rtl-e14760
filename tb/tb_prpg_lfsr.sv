// tb_prpg_lfsr: self-checking test of the PRPG.
// Compares a 32-bit instance, step by step, with a reference model of the
// polynomial x^32+x^22+x^2+x+1 written out here, including channel injection,
// stalls (advance low) and seed reloads; checks that an 8-bit instance has
// the maximal period 255.
module tb_prpg_lfsr;
  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        seed_load, advance;
  logic [31:0] seed, state;
  logic [1:0]  inject;
  logic        seed_load8, advance8;
  logic [7:0]  state8;

  prpg_lfsr #(.N(32), .CHANNELS(2)) dut (
    .clk, .rst_n, .seed_load, .seed, .advance, .inject, .state);

  prpg_lfsr #(.N(8), .CHANNELS(1), .SEED(8'h01)) dut8 (
    .clk, .rst_n, .seed_load(seed_load8), .seed(8'h01), .advance(advance8),
    .inject(1'b0), .state(state8));

  logic [31:0] ref_s;

  function automatic logic [31:0] ref_step(logic [31:0] s, logic [1:0] inj);
    logic [31:0] n;
    n = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    n[0]  ^= inj[0];
    n[16] ^= inj[1];
    return n;
  endfunction

  initial begin
    int period;
    logic [7:0] first8;
    rst_n = 1'b0; seed_load = 0; advance = 0; inject = 0; seed = 32'h1234_5678;
    seed_load8 = 0; advance8 = 0;
    @(negedge clk); rst_n = 1'b1;
    // reset value
    checks++; if (state == 32'h0) begin failures++; $display("zero seed after reset"); end
    seed_load = 1; @(negedge clk); seed_load = 0;
    ref_s = 32'h1234_5678;
    checks++; if (state !== ref_s) begin failures++; $display("seed load failed"); end
    for (int i = 0; i < 3000; i++) begin
      advance = ($urandom_range(0, 3) != 0);
      inject  = (i > 1500) ? 2'($urandom) : 2'b00;
      if (i % 700 == 699) begin seed = $urandom; seed_load = 1; end
      else seed_load = 0;
      @(negedge clk);
      if (seed_load) ref_s = seed;
      else if (advance) ref_s = ref_step(ref_s, inject);
      checks++;
      if (state !== ref_s) begin
        failures++;
        if (failures < 5) $display("step %0d: state %h expected %h", i, state, ref_s);
      end
    end
    seed_load = 0; advance = 0; inject = 0;
    // period of the 8-bit instance
    seed_load8 = 1; @(negedge clk); seed_load8 = 0; advance8 = 1;
    first8 = state8; period = 0;
    do begin @(negedge clk); period++; end while (state8 != first8 && period < 300);
    advance8 = 0;
    checks++;
    if (period != 255) begin failures++; $display("8-bit period %0d, expected 255", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
