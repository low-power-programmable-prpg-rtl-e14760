// lp_config_regs: serially loaded LP parameter registers with shadow copies.
//
// The switching, hold and toggle codes (and, for decompressor mode, the
// initial T flip-flop value and the counter offset) form one CFG_W-bit serial
// chain, loaded one bit per clock while cfg_shift is high, MSB of lp_cfg_t
// first; cfg_so is the chain's last bit so several generators can share one
// scan-style load path. A one-cycle cfg_update copies the chain into the
// shadow registers that drive the generator, so the values in use stay
// unchanged while the next set is shifted in and during capture.
//
// Timing: chain and shadow update on the rising edge; if cfg_update and
// cfg_shift coincide the shadow takes the chain value from before the shift.
// Async active-low reset clears both (switching code 0000 = LP function off).
// Serial loading with shadow registers follows the document; the chain order,
// the update strobe and the reset value are this design's choices.
module lp_config_regs
  import presto_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cfg_shift,
  input  logic    cfg_si,
  input  logic    cfg_update,
  output logic    cfg_so,
  output lp_cfg_t cfg
);
  logic [CFG_W-1:0] chain;

  assign cfg_so = chain[CFG_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain <= '0;
      cfg   <= '0;
    end else begin
      if (cfg_shift)  chain <= {chain[CFG_W-2:0], cfg_si};
      if (cfg_update) cfg   <= lp_cfg_t'(chain);
    end
  end

endmodule
