// clk_ctrl: clock selection and gating of the chip.
//
// clk_mux chooses the core clock source: low selects ext_clk, high the on-chip VCO clock
// (vco_clk, which comes from outside this RTL). clk_gating high stops the core clock:
// the enable is captured by a latch that is open while the selected clock is low, the
// usual glitch-free clock gate, so the clock output is only ever cut or restored while it
// is low. The latch is intended. clk_mux itself is a plain multiplexer and must only be
// changed while both clocks are stopped or under reset. The original draws a CLK MUX with
// the inputs ext_clk, VCO_clk and clk_mux, and a clk_gating pin; the polarity of the
// controls and the gate are this design's own.
module clk_ctrl (
  input  logic ext_clk,
  input  logic vco_clk,
  input  logic clk_mux,
  input  logic clk_gating,
  output logic core_clk
);
  logic clk_sel;
  logic en_l;

  assign clk_sel = clk_mux ? vco_clk : ext_clk;

  always_latch begin
    if (!clk_sel) en_l = !clk_gating;
  end

  assign core_clk = clk_sel & en_l;

endmodule
