// gcgm: gated-clock generation module.
//
// The SM-dedicated modules (X2CCM, EDCM, 2DLCM) hold most of the logic but
// are idle in the spatial-diversity modes, so they get their own clock
// CLK_SM, which only toggles while the MIMO mode is SM or while SM work is
// still in flight (sm_pending). The shared and SD modules run on CLK_SD,
// which is never gated, since the IPM and PCM serve both modes.
//
// Gating cell: the enable is sampled on the falling edge of clk and ANDed
// with clk, so it can only change while clk is low and CLK_SM has no glitches
// (an integrated clock-gating cell does the same with a latch; a falling-edge
// flip-flop is used here to keep the RTL free of latches). An enable present
// during a clock cycle lets the rising edge at the end of that cycle through.
// Gating by mode follows the published architecture; the pending input and the gating cell
// are this design's choice.
module gcgm
  import mimo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mimo_mode_e mimo_mode,
  input  logic       sm_pending,
  output logic       clk_sd,
  output logic       clk_sm,
  output logic       sm_clk_on
);

  logic en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= (mimo_mode == MODE_SM) || sm_pending;
  end

  assign clk_sm    = clk & en_q;
  assign clk_sd    = clk;
  assign sm_clk_on = en_q;

endmodule
