// lcm1d: 1-dimensional LLR calculation module (spatial-diversity modes).
//
// After the Alamouti/MRC combining of the DVCM every symbol is seen alone on
// a scaled constellation, z ~ CSI * x, so the LLRs follow per axis from
// piecewise-linear (simplified max-log) demapping with thresholds that are
// multiples of CSI. For one axis value u (I for the even LLRs, Q for the
// odd ones):
//   sign bit   : L = -u
//   16QAM outer: L = |u| - 2*CSI
//   64QAM outer: L = |u| - 4*CSI
//   64QAM fine : L = ||u| - 4*CSI| - 2*CSI
// BPSK (+-1 on the I axis) uses only the I sign bit, so its Q LLR is 0.
// A positive LLR favours bit value 1 (bit labels as in mimo_pkg). LLRs not
// used by the modulation are 0. The piecewise-linear demapper is this
// design's choice for the simplified demapping the published architecture refers to; the
// 24-bit LLR word length is the published one.
//
// Timing: one register stage. Runs on the SD clock.
module lcm1d
  import mimo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic signed [DW-1:0] z_re, z_im,
  input  logic signed [DW-1:0] csi,
  input  tag_t    in_tag,
  output logic    out_valid,
  output logic signed [L1W-1:0] llr [NLLR],
  output tag_t    out_tag
);

  typedef logic signed [L1W-1:0] l_t;

  function automatic l_t absl(input l_t v);
    return (v < 0) ? -v : v;
  endfunction

  // LLRs of one axis: {fine, outer, sign}
  function automatic void axis_llr(input l_t u, input l_t c, input mod_e m,
                                   output l_t ls, output l_t lo, output l_t lf);
    ls = -u;
    lo = '0;
    lf = '0;
    if (m == MOD_16QAM) lo = absl(u) - (c <<< 1);
    if (m == MOD_64QAM) begin
      lo = absl(u) - (c <<< 2);
      lf = absl(absl(u) - (c <<< 2)) - (c <<< 1);
    end
  endfunction

  l_t li [NLLR];

  always_comb begin
    axis_llr(l_t'(z_re), l_t'(csi), in_tag.modu, li[0], li[2], li[4]);
    axis_llr(l_t'(z_im), l_t'(csi), in_tag.modu, li[1], li[3], li[5]);
    if (in_tag.modu == MOD_BPSK) li[1] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      for (int k = 0; k < NLLR; k++) llr[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        for (int k = 0; k < NLLR; k++) llr[k] <= li[k];
      end
    end
  end

endmodule
