// edcm: Euclidean distance calculation module (spatial-multiplexing path).
//
// For the 16 candidates of one PBM phase it computes the metric
//   e_m ~ ||y - hc c_m - hx x2(c_m)||
// where hc is the channel column of the searched symbol (candidate c_m) and
// hx that of the sliced symbol x2(c_m). The products of a channel value with a
// constellation point are formed with shifts, adds and sign inversions (both
// factors' levels are odd integers up to 7), so no multiplier is needed. The
// norm of each RX-antenna residual r uses the approximation of the design
//   |r| ~ 3/8 (|Re r| + |Im r|) + 5/8 max(|Re r|, |Im r|)
// and the metric is the sum of the two approximate magnitudes (this design's
// reading of how the approximation extends to the 2-element residual).
//
// Word lengths: residuals are 28-bit I/Q as in the design's word-length
// table (22 bits would already hold them for 16-bit inputs); the metrics are
// 24 bits as in the block diagram; with 16-bit inputs the metric stays below
// 2^22, so its two top bits are always zero (kept for the published width).
// Timing: one register stage; one phase of 16 metrics per clock. Runs on the
// SM clock.
module edcm
  import mimo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic [1:0] in_phase,
  input  sym_t    in_x2 [NLANE],
  input  tag_t    in_tag,
  input  sm_ctx_t in_ctx,
  output logic    out_valid,
  output logic [1:0] out_phase,
  output logic [EDW-1:0] out_ed [NLANE],
  output tag_t    out_tag
);

  typedef logic signed [RW-1:0] r_t;

  function automatic logic [EDW-1:0] approx_abs(input r_t re, input r_t im);
    logic [EDW-1:0] a, b, mx;
    r_t ar, ai;
    ar = (re < 0) ? -re : re;
    ai = (im < 0) ? -im : im;
    a  = EDW'(unsigned'(ar));
    b  = EDW'(unsigned'(ai));
    mx = (a > b) ? a : b;
    return ((a + b) + ((a + b) <<< 1) + mx + (mx <<< 2)) >> 3;
  endfunction

  // residual of one RX antenna
  function automatic void resid(input cplx_t y, input cplx_t hc, input sym_t c,
                                input cplx_t hx, input sym_t x,
                                output r_t re, output r_t im);
    logic signed [IW+4:0] pcr, pci, pxr, pxi;
    cmul_sym(hc, c, pcr, pci);
    cmul_sym(hx, x, pxr, pxi);
    re = r_t'(y.re) - r_t'(pcr) - r_t'(pxr);
    im = r_t'(y.im) - r_t'(pci) - r_t'(pxi);
  endfunction

  logic [EDW-1:0] ed_c [NLANE];

  always_comb begin
    r_t r1r, r1i, r2r, r2i;
    sym_t c;
    for (int m = 0; m < NLANE; m++) begin
      c = cand_of(int'(in_phase), m);
      resid(in_ctx.y1, in_ctx.hc1, c, in_ctx.hx1, in_x2[m], r1r, r1i);
      resid(in_ctx.y2, in_ctx.hc2, c, in_ctx.hx2, in_x2[m], r2r, r2i);
      ed_c[m] = approx_abs(r1r, r1i) + approx_abs(r2r, r2i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_phase <= '0;
      out_tag   <= '0;
      for (int m = 0; m < NLANE; m++) out_ed[m] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_phase <= in_phase;
        out_tag   <= in_tag;
        for (int m = 0; m < NLANE; m++) out_ed[m] <= ed_c[m];
      end
    end
  end

endmodule
