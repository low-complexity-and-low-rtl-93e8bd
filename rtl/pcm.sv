// pcm: parameter calculation module.
//
// Computes the three parameters that both detection modes need from the
// operand vectors prepared by the IPM:
//   p1 = a^H b,  p2 = c^H d,  p3 = ||e||^2   (a..e are 2-element complex).
// As in the block diagram of the design, it uses four complex multipliers with
// a conjugated first operand, two squared-norm units and three adders. In SM
// mode p1 = h2^H y, p2 = h2^H h1 and p3 = ||h2||^2, the inputs of the slicer;
// in the SD modes p1/p2 are the two halves of the decision variable and p3 the
// channel energy.
//
// Timing: one register stage; out_* is valid one clock after in_valid.
// The I/Q results are 33 bits as in the design's word-length table; a sum that
// would need a 34th bit (only possible with inputs near full scale) saturates.
// tag and ctx ride along unchanged.
module pcm
  import mimo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx_t   a1, a2, b1, b2, c1, c2, d1, d2, e1, e2,
  input  tag_t    in_tag,
  input  sm_ctx_t in_ctx,
  output logic    out_valid,
  output cplxp_t  p1, p2,
  output logic signed [PW-1:0] p3,
  output tag_t    out_tag,
  output sm_ctx_t out_ctx
);

  typedef logic signed [2*IW+1:0] wide_t;  // 34 bits

  // conj(x) * y
  function automatic void cmul_conj(input cplx_t x, input cplx_t y,
                                    output wide_t re, output wide_t im);
    re = wide_t'(x.re) * wide_t'(y.re) + wide_t'(x.im) * wide_t'(y.im);
    im = wide_t'(x.re) * wide_t'(y.im) - wide_t'(x.im) * wide_t'(y.re);
  endfunction

  function automatic wide_t sqnorm(input cplx_t x);
    return wide_t'(x.re) * wide_t'(x.re) + wide_t'(x.im) * wide_t'(x.im);
  endfunction

  function automatic logic signed [PW-1:0] satp(input wide_t v);
    return PW'(sat(48'(v), PW));
  endfunction

  wide_t m1r, m1i, m2r, m2i, m3r, m3i, m4r, m4i;

  always_comb begin
    cmul_conj(a1, b1, m1r, m1i);
    cmul_conj(a2, b2, m2r, m2i);
    cmul_conj(c1, d1, m3r, m3i);
    cmul_conj(c2, d2, m4r, m4i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p1 <= '0;
      p2 <= '0;
      p3 <= '0;
      out_tag <= '0;
      out_ctx <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        p1.re   <= satp(m1r + m2r);
        p1.im   <= satp(m1i + m2i);
        p2.re   <= satp(m3r + m4r);
        p2.im   <= satp(m3i + m4i);
        p3      <= satp(sqnorm(e1) + sqnorm(e2));
        out_tag <= in_tag;
        out_ctx <= in_ctx;
      end
    end
  end

endmodule
