// x2ccm: X2C calculation module (spatial-multiplexing path).
//
// For every candidate c_m of the searched symbol it finds the ML estimate of
// the other symbol,
//   x2(c_m) = Q(h2^H (y - h1 c_m) / ||h2||^2) = Q(p1 - p2 c_m, p3),
// without a division: the slicer compares p1 - p2 c_m with the constellation
// decision thresholds scaled by p3 (0, +-2 p3, +-4 p3, +-6 p3 on each axis),
// which only needs shifts and adds. The 64 products p2 c_m come from the
// polar-based multiplier (pbm), 16 per clock over 4 clocks.
//
// p1, p2, p3 arrive with the 33-bit PCM word length and are first scaled by
// 2^-SM_SHIFT and saturated to 16 bits (the 32-bit complex p1/p2 and 16-bit p3
// ports of the block diagram); p1 is then sign-extended to the product width
// ("denormalize"). The shift value is this design's choice. The slicer result
// is clipped to the levels of the active modulation.
//
// Output: out_x2[m] is the 6-bit symbol index (3 bits I, 3 bits Q, level
// 2k-7) of lane m for PBM phase out_phase; tag and ctx are held for the whole
// column. Timing: in_valid one clock, then 4 clocks of results starting two
// clocks later. Runs on the SM clock.
module x2ccm
  import mimo_pkg::*;
#(
  parameter int unsigned SM_SHIFT = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplxp_t  p1, p2,
  input  logic signed [PW-1:0] p3,
  input  tag_t    in_tag,
  input  sm_ctx_t in_ctx,
  output logic    out_valid,
  output logic [1:0] out_phase,
  output sym_t    out_x2 [NLANE],
  output tag_t    out_tag,
  output sm_ctx_t out_ctx
);

  localparam int OW = X2W;          // PBM product width
  localparam int UW = X2W + 1;      // slicer argument width
  typedef logic signed [UW-1:0] u_t;

  function automatic logic signed [XW-1:0] to_x(input logic signed [PW-1:0] v);
    return XW'(sat(48'(v >>> SM_SHIFT), XW));
  endfunction

  cplxx_t p2x;
  assign p2x.re = to_x(p2.re);
  assign p2x.im = to_x(p2.im);

  logic signed [XW-1:0] p1x_re, p1x_im, p3x;
  tag_t    tag_h;
  sm_ctx_t ctx_h;

  logic                 pb_valid;
  logic [1:0]           pb_phase;
  logic signed [OW-1:0] pb_re [NLANE];
  logic signed [OW-1:0] pb_im [NLANE];

  pbm #(.OW(OW)) u_pbm (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .p2       (p2x),
    .out_valid(pb_valid),
    .out_phase(pb_phase),
    .prod_re  (pb_re),
    .prod_im  (pb_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1x_re <= '0;
      p1x_im <= '0;
      p3x    <= '0;
      tag_h  <= '0;
      ctx_h  <= '0;
    end else if (in_valid) begin
      p1x_re <= to_x(p1.re);
      p1x_im <= to_x(p1.im);
      p3x    <= to_x(p3);
      tag_h  <= in_tag;
      ctx_h  <= in_ctx;
    end
  end

  // slicer of one axis against the p3-scaled thresholds
  function automatic logic [2:0] slice(input u_t u, input u_t s, input mod_e m);
    u_t th;
    int k;
    k = 0;
    for (int j = 0; j < 7; j++) begin
      case (j)
        0: th = -((s <<< 2) + (s <<< 1));
        1: th = -(s <<< 2);
        2: th = -(s <<< 1);
        3: th = '0;
        4: th = (s <<< 1);
        5: th = (s <<< 2);
        default: th = (s <<< 2) + (s <<< 1);
      endcase
      if (u > th) k++;
    end
    if (3'(k) > kmax(m)) return kmax(m);
    if (3'(k) < kmin(m)) return kmin(m);
    return 3'(k);
  endfunction

  sym_t x2_c [NLANE];
  u_t   u_re, u_im;

  always_comb begin
    for (int m = 0; m < NLANE; m++) begin
      u_re = u_t'(p1x_re) - u_t'(pb_re[m]);
      u_im = u_t'(p1x_im) - u_t'(pb_im[m]);
      x2_c[m].re = slice(u_re, u_t'(p3x), tag_h.modu);
      x2_c[m].im = slice(u_im, u_t'(p3x), tag_h.modu);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_phase <= '0;
      out_tag   <= '0;
      out_ctx   <= '0;
      for (int m = 0; m < NLANE; m++) out_x2[m] <= '0;
    end else begin
      out_valid <= pb_valid;
      if (pb_valid) begin
        out_phase <= pb_phase;
        out_tag   <= tag_h;
        out_ctx   <= ctx_h;
        for (int m = 0; m < NLANE; m++) out_x2[m] <= x2_c[m];
      end
    end
  end

endmodule
