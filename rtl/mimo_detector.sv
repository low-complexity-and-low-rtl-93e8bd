// mimo_detector: soft-output symbol detector for 2x2 MIMO (top level).
//
// One datapath serves every MIMO mode of a 2-TX/2-RX link: SISO, SIMO,
// Alamouti MISO and 2x2 Alamouti (STBC/SFBC, "SD") as well as spatial
// multiplexing ("SM"). The shared front end (ipm, pcm) computes
//   p1 = a^H b, p2 = c^H d, p3 = ||e||^2
// from a mode-dependent arrangement of H and y. In the SD modes p1/p2/p3
// give a combined decision variable and the channel energy (dvcm), which a
// per-axis demapper turns into LLRs (lcm1d). In SM a modified ML detector is
// used: for each of the 64 candidates c_m of one symbol the other symbol is
// found by slicing (x2ccm, using the polar-based multiplier pbm), the
// approximate Euclidean distance of the pair is formed (edcm), and max-log
// LLRs are the differences of per-bit minima (lcm2d). Switching the channel
// columns in the ipm gives the LLRs of the second symbol with the same
// hardware. The SM-dedicated modules run on a gated clock (gcgm). A
// multiplexer (llr_mux) and an 8-bit quantizer (qm) end both paths.
//
// Interface: one input vector (H, y, MIMO mode, modulation) per in_valid &&
// in_ready. Each output clock with out_valid carries the six 8-bit LLRs of
// one transmitted symbol (LLR0..5 = b0..b5, see mimo_pkg; unused ones 0) and
// its tag (mode, modulation, time unit / TX index).
//
// Throughput and latency (clocks of clk): SISO/SIMO one symbol per clock,
// MISO/SD two symbols per two clocks, SM two symbols per 8 clocks (the PBM
// spends 4 clocks per symbol). Latency from acceptance to the first LLR:
// 7 clocks in the SD modes (plus one clock of pairing in SD), 11 in SM.
module mimo_detector
  import mimo_pkg::*;
#(
  parameter int unsigned Z_SHIFT   = 12,  // p -> z/CSI scaling (SD path)
  parameter int unsigned SM_SHIFT  = 12,  // p -> X2CCM input scaling (SM path)
  parameter int unsigned QSHIFT_SD = 4,   // LLR -> 8 bit scaling, SD path
  parameter int unsigned QSHIFT_SM = 4,   // LLR -> 8 bit scaling, SM path
  parameter int unsigned SM_TAIL   = 10   // SM clock run-on after the last SM item
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  mimo_mode_e in_mode,
  input  mod_e       in_mod,
  input  in_vec_t    in_vec,
  output logic       out_valid,
  output logic signed [QW-1:0] out_llr [NLLR],
  output tag_t       out_tag,
  output logic       sm_clk_on
);

  logic clk_sd, clk_sm;

  // IPM -> PCM
  logic       ipm_valid;
  cplx_t      a1, a2, b1, b2, c1, c2, d1, d2, e1, e2;
  tag_t       ipm_tag;
  sm_ctx_t    ipm_ctx;
  mimo_mode_e cur_mode;
  logic       sm_act;

  // PCM -> DVCM / X2CCM
  logic       pcm_valid;
  cplxp_t     p1, p2;
  logic signed [PW-1:0] p3;
  tag_t       pcm_tag;
  sm_ctx_t    pcm_ctx;

  // SD path
  logic       dv_valid;
  logic signed [DW-1:0] z_re, z_im, csi;
  tag_t       dv_tag;
  logic       l1_valid;
  logic signed [L1W-1:0] l1_llr [NLLR];
  tag_t       l1_tag;

  // SM path
  logic       x2_valid;
  logic [1:0] x2_phase;
  sym_t       x2_sym [NLANE];
  tag_t       x2_tag;
  sm_ctx_t    x2_ctx;
  logic       ed_valid;
  logic [1:0] ed_phase;
  logic [EDW-1:0] ed [NLANE];
  tag_t       ed_tag;
  logic       l2_valid;
  logic signed [L2W-1:0] l2_llr [NLLR];
  tag_t       l2_tag;

  // output
  logic       mx_valid, mx_is_sm;
  logic signed [L1W-1:0] mx_llr [NLLR];
  tag_t       mx_tag;

  gcgm u_gcgm (
    .clk       (clk),
    .rst_n     (rst_n),
    .mimo_mode (cur_mode),
    .sm_pending(sm_act),
    .clk_sd    (clk_sd),
    .clk_sm    (clk_sm),
    .sm_clk_on (sm_clk_on)
  );

  ipm #(.SM_TAIL(SM_TAIL)) u_ipm (
    .clk      (clk_sd),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_mode  (in_mode),
    .in_mod   (in_mod),
    .in_vec   (in_vec),
    .out_valid(ipm_valid),
    .a1(a1), .a2(a2), .b1(b1), .b2(b2), .c1(c1), .c2(c2),
    .d1(d1), .d2(d2), .e1(e1), .e2(e2),
    .out_tag  (ipm_tag),
    .out_ctx  (ipm_ctx),
    .cur_mode (cur_mode),
    .sm_act   (sm_act)
  );

  pcm u_pcm (
    .clk      (clk_sd),
    .rst_n    (rst_n),
    .in_valid (ipm_valid),
    .a1(a1), .a2(a2), .b1(b1), .b2(b2), .c1(c1), .c2(c2),
    .d1(d1), .d2(d2), .e1(e1), .e2(e2),
    .in_tag   (ipm_tag),
    .in_ctx   (ipm_ctx),
    .out_valid(pcm_valid),
    .p1(p1), .p2(p2), .p3(p3),
    .out_tag  (pcm_tag),
    .out_ctx  (pcm_ctx)
  );

  dvcm #(.Z_SHIFT(Z_SHIFT)) u_dvcm (
    .clk      (clk_sd),
    .rst_n    (rst_n),
    .in_valid (pcm_valid && pcm_tag.mode != MODE_SM),
    .p1(p1), .p2(p2), .p3(p3),
    .in_tag   (pcm_tag),
    .out_valid(dv_valid),
    .z_re(z_re), .z_im(z_im), .csi(csi),
    .out_tag  (dv_tag)
  );

  lcm1d u_lcm1d (
    .clk      (clk_sd),
    .rst_n    (rst_n),
    .in_valid (dv_valid),
    .z_re(z_re), .z_im(z_im), .csi(csi),
    .in_tag   (dv_tag),
    .out_valid(l1_valid),
    .llr      (l1_llr),
    .out_tag  (l1_tag)
  );

  x2ccm #(.SM_SHIFT(SM_SHIFT)) u_x2ccm (
    .clk      (clk_sm),
    .rst_n    (rst_n),
    .in_valid (pcm_valid && pcm_tag.mode == MODE_SM),
    .p1(p1), .p2(p2), .p3(p3),
    .in_tag   (pcm_tag),
    .in_ctx   (pcm_ctx),
    .out_valid(x2_valid),
    .out_phase(x2_phase),
    .out_x2   (x2_sym),
    .out_tag  (x2_tag),
    .out_ctx  (x2_ctx)
  );

  edcm u_edcm (
    .clk      (clk_sm),
    .rst_n    (rst_n),
    .in_valid (x2_valid),
    .in_phase (x2_phase),
    .in_x2    (x2_sym),
    .in_tag   (x2_tag),
    .in_ctx   (x2_ctx),
    .out_valid(ed_valid),
    .out_phase(ed_phase),
    .out_ed   (ed),
    .out_tag  (ed_tag)
  );

  lcm2d u_lcm2d (
    .clk      (clk_sm),
    .rst_n    (rst_n),
    .in_valid (ed_valid),
    .in_phase (ed_phase),
    .in_ed    (ed),
    .in_tag   (ed_tag),
    .out_valid(l2_valid),
    .llr      (l2_llr),
    .out_tag  (l2_tag)
  );

  llr_mux u_llr_mux (
    .sd_valid (l1_valid),
    .sd_llr   (l1_llr),
    .sd_tag   (l1_tag),
    .sm_valid (l2_valid),
    .sm_llr   (l2_llr),
    .sm_tag   (l2_tag),
    .out_valid(mx_valid),
    .out_is_sm(mx_is_sm),
    .out_llr  (mx_llr),
    .out_tag  (mx_tag)
  );

  qm #(.QSHIFT_SD(QSHIFT_SD), .QSHIFT_SM(QSHIFT_SM)) u_qm (
    .clk      (clk_sd),
    .rst_n    (rst_n),
    .in_valid (mx_valid),
    .in_is_sm (mx_is_sm),
    .in_llr   (mx_llr),
    .in_tag   (mx_tag),
    .out_valid(out_valid),
    .out_q    (out_llr),
    .out_tag  (out_tag)
  );

endmodule
