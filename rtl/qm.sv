// qm: quantization module.
//
// Turns each LLR of the selected path into an 8-bit signed value: the LLR is
// divided by 2^QSHIFT_SD (SD path) or 2^QSHIFT_SM (SM path) with rounding to
// nearest and saturated to [-128, 127]. The 8-bit output word follows the
// design; the two per-path scale factors and the rounding are this design's
// choice (the two paths produce LLRs on different scales).
//
// Timing: one register stage.
module qm
  import mimo_pkg::*;
#(
  parameter int unsigned QSHIFT_SD = 4,
  parameter int unsigned QSHIFT_SM = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_is_sm,
  input  logic signed [L1W-1:0] in_llr [NLLR],
  input  tag_t    in_tag,
  output logic    out_valid,
  output logic signed [QW-1:0] out_q [NLLR],
  output tag_t    out_tag
);

  typedef logic signed [L1W:0] v_t;

  function automatic logic signed [QW-1:0] quant(input logic signed [L1W-1:0] l,
                                                 input int unsigned s);
    v_t v;
    v = v_t'(l);
    if (s > 0) v = (v + (v_t'(1) <<< (s - 1))) >>> s;
    return QW'(sat(48'(v), QW));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      for (int k = 0; k < NLLR; k++) out_q[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        for (int k = 0; k < NLLR; k++)
          out_q[k] <= quant(in_llr[k], in_is_sm ? QSHIFT_SM : QSHIFT_SD);
      end
    end
  end

endmodule
