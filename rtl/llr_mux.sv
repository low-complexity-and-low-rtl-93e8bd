// llr_mux: LLR multiplexer between the SD and SM paths.
//
// Forwards the LLR set of whichever detection path presents one in this
// clock: the six 24-bit LLRs of the 1-D (SD) path or the six 19-bit LLRs of
// the 2-D (SM) path, sign-extended to 24 bits, together with the item's tag
// and a flag telling which path it came from. The IPM schedules items so that
// the two paths never deliver in the same clock; an assertion checks this.
// Purely combinational.
module llr_mux
  import mimo_pkg::*;
(
  input  logic    sd_valid,
  input  logic signed [L1W-1:0] sd_llr [NLLR],
  input  tag_t    sd_tag,
  input  logic    sm_valid,
  input  logic signed [L2W-1:0] sm_llr [NLLR],
  input  tag_t    sm_tag,
  output logic    out_valid,
  output logic    out_is_sm,
  output logic signed [L1W-1:0] out_llr [NLLR],
  output tag_t    out_tag
);

  always_comb begin
    out_valid = sd_valid || sm_valid;
    out_is_sm = sm_valid;
    out_tag   = sm_valid ? sm_tag : sd_tag;
    for (int k = 0; k < NLLR; k++)
      out_llr[k] = sm_valid ? L1W'(sm_llr[k]) : sd_llr[k];
  end

  always_comb begin
    assert (!(sd_valid && sm_valid) || $isunknown({sd_valid, sm_valid}))
      else $error("llr_mux: SD and SM LLRs in the same clock");
  end

endmodule
