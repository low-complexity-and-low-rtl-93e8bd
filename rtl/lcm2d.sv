// lcm2d: 2-dimensional LLR calculation module (spatial-multiplexing path).
//
// Max-log LLRs of the searched symbol from the metrics of all its candidates:
//   LLR_l = min{e_m : bit l of c_m = 0} - min{e_m : bit l of c_m = 1}.
// The 64 candidates arrive as 4 phases of 16 metrics (lane/phase numbering
// of the pbm); two running minima per bit are kept across the phases, reset
// at phase 0. Candidates outside the active modulation (QPSK uses 4, 16QAM
// 16 of the 64 lanes) are ignored. Bits not used by the modulation give 0.
// The result saturates to the 19-bit word length of the design.
//
// Timing: the LLRs of a column are registered at the end of phase 3 and held
// with out_valid high for one clock. Runs on the SM clock.
module lcm2d
  import mimo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic [1:0] in_phase,
  input  logic [EDW-1:0] in_ed [NLANE],
  input  tag_t    in_tag,
  output logic    out_valid,
  output logic signed [L2W-1:0] llr [NLLR],
  output tag_t    out_tag
);

  typedef logic [EDW-1:0] e_t;

  e_t min0 [NLLR];
  e_t min1 [NLLR];
  e_t n0 [NLLR];
  e_t n1 [NLLR];

  always_comb begin
    sym_t c;
    logic [5:0] bits;
    logic ok;
    for (int b = 0; b < NLLR; b++) begin
      n0[b] = (in_phase == 2'd0) ? '1 : min0[b];
      n1[b] = (in_phase == 2'd0) ? '1 : min1[b];
    end
    for (int m = 0; m < NLANE; m++) begin
      c    = cand_of(int'(in_phase), m);
      ok   = c.re >= kmin(in_tag.modu) && c.re <= kmax(in_tag.modu) &&
             c.im >= kmin(in_tag.modu) && c.im <= kmax(in_tag.modu);
      bits = sym_bits(c, in_tag.modu);
      for (int b = 0; b < NLLR; b++) begin
        if (ok && b < nbits(in_tag.modu)) begin
          if (bits[b]) begin
            if (in_ed[m] < n1[b]) n1[b] = in_ed[m];
          end else begin
            if (in_ed[m] < n0[b]) n0[b] = in_ed[m];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      for (int b = 0; b < NLLR; b++) begin
        min0[b] <= '0;
        min1[b] <= '0;
        llr[b]  <= '0;
      end
    end else begin
      out_valid <= in_valid && in_phase == 2'd3;
      if (in_valid) begin
        for (int b = 0; b < NLLR; b++) begin
          min0[b] <= n0[b];
          min1[b] <= n1[b];
        end
        if (in_phase == 2'd3) begin
          out_tag <= in_tag;
          for (int b = 0; b < NLLR; b++)
            llr[b] <= (b < nbits(in_tag.modu))
                      ? L2W'(sat(48'(n0[b]) - 48'(n1[b]), L2W)) : '0;
        end
      end
    end
  end

endmodule
