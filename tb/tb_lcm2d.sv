// tb_lcm2d: checks the 2-D LLR calculation module. Four phases of 16 random
// metrics (one column of candidates) are applied per test with a random
// modulation; after phase 3 the LLRs must equal min(metric | bit = 0) -
// min(metric | bit = 1) over the candidates that belong to the modulation,
// saturated to 19 bits, with bits labelled per axis (sign 1 = negative,
// outer 1 = |level| >= 5 (64QAM) or 3 (16QAM), fine 1 = |level| in {1, 7}).
// Unused LLRs must be 0. Also checks that out_valid is a single-clock pulse
// one clock after phase 3.
module tb_lcm2d;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid;
  logic [1:0] in_phase;
  logic [EDW-1:0] in_ed [NLANE];
  tag_t in_tag, out_tag;
  logic signed [L2W-1:0] llr [NLLR];

  lcm2d dut (.*);

  int checks = 0, failures = 0;

  function automatic int abits(int l, mod_e m);
    int a, r;
    a = l < 0 ? -l : l;
    r = (l < 0) ? 1 : 0;
    if (m == MOD_16QAM && a == 3) r |= 2;
    if (m == MOD_64QAM) begin
      if (a >= 5) r |= 2;
      if (a == 1 || a == 7) r |= 4;
    end
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint mn0 [6], mn1 [6], ex [6];
    tag_t tg;
    int ml, nb;
    in_valid = 0; in_phase = 0; in_tag = '0;
    for (int m = 0; m < NLANE; m++) in_ed[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      tg = tag_t'($urandom); tg.modu = mod_e'($urandom_range(0, 2));
      ml = (tg.modu == MOD_QPSK) ? 1 : (tg.modu == MOD_16QAM ? 3 : 7);
      nb = (tg.modu == MOD_QPSK) ? 2 : (tg.modu == MOD_16QAM ? 4 : 6);
      for (int b = 0; b < 6; b++) begin mn0[b] = 64'h7fffffffff; mn1[b] = 64'h7fffffffff; end
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        in_valid = 1'b1; in_phase = 2'(k); in_tag = tg;
        for (int m = 0; m < NLANE; m++) begin
          sym_t c;
          int cr, ci, bits, bi, bq;
          in_ed[m] = (i % 4 == 0) ? EDW'($urandom) : EDW'($urandom_range(0, 5000));
          c = cand_of(k, m);
          cr = 2 * int'(c.re) - 7; ci = 2 * int'(c.im) - 7;
          if (cr >= -ml && cr <= ml && ci >= -ml && ci <= ml) begin
            bi = abits(cr, tg.modu); bq = abits(ci, tg.modu);
            bits = (bi & 1) | ((bq & 1) << 1) | (((bi >> 1) & 1) << 2) | (((bq >> 1) & 1) << 3) |
                   (((bi >> 2) & 1) << 4) | (((bq >> 2) & 1) << 5);
            for (int b = 0; b < nb; b++)
              if ((bits >> b) & 1) begin if (in_ed[m] < mn1[b]) mn1[b] = in_ed[m]; end
              else                 begin if (in_ed[m] < mn0[b]) mn0[b] = in_ed[m]; end
          end
        end
        @(posedge clk); #1;
        checks++;
        if (out_valid != (k == 3)) begin failures++; $display("ERROR: out_valid at phase %0d", k); end
      end
      @(negedge clk);
      in_valid = 1'b0;
      for (int b = 0; b < 6; b++) begin
        ex[b] = (b < nb) ? mn0[b] - mn1[b] : 0;
        if (ex[b] > 262143) ex[b] = 262143;
        if (ex[b] < -262144) ex[b] = -262144;
        checks++;
        if (longint'(llr[b]) != ex[b]) begin
          failures++; $display("ERROR: i=%0d mod %0d llr%0d got %0d exp %0d", i, tg.modu, b, llr[b], ex[b]);
        end
      end
      checks++;
      if (out_tag != tg) begin failures++; $display("ERROR: tag"); end
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("ERROR: out_valid longer than one clock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
