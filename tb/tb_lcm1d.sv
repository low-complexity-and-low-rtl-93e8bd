// tb_lcm1d: checks the 1-D LLR calculation module. For random decision
// variables and CSI in all four modulations (BPSK, QPSK, 16QAM, 64QAM) the
// LLRs must follow the piecewise-linear demapping written out per level
// region below, and, where the LLR is clearly non-zero, its sign must agree with the exact max-log
// LLR found by searching all levels of the axis. One-clock latency.
module tb_lcm1d;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid;
  logic signed [DW-1:0] z_re, z_im, csi;
  tag_t in_tag, out_tag;
  logic signed [L1W-1:0] llr [NLLR];

  lcm1d dut (.*);

  int checks = 0, failures = 0;

  // piecewise-linear LLRs of one axis, written per region
  function automatic void pwl(longint u, longint c, mod_e m, output longint l[3]);
    longint a;
    a = u < 0 ? -u : u;
    l[0] = -u; l[1] = 0; l[2] = 0;
    if (m == MOD_16QAM) l[1] = a - 2 * c;
    if (m == MOD_64QAM) begin
      l[1] = a - 4 * c;
      if (a >= 4 * c) l[2] = a - 6 * c;
      else            l[2] = 2 * c - a;
    end
  endfunction

  // exact max-log sign: 1 if the nearest level with bit=1 is nearer than bit=0
  function automatic int maxlog_sign(longint u, longint c, mod_e m, int b);
    longint d0 = 64'h7fffffffffff, d1 = 64'h7fffffffffff, d;
    int ml, bit_v, a;
    ml = (m == MOD_QPSK || m == MOD_BPSK) ? 1 : (m == MOD_16QAM ? 3 : 7);
    for (int L = -ml; L <= ml; L += 2) begin
      a = L < 0 ? -L : L;
      case (b)
        0: bit_v = L < 0;
        1: bit_v = (m == MOD_16QAM) ? (a == 3) : (a >= 5);
        default: bit_v = (a == 1 || a == 7);
      endcase
      d = (u - c * L) * (u - c * L);
      if (bit_v) begin if (d < d1) d1 = d; end
      else       begin if (d < d0) d0 = d; end
    end
    return (d0 > d1) ? 1 : ((d0 < d1) ? -1 : 0);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint li[3], lq[3], ex[6];
    longint c, ur, ui;
    tag_t tg;
    int nb;
    in_valid = 0; z_re = 0; z_im = 0; csi = 0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tg = tag_t'($urandom); tg.modu = mod_e'($urandom_range(0, 3));
      c = $urandom_range(1, 8000);
      ur = longint'($signed($urandom_range(0, 16 * c))) - 8 * c;
      ui = longint'($signed($urandom_range(0, 16 * c))) - 8 * c;
      if (ur > 65535) ur = 65535; if (ur < -65536) ur = -65536;
      if (ui > 65535) ui = 65535; if (ui < -65536) ui = -65536;
      z_re = DW'(ur); z_im = DW'(ui); csi = DW'(c); in_tag = tg; in_valid = 1'b1;
      pwl(ur, c, tg.modu, li); pwl(ui, c, tg.modu, lq);
      ex = '{li[0], lq[0], li[1], lq[1], li[2], lq[2]};
      if (tg.modu == MOD_BPSK) ex[1] = 0;   // BPSK: I sign bit only
      nb = (tg.modu == MOD_BPSK) ? 1 : (tg.modu == MOD_QPSK) ? 2 : (tg.modu == MOD_16QAM ? 4 : 6);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_tag != tg) begin failures++; $display("ERROR: valid/tag"); end
      for (int b = 0; b < 6; b++) begin
        checks++;
        if (longint'(llr[b]) != ex[b]) begin
          failures++; $display("ERROR: i=%0d mod %0d llr%0d got %0d exp %0d", i, tg.modu, b, llr[b], ex[b]);
        end
        if (b < nb && (llr[b] > c / 4 || llr[b] < -c / 4)) begin
          int s;
          s = maxlog_sign((b % 2) ? ui : ur, c, tg.modu, b / 2);
          checks++;
          if ((llr[b] > 0 ? 1 : -1) != s) begin
            failures++; $display("ERROR: i=%0d llr%0d sign differs from max-log", i, b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
