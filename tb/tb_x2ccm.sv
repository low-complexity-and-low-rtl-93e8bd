// tb_x2ccm: checks the X2C calculation module. Random p1, p2, p3 (33-bit, as
// produced by the PCM) with random modulations are applied; for every phase
// and lane the sliced symbol must be the constellation point of the active
// modulation nearest (per axis, lower level on a tie) to p1 - p2*c_m measured
// in units of p3, found here by exhaustive search, after the 2^-12 input
// scaling with 16-bit saturation. Also checks the 2-clock latency, the 4
// consecutive phases and that tag and context are carried.
module tb_x2ccm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid;
  cplxp_t p1, p2;
  logic signed [PW-1:0] p3;
  tag_t in_tag, out_tag;
  sm_ctx_t in_ctx, out_ctx;
  logic [1:0] out_phase;
  sym_t out_x2 [NLANE];

  x2ccm dut (.*);

  int checks = 0, failures = 0;

  function automatic longint sc(longint v);
    v = v >>> 12;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  function automatic int nearest(longint u, longint s, int ml);
    longint best = 64'h7fffffffffff, d;
    int r = -ml;
    for (int L = -ml; L <= ml; L += 2) begin
      d = u - s * L;
      if (d < 0) d = -d;
      if (d < best) begin best = d; r = L; end
    end
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint s1r, s1i, s2r, s2i, s3;
    int ml;
    tag_t tg;
    sm_ctx_t cx;
    in_valid = 0; p1 = '0; p2 = '0; p3 = '0; in_tag = '0; in_ctx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      tg.mode = MODE_SM; tg.modu = mod_e'($urandom_range(0, 2)); tg.t = 1'($urandom);
      cx = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ml = (tg.modu == MOD_QPSK) ? 1 : (tg.modu == MOD_16QAM ? 3 : 7);
      s3 = $urandom_range(50, 4000);
      p3 = PW'(s3 << 12) + PW'($urandom_range(0, 4095));
      p2.re = PW'(($signed($urandom_range(0, 8000)) - 4000) * 4096);
      p2.im = PW'(($signed($urandom_range(0, 8000)) - 4000) * 4096);
      p1.re = PW'(($signed($urandom_range(0, 60000)) - 30000) * 4096 + $urandom_range(0, 4095));
      p1.im = PW'(($signed($urandom_range(0, 60000)) - 30000) * 4096 + $urandom_range(0, 4095));
      if (i % 10 == 0) p1.re = PW'(64'sd1 << 31);   // saturates
      s1r = sc(p1.re); s1i = sc(p1.im); s2r = sc(p2.re); s2i = sc(p2.im); s3 = sc(p3);
      in_tag = tg; in_ctx = cx; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0; p1 = '0; p2 = '0; p3 = '0;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        checks++;
        if (!out_valid || out_phase != 2'(k) || out_tag != tg || out_ctx != cx) begin
          failures++; $display("ERROR: i=%0d phase %0d valid=%0d phase=%0d", i, k, out_valid, out_phase);
        end
        for (int m = 0; m < 16; m++) begin
          sym_t c;
          longint ur, ui;
          int cr, ci, xr, xi;
          c = cand_of(k, m);
          cr = 2 * int'(c.re) - 7; ci = 2 * int'(c.im) - 7;
          ur = s1r - (s2r * cr - s2i * ci);
          ui = s1i - (s2r * ci + s2i * cr);
          xr = nearest(ur, s3, ml); xi = nearest(ui, s3, ml);
          checks++;
          if (2 * int'(out_x2[m].re) - 7 != xr || 2 * int'(out_x2[m].im) - 7 != xi) begin
            failures++;
            $display("ERROR: i=%0d ph %0d lane %0d got %0d,%0d exp %0d,%0d", i, k, m,
                     2 * int'(out_x2[m].re) - 7, 2 * int'(out_x2[m].im) - 7, xr, xi);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
