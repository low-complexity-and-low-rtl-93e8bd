// tb_pcm: checks p1 = a^H b, p2 = c^H d, p3 = ||e||^2 of the parameter
// calculation module against products computed in 64-bit integers, for random
// operands (including full-scale ones, where the 33-bit result saturates), and
// checks the one-clock latency and that tag and context ride along.
module tb_pcm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid;
  cplx_t a1, a2, b1, b2, c1, c2, d1, d2, e1, e2;
  tag_t in_tag, out_tag;
  sm_ctx_t in_ctx, out_ctx;
  cplxp_t p1, p2;
  logic signed [PW-1:0] p3;

  pcm dut (.*);

  int checks = 0, failures = 0;

  function automatic cplx_t rc(int big);
    cplx_t z;
    z.re = big ? 16'($urandom) : 16'($signed($urandom_range(0, 8000)) - 4000);
    z.im = big ? 16'($urandom) : 16'($signed($urandom_range(0, 8000)) - 4000);
    return z;
  endfunction

  function automatic longint sat33(longint v);
    if (v > 64'sd4294967295) return 64'sd4294967295;
    if (v < -64'sd4294967296) return -64'sd4294967296;
    return v;
  endfunction

  // conj(x)*y
  function automatic longint cre(cplx_t x, cplx_t y);
    return longint'(x.re) * y.re + longint'(x.im) * y.im;
  endfunction
  function automatic longint cim(cplx_t x, cplx_t y);
    return longint'(x.re) * y.im - longint'(x.im) * y.re;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint e1r, e1i, e2r, e2i, e3;
    in_valid = 0; {a1, a2, b1, b2, c1, c2, d1, d2, e1, e2} = '0; in_tag = '0; in_ctx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      int big = (i % 10 == 0);
      @(negedge clk);
      a1 = rc(big); a2 = rc(big); b1 = rc(big); b2 = rc(big); c1 = rc(big);
      c2 = rc(big); d1 = rc(big); d2 = rc(big); e1 = rc(big); e2 = rc(big);
      in_tag = tag_t'($urandom); in_ctx = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      in_valid = 1'b1;
      e1r = sat33(cre(a1, b1) + cre(a2, b2)); e1i = sat33(cim(a1, b1) + cim(a2, b2));
      e2r = sat33(cre(c1, d1) + cre(c2, d2)); e2i = sat33(cim(c1, d1) + cim(c2, d2));
      e3  = sat33(longint'(e1.re) * e1.re + longint'(e1.im) * e1.im +
                  longint'(e2.re) * e2.re + longint'(e2.im) * e2.im);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || longint'(p1.re) != e1r || longint'(p1.im) != e1i ||
          longint'(p2.re) != e2r || longint'(p2.im) != e2i || longint'(p3) != e3 ||
          out_tag != in_tag || out_ctx != in_ctx) begin
        failures++;
        $display("ERROR: i=%0d p1=%0d,%0d exp %0d,%0d p2=%0d,%0d exp %0d,%0d p3=%0d exp %0d",
                 i, p1.re, p1.im, e1r, e1i, p2.re, p2.im, e2r, e2i, p3, e3);
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++; if (out_valid) begin failures++; $display("ERROR: valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
