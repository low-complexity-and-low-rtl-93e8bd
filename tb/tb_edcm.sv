// tb_edcm: checks the Euclidean distance calculation module. With random
// received samples, channel columns and sliced symbols, each of the 16
// metrics of a phase must equal sum over both RX antennas of
// floor((3(|Re r|+|Im r|) + 5 max(|Re r|,|Im r|)) / 8), r = y - hc c_m - hx x2,
// computed with ordinary complex multiplications. Also checks the one-clock
// latency and that phase and tag are carried.
module tb_edcm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid;
  logic [1:0] in_phase, out_phase;
  sym_t in_x2 [NLANE];
  tag_t in_tag, out_tag;
  sm_ctx_t in_ctx;
  logic [EDW-1:0] out_ed [NLANE];

  edcm dut (.*);

  int checks = 0, failures = 0;

  function automatic cplx_t rc();
    cplx_t z;
    z.re = 16'($signed($urandom_range(0, 40000)) - 20000);
    z.im = 16'($signed($urandom_range(0, 40000)) - 20000);
    return z;
  endfunction

  function automatic longint mag(longint re, longint im);
    longint a = re < 0 ? -re : re;
    longint b = im < 0 ? -im : im;
    longint mx = a > b ? a : b;
    return (3 * (a + b) + 5 * mx) / 8;
  endfunction

  function automatic longint metric_row(cplx_t y, cplx_t hc, cplx_t hx, int cr, int ci, int xr, int xi);
    longint rr, ri;
    rr = longint'(y.re) - (longint'(hc.re) * cr - longint'(hc.im) * ci) - (longint'(hx.re) * xr - longint'(hx.im) * xi);
    ri = longint'(y.im) - (longint'(hc.re) * ci + longint'(hc.im) * cr) - (longint'(hx.re) * xi + longint'(hx.im) * xr);
    return mag(rr, ri);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint exp_e [NLANE];
    tag_t tg;
    logic [1:0] ph;
    in_valid = 0; in_phase = 0; in_tag = '0; in_ctx = '0;
    for (int m = 0; m < NLANE; m++) in_x2[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      ph = 2'($urandom); tg = tag_t'($urandom);
      in_ctx.y1 = rc(); in_ctx.y2 = rc();
      in_ctx.hc1 = rc(); in_ctx.hc2 = rc(); in_ctx.hx1 = rc(); in_ctx.hx2 = rc();
      if (i % 3 == 0) begin   // small residual
        in_ctx.hc1.re = in_ctx.hc1.re >>> 6; in_ctx.hc1.im = in_ctx.hc1.im >>> 6;
      end
      for (int m = 0; m < NLANE; m++) begin
        sym_t c;
        int cr, ci, xr, xi;
        in_x2[m] = sym_t'($urandom);
        c = cand_of(int'(ph), m);
        cr = 2 * int'(c.re) - 7; ci = 2 * int'(c.im) - 7;
        xr = 2 * int'(in_x2[m].re) - 7; xi = 2 * int'(in_x2[m].im) - 7;
        exp_e[m] = metric_row(in_ctx.y1, in_ctx.hc1, in_ctx.hx1, cr, ci, xr, xi) +
                   metric_row(in_ctx.y2, in_ctx.hc2, in_ctx.hx2, cr, ci, xr, xi);
      end
      in_phase = ph; in_tag = tg; in_valid = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_phase != ph || out_tag != tg) begin
        failures++; $display("ERROR: i=%0d valid/phase/tag", i);
      end
      for (int m = 0; m < NLANE; m++) begin
        checks++;
        if (longint'(out_ed[m]) != exp_e[m]) begin
          failures++; $display("ERROR: i=%0d lane %0d got %0d exp %0d", i, m, out_ed[m], exp_e[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
