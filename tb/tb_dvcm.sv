// tb_dvcm: checks the decision variable calculation module. Random streams
// of items in the SISO, SIMO, MISO and SD modes (SD and MISO as back-to-back
// pairs t = 0, 1) are applied one per clock, with idle gaps. Expected:
// z = p1 (p1 + p2 in SD), CSI = p3 (in SD the sum of the p3 of both items of
// the pair, for both), each divided by 2^12 (arithmetic shift) and saturated
// to 17 bits, two clocks after the input, in order, with the tag.
module tb_dvcm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid;
  cplxp_t p1, p2;
  logic signed [PW-1:0] p3;
  tag_t in_tag, out_tag;
  logic signed [DW-1:0] z_re, z_im, csi;

  dvcm dut (.*);

  int checks = 0, failures = 0;
  typedef struct { longint zr, zi, c; tag_t tg; int t_in; } exp_t;
  exp_t q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint s17(longint v);
    v = v >>> 12;
    if (v > 65535) v = 65535;
    if (v < -65536) v = -65536;
    return v;
  endfunction

  function automatic longint r33();
    return ($urandom_range(0, 9) == 0) ? longint'($signed({$urandom, 1'b0}))
                                       : longint'($signed($urandom_range(0, 20000000))) - 10000000;
  endfunction

  // an output is seen on the falling edge after the second rising edge
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("ERROR: unexpected output"); end
    else begin
      e = q.pop_front();
      if (z_re != e.zr || z_im != e.zi || csi != e.c || out_tag != e.tg || cyc - e.t_in != 1) begin
        failures++;
        $display("ERROR: z=%0d,%0d csi=%0d exp %0d,%0d csi %0d lat %0d", z_re, z_im, csi, e.zr, e.zi, e.c, cyc - e.t_in);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic item(mimo_mode_e md, logic t, longint a1r, a1i, a2r, a2i, a3, output exp_t e);
    @(negedge clk);
    p1.re = PW'(a1r); p1.im = PW'(a1i); p2.re = PW'(a2r); p2.im = PW'(a2i); p3 = PW'(a3);
    in_tag.mode = md; in_tag.modu = mod_e'($urandom_range(0, 2)); in_tag.t = t;
    in_valid = 1'b1;
    e.tg = in_tag; e.t_in = cyc + 1;
    if (md == MODE_SD) begin e.zr = s17(a1r + a2r); e.zi = s17(a1i + a2i); end
    else begin e.zr = s17(a1r); e.zi = s17(a1i); end
  endtask

  initial begin
    exp_t e0, e1;
    longint x3, y3;
    in_valid = 0; p1 = '0; p2 = '0; p3 = '0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      mimo_mode_e md;
      md = mimo_mode_e'($urandom_range(0, 3));
      x3 = $urandom_range(0, 300000000); y3 = $urandom_range(0, 300000000);
      if (md == MODE_SD || md == MODE_MISO) begin
        item(md, 1'b0, r33(), r33(), r33(), r33(), x3, e0);
        item(md, 1'b1, r33(), r33(), r33(), r33(), (md == MODE_SD) ? y3 : x3, e1);
        e0.c = (md == MODE_SD) ? s17(x3 + y3) : s17(x3);
        e1.c = e0.c;
        q.push_back(e0); q.push_back(e1);
      end else begin
        item(md, 1'b0, r33(), r33(), r33(), r33(), x3, e0);
        e0.c = s17(x3);
        q.push_back(e0);
      end
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("ERROR: missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
