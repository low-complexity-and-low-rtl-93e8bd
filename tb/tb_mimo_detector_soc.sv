// tb_mimo_detector_soc: system test of the detector with its bus buffers.
//
// A bus master model loads slots of 48 input vectors into the channel and
// received-sample RAMs over AHB-Lite, starts a run through the control
// register, polls the status register until the run is done and reads the
// 8-bit LLRs back from the LLR RAM. The slot sequence is that of the ten
// power-evaluation scenarios (scenario n has n spatial-multiplexing slots
// among 10 slots of SD, SISO, SIMO, MISO and SM with QPSK, 16QAM and 64QAM).
// Expected LLRs come from a reference model written from the detection
// equations (Alamouti / MRC combining and piecewise-linear demapping for the
// diversity modes; modified ML with a nearest-point slicer, the 3/8-5/8 norm
// approximation and per-bit minima for SM) and must match bit-exactly, tag
// byte included; at the low noise used the LLR signs must equal the
// transmitted bits. Also checked: run length of a slot (one vector per clock
// in SISO/SIMO, 2 clocks per vector in MISO/SD, 8 in SM, i.e. 1.5 bits per
// clock for 64QAM SM), no SM clock edge during a diversity-mode slot, the
// SM clock running in SM slots, and the status register contents. The share
// of clocks with the SM clock running is printed per scenario.
// Runs the top with its default parameters.
module tb_mimo_detector_soc;
  import mimo_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset of all domains
  always #5 clk = ~clk;

  logic        hsel = 1'b0;
  logic [15:0] haddr = '0;
  logic [1:0]  htrans = 2'b00;
  logic        hwrite = 1'b0;
  logic [31:0] hwdata = '0;
  logic        hready;
  logic        hreadyout;
  logic [31:0] hrdata;
  logic        hresp;
  logic        sm_clk_on;

  assign hready = hreadyout;   // single slave on the bus

  mimo_detector_soc dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference model ----------------
  typedef struct {
    int q [6];
    mimo_mode_e mode;
    mod_e modu;
    logic t;
    int txbits;    // transmitted bits of the symbol (b0..b5)
    int nb;
  } exp_t;
  exp_t expq[$];

  function automatic longint sat_l(longint v, int n);
    longint hi = (64'sd1 <<< (n - 1)) - 1;
    longint lo = -(64'sd1 <<< (n - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic int quant8(longint l, int s);
    longint v = l;
    if (s > 0) v = (v + (64'sd1 <<< (s - 1))) >>> s;
    return int'(sat_l(v, 8));
  endfunction

  function automatic int nb_of(mod_e m);
    return m == MOD_QPSK ? 2 : (m == MOD_16QAM ? 4 : 6);
  endfunction

  function automatic int maxlvl(mod_e m);
    return m == MOD_QPSK ? 1 : (m == MOD_16QAM ? 3 : 7);
  endfunction

  // bits of one axis level: [sign, outer, fine]
  function automatic int abits(int l, mod_e m);
    int a = l < 0 ? -l : l;
    int r = (l < 0) ? 1 : 0;
    if (m == MOD_16QAM && a == 3) r |= 2;
    if (m == MOD_64QAM) begin
      if (a >= 5) r |= 2;
      if (a == 1 || a == 7) r |= 4;
    end
    return r;
  endfunction

  function automatic int symbits(int lr, int li, mod_e m);
    int bi = abits(lr, m), bq = abits(li, m);
    int r = 0;
    for (int k = 0; k < 3; k++) begin
      r |= ((bi >> k) & 1) << (2 * k);
      r |= ((bq >> k) & 1) << (2 * k + 1);
    end
    return r;
  endfunction

  // complex helpers on longint pairs
  typedef struct { longint re, im; } cl_t;
  function automatic cl_t C(cplx_t z); cl_t r; r.re = z.re; r.im = z.im; return r; endfunction
  function automatic cl_t cj(cl_t a); cl_t r; r.re = a.re; r.im = -a.im; return r; endfunction
  function automatic cl_t mul(cl_t a, cl_t b);
    cl_t r; r.re = a.re * b.re - a.im * b.im; r.im = a.re * b.im + a.im * b.re; return r;
  endfunction
  function automatic cl_t add(cl_t a, cl_t b); cl_t r; r.re = a.re + b.re; r.im = a.im + b.im; return r; endfunction
  function automatic cl_t sub(cl_t a, cl_t b); cl_t r; r.re = a.re - b.re; r.im = a.im - b.im; return r; endfunction
  function automatic longint n2(cl_t a); return a.re * a.re + a.im * a.im; endfunction
  function automatic cl_t mk(longint re, longint im); cl_t r; r.re = re; r.im = im; return r; endfunction

  // SD-family reference: one symbol from z, csi
  function automatic void ref_sd(cl_t z, longint csi, mod_e m, mimo_mode_e md, logic t, int tx);
    exp_t e;
    longint zr, zi, c, l[6];
    zr = sat_l(z.re >>> 12, 17);
    zi = sat_l(z.im >>> 12, 17);
    c  = sat_l(csi >>> 12, 17);
    for (int k = 0; k < 6; k++) l[k] = 0;
    for (int ax = 0; ax < 2; ax++) begin
      longint u = ax ? zi : zr;
      longint au = u < 0 ? -u : u;
      l[ax] = -u;
      if (m == MOD_16QAM) l[2 + ax] = au - 2 * c;
      if (m == MOD_64QAM) begin
        longint d = au - 4 * c;
        l[2 + ax] = d;
        l[4 + ax] = (d < 0 ? -d : d) - 2 * c;
      end
    end
    for (int k = 0; k < 6; k++) e.q[k] = quant8(l[k], 4);
    e.mode = md; e.modu = m; e.t = t; e.txbits = tx; e.nb = nb_of(m);
    expq.push_back(e);
  endfunction

  // SM reference for one column: candidates on hc, slicing on hx
  function automatic void ref_sm(cl_t y1, cl_t y2, cl_t hc1, cl_t hc2, cl_t hx1, cl_t hx2,
                                 mod_e m, logic t, int tx);
    exp_t e;
    longint p1r, p1i, p2r, p2i, p3s;
    cl_t p1, p2;
    longint min0[6], min1[6];
    int ml = maxlvl(m);
    p1 = add(mul(cj(hx1), y1), mul(cj(hx2), y2));
    p2 = add(mul(cj(hx1), hc1), mul(cj(hx2), hc2));
    p1r = sat_l(p1.re >>> 12, 16); p1i = sat_l(p1.im >>> 12, 16);
    p2r = sat_l(p2.re >>> 12, 16); p2i = sat_l(p2.im >>> 12, 16);
    p3s = sat_l((n2(hx1) + n2(hx2)) >>> 12, 16);
    for (int k = 0; k < 6; k++) begin min0[k] = 64'h7fffffffffff; min1[k] = 64'h7fffffffffff; end
    for (int cr = -ml; cr <= ml; cr += 2)
      for (int ci = -ml; ci <= ml; ci += 2) begin
        longint ur, ui, best, met;
        int xr, xi, bits;
        cl_t r1, r2;
        ur = p1r - (p2r * cr - p2i * ci);
        ui = p1i - (p2r * ci + p2i * cr);
        // nearest level on each axis, brute force, lower level on ties
        best = 64'h7fffffffffff; xr = -ml;
        for (int L = -ml; L <= ml; L += 2) begin
          longint d = ur - p3s * L; if (d < 0) d = -d;
          if (d < best) begin best = d; xr = L; end
        end
        best = 64'h7fffffffffff; xi = -ml;
        for (int L = -ml; L <= ml; L += 2) begin
          longint d = ui - p3s * L; if (d < 0) d = -d;
          if (d < best) begin best = d; xi = L; end
        end
        r1 = sub(sub(y1, mul(hc1, mk(cr, ci))), mul(hx1, mk(xr, xi)));
        r2 = sub(sub(y2, mul(hc2, mk(cr, ci))), mul(hx2, mk(xr, xi)));
        met = 0;
        begin
          longint a, b, mx;
          a = r1.re < 0 ? -r1.re : r1.re; b = r1.im < 0 ? -r1.im : r1.im; mx = a > b ? a : b;
          met += (3 * (a + b) + 5 * mx) >>> 3;
          a = r2.re < 0 ? -r2.re : r2.re; b = r2.im < 0 ? -r2.im : r2.im; mx = a > b ? a : b;
          met += (3 * (a + b) + 5 * mx) >>> 3;
        end
        bits = symbits(cr, ci, m);
        for (int k = 0; k < nb_of(m); k++)
          if ((bits >> k) & 1) begin if (met < min1[k]) min1[k] = met; end
          else                 begin if (met < min0[k]) min0[k] = met; end
      end
    for (int k = 0; k < 6; k++)
      e.q[k] = (k < nb_of(m)) ? quant8(sat_l(min0[k] - min1[k], 19), 4) : 0;
    e.mode = MODE_SM; e.modu = m; e.t = t; e.txbits = tx; e.nb = nb_of(m);
    expq.push_back(e);
  endfunction

  // ---------------- stimulus ----------------
  function automatic int rnd_lvl(mod_e m);
    int ml = maxlvl(m);
    return 2 * int'($urandom_range(0, ml)) - ml;
  endfunction

  function automatic cplx_t rnd_h();
    cplx_t h;
    h.re = 16'($signed($urandom_range(0, 1200)) - 600);
    h.im = 16'($signed($urandom_range(0, 1200)) - 600);
    if (h.re > -150 && h.re < 150) h.re = h.re < 0 ? -16'sd400 : 16'sd400;
    return h;
  endfunction

  function automatic cplx_t to_c(cl_t a);
    cplx_t r;
    r.re = 16'(sat_l(a.re, 16));
    r.im = 16'(sat_l(a.im, 16));
    return r;
  endfunction

  function automatic cl_t noise();
    return mk(longint'($urandom_range(0, 60)) - 30, longint'($urandom_range(0, 60)) - 30);
  endfunction

  // build one vector and its expected outputs
  task automatic make_vec(mimo_mode_e md, mod_e m, output in_vec_t v);
    cl_t h11, h12, h21, h22, x1, x2, x1c, x2c, y11, y12, y21, y22;
    int b1, b2;
    int l1r = rnd_lvl(m), l1i = rnd_lvl(m), l2r = rnd_lvl(m), l2i = rnd_lvl(m);
    v = '0;
    v.h11 = rnd_h(); v.h12 = rnd_h(); v.h21 = rnd_h(); v.h22 = rnd_h();
    h11 = C(v.h11); h12 = C(v.h12); h21 = C(v.h21); h22 = C(v.h22);
    x1 = mk(l1r, l1i); x2 = mk(l2r, l2i);
    b1 = symbits(l1r, l1i, m); b2 = symbits(l2r, l2i, m);
    case (md)
      MODE_SISO: begin
        y11 = add(mul(h11, x1), noise());
        v.y11 = to_c(y11);
        ref_sd(mul(cj(h11), C(v.y11)), n2(h11), m, md, 1'b0, b1);
      end
      MODE_SIMO: begin
        v.y11 = to_c(add(mul(h11, x1), noise()));
        v.y21 = to_c(add(mul(h12, x1), noise()));
        ref_sd(add(mul(cj(h11), C(v.y11)), mul(cj(h12), C(v.y21))), n2(h11) + n2(h12),
               m, md, 1'b0, b1);
      end
      MODE_MISO, MODE_SD: begin
        // Alamouti: time 1 sends (x1, x2), time 2 sends (-x2*, x1*)
        cl_t z1, z2; longint csi;
        x1c = cj(x1); x2c = cj(x2);
        v.y11 = to_c(add(add(mul(h11, x1), mul(h21, x2)), noise()));
        v.y12 = to_c(add(sub(mul(h21, x1c), mul(h11, x2c)), noise()));
        v.y21 = to_c(add(add(mul(h12, x1), mul(h22, x2)), noise()));
        v.y22 = to_c(add(sub(mul(h22, x1c), mul(h12, x2c)), noise()));
        z1 = add(mul(cj(h11), C(v.y11)), mul(h21, cj(C(v.y12))));
        z2 = sub(mul(cj(h21), C(v.y11)), mul(h11, cj(C(v.y12))));
        csi = n2(h11) + n2(h21);
        if (md == MODE_SD) begin
          z1 = add(z1, add(mul(cj(h12), C(v.y21)), mul(h22, cj(C(v.y22)))));
          z2 = add(z2, sub(mul(cj(h22), C(v.y21)), mul(h12, cj(C(v.y22)))));
          csi += n2(h12) + n2(h22);
        end
        ref_sd(z1, csi, m, md, 1'b0, b1);
        ref_sd(z2, csi, m, md, 1'b1, b2);
      end
      default: begin
        v.y11 = to_c(add(add(mul(h11, x1), mul(h21, x2)), noise()));
        v.y21 = to_c(add(add(mul(h12, x1), mul(h22, x2)), noise()));
        y11 = C(v.y11); y21 = C(v.y21);
        ref_sm(y11, y21, h11, h12, h21, h22, m, 1'b0, b1);   // LLRs of x1
        ref_sm(y11, y21, h21, h22, h11, h12, m, 1'b1, b2);   // LLRs of x2
      end
    endcase
  endtask

  // ---------------- bus master ----------------
  task automatic ahb_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    hsel = 1'b1; haddr = a; htrans = 2'b10; hwrite = 1'b1;
    @(posedge clk);
    #1 hsel = 1'b0; htrans = 2'b00; hwdata = d;
    @(negedge clk);
    while (!hreadyout) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic ahb_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    hsel = 1'b1; haddr = a; htrans = 2'b10; hwrite = 1'b0;
    @(posedge clk);
    #1 hsel = 1'b0; htrans = 2'b00;
    @(negedge clk);
    while (!hreadyout) @(negedge clk);
    d = hrdata;
    checks++;
    if (hresp !== 1'b0) begin failures++; $display("ERROR: HRESP not OKAY"); end
    @(posedge clk);
  endtask

  // ---------------- Table of scenarios: 10 slots each ----------------
  // mode codes: 0 SISO, 1 SIMO, 2 MISO, 3 SD, 4 SM; modulation 0 QPSK,
  // 1 16QAM, 2 64QAM
  localparam int SC_MODE [10][10] = '{
    '{3, 0, 1, 0, 3, 2, 2, 1, 3, 0},
    '{3, 0, 4, 0, 3, 2, 2, 1, 3, 0},
    '{3, 0, 4, 0, 3, 2, 4, 1, 3, 0},
    '{4, 0, 4, 0, 3, 2, 2, 1, 4, 0},
    '{4, 0, 4, 0, 4, 2, 2, 1, 4, 0},
    '{4, 0, 4, 0, 4, 2, 2, 4, 3, 4},
    '{3, 0, 4, 0, 4, 2, 2, 4, 4, 4},
    '{4, 4, 4, 0, 4, 2, 4, 1, 4, 4},
    '{4, 4, 4, 0, 4, 4, 2, 4, 4, 4},
    '{4, 4, 4, 4, 4, 2, 4, 4, 4, 4}};
  localparam int SC_MOD [10][10] = '{
    '{2, 0, 0, 2, 1, 1, 0, 1, 0, 1},
    '{2, 0, 1, 2, 1, 1, 0, 1, 0, 1},
    '{2, 0, 1, 2, 1, 1, 2, 1, 0, 1},
    '{2, 0, 1, 2, 1, 1, 0, 1, 0, 1},
    '{2, 0, 1, 2, 1, 1, 0, 1, 0, 1},
    '{2, 0, 1, 2, 0, 0, 0, 0, 0, 0},
    '{2, 0, 1, 2, 1, 1, 0, 1, 0, 1},
    '{2, 0, 1, 2, 1, 1, 2, 1, 0, 1},
    '{2, 0, 1, 2, 1, 1, 0, 1, 0, 1},
    '{2, 0, 1, 2, 1, 1, 0, 1, 0, 1}};
  localparam int NVEC = 48;

  int sm_edges = 0;
  always @(posedge dut.u_det.clk_sm) sm_edges++;
  int sm_on_clks = 0;
  always @(posedge clk) if (sm_clk_on) sm_on_clks++;

  // mechanisms: input stalls (core not ready), SD<->SM switches, gated slots
  int n_stall = 0, n_switch = 0, n_gated = 0, n_col2 = 0;
  always @(posedge clk) if (rst_n && dut.det_valid && !dut.det_ready) n_stall++;
  always @(posedge clk) if (rst_n && dut.out_valid && dut.out_tag.mode == MODE_SM && dut.out_tag.t) n_col2++;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out = 0;

  task automatic run_slot(mimo_mode_e md, mod_e m, output int run_clks);
    in_vec_t v;
    logic [31:0] w0, w1, st;
    int nexp, t0, e0, guard;
    exp_t e;
    cplx_t hs [4], ys [4];
    expq.delete();
    for (int i = 0; i < NVEC; i++) begin
      make_vec(md, m, v);
      hs = '{v.h11, v.h12, v.h21, v.h22};
      ys = '{v.y11, v.y12, v.y21, v.y22};
      for (int s = 0; s < 4; s++) begin
        ahb_write(16'h0000 + 16'(4 * (4 * i + s)), hs[s]);
        ahb_write(16'h1000 + 16'(4 * (4 * i + s)), ys[s]);
      end
    end
    nexp = expq.size();
    e0 = sm_edges;
    ahb_write(16'h3000, {8'h00, 8'(NVEC), 6'h00, 2'(m), 1'b0, 3'(md), 4'h1});
    t0 = cyc;
    guard = 0;
    do begin
      ahb_read(16'h3004, st);
      guard++;
    end while (!st[1] && guard < 5000);
    run_clks = cyc - t0;
    checks++;
    if (!st[1] || st[0] || st[2] || int'(st[23:16]) != nexp) begin
      failures++;
      $display("ERROR: status %h after run (mode %0d mod %0d), expected %0d entries", st, md, m, nexp);
    end
    ahb_read(16'h3000, st);
    checks++;
    if (st[6:4] != 3'(md) || st[9:8] != 2'(m) || st[23:16] != 8'(NVEC) || st[0]) begin
      failures++;
      $display("ERROR: CTRL read back %h", st);
    end
    // SM clock: off in the diversity modes, running in SM
    checks++;
    if ((md == MODE_SM) != (sm_edges != e0)) begin
      failures++;
      $display("ERROR: %0d SM clock edges in a mode %0d slot", sm_edges - e0, md);
    end
    for (int n = 0; n < nexp; n++) begin
      logic ok;
      logic [7:0] tb;
      logic signed [7:0] q [6];
      ahb_read(16'h2000 + 16'(8 * n), w0);
      ahb_read(16'h2000 + 16'(8 * n + 4), w1);
      e = expq.pop_front();
      q = '{w0[7:0], w0[15:8], w0[23:16], w0[31:24], w1[7:0], w1[15:8]};
      tb = w1[23:16];
      ok = tb == {2'b00, e.t, 2'(e.modu), 3'(e.mode)} && w1[31:24] == 8'h00;
      for (int k = 0; k < 6; k++) if (int'(q[k]) != e.q[k]) ok = 0;
      checks++;
      n_out++;
      if (!ok) begin
        failures++;
        $display("ERROR: entry %0d mode %0d mod %0d t %0d got %h %h exp %0d %0d %0d %0d %0d %0d",
                 n, e.mode, e.modu, e.t, w1, w0, e.q[0], e.q[1], e.q[2], e.q[3], e.q[4], e.q[5]);
      end
      for (int k = 0; k < e.nb; k++) begin
        if (q[k] != 0) begin
          checks++;
          if ((q[k] > 0) != (((e.txbits >> k) & 1) == 1)) begin
            failures++;
            $display("ERROR: hard decision bit %0d wrong (entry %0d mode %0d)", k, n, e.mode);
          end
        end
      end
    end
  endtask

  initial begin
    int rc, lim, on0, tot0, sc_on;
    mimo_mode_e md, prev;
    mod_e m;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    prev = MODE_SISO;
    for (int sc = 0; sc < 10; sc++) begin
      sc_on = sm_on_clks; tot0 = cyc;
      for (int sl = 0; sl < 10; sl++) begin
        md = mimo_mode_e'(SC_MODE[sc][sl]);
        m  = mod_e'(SC_MOD[sc][sl]);
        if ($test$plusargs("dbg")) $display("slot %0d %0d: mode %0d mod %0d", sc, sl, md, m);
        on0 = sm_edges;
        run_slot(md, m, rc);
        if ((md == MODE_SM) != (prev == MODE_SM)) n_switch++;
        if (md != MODE_SM && sm_edges == on0) n_gated++;
        prev = md;
        // run time: vectors x clocks per vector + pipeline latency and polling
        lim = NVEC * (md == MODE_SM ? 8 : (md inside {MODE_MISO, MODE_SD} ? 2 : 1)) + 24;
        checks++;
        if (rc > lim || (md == MODE_SM && rc < NVEC * 8)) begin
          failures++;
          $display("ERROR: slot mode %0d mod %0d took %0d clocks (limit %0d)", md, m, rc, lim);
        end
      end
      $display("scenario %0d: SM clock enabled in %0d of %0d clocks", sc,
               sm_on_clks - sc_on, cyc - tot0);
    end
    checks++; if (n_stall == 0)  begin failures++; $display("ERROR: core never stalled the input"); end
    checks++; if (n_switch < 2)  begin failures++; $display("ERROR: no SD/SM mode switch"); end
    checks++; if (n_gated == 0)  begin failures++; $display("ERROR: SM clock never gated in a slot"); end
    checks++; if (n_col2 == 0)   begin failures++; $display("ERROR: no column-switched SM output"); end
    $display("LLR entries read = %0d, stall clocks = %0d, SD/SM switches = %0d, gated slots = %0d, SM second-column outputs = %0d",
             n_out, n_stall, n_switch, n_gated, n_col2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
