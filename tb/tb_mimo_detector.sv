// tb_mimo_detector: end-to-end test of the 2x2 MIMO symbol detector.
//
// Random channels and symbols are sent through y = H x + n for every MIMO
// mode (SISO, SIMO, MISO, SD, SM) and modulation (QPSK, 16QAM, 64QAM, and
// BPSK in the diversity modes) in mixed order, so that the mode changes between SD and SM several times. A
// reference model written from the detection equations (Alamouti / MRC
// combining and piecewise-linear demapping for SD; modified ML with a
// brute-force nearest-point slicer, the 3/8-5/8 norm approximation and
// per-bit minima for SM) gives the expected 8-bit LLRs, which must match
// bit-exactly and in order. At the low noise used here the sign of every LLR
// must also match the transmitted bit.
// Also checked: SM costs 8 clocks per vector (two symbols, 4 clocks each),
// SIMO streams one symbol per clock, the SM clock does not toggle during an
// SD-only stretch, and the input stalls (in_ready low) while SM is busy.
// Runs with the default parameters of the design.
module tb_mimo_detector;
  import mimo_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset of all domains
  always #5 clk = ~clk;

  logic       in_valid;
  logic       in_ready;
  mimo_mode_e in_mode;
  mod_e       in_mod;
  in_vec_t    in_vec;
  logic       out_valid;
  logic signed [QW-1:0] out_llr [NLLR];
  tag_t       out_tag;
  logic       sm_clk_on;

  mimo_detector dut (.*);

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
    return m == MOD_BPSK ? 1 : m == MOD_QPSK ? 2 : (m == MOD_16QAM ? 4 : 6);
  endfunction

  function automatic int maxlvl(mod_e m);
    return (m == MOD_QPSK || m == MOD_BPSK) ? 1 : (m == MOD_16QAM ? 3 : 7);
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
    if (m == MOD_BPSK) l[1] = 0;   // BPSK: I sign bit only
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
    if (m == MOD_BPSK) begin l1i = 0; l2i = 0; end   // BPSK: +-1 on the I axis
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

  // ---------------- driver ----------------
  int n_stall = 0, n_switch = 0, n_sm_col2 = 0, n_gated = 0;
  int cov [5][4];
  mimo_mode_e last_mode = MODE_SISO;

  // inputs change on the falling edge; in_ready is sampled just before the
  // rising edge that completes the handshake
  task automatic send(mimo_mode_e md, mod_e m);
    in_vec_t v;
    logic rdy;
    make_vec(md, m, v);
    @(negedge clk);
    if ($test$plusargs("dbg")) $display("IN cyc=%0d mode=%0d", cyc, md);
    in_valid = 1'b1; in_mode = md; in_mod = m; in_vec = v;
    #1 rdy = in_ready;
    while (!rdy) begin
      n_stall++;
      @(negedge clk);
      #1 rdy = in_ready;
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    if (md != last_mode && (md == MODE_SM || last_mode == MODE_SM)) n_switch++;
    last_mode = md;
    cov[int'(md)][int'(m)]++;
  endtask

  // ---------------- monitor ----------------
  int n_out = 0;
  int t_out [$];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      t_out.push_back(cyc);
      if ($test$plusargs("dbg")) $display("OUT cyc=%0d mode=%0d t=%0d llr=%0d %0d %0d", cyc, out_tag.mode, out_tag.t, out_llr[0], out_llr[1], out_llr[2]);
      n_out++;
      if (expq.size() == 0) begin
        failures++; checks++;
        $display("ERROR: unexpected output at cycle %0d", cyc);
      end else begin
        logic ok;
        e = expq.pop_front();
        ok = (out_tag.mode == e.mode) && (out_tag.modu == e.modu) && (out_tag.t == e.t);
        for (int k = 0; k < 6; k++) if (int'(out_llr[k]) != e.q[k]) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("ERROR: mode %0d mod %0d t %0d got %0d %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d %0d",
                   e.mode, e.modu, e.t, out_llr[0], out_llr[1], out_llr[2], out_llr[3],
                   out_llr[4], out_llr[5], e.q[0], e.q[1], e.q[2], e.q[3], e.q[4], e.q[5]);
        end
        // hard decisions must equal the transmitted bits
        for (int k = 0; k < e.nb; k++) begin
          if (out_llr[k] != 0) begin
            checks++;
            if ((out_llr[k] > 0) != (((e.txbits >> k) & 1) == 1)) begin
              failures++;
              $display("ERROR: hard decision bit %0d wrong (mode %0d mod %0d t %0d)", k, e.mode, e.modu, e.t);
            end
          end
        end
        if (e.mode == MODE_SM && e.t) n_sm_col2++;
      end
    end
  end

  // clk_sm edges while only SD work is in flight
  int sm_edges = 0;
  always @(posedge dut.clk_sm) sm_edges++;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_drain();
    int guard = 0;
    while ((expq.size() != 0) && guard < 1000) begin @(posedge clk); guard++; end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int t0, e0, k;
    in_valid = 0; in_mode = MODE_SISO; in_mod = MOD_QPSK; in_vec = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. SM throughput: 8 back-to-back SM 64QAM vectors -> 16 symbols,
    //    one every 4 clocks
    t_out.delete();
    for (int i = 0; i < 8; i++) send(MODE_SM, MOD_64QAM);
    wait_drain();
    checks++;
    if (t_out.size() != 16 || t_out[15] - t_out[0] != 60) begin
      failures++;
      $display("ERROR: SM rate: %0d outputs, span %0d clocks", t_out.size(),
               t_out.size() ? t_out[t_out.size()-1] - t_out[0] : -1);
    end

    // 2. SIMO stream at one symbol per clock, SM clock gated meanwhile
    t_out.delete();
    repeat (30) @(posedge clk);   // SM clock run-on ends
    send(MODE_SISO, MOD_QPSK);    // mode leaves SM
    wait_drain();
    t_out.delete();
    e0 = sm_edges;
    for (int i = 0; i < 48; i++) send(MODE_SIMO, MOD_16QAM);
    wait_drain();
    checks++;
    if (t_out.size() != 48 || t_out[47] - t_out[0] != 47) begin
      failures++;
      $display("ERROR: SIMO rate: %0d outputs, span %0d", t_out.size(),
               t_out.size() ? t_out[t_out.size()-1] - t_out[0] : -1);
    end
    checks++;
    if (sm_edges != e0) begin
      failures++;
      $display("ERROR: SM clock toggled %0d times in SD mode", sm_edges - e0);
    end else n_gated++;

    // 3. SD 2x2 Alamouti stream: two symbols per vector, one per clock
    t_out.delete();
    for (int i = 0; i < 24; i++) send(MODE_SD, MOD_64QAM);
    wait_drain();
    checks++;
    if (t_out.size() != 48 || t_out[47] - t_out[0] != 47) begin
      failures++;
      $display("ERROR: SD rate: %0d outputs", t_out.size());
    end

    // 4. every mode x modulation in random order
    for (int i = 0; i < 400; i++) begin
      k = $urandom_range(0, 4);
      send(mimo_mode_e'(k), mod_e'($urandom_range(0, (k == 4) ? 2 : 3)));
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 12)) @(posedge clk);
    end
    wait_drain();

    // coverage of the mechanisms
    for (int md = 0; md < 5; md++)
      for (int m = 0; m < 4; m++) if (!(md == 4 && m == 3)) begin
        checks++;
        if (cov[md][m] == 0) begin failures++; $display("ERROR: mode %0d mod %0d never run", md, m); end
      end
    checks++; if (n_stall == 0)   begin failures++; $display("ERROR: no input stall"); end
    checks++; if (n_switch < 2)   begin failures++; $display("ERROR: no SD/SM mode switch"); end
    checks++; if (n_sm_col2 == 0) begin failures++; $display("ERROR: no column-switched SM output"); end
    checks++; if (n_gated == 0)   begin failures++; $display("ERROR: SM clock never gated"); end
    checks++; if (expq.size() != 0) begin failures++; $display("ERROR: %0d outputs missing", expq.size()); end
    $display("outputs=%0d stalls=%0d mode_switches=%0d sm_col2=%0d gated_stretches=%0d",
             n_out, n_stall, n_switch, n_sm_col2, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
