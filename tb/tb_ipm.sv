// tb_ipm: checks the input preprocessor. Random vectors in all MIMO modes are
// offered with random gaps. For each accepted vector the emitted operand sets
// must match the data-mapping table of the design (written out again below),
// including the SM column switching, and arrive at the expected clocks:
// one clock after acceptance for the first item, the second MISO/SD item one
// clock later, the second SM item four clocks later. Also checked: SD vectors
// stream without gaps, in_ready is low while an SM vector is in progress, a
// non-SM vector is held one extra clock after an SM vector, and sm_act covers
// the SM items.
module tb_ipm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, in_ready, out_valid, sm_act;
  mimo_mode_e in_mode, cur_mode;
  mod_e in_mod;
  in_vec_t in_vec;
  cplx_t a1, a2, b1, b2, c1, c2, d1, d2, e1, e2;
  tag_t out_tag;
  sm_ctx_t out_ctx;

  ipm dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    cplx_t o [10];
    tag_t tg;
    sm_ctx_t cx;
    int when;
  } item_t;
  item_t q[$];

  function automatic cplx_t cj(cplx_t z); cplx_t r; r.re = z.re; r.im = -z.im; return r; endfunction
  function automatic cplx_t ng(cplx_t z); cplx_t r; r.re = -z.re; r.im = -z.im; return r; endfunction

  // operands {a1,a2,b1,b2,c1,c2,d1,d2,e1,e2} per mode and time unit
  function automatic item_t table_row(mimo_mode_e md, mod_e m, int t, in_vec_t v);
    item_t it;
    cplx_t z;
    z = '0;
    it.cx = '0;
    case (md)
      MODE_SISO: it.o = '{v.h11, z, v.y11, v.y12, z, z, z, z, v.h11, z};
      MODE_SIMO: it.o = '{v.h11, v.h12, v.y11, v.y21, z, z, z, z, v.h11, v.h12};
      MODE_MISO:
        if (t == 0) it.o = '{v.h11, cj(v.h21), v.y11, cj(v.y12), z, z, z, z, v.h11, cj(v.h21)};
        else        it.o = '{v.h21, ng(cj(v.h11)), v.y11, cj(v.y12), z, z, z, z, v.h21, ng(cj(v.h11))};
      MODE_SD:
        if (t == 0) it.o = '{v.h11, cj(v.h21), v.y11, cj(v.y12), v.h12, cj(v.h22), v.y21, cj(v.y22),
                             v.h11, cj(v.h21)};
        else        it.o = '{v.h21, ng(cj(v.h11)), v.y11, cj(v.y12), v.h22, ng(cj(v.h12)), v.y21,
                             cj(v.y22), v.h12, cj(v.h22)};
      default: begin
        it.cx.y1 = v.y11; it.cx.y2 = v.y21;
        if (t == 0) begin
          it.o = '{v.h21, v.h22, v.y11, v.y21, v.h21, v.h22, v.h11, v.h12, v.h21, v.h22};
          it.cx.hc1 = v.h11; it.cx.hc2 = v.h12; it.cx.hx1 = v.h21; it.cx.hx2 = v.h22;
        end else begin
          it.o = '{v.h11, v.h12, v.y11, v.y21, v.h11, v.h12, v.h21, v.h22, v.h11, v.h12};
          it.cx.hc1 = v.h21; it.cx.hc2 = v.h22; it.cx.hx1 = v.h11; it.cx.hx2 = v.h12;
        end
      end
    endcase
    it.tg.mode = md; it.tg.modu = m; it.tg.t = 1'(t);
    return it;
  endfunction

  // monitor (sampled on the falling edge)
  int n_items = 0, sm_blocked = 0, sm_guard = 0;
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      item_t e;
      checks++;
      n_items++;
      if (q.size() == 0) begin failures++; $display("ERROR: unexpected item"); end
      else begin
        e = q.pop_front();
        if ('{a1, a2, b1, b2, c1, c2, d1, d2, e1, e2} != e.o || out_tag != e.tg ||
            (e.tg.mode == MODE_SM && out_ctx != e.cx) || cyc != e.when) begin
          failures++;
          $display("ERROR: item mode %0d t %0d at cyc %0d expected at %0d", e.tg.mode, e.tg.t, cyc, e.when);
        end
        if (e.tg.mode == MODE_SM) begin
          checks++;
          if (!sm_act) begin failures++; $display("ERROR: sm_act low during SM"); end
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    mimo_mode_e md, prev;
    mod_e m;
    in_vec_t v;
    int acc, wait_n, sd_start, sd_items;
    in_valid = 0; in_mode = MODE_SISO; in_mod = MOD_QPSK; in_vec = '0;
    prev = MODE_SISO;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      md = mimo_mode_e'($urandom_range(0, 4));
      m = mod_e'($urandom_range(0, 2));
      v = in_vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      @(negedge clk);
      in_valid = 1'b1; in_mode = md; in_mod = m; in_vec = v;
      #1;
      wait_n = 0;
      while (!in_ready) begin
        wait_n++;
        @(negedge clk); #1;
      end
      if (wait_n > 0 && prev == MODE_SM) begin
        if (md == MODE_SM) sm_blocked++; else sm_guard++;
      end
      acc = cyc;                         // accepted at the next rising edge
      if (md == MODE_SISO || md == MODE_SIMO) begin
        item_t it; it = table_row(md, m, 0, v); it.when = acc + 2; q.push_back(it);
      end else if (md == MODE_SM) begin
        item_t it;
        it = table_row(md, m, 0, v); it.when = acc + 2; q.push_back(it);
        it = table_row(md, m, 1, v); it.when = acc + 6; q.push_back(it);
      end else begin
        item_t it;
        it = table_row(md, m, 0, v); it.when = acc + 2; q.push_back(it);
        it = table_row(md, m, 1, v); it.when = acc + 3; q.push_back(it);
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      prev = md;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 10)) @(negedge clk);
    end
    // SD stream without gaps: 20 vectors -> 40 items on 40 consecutive clocks
    repeat (10) @(negedge clk);
    sd_items = n_items;
    for (int i = 0; i < 20; i++) begin
      v = in_vec_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      @(negedge clk);
      in_valid = 1'b1; in_mode = MODE_SD; in_mod = MOD_16QAM; in_vec = v;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      acc = cyc;
      if (i == 0) sd_start = acc;
      begin
        item_t it;
        it = table_row(MODE_SD, MOD_16QAM, 0, v); it.when = acc + 2; q.push_back(it);
        it = table_row(MODE_SD, MOD_16QAM, 1, v); it.when = acc + 3; q.push_back(it);
      end
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (acc - sd_start != 38 || n_items - sd_items != 40) begin
      failures++; $display("ERROR: SD stream not gapless (%0d clocks)", acc - sd_start);
    end
    checks++; if (q.size() != 0) begin failures++; $display("ERROR: items missing"); end
    checks++; if (sm_blocked == 0 || sm_guard == 0) begin failures++; $display("ERROR: stall coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
