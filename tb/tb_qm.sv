// tb_qm: checks the quantization module: each LLR of the SD path (divided
// by 2^4) and of the SM path (divided by 2^4) is rounded to nearest (halves
// toward +infinity) and saturated to [-128, 127]. The expected value is found
// by a search over the 256 output codes for the one nearest to LLR / 16.
// One-clock latency.
module tb_qm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid, in_is_sm;
  logic signed [L1W-1:0] in_llr [NLLR];
  tag_t in_tag, out_tag;
  logic signed [QW-1:0] out_q [NLLR];

  qm dut (.*);

  int checks = 0, failures = 0;

  // nearest 8-bit code to v/16, ties to the larger code
  function automatic int best_code(longint v);
    longint bd = 64'h7fffffffffff, d;
    int r = 0;
    for (int q = -128; q <= 127; q++) begin
      d = 16 * q - v; if (d < 0) d = -d;
      if (d <= bd) begin bd = d; r = q; end
    end
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint v [NLLR];
    tag_t tg;
    in_valid = 0; in_is_sm = 0; in_tag = '0;
    for (int k = 0; k < NLLR; k++) in_llr[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      tg = tag_t'($urandom);
      in_is_sm = 1'($urandom);
      for (int k = 0; k < NLLR; k++) begin
        v[k] = (i % 5 == 0) ? longint'($signed($urandom_range(0, 200000))) - 100000
                            : longint'($signed($urandom_range(0, 5000))) - 2500;
        if (in_is_sm && (v[k] > 262143 || v[k] < -262144)) v[k] = 0;
        in_llr[k] = L1W'(v[k]);
      end
      in_tag = tg; in_valid = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_tag != tg) begin failures++; $display("ERROR: valid/tag"); end
      for (int k = 0; k < NLLR; k++) begin
        checks++;
        if (int'(out_q[k]) != best_code(v[k])) begin
          failures++; $display("ERROR: llr %0d -> %0d exp %0d", v[k], out_q[k], best_code(v[k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
