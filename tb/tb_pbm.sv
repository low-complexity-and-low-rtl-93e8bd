// tb_pbm: checks the polar-coordinate based multiplier. For random p2 values
// (including full-scale ones) the 16 products of each of the 4 phases must
// equal p2 * c_m computed with an ordinary complex multiplication, where c_m
// is the candidate of lane m in that phase: ((2n+1) + i(2k+1)) * i^g for lane
// 4g+n of phase k. Also checks that the 4 phases come on 4 consecutive clocks
// after the start, back to back for consecutive starts 4 clocks apart.
module tb_pbm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid, out_valid;
  cplxx_t p2;
  logic [1:0] out_phase;
  logic signed [19:0] prod_re [NLANE];
  logic signed [19:0] prod_im [NLANE];

  pbm dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cplxx_t cur;
    in_valid = 0; p2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      // start
      cur.re = (i % 7 == 0) ? 16'($urandom) : 16'($signed($urandom_range(0, 4000)) - 2000);
      cur.im = (i % 7 == 0) ? 16'($urandom) : 16'($signed($urandom_range(0, 4000)) - 2000);
      if (i == 1) begin cur.re = 16'sh7fff; cur.im = 16'sh7fff; end
      if (i == 2) begin cur.re = -16'sh8000; cur.im = -16'sh8000; end
      p2 = cur; in_valid = 1'b1;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        in_valid = 1'b0; p2 = cplxx_t'($urandom);   // p2 is only sampled at the start
        checks++;
        if (!out_valid || out_phase != 2'(k)) begin
          failures++; $display("ERROR: phase %0d: valid=%0d phase=%0d", k, out_valid, out_phase);
        end
        for (int m = 0; m < 16; m++) begin
          int g, n;
          longint br, bi, cr, ci, er, ei;
          g = m / 4; n = m % 4; br = 2 * n + 1; bi = 2 * k + 1;
          case (g)
            0: begin cr = br; ci = bi; end
            1: begin cr = -bi; ci = br; end
            2: begin cr = -br; ci = -bi; end
            default: begin cr = bi; ci = -br; end
          endcase
          er = longint'(cur.re) * cr - longint'(cur.im) * ci;
          ei = longint'(cur.re) * ci + longint'(cur.im) * cr;
          checks++;
          if (longint'(prod_re[m]) != er || longint'(prod_im[m]) != ei) begin
            failures++;
            $display("ERROR: i=%0d phase %0d lane %0d got %0d,%0d exp %0d,%0d", i, k, m,
                     prod_re[m], prod_im[m], er, ei);
          end
        end
      end
      if (i % 5 == 4) begin
        repeat (3) @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("ERROR: valid after 4 phases"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
