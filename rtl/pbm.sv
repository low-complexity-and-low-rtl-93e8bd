// pbm: polar-coordinate based multiplier.
//
// Produces the 64 products p2*c_m of one complex value with all 64QAM points
// without a general multiplier, in 4 clocks of 16 products each. It exploits
// the symmetry of the square constellation: the 16 points of one "ring group"
// are four base points (1+i, 3+i, 5+i, 7+i in group A; +2i per further group
// B, C, D) and their rotations by pi/2, pi and 3pi/2, which are the trivial
// multiplications by i, -1 and -i (swap and sign inversion).
//   clock 0 (group A): S0[n] = p2*((2n+1) + i)      shifts and adds
//   clock k (B, C, D): S_k[n] = S_{k-1}[n] + 2i*p2    one adder per point
// Lane 4g+n of the output carries S_k[n] * i^g, i.e. the candidate
// ((2n+1) + i(2k+1)) * i^g (mimo_pkg::cand_of gives the same numbering).
//
// Timing: in_valid loads the first stage; out_phase 0..3 are presented on the
// next four clocks with out_valid high. A new in_valid may come every 4
// clocks. The stage registers and the 2i*p2 register follow the block diagram
// of the design; applying the rotations after the phase multiplexer instead
// of before it (one rotator set instead of four) is this design's choice, as
// is the 20-bit output word (19 bits can overflow for p2*(7+7i) at full scale).
module pbm
  import mimo_pkg::*;
#(
  parameter int OW = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  cplxx_t              p2,
  output logic                out_valid,
  output logic [1:0]          out_phase,
  output logic signed [OW-1:0] prod_re [NLANE],
  output logic signed [OW-1:0] prod_im [NLANE]
);

  typedef logic signed [OW-1:0] w_t;

  w_t   s_re [NPHASE][4];
  w_t   s_im [NPHASE][4];
  w_t   t2_re, t2_im;          // 2i*p2 = -2*p2.im + i*2*p2.re
  logic [1:0] ph;
  logic       run;

  w_t pr, pi;
  assign pr = w_t'(p2.re);
  assign pi = w_t'(p2.im);

  // p2 * (b + i) for b = 1,3,5,7: re = b*pr - pi, im = b*pi + pr
  function automatic w_t times_odd(input w_t x, input int n);
    case (n)
      0:       return x;
      1:       return x + (x <<< 1);
      2:       return x + (x <<< 2);
      default: return (x <<< 3) - x;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      ph  <= '0;
      t2_re <= '0;
      t2_im <= '0;
      for (int k = 0; k < NPHASE; k++)
        for (int n = 0; n < 4; n++) begin
          s_re[k][n] <= '0;
          s_im[k][n] <= '0;
        end
    end else begin
      if (in_valid) begin
        run <= 1'b1;
        ph  <= '0;
        t2_re <= -(pi <<< 1);
        t2_im <=  (pr <<< 1);
        for (int n = 0; n < 4; n++) begin
          s_re[0][n] <= times_odd(pr, n) - pi;
          s_im[0][n] <= times_odd(pi, n) + pr;
        end
      end else if (run) begin
        ph <= ph + 2'd1;
        if (ph == 2'd3) run <= 1'b0;
      end
      // group B, C, D: one more 2i*p2 per clock
      if (run && ph != 2'd3) begin
        for (int n = 0; n < 4; n++) begin
          s_re[ph+1][n] <= s_re[ph][n] + t2_re;
          s_im[ph+1][n] <= s_im[ph][n] + t2_im;
        end
      end
    end
  end

  // phase multiplexer and the trivial rotations by i, -1, -i
  always_comb begin
    for (int n = 0; n < 4; n++) begin
      prod_re[n]      =  s_re[ph][n];  prod_im[n]      =  s_im[ph][n];
      prod_re[4 + n]  = -s_im[ph][n];  prod_im[4 + n]  =  s_re[ph][n];
      prod_re[8 + n]  = -s_re[ph][n];  prod_im[8 + n]  = -s_im[ph][n];
      prod_re[12 + n] =  s_im[ph][n];  prod_im[12 + n] = -s_re[ph][n];
    end
  end

  assign out_valid = run;
  assign out_phase = ph;

endmodule
