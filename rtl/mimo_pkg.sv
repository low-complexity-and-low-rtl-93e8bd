// mimo_pkg: types, word lengths and small arithmetic helpers shared by the
// 2x2 soft-output MIMO symbol detector.
//
// Numbers: every complex sample is a pair of two's-complement integers. The
// constellation is handled in unnormalised integer form, i.e. the points of
// QPSK/16QAM/64QAM are the odd integers {+-1}, {+-1,+-3}, {+-1..+-7} on each
// axis, so that multiplying by a constellation point is a shift-and-add
// operation. The received samples are expected in the same scale (y = H x + n
// with x on the integer grid). The 16-bit input word length, the 33-bit PCM
// word length and the 8-bit LLR output follow the word-length table of the
// design; the remaining scalings are this design's own choice.
//
// Bit labelling (this design's choice, the per-axis Gray labelling used by
// LTE): LLR0/LLR1 are the sign bits of I/Q (1 = negative), LLR2/LLR3 select
// inner/outer amplitude (1 = outer), LLR4/LLR5 the 64QAM fine bit
// (1 = amplitude 1 or 7). LLR = min(metric | bit=0) - min(metric | bit=1),
// so a positive LLR favours bit value 1.
package mimo_pkg;

  localparam int IW      = 16;  // I/Q word length at the input (IPM)
  localparam int PW      = 33;  // I/Q word length of p1, p2, p3 (PCM)
  localparam int XW      = 16;  // I/Q word length of p1/p2/p3 entering the X2CCM
  localparam int X2W     = 20;  // I/Q word length of p1 - p2*c_m (X2CCM)
  localparam int RW      = 28;  // I/Q word length of the residual in the EDCM
  localparam int EDW     = 24;  // Euclidean-distance metric word length
  localparam int DW      = 17;  // I/Q word length of z and CSI (DVCM)
  localparam int L1W     = 24;  // 1-D LLR word length
  localparam int L2W     = 19;  // 2-D LLR word length
  localparam int QW      = 8;   // quantised LLR word length
  localparam int NLANE   = 16;  // candidates handled per clock in the SM path
  localparam int NPHASE  = 4;   // PBM pipeline stages (groups A, B, C, D)
  localparam int NLLR    = 6;   // LLRs per symbol (64QAM)

  typedef enum logic [2:0] {
    MODE_SISO = 3'd0,
    MODE_SIMO = 3'd1,
    MODE_MISO = 3'd2,   // Alamouti 2x1 (STBC/SFBC, one RX antenna)
    MODE_SD   = 3'd3,   // Alamouti 2x2 (STBC/SFBC, two RX antennas)
    MODE_SM   = 3'd4    // spatial multiplexing 2x2
  } mimo_mode_e;

  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_16QAM = 2'd1,
    MOD_64QAM = 2'd2,
    MOD_BPSK  = 2'd3    // +-1 on the I axis; diversity modes only
  } mod_e;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [PW-1:0] re;
    logic signed [PW-1:0] im;
  } cplxp_t;

  typedef struct packed {
    logic signed [XW-1:0] re;
    logic signed [XW-1:0] im;
  } cplxx_t;

  // One input vector. h_ji is the channel from TX antenna j to RX antenna i,
  // y_ik the sample of RX antenna i in time unit k. SM uses y11 and y21 only.
  typedef struct packed {
    cplx_t h11, h12, h21, h22;
    cplx_t y11, y12, y21, y22;
  } in_vec_t;

  // Per-item tag travelling with the data.
  typedef struct packed {
    mimo_mode_e mode;
    mod_e       modu;
    logic       t;      // time unit / column (0: first, 1: second)
  } tag_t;

  // Data the SM path needs besides p1/p2/p3: y and the two channel columns.
  // hc: column of the searched symbol (candidates c_m), hx: column of the
  // sliced symbol x(c_m).
  typedef struct packed {
    cplx_t y1, y2;
    cplx_t hc1, hc2;
    cplx_t hx1, hx2;
  } sm_ctx_t;

  // A constellation coordinate: odd level -7..7 coded as 3-bit index k,
  // level = 2k-7.
  typedef struct packed {
    logic [2:0] re;
    logic [2:0] im;
  } sym_t;

  function automatic int lvl_of(input logic [2:0] k);
    return 2 * int'(k) - 7;
  endfunction

  // Largest level index / smallest level index for a modulation.
  function automatic logic [2:0] kmax(input mod_e m);
    case (m)
      MOD_QPSK:  return 3'd4;
      MOD_16QAM: return 3'd5;
      default:   return 3'd7;
    endcase
  endfunction

  function automatic logic [2:0] kmin(input mod_e m);
    case (m)
      MOD_QPSK:  return 3'd3;
      MOD_16QAM: return 3'd2;
      default:   return 3'd0;
    endcase
  endfunction

  // Candidate c_m handled by lane (4*g + n) in PBM phase p: base point
  // (2n+1) + i(2p+1) of quadrant group A..D, rotated by i^g.
  function automatic sym_t cand_of(input int phase, input int lane);
    int g, n, br, bi, cr, ci;
    sym_t s;
    g  = lane / 4;
    n  = lane % 4;
    br = 2 * n + 1;
    bi = 2 * phase + 1;
    case (g)
      0:       begin cr =  br; ci =  bi; end
      1:       begin cr = -bi; ci =  br; end
      2:       begin cr = -br; ci = -bi; end
      default: begin cr =  bi; ci = -br; end
    endcase
    s.re = 3'((cr + 7) / 2);
    s.im = 3'((ci + 7) / 2);
    return s;
  endfunction

  // Gray labels of one axis: {sign, outer, fine} for 64QAM, {sign, outer}
  // for 16QAM, {sign} for QPSK and BPSK; unused positions are 0.
  function automatic logic [2:0] axis_bits(input logic [2:0] k, input mod_e m);
    int l, a;
    logic [2:0] b;
    l = lvl_of(k);
    a = (l < 0) ? -l : l;
    b = '0;
    b[0] = (l < 0);
    if (m == MOD_16QAM) b[1] = (a == 3);
    if (m == MOD_64QAM) begin
      b[1] = (a >= 5);
      b[2] = (a == 1) || (a == 7);
    end
    return b;
  endfunction

  // The six bit labels of a symbol in LLR order b0..b5.
  function automatic logic [5:0] sym_bits(input sym_t s, input mod_e m);
    logic [2:0] bi, bq;
    bi = axis_bits(s.re, m);
    bq = axis_bits(s.im, m);
    return {bq[2], bi[2], bq[1], bi[1], bq[0], bi[0]};
  endfunction

  function automatic int nbits(input mod_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_16QAM: return 4;
      default:   return 6;
    endcase
  endfunction

  // Multiplication of a real value by an odd level -7..7 with a sign
  // inversion, shifts and adds only (x*3 = x+2x, x*5 = x+4x, x*7 = 8x-x).
  function automatic logic signed [IW+3:0] mul_lvl(input logic signed [IW-1:0] x,
                                                   input logic [2:0] k);
    logic signed [IW+3:0] xe, r;
    xe = {{4{x[IW-1]}}, x};
    case (k)
      3'd3, 3'd4: r = xe;                       // |level| = 1
      3'd2, 3'd5: r = xe + (xe <<< 1);          // |level| = 3
      3'd1, 3'd6: r = xe + (xe <<< 2);          // |level| = 5
      default:    r = (xe <<< 3) - xe;          // |level| = 7
    endcase
    return (k <= 3'd3) ? -r : r;
  endfunction

  // Complex sample times complex constellation point, shift-and-add only.
  function automatic void cmul_sym(input cplx_t h, input sym_t s,
                                   output logic signed [IW+4:0] re,
                                   output logic signed [IW+4:0] im);
    re = (IW+5)'(mul_lvl(h.re, s.re)) - (IW+5)'(mul_lvl(h.im, s.im));
    im = (IW+5)'(mul_lvl(h.re, s.im)) + (IW+5)'(mul_lvl(h.im, s.re));
  endfunction

  // Saturate a wide signed value into n bits (n <= 48).
  function automatic logic signed [47:0] sat(input logic signed [47:0] v, input int n);
    logic signed [47:0] hi, lo;
    hi = (48'sd1 <<< (n - 1)) - 48'sd1;
    lo = -(48'sd1 <<< (n - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
