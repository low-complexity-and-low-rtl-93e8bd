// ipm: input preprocessor module.
//
// Takes one input vector (2x2 channel matrix H and received samples y) per
// handshake and turns it into the operand vectors a, b, c, d, e of the
// parameter calculation module, following the data-mapping table of the
// design: one time unit for SISO/SIMO, two (t=0,1) for the Alamouti modes
// MISO and SD, and two channel-column orders for SM. In SM the columns of H
// are switched between the two time units so that the same datapath first
// produces the LLRs of the TX1 symbol and then those of the TX2 symbol.
//
// Timing: a vector is accepted when in_valid && in_ready. The first item
// appears on out_* two clocks later. SISO/SIMO take one clock per vector,
// MISO/SD two, SM eight (one item every 4 clocks, because the polar-based
// multiplier of the SM path works on one column for 4 clocks). A vector can be
// accepted in the last clock of the previous one, so SD streams at one item
// per clock. After an SM vector a non-SM vector waits one extra clock, so that
// the short SD path cannot overtake the longer SM path at the LLR output.
//
// sm_act is high while SM items are issued and for SM_TAIL clocks after, to
// keep the gated SM clock running until the SM pipeline is drained.
// cur_mode is the MIMO mode of the vector being issued (MODE_SISO when idle),
// so the SM clock is not left running between runs.
//
// BPSK is a diversity-mode modulation: the SM candidate and slicer hardware
// works on odd levels of both axes, so an SM vector with BPSK is a usage
// error, flagged by an assertion.
//
// Design choices beyond the published architecture: the Alamouti mappings conjugate the
// second operands (a2, c2, b2, d2) as the Alamouti combiner requires; SIMO
// takes the two RX antennas of time unit 1 (y11, y21); in SD the second time
// unit sets e to the RX2 channels (h12, h22*) so that the DVCM can add both
// halves of the channel energy.
module ipm
  import mimo_pkg::*;
#(
  parameter int unsigned SM_TAIL = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  // input stream
  input  logic       in_valid,
  output logic       in_ready,
  input  mimo_mode_e in_mode,
  input  mod_e       in_mod,
  input  in_vec_t    in_vec,
  // PCM operands
  output logic       out_valid,
  output cplx_t      a1, a2, b1, b2, c1, c2, d1, d2, e1, e2,
  output tag_t       out_tag,
  output sm_ctx_t    out_ctx,
  // status for the gated-clock generator
  output mimo_mode_e cur_mode,
  output logic       sm_act
);

  in_vec_t    v;
  mimo_mode_e mode;
  mod_e       modu;
  logic       busy;
  logic [2:0] cnt;
  logic [3:0] tail;

  logic       last, issue, t_now, accept;

  function automatic cplx_t conj(input cplx_t z);
    cplx_t r;
    r.re = z.re;
    r.im = -z.im;
    return r;
  endfunction

  function automatic cplx_t neg(input cplx_t z);
    cplx_t r;
    r.re = -z.re;
    r.im = -z.im;
    return r;
  endfunction

  // Sequencer: which clock of the current vector is the last, and in which
  // clocks an item is issued.
  always_comb begin
    last  = 1'b0;
    issue = 1'b0;
    t_now = 1'b0;
    if (busy) begin
      unique case (mode)
        MODE_SISO, MODE_SIMO: begin last = 1'b1;          issue = 1'b1; end
        MODE_MISO, MODE_SD:   begin last = (cnt == 3'd1); issue = 1'b1; t_now = cnt[0]; end
        default: begin
          last  = (cnt == 3'd7);
          issue = (cnt[1:0] == 2'd0);
          t_now = cnt[2];
        end
      endcase
    end
  end

  assign in_ready = (!busy || last) && !(busy && mode == MODE_SM && in_mode != MODE_SM);
  assign accept   = in_valid && in_ready;
  assign cur_mode = busy ? mode : MODE_SISO;
  assign sm_act   = (busy && mode == MODE_SM) || (tail != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      mode <= MODE_SISO;
      modu <= MOD_QPSK;
      v    <= '0;
      tail <= '0;
    end else begin
      if (accept) begin
        busy <= 1'b1;
        cnt  <= '0;
        mode <= in_mode;
        modu <= in_mod;
        v    <= in_vec;
      end else if (busy) begin
        cnt <= cnt + 3'd1;
        if (last) busy <= 1'b0;
      end
      if (busy && last && mode == MODE_SM) tail <= 4'(SM_TAIL);
      else if (tail != '0)                  tail <= tail - 4'd1;
    end
  end

  // Operand mapping, registered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      {a1, a2, b1, b2, c1, c2, d1, d2, e1, e2} <= '0;
      out_tag   <= '0;
      out_ctx   <= '0;
    end else begin
      out_valid <= issue;
      if (issue) begin
        out_tag.mode <= mode;
        out_tag.modu <= modu;
        out_tag.t    <= t_now;
        {c1, c2, d1, d2} <= '0;
        out_ctx <= '0;
        unique case (mode)
          MODE_SISO: begin
            a1 <= v.h11; a2 <= '0;
            b1 <= v.y11; b2 <= v.y12;
            e1 <= v.h11; e2 <= '0;
          end
          MODE_SIMO: begin
            a1 <= v.h11; a2 <= v.h12;
            b1 <= v.y11; b2 <= v.y21;
            e1 <= v.h11; e2 <= v.h12;
          end
          MODE_MISO, MODE_SD: begin
            b1 <= v.y11; b2 <= conj(v.y12);
            if (!t_now) begin
              a1 <= v.h11; a2 <= conj(v.h21);
              e1 <= v.h11; e2 <= conj(v.h21);
            end else begin
              a1 <= v.h21; a2 <= neg(conj(v.h11));
              e1 <= v.h21; e2 <= neg(conj(v.h11));
            end
            if (mode == MODE_SD) begin
              d1 <= v.y21; d2 <= conj(v.y22);
              if (!t_now) begin
                c1 <= v.h12; c2 <= conj(v.h22);
              end else begin
                c1 <= v.h22; c2 <= neg(conj(v.h12));
                e1 <= v.h12; e2 <= conj(v.h22);
              end
            end
          end
          default: begin  // SM with column switching
            b1 <= v.y11; b2 <= v.y21;
            out_ctx.y1 <= v.y11;
            out_ctx.y2 <= v.y21;
            if (!t_now) begin
              // candidates for x1 (column h1), x2 sliced (column h2)
              a1 <= v.h21; a2 <= v.h22;
              c1 <= v.h21; c2 <= v.h22;
              d1 <= v.h11; d2 <= v.h12;
              e1 <= v.h21; e2 <= v.h22;
              out_ctx.hc1 <= v.h11; out_ctx.hc2 <= v.h12;
              out_ctx.hx1 <= v.h21; out_ctx.hx2 <= v.h22;
            end else begin
              a1 <= v.h11; a2 <= v.h12;
              c1 <= v.h11; c2 <= v.h12;
              d1 <= v.h21; d2 <= v.h22;
              e1 <= v.h11; e2 <= v.h12;
              out_ctx.hc1 <= v.h21; out_ctx.hc2 <= v.h22;
              out_ctx.hx1 <= v.h11; out_ctx.hx2 <= v.h12;
            end
          end
        endcase
      end
    end
  end

  // SM works on QAM grids only (QPSK, 16QAM, 64QAM)
  always_comb begin
    assert (!(in_valid && in_ready && in_mode == MODE_SM && in_mod == MOD_BPSK) ||
            $isunknown({in_valid, in_mode, in_mod}))
      else $error("ipm: BPSK is not supported in SM");
  end

endmodule
