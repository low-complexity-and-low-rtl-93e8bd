// dvcm: decision variable calculation module (spatial-diversity modes).
//
// From the PCM parameters it forms the decision variable z and the channel
// state information CSI of one transmitted symbol:
//   SISO/SIMO/MISO: z = p1,      CSI = p3
//   SD (Alamouti 2x2, STBC/SFBC): z = p1 + p2, CSI = p3(t=0) + p3(t=1)
// In SD the PCM delivers the energy of the RX1 channels in the first time
// unit and that of the RX2 channels in the second; both symbols of the pair
// use their sum, so z of the first time unit is held one clock until the
// second p3 has arrived (the CSI of a pair then spans two output clocks).
// The adding of the two p3 halves is this design's choice (see ipm).
//
// z and CSI are scaled down by 2^Z_SHIFT and saturated to the 17-bit word
// length of the design; the shift is this design's choice.
//
// Timing: two register stages, out_* valid two clocks after in_valid, one
// symbol per clock. Runs on the SD clock.
module dvcm
  import mimo_pkg::*;
#(
  parameter int unsigned Z_SHIFT = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplxp_t  p1, p2,
  input  logic signed [PW-1:0] p3,
  input  tag_t    in_tag,
  output logic    out_valid,
  output logic signed [DW-1:0] z_re, z_im,
  output logic signed [DW-1:0] csi,
  output tag_t    out_tag
);

  typedef logic signed [PW:0] sum_t;

  logic              va;
  sum_t              za_re, za_im;
  logic signed [PW-1:0] p3a;
  tag_t              taga;
  sum_t              csi_hold, csi_now;

  function automatic logic signed [DW-1:0] scale(input sum_t v);
    return DW'(sat(48'(v >>> Z_SHIFT), DW));
  endfunction

  always_comb begin
    if (taga.mode == MODE_SD) begin
      if (!taga.t) csi_now = sum_t'(p3a) + sum_t'(p3);
      else         csi_now = csi_hold;
    end else begin
      csi_now = sum_t'(p3a);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va <= 1'b0;
      za_re <= '0;
      za_im <= '0;
      p3a <= '0;
      taga <= '0;
      csi_hold <= '0;
      out_valid <= 1'b0;
      z_re <= '0;
      z_im <= '0;
      csi <= '0;
      out_tag <= '0;
    end else begin
      va <= in_valid;
      if (in_valid) begin
        if (in_tag.mode == MODE_SD) begin
          za_re <= sum_t'(p1.re) + sum_t'(p2.re);
          za_im <= sum_t'(p1.im) + sum_t'(p2.im);
        end else begin
          za_re <= sum_t'(p1.re);
          za_im <= sum_t'(p1.im);
        end
        p3a  <= p3;
        taga <= in_tag;
      end
      out_valid <= va;
      if (va) begin
        z_re     <= scale(za_re);
        z_im     <= scale(za_im);
        csi      <= scale(csi_now);
        csi_hold <= csi_now;
        out_tag  <= taga;
      end
    end
  end

endmodule
