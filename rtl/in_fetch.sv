// in_fetch: input sequencer between the input RAMs and the detector.
//
// After a start pulse it reads vectors 0 .. count-1 from the channel RAM and
// the received-sample RAM (both port B, one clock read latency) and offers
// them to the detector with the run's MIMO mode and modulation, using the
// detector's valid/ready handshake. The RAM output registers act as the
// pipeline register: a new read is issued whenever the presented vector is
// taken (or none is presented), so one vector per clock can be delivered.
// `busy` is high from start until the last vector has been accepted.
// The published architecture only shows the RAMs and the bus; this sequencer is this
// design's choice.
module in_fetch
  import mimo_pkg::*;
#(
  parameter int DEPTH = 48,
  parameter int VW    = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [VW:0] count,
  input  mimo_mode_e mode,
  input  mod_e       modu,
  output logic       busy,
  // RAM port B (read)
  output logic       ram_en,
  output logic [VW-1:0] ram_addr,
  input  logic [127:0] ch_rdata,
  input  logic [127:0] rx_rdata,
  // detector input
  output logic       det_valid,
  input  logic       det_ready,
  output mimo_mode_e det_mode,
  output mod_e       det_mod,
  output in_vec_t    det_vec
);

  logic [VW:0] rd_idx;     // next vector to read
  logic [VW:0] left;       // vectors not yet accepted
  logic        take;

  assign take     = det_valid && det_ready;
  assign ram_en   = busy && rd_idx < count && (!det_valid || take);
  assign ram_addr = rd_idx[VW-1:0];
  assign det_vec  = {ch_rdata, rx_rdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd_idx    <= '0;
      left      <= '0;
      det_valid <= 1'b0;
      det_mode  <= MODE_SISO;
      det_mod   <= MOD_QPSK;
    end else if (start && !busy) begin
      busy     <= count != 0;
      rd_idx   <= '0;
      left     <= count;
      det_mode <= mode;
      det_mod  <= modu;
    end else begin
      if (ram_en) rd_idx <= rd_idx + 1'b1;
      if (ram_en)    det_valid <= 1'b1;
      else if (take) det_valid <= 1'b0;
      if (take) begin
        left <= left - 1'b1;
        if (left == 1) busy <= 1'b0;
      end
    end
  end

endmodule
