// omc: output memory controller.
//
// Collects the quantized LLR sets leaving the detector and writes them to
// consecutive entries of the output RAM, starting at entry 0 when `clear` is
// pulsed (a new run). Each entry holds the six 8-bit LLRs of one transmitted
// symbol and a tag byte {t, modulation[1:0], mode[2:0]} in the layout of
// out_ram. Entries beyond DEPTH are dropped and flagged by `overflow`.
// `count` is the number of entries written since the last clear.
//
// Timing: one write per clock in which out_valid is high, in the same clock.
// The published architecture names the block; its behaviour here is this design's choice.
module omc
  import mimo_pkg::*;
#(
  parameter int DEPTH = 96,
  parameter int CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          llr_valid,
  input  logic signed [QW-1:0] llr [NLLR],
  input  tag_t          tag,
  output logic          ram_we,
  output logic [$clog2(DEPTH)-1:0] ram_addr,
  output logic [63:0]   ram_wdata,
  output logic [CW-1:0] count,
  output logic          overflow
);

  logic full;
  assign full = (count == CW'(DEPTH));

  assign ram_we    = llr_valid && !full;
  assign ram_addr  = count[$clog2(DEPTH)-1:0];
  assign ram_wdata = {8'h00, 2'b00, tag.t, tag.modu, tag.mode,
                      llr[5], llr[4], llr[3], llr[2], llr[1], llr[0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (llr_valid) begin
      if (full) overflow <= 1'b1;
      else      count    <= count + 1'b1;
    end
  end

endmodule
