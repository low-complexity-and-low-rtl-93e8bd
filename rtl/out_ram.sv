// out_ram: dual-port output buffer for the quantized LLRs.
//
// DEPTH entries of 64 bits: the six 8-bit LLRs of one symbol and a tag byte.
// Port A is the bus side, 32-bit reads with one clock latency (word address
// = 2 * entry + half; half 0 = {LLR3, LLR2, LLR1, LLR0}, half 1 =
// {8'h0, tag, LLR5, LLR4}). Port B is written by the output memory
// controller, one entry per clock. Depth (96 = two symbols for each of 48
// SM vectors) and word layout are this design's choice.
module out_ram #(
  parameter int DEPTH = 96,
  parameter int AW    = $clog2(DEPTH * 2)
) (
  input  logic          clk,
  // port A: bus read
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output logic [31:0]   a_rdata,
  // port B: controller write
  input  logic          b_we,
  input  logic [AW-2:0] b_addr,
  input  logic [63:0]   b_wdata
);

  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    if (a_en) a_rdata <= a_addr[0] ? mem[a_addr[AW-1:1]][63:32] : mem[a_addr[AW-1:1]][31:0];
  end

endmodule
