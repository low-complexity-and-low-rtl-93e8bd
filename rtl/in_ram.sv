// in_ram: dual-port input buffer (channel matrices or received samples).
//
// Holds DEPTH vectors of four complex 16-bit samples (128 bits). Port A is
// the bus side: 32-bit word access (one complex sample, {re, im}), word
// address = 4 * vector + sample, synchronous read with one clock latency.
// Port B is the detector side: it reads one whole vector per clock, also with
// one clock latency. Written as an array so synthesis can map it to a
// dual-port RAM macro. The published architecture has two such input RAMs on the bus,
// one for H and one for y; depth and word organisation are this design's
// choice (48 vectors = one slot of 48 symbols).
module in_ram #(
  parameter int DEPTH = 48,
  parameter int AW    = $clog2(DEPTH * 4)
) (
  input  logic          clk,
  // port A: bus
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: detector
  input  logic          b_en,
  input  logic [AW-3:0] b_addr,
  output logic [127:0]  b_rdata
);

  logic [31:0] mem [DEPTH][4];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr[AW-1:2]][a_addr[1:0]] <= a_wdata;
      else      a_rdata <= mem[a_addr[AW-1:2]][a_addr[1:0]];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= {mem[b_addr][0], mem[b_addr][1], mem[b_addr][2], mem[b_addr][3]};
  end

endmodule
