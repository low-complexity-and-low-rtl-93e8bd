// tb_out_ram: test of the dual-port LLR RAM.
//
// Writes random 64-bit entries through port B and reads both 32-bit halves
// of each entry through port A (one clock latency), also while port B keeps
// writing other entries. Runs at the default depth (96 entries).
module tb_out_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 96;
  localparam int AW = $clog2(DEPTH * 2);

  logic          a_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0;
  logic [31:0]   a_rdata;
  logic [AW-2:0] b_addr = '0;
  logic [63:0]   b_wdata = '0;

  out_ram dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [DEPTH];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, r;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_we = 1; b_addr = (AW-1)'(i); b_wdata = {$urandom, $urandom}; model[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      r = $urandom_range(0, DEPTH * 2 - 1);
      a_en = 1; a_addr = AW'(r);
      e = (r / 2 + 1 + $urandom_range(0, DEPTH - 2)) % DEPTH;
      b_we = $urandom_range(0, 1); b_addr = (AW-1)'(e); b_wdata = {$urandom, $urandom};
      if (b_we) model[e] = b_wdata;
      @(negedge clk);
      a_en = 0; b_we = 0;
      checks++;
      if (a_rdata !== (r % 2 ? model[r/2][63:32] : model[r/2][31:0])) begin
        failures++; $display("ERROR: word %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
