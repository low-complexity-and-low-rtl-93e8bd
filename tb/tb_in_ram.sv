// tb_in_ram: test of the dual-port input RAM.
//
// Random 32-bit word writes through port A, then read-back of every word on
// port A and of every vector on port B (both one clock latency), compared
// with a model array. Simultaneous port A writes and port B reads of other
// vectors are included. Runs at the default depth (48 vectors).
module tb_in_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 48;
  localparam int AW = $clog2(DEPTH * 4);

  logic          a_en = 0, a_we = 0, b_en = 0;
  logic [AW-1:0] a_addr = '0;
  logic [31:0]   a_wdata = '0, a_rdata;
  logic [AW-3:0] b_addr = '0;
  logic [127:0]  b_rdata;

  in_ram dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH * 4];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    // fill
    for (int i = 0; i < DEPTH * 4; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    // random overwrites while port B reads other vectors
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      w = $urandom_range(0, DEPTH * 4 - 1);
      a_en = 1; a_we = 1; a_addr = AW'(w); a_wdata = $urandom; model[w] = a_wdata;
      b_en = 1; b_addr = (AW-2)'((w / 4 + 1) % DEPTH);
      @(negedge clk);
      a_en = 0; a_we = 0;
      checks++;
      if (b_rdata !== {model[4*b_addr], model[4*b_addr+1], model[4*b_addr+2], model[4*b_addr+3]}) begin
        failures++; $display("ERROR: port B vector %0d", b_addr);
      end
      b_en = 0;
    end
    // read back through port A
    for (int i = 0; i < DEPTH * 4; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 0; a_addr = AW'(i);
      @(negedge clk);
      a_en = 0;
      checks++;
      if (a_rdata !== model[i]) begin failures++; $display("ERROR: port A word %0d", i); end
    end
    // port B hold when not enabled
    @(negedge clk); b_en = 1; b_addr = 0;
    @(negedge clk); b_en = 0; b_addr = 5;
    @(negedge clk);
    checks++;
    if (b_rdata !== {model[0], model[1], model[2], model[3]}) begin
      failures++; $display("ERROR: port B output not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
