// tb_gcgm: checks the gated-clock generation module. The MIMO mode and the
// pending flag are changed at random just after rising clock edges. The SM
// clock must rise at the end of exactly those cycles in which the mode was SM
// or work was pending, must never be high while clk is low (no glitches), and
// the SD clock must follow clk on every edge.
module tb_gcgm;
  import mimo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  mimo_mode_e mimo_mode;
  logic sm_pending, clk_sd, clk_sm, sm_clk_on;

  gcgm dut (.*);

  int checks = 0, failures = 0;
  int sm_rises = 0, sd_rises = 0, gated = 0, passed = 0;
  always @(posedge clk_sm) sm_rises++;
  always @(posedge clk_sd) sd_rises++;

  // no SM clock pulse outside the high phase of clk
  always @(clk_sm) if (clk_sm && !clk) begin
    checks++; failures++; $display("ERROR: clk_sm high while clk low");
  end

  initial begin
    #200000;
    failures++; $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic en;
    int r0, s0;
    mimo_mode = MODE_SD; sm_pending = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      if (i == 0) #1;
      mimo_mode = mimo_mode_e'($urandom_range(0, 4));
      sm_pending = ($urandom_range(0, 3) == 0);
      en = (mimo_mode == MODE_SM) || sm_pending;
      r0 = sm_rises; s0 = sd_rises;
      @(posedge clk); #1;
      checks++;
      if ((sm_rises - r0) != (en ? 1 : 0)) begin
        failures++; $display("ERROR: cycle %0d enable %0d but %0d SM clock edges", i, en, sm_rises - r0);
      end
      checks++;
      if (sd_rises - s0 != 1) begin failures++; $display("ERROR: SD clock missed an edge"); end
      if (en) passed++; else gated++;
    end
    checks++;
    if (gated == 0 || passed == 0) begin failures++; $display("ERROR: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
