// tb_in_fetch: test of the input sequencer.
//
// Two model RAMs (one clock read latency, like in_ram port B) hold random
// vectors. Runs of random length, mode and modulation are started; the
// detector side drops ready at random. Every accepted vector must be the
// next one in order with the run's mode and modulation, exactly `count`
// vectors per run, busy must fall after the last one, and with ready held
// high one vector per clock must be delivered. Runs at the default depth (48 vectors).
module tb_in_fetch;
  import mimo_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 48;
  localparam int VW = $clog2(DEPTH);

  logic start = 0;
  logic [VW:0] count = '0;
  mimo_mode_e mode = MODE_SISO;
  mod_e modu = MOD_QPSK;
  logic busy, ram_en;
  logic [VW-1:0] ram_addr;
  logic [127:0] ch_rdata, rx_rdata;
  logic det_valid, det_ready = 0;
  mimo_mode_e det_mode;
  mod_e det_mod;
  in_vec_t det_vec;

  in_fetch dut (.*);

  logic [127:0] ch_mem [DEPTH], rx_mem [DEPTH];
  always_ff @(posedge clk) if (ram_en) begin
    ch_rdata <= ch_mem[ram_addr];
    rx_rdata <= rx_mem[ram_addr];
  end

  int checks = 0, failures = 0;
  int got = 0, first_t = 0, last_t = 0, cyc = 0;
  logic rnd_ready = 1;
  always @(posedge clk) cyc <= cyc + 1;

  // accepted vectors
  always @(posedge clk) if (rst_n && det_valid && det_ready) begin
    checks++;
    if (got >= int'(count) || det_vec !== {ch_mem[got], rx_mem[got]} ||
        det_mode != mode || det_mod != modu) begin
      failures++; $display("ERROR: vector %0d of %0d wrong", got, count);
    end
    if (got == 0) first_t = cyc;
    last_t = cyc;
    got++;
  end

  always @(negedge clk) det_ready <= rnd_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int guard;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 60; run++) begin
      for (int i = 0; i < DEPTH; i++) begin
        ch_mem[i] = {$urandom, $urandom, $urandom, $urandom};
        rx_mem[i] = {$urandom, $urandom, $urandom, $urandom};
      end
      rnd_ready = run % 3 != 0;
      @(negedge clk);
      got = 0;
      count = (VW+1)'(run < 2 ? DEPTH : $urandom_range(1, DEPTH));
      mode = mimo_mode_e'($urandom_range(0, 4));
      modu = mod_e'($urandom_range(0, 2));
      start = 1;
      @(negedge clk); start = 0;
      // change the inputs: the run must keep what it latched at start
      guard = 0;
      while (busy && guard < 1000) begin @(negedge clk); guard++; end
      repeat (3) @(negedge clk);
      checks++;
      if (got != int'(count) || det_valid) begin
        failures++; $display("ERROR: run %0d delivered %0d of %0d", run, got, count);
      end
      if (!rnd_ready) begin
        checks++;
        if (last_t - first_t != int'(count) - 1) begin
          failures++; $display("ERROR: run %0d not one vector per clock", run);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
