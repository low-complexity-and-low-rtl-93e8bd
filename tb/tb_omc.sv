// tb_omc: test of the output memory controller.
//
// Random LLR sets and tags arrive with random gaps; every clock the RAM
// write enable, address (consecutive from 0) and data layout
// {8'h0, tag byte, LLR5..LLR0} are compared with a model, as are the entry
// count and the overflow flag when more than DEPTH sets arrive. A clear
// restarts at entry 0. Runs at the default depth (96 entries).
module tb_omc;
  import mimo_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 96;
  localparam int CW = $clog2(DEPTH + 1);

  logic clear = 0, llr_valid = 0;
  logic signed [QW-1:0] llr [NLLR];
  tag_t tag;
  logic ram_we;
  logic [$clog2(DEPTH)-1:0] ram_addr;
  logic [63:0] ram_wdata;
  logic [CW-1:0] count;
  logic overflow;

  omc dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, items;
    logic [63:0] exp_w;
    logic ovf;
    for (int k = 0; k < NLLR; k++) llr[k] = '0;
    tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      n = 0; ovf = 0;
      items = (run == 2) ? DEPTH + 10 : $urandom_range(1, DEPTH);
      for (int i = 0; i < items; i++) begin
        @(negedge clk);
        llr_valid = (run == 2) || $urandom_range(0, 3) != 0;
        for (int k = 0; k < NLLR; k++) llr[k] = QW'($urandom);
        tag.mode = mimo_mode_e'($urandom_range(0, 4));
        tag.modu = mod_e'($urandom_range(0, 2));
        tag.t = 1'($urandom);
        #1;
        exp_w = {8'h00, 2'b00, tag.t, tag.modu, tag.mode,
                 llr[5], llr[4], llr[3], llr[2], llr[1], llr[0]};
        checks++;
        if (ram_we !== (llr_valid && n < DEPTH) || int'(count) != n || overflow !== ovf ||
            (ram_we && (int'(ram_addr) != n || ram_wdata !== exp_w))) begin
          failures++;
          $display("ERROR: run %0d item %0d: we %b addr %0d count %0d ovf %b", run, n,
                   ram_we, ram_addr, count, overflow);
        end
        if (llr_valid) begin
          if (n < DEPTH) n++;
          else ovf = 1;
        end
      end
      @(negedge clk); llr_valid = 0;
      #1 checks++;
      if (int'(count) != n || overflow !== ovf) begin
        failures++; $display("ERROR: final count %0d exp %0d", count, n);
      end
      if (run == 2 && !ovf) begin failures++; $display("ERROR: overflow not exercised"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
