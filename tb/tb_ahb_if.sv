// tb_ahb_if: test of the AHB-Lite bus interface and control registers.
//
// A bus master model issues single word transfers. Behavioural RAM models
// (one clock read latency) stand in for the input and LLR RAMs. Checked:
// writes reach the right RAM word with the right data and without a wait
// state, reads return the RAM word after exactly one wait state, accesses
// beyond the RAM sizes touch no RAM, CTRL fields and the one-clock start
// pulse, the done bit set when the LLR entry count reaches count (SISO/SIMO)
// or 2*count (other modes) and cleared by the next start, and HRESP = OKAY.
// Default parameters (48 vectors, 96 LLR entries).
module tb_ahb_if;
  import mimo_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int IN_WORDS = 192, OUT_WORDS = 192;

  logic        hsel = 0, hwrite = 0;
  logic [15:0] haddr = '0;
  logic [1:0]  htrans = '0;
  logic [31:0] hwdata = '0, hrdata;
  logic        hready, hreadyout, hresp;
  logic        ch_en, ch_we, rx_en, rx_we, llr_en;
  logic [7:0]  ch_addr, rx_addr, llr_addr;
  logic [31:0] ch_wdata, rx_wdata, ch_rdata, rx_rdata, llr_rdata;
  logic        start;
  mimo_mode_e  mode;
  mod_e        modu;
  logic [7:0]  count;
  logic        fetch_busy = 0, llr_overflow = 0;
  logic [7:0]  llr_count = '0;

  assign hready = hreadyout;

  ahb_if dut (
    .hclk(clk), .hresetn(rst_n), .hsel, .haddr, .htrans, .hwrite, .hwdata,
    .hready, .hreadyout, .hrdata, .hresp,
    .ch_en, .ch_we, .ch_addr, .ch_wdata, .ch_rdata,
    .rx_en, .rx_we, .rx_addr, .rx_wdata, .rx_rdata,
    .llr_en, .llr_addr, .llr_rdata,
    .start, .mode, .modu, .count, .fetch_busy, .llr_count, .llr_overflow
  );

  logic [31:0] ch_m [256], rx_m [256], llr_m [256];
  int n_ch_acc = 0, n_rx_acc = 0, n_llr_acc = 0, n_start = 0;
  always_ff @(posedge clk) begin
    if (ch_en) begin if (ch_we) ch_m[ch_addr] <= ch_wdata; else ch_rdata <= ch_m[ch_addr]; n_ch_acc++; end
    if (rx_en) begin if (rx_we) rx_m[rx_addr] <= rx_wdata; else rx_rdata <= rx_m[rx_addr]; n_rx_acc++; end
    if (llr_en) begin llr_rdata <= llr_m[llr_addr]; n_llr_acc++; end
    if (start) n_start++;
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("ERROR: %s", msg); end
  endtask

  int waits;
  task automatic ahb_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    hsel = 1; haddr = a; htrans = 2'b10; hwrite = 1;
    @(posedge clk);
    #1 hsel = 0; htrans = 2'b00; hwdata = d;
    waits = 0;
    @(negedge clk);
    while (!hreadyout) begin waits++; @(negedge clk); end
    @(posedge clk);
  endtask

  task automatic ahb_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    hsel = 1; haddr = a; htrans = 2'b10; hwrite = 0;
    @(posedge clk);
    #1 hsel = 0; htrans = 2'b00;
    waits = 0;
    @(negedge clk);
    while (!hreadyout) begin waits++; @(negedge clk); end
    d = hrdata;
    chk(hresp === 1'b0, "HRESP");
    @(posedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, exp_ch [IN_WORDS], exp_rx [IN_WORDS];
    int a0, a1, a2, w, exp_n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // input RAMs: fill, then random reads
    for (int i = 0; i < IN_WORDS; i++) begin
      exp_ch[i] = $urandom; exp_rx[i] = $urandom;
      ahb_write(16'(4 * i), exp_ch[i]);
      chk(waits == 0, "write wait state");
      ahb_write(16'h1000 + 16'(4 * i), exp_rx[i]);
    end
    @(negedge clk);
    for (int i = 0; i < IN_WORDS; i++) begin
      chk(ch_m[i] === exp_ch[i] && rx_m[i] === exp_rx[i], $sformatf("RAM word %0d", i));
      llr_m[i] = $urandom;
    end
    for (int n = 0; n < 500; n++) begin
      w = $urandom_range(0, IN_WORDS - 1);
      case ($urandom_range(0, 2))
        0: begin ahb_read(16'(4 * w), d); chk(d === exp_ch[w], "CH read"); end
        1: begin ahb_read(16'h1000 + 16'(4 * w), d); chk(d === exp_rx[w], "RX read"); end
        default: begin ahb_read(16'h2000 + 16'(4 * w), d); chk(d === llr_m[w], "LLR read"); end
      endcase
      chk(waits == 1, "read wait state");
    end
    // out of range: no RAM access, no write to the LLR RAM
    a0 = n_ch_acc; a1 = n_rx_acc; a2 = n_llr_acc;
    ahb_write(16'(4 * IN_WORDS), 32'hdead);
    ahb_read(16'h1000 + 16'(4 * IN_WORDS + 8), d);
    ahb_read(16'h2000 + 16'(4 * OUT_WORDS), d);
    ahb_write(16'h2000, 32'hbeef);
    chk(n_ch_acc == a0 && n_rx_acc == a1 && n_llr_acc == a2, "out-of-range access");
    // runs
    for (int r = 0; r < 40; r++) begin
      mimo_mode_e md = mimo_mode_e'(r % 5);
      mod_e m = mod_e'(r % 3);
      int cnt;
      md = mimo_mode_e'(r % 5);
      m = mod_e'(r % 3);
      cnt = $urandom_range(1, 48);
      exp_n = (md inside {MODE_SISO, MODE_SIMO}) ? cnt : 2 * cnt;
      a0 = n_start;
      ahb_write(16'h3000, {8'h0, 8'(cnt), 6'h0, 2'(m), 1'b0, 3'(md), 4'h1});
      @(negedge clk);
      llr_count = '0;
      fetch_busy = 1;
      chk(start == 1'b1 && n_start == a0 && mode == md && modu == m && int'(count) == cnt, "start / CTRL fields");
      ahb_read(16'h3000, d);
      chk(d == {8'h0, 8'(cnt), 6'h0, 2'(m), 1'b0, 3'(md), 4'h0}, "CTRL read back");
      ahb_read(16'h3004, d);
      chk(d[1:0] == 2'b01, "status busy");
      // a CTRL write during a run is ignored
      ahb_write(16'h3000, 32'h0000_0041);
      chk(n_start == a0 + 1 && mode == md, "CTRL write while running");
      fetch_busy = 0;
      for (int k = 0; k < exp_n; k++) begin
        @(negedge clk);
        llr_count = 8'(k);
        #1 chk(dut.done == 1'b0, "early done");
        if (k == exp_n / 2) begin
          ahb_read(16'h3004, d);
          chk(d[0] == 1'b1 && d[1] == 1'b0 && int'(d[23:16]) == k, "status during run");
        end
      end
      @(negedge clk); llr_count = 8'(exp_n);
      llr_overflow = r == 7;
      repeat (2) @(negedge clk);
      ahb_read(16'h3004, d);
      chk(d[2:0] == {llr_overflow, 2'b10} && int'(d[23:16]) == exp_n, $sformatf("status done %h", d));
      llr_overflow = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
