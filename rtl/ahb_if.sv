// ahb_if: AHB-Lite slave bus interface with the detector's control registers.
//
// Lets a microprocessor load the input RAMs, start a run and read the LLRs.
// Byte address map (32-bit word accesses only):
//   0x0000 + 4*(4*v + s)  channel RAM, vector v, sample s = h11, h12, h21, h22
//   0x1000 + 4*(4*v + s)  received-sample RAM, s = y11, y12, y21, y22
//                         (each word {re[15:0], im[15:0]})
//   0x2000 + 4*(2*n + w)  LLR RAM, entry n (read only), w = 0: LLR3..LLR0,
//                         w = 1: {8'h0, tag, LLR5, LLR4}
//   0x3000 CTRL   write: [0] start (self clearing), [6:4] MIMO mode,
//                 [9:8] modulation, [23:16] number of vectors; read back
//                 without the start bit
//   0x3004 STATUS read: [0] busy, [1] done, [2] LLR RAM overflow,
//                 [23:16] LLR entries written
// A run produces one LLR entry per symbol: count entries in SISO/SIMO and
// 2*count in MISO, SD and SM. `done` is set when all of them are written and
// cleared by the next start.
//
// Timing: writes have no wait state (the RAM or register is written in the
// data phase); reads insert one wait state (the RAM is read in the first
// data-phase clock, HRDATA is driven in the second). HRESP is always OKAY
// (constant output: no access is refused). HTRANS[0] is not used, since
// NONSEQ and SEQ transfers are served alike, nor are HADDR[1:0] and
// HADDR[15:14] (word accesses in a 16 KiB window).
// The published architecture names the bus but not its register set; everything here is
// this design's choice.
module ahb_if
  import mimo_pkg::*;
#(
  parameter int IN_AW  = 8,   // word address width of an input RAM port A
  parameter int OUT_AW = 8,   // word address width of the LLR RAM port A
  parameter int CW     = 8,   // width of the LLR entry counter
  parameter int IN_WORDS  = 192,  // words of an input RAM (4 per vector)
  parameter int OUT_WORDS = 192   // words of the LLR RAM (2 per entry)
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic [15:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic [31:0] hrdata,
  output logic        hresp,
  // channel RAM port A
  output logic        ch_en,
  output logic        ch_we,
  output logic [IN_AW-1:0] ch_addr,
  output logic [31:0] ch_wdata,
  input  logic [31:0] ch_rdata,
  // received-sample RAM port A
  output logic        rx_en,
  output logic        rx_we,
  output logic [IN_AW-1:0] rx_addr,
  output logic [31:0] rx_wdata,
  input  logic [31:0] rx_rdata,
  // LLR RAM port A
  output logic        llr_en,
  output logic [OUT_AW-1:0] llr_addr,
  input  logic [31:0] llr_rdata,
  // run control
  output logic        start,
  output mimo_mode_e  mode,
  output mod_e        modu,
  output logic [7:0]  count,
  input  logic        fetch_busy,
  input  logic [CW-1:0] llr_count,
  input  logic        llr_overflow
);

  localparam logic [1:0] R_CH = 2'd0, R_RX = 2'd1, R_LLR = 2'd2, R_REG = 2'd3;

  logic        dp;          // data phase in progress
  logic        dp_write;
  logic [15:0] dp_addr;
  logic        rd_wait;     // first clock of a read data phase
  logic        done, running;
  logic [CW:0] expect_n;

  logic [1:0]  region;
  logic [11:0] word;
  assign region = dp_addr[13:12];
  assign word   = {2'b00, dp_addr[11:2]};

  // address phase
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp       <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
      rd_wait  <= 1'b0;
    end else begin
      if (rd_wait) rd_wait <= 1'b0;
      if (hready) begin
        dp       <= hsel && htrans[1];
        dp_write <= hwrite;
        dp_addr  <= haddr;
        rd_wait  <= hsel && htrans[1] && !hwrite;
      end
    end
  end

  assign hreadyout = !rd_wait;
  assign hresp     = 1'b0;

  // RAM port A: writes in the data phase, reads in the first read clock
  logic acc;
  assign acc      = dp && (dp_write || rd_wait);
  assign ch_en    = acc && region == R_CH && word < 12'(IN_WORDS);
  assign rx_en    = acc && region == R_RX && word < 12'(IN_WORDS);
  assign ch_we    = dp_write;
  assign rx_we    = dp_write;
  assign ch_addr  = word[IN_AW-1:0];
  assign rx_addr  = word[IN_AW-1:0];
  assign ch_wdata = hwdata;
  assign rx_wdata = hwdata;
  assign llr_en   = acc && !dp_write && region == R_LLR && word < 12'(OUT_WORDS);
  assign llr_addr = word[OUT_AW-1:0];

  // control registers
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      start    <= 1'b0;
      mode     <= MODE_SISO;
      modu     <= MOD_QPSK;
      count    <= '0;
      running  <= 1'b0;
      done     <= 1'b0;
      expect_n <= '0;
    end else begin
      start <= 1'b0;
      if (dp && dp_write && region == R_REG && dp_addr[11:2] == 10'd0 && !running) begin
        mode  <= mimo_mode_e'(hwdata[6:4]);
        modu  <= mod_e'(hwdata[9:8]);
        count <= hwdata[23:16];
        if (hwdata[0]) begin
          start    <= 1'b1;
          running  <= 1'b1;
          done     <= 1'b0;
          expect_n <= (mimo_mode_e'(hwdata[6:4]) inside {MODE_SISO, MODE_SIMO})
                      ? (CW+1)'(hwdata[23:16]) : (CW+1)'({hwdata[23:16], 1'b0});
        end
      end else if (running && !start && (CW+1)'(llr_count) == expect_n) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // read data, second clock of the read data phase
  always_comb begin
    hrdata = '0;
    if (dp && !dp_write) begin
      unique case (region)
        R_CH:  hrdata = ch_rdata;
        R_RX:  hrdata = rx_rdata;
        R_LLR: hrdata = llr_rdata;
        default: begin
          if (dp_addr[11:2] == 10'd0)
            hrdata = {8'h00, count, 6'h00, modu, 1'b0, mode, 4'h0};
          else if (dp_addr[11:2] == 10'd1)
            hrdata = {8'h00, 8'(llr_count), 13'h0, llr_overflow, done,
                      running || fetch_busy};
        end
      endcase
    end
  end

endmodule
