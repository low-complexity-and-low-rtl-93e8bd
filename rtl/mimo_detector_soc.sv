// mimo_detector_soc: 2x2 MIMO soft-output detector with its bus-attached
// buffers (top level).
//
// The detector core (mimo_detector) is surrounded by the memories and the
// bus interface of the system block diagram: an input RAM for the channel
// matrices, one for the received samples, an output memory controller with
// the LLR RAM, and an AHB-Lite slave through which a processor loads a slot
// of input vectors, starts the run and reads back the 8-bit LLRs. A run
// covers up to DEPTH vectors of one MIMO mode and modulation (a slot of 48
// symbols as in the power evaluation); in_fetch feeds them to the core at
// the rate the core accepts them.
//
// Interface: AHB-Lite slave (register map in ahb_if), one clock domain
// `clk`; the core derives its gated SM clock internally. `sm_clk_on`
// shows when that clock runs. Timing of one run: the input RAM read adds one
// clock before the first vector; the LLR RAM is written in the clock each
// LLR set leaves the core.
module mimo_detector_soc
  import mimo_pkg::*;
#(
  parameter int DEPTH = 48     // input vectors per run (one slot)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [15:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic [31:0] hrdata,
  output logic        hresp,
  output logic        sm_clk_on
);

  localparam int ODEPTH = 2 * DEPTH;
  localparam int IN_AW  = $clog2(DEPTH * 4);
  localparam int OUT_AW = $clog2(ODEPTH * 2);
  localparam int VW     = $clog2(DEPTH);
  localparam int CW     = $clog2(ODEPTH + 1);

  logic             ch_en, ch_we, rx_en, rx_we, llr_en;
  logic [IN_AW-1:0] ch_addr, rx_addr;
  logic [31:0]      ch_wdata, rx_wdata, ch_rdata, rx_rdata, llr_rdata;
  logic [OUT_AW-1:0] llr_addr;

  logic       start, fetch_busy;
  mimo_mode_e mode;
  mod_e       modu;
  logic [7:0] count;

  logic          b_en;
  logic [VW-1:0] b_addr;
  logic [127:0]  ch_vec, rx_vec;

  logic       det_valid, det_ready;
  mimo_mode_e det_mode;
  mod_e       det_mod;
  in_vec_t    det_vec;

  logic       out_valid;
  logic signed [QW-1:0] out_llr [NLLR];
  tag_t       out_tag;

  logic              o_we, o_ovf;
  logic [VW:0]       o_addr;
  logic [63:0]       o_wdata;
  logic [CW-1:0]     o_count;

  ahb_if #(.IN_AW(IN_AW), .OUT_AW(OUT_AW), .CW(CW),
           .IN_WORDS(DEPTH * 4), .OUT_WORDS(ODEPTH * 2)) u_ahb (
    .hclk(clk), .hresetn(rst_n), .hsel(hsel), .haddr(haddr), .htrans(htrans),
    .hwrite(hwrite), .hwdata(hwdata), .hready(hready), .hreadyout(hreadyout),
    .hrdata(hrdata), .hresp(hresp),
    .ch_en(ch_en), .ch_we(ch_we), .ch_addr(ch_addr), .ch_wdata(ch_wdata), .ch_rdata(ch_rdata),
    .rx_en(rx_en), .rx_we(rx_we), .rx_addr(rx_addr), .rx_wdata(rx_wdata), .rx_rdata(rx_rdata),
    .llr_en(llr_en), .llr_addr(llr_addr), .llr_rdata(llr_rdata),
    .start(start), .mode(mode), .modu(modu), .count(count),
    .fetch_busy(fetch_busy), .llr_count(o_count), .llr_overflow(o_ovf)
  );

  in_ram #(.DEPTH(DEPTH)) u_ch_ram (
    .clk(clk), .a_en(ch_en), .a_we(ch_we), .a_addr(ch_addr), .a_wdata(ch_wdata),
    .a_rdata(ch_rdata), .b_en(b_en), .b_addr(b_addr), .b_rdata(ch_vec)
  );

  in_ram #(.DEPTH(DEPTH)) u_rx_ram (
    .clk(clk), .a_en(rx_en), .a_we(rx_we), .a_addr(rx_addr), .a_wdata(rx_wdata),
    .a_rdata(rx_rdata), .b_en(b_en), .b_addr(b_addr), .b_rdata(rx_vec)
  );

  in_fetch #(.DEPTH(DEPTH)) u_fetch (
    .clk(clk), .rst_n(rst_n), .start(start),
    .count((VW+1)'(count > 8'(DEPTH) ? 8'(DEPTH) : count)),
    .mode(mode), .modu(modu), .busy(fetch_busy),
    .ram_en(b_en), .ram_addr(b_addr), .ch_rdata(ch_vec), .rx_rdata(rx_vec),
    .det_valid(det_valid), .det_ready(det_ready), .det_mode(det_mode),
    .det_mod(det_mod), .det_vec(det_vec)
  );

  mimo_detector u_det (
    .clk(clk), .rst_n(rst_n),
    .in_valid(det_valid), .in_ready(det_ready), .in_mode(det_mode),
    .in_mod(det_mod), .in_vec(det_vec),
    .out_valid(out_valid), .out_llr(out_llr), .out_tag(out_tag),
    .sm_clk_on(sm_clk_on)
  );

  omc #(.DEPTH(ODEPTH)) u_omc (
    .clk(clk), .rst_n(rst_n), .clear(start),
    .llr_valid(out_valid), .llr(out_llr), .tag(out_tag),
    .ram_we(o_we), .ram_addr(o_addr[VW:0]), .ram_wdata(o_wdata),
    .count(o_count), .overflow(o_ovf)
  );

  out_ram #(.DEPTH(ODEPTH)) u_llr_ram (
    .clk(clk), .a_en(llr_en), .a_addr(llr_addr), .a_rdata(llr_rdata),
    .b_we(o_we), .b_addr(o_addr[VW:0]), .b_wdata(o_wdata)
  );

endmodule
