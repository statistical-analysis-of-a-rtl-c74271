// ngdbf_test_system: top level of the channel emulator and NGDBF decoder
// test hardware.
//
// Two processor peripherals stand side by side, each with its own AXI4-Lite
// slave port for the soft processor that drives it:
//   ch_*  the channel emulator test platform: Gaussian emulator, 5-bit
//         quantizer and 32-bin histogram, used to check the emulator's
//         distribution, its independence of the seed and its reset;
//   bt_*  the decoder test platform: six bit error rate testers, each with a
//         channel emulator, a perturbation-noise generator and a 2048-bit
//         NGDBF decoder, counting bit and frame errors.
// The processor systems themselves (processor, UART, timer, clocking, reset,
// memories, debug) are outside this design; only their AXI4-Lite master
// connections appear here as ports. Both peripherals share one clock and one
// active-low reset.
//
// The two platforms and their contents follow the document, which builds them
// on two different boards; putting them in one top is this design's own.
module ngdbf_test_system #(
  parameter int N_BERT = 6,
  parameter int Z      = 64,
  parameter int KB     = 32,
  parameter int JB     = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // channel emulator test platform
  input  logic [8:0]  ch_s_axi_awaddr,
  input  logic        ch_s_axi_awvalid,
  output logic        ch_s_axi_awready,
  input  logic [31:0] ch_s_axi_wdata,
  input  logic [3:0]  ch_s_axi_wstrb,
  input  logic        ch_s_axi_wvalid,
  output logic        ch_s_axi_wready,
  output logic [1:0]  ch_s_axi_bresp,
  output logic        ch_s_axi_bvalid,
  input  logic        ch_s_axi_bready,
  input  logic [8:0]  ch_s_axi_araddr,
  input  logic        ch_s_axi_arvalid,
  output logic        ch_s_axi_arready,
  output logic [31:0] ch_s_axi_rdata,
  output logic [1:0]  ch_s_axi_rresp,
  output logic        ch_s_axi_rvalid,
  input  logic        ch_s_axi_rready,
  // bit error rate tester platform
  input  logic [7:0]  bt_s_axi_awaddr,
  input  logic        bt_s_axi_awvalid,
  output logic        bt_s_axi_awready,
  input  logic [31:0] bt_s_axi_wdata,
  input  logic [3:0]  bt_s_axi_wstrb,
  input  logic        bt_s_axi_wvalid,
  output logic        bt_s_axi_wready,
  output logic [1:0]  bt_s_axi_bresp,
  output logic        bt_s_axi_bvalid,
  input  logic        bt_s_axi_bready,
  input  logic [7:0]  bt_s_axi_araddr,
  input  logic        bt_s_axi_arvalid,
  output logic        bt_s_axi_arready,
  output logic [31:0] bt_s_axi_rdata,
  output logic [1:0]  bt_s_axi_rresp,
  output logic        bt_s_axi_rvalid,
  input  logic        bt_s_axi_rready
);

  chan_test_platform u_chan (
    .clk, .rst_n,
    .s_axi_awaddr(ch_s_axi_awaddr), .s_axi_awvalid(ch_s_axi_awvalid),
    .s_axi_awready(ch_s_axi_awready), .s_axi_wdata(ch_s_axi_wdata),
    .s_axi_wstrb(ch_s_axi_wstrb), .s_axi_wvalid(ch_s_axi_wvalid),
    .s_axi_wready(ch_s_axi_wready), .s_axi_bresp(ch_s_axi_bresp),
    .s_axi_bvalid(ch_s_axi_bvalid), .s_axi_bready(ch_s_axi_bready),
    .s_axi_araddr(ch_s_axi_araddr), .s_axi_arvalid(ch_s_axi_arvalid),
    .s_axi_arready(ch_s_axi_arready), .s_axi_rdata(ch_s_axi_rdata),
    .s_axi_rresp(ch_s_axi_rresp), .s_axi_rvalid(ch_s_axi_rvalid),
    .s_axi_rready(ch_s_axi_rready)
  );

  bert_platform #(.N_BERT(N_BERT), .Z(Z), .KB(KB), .JB(JB)) u_bert (
    .clk, .rst_n,
    .s_axi_awaddr(bt_s_axi_awaddr), .s_axi_awvalid(bt_s_axi_awvalid),
    .s_axi_awready(bt_s_axi_awready), .s_axi_wdata(bt_s_axi_wdata),
    .s_axi_wstrb(bt_s_axi_wstrb), .s_axi_wvalid(bt_s_axi_wvalid),
    .s_axi_wready(bt_s_axi_wready), .s_axi_bresp(bt_s_axi_bresp),
    .s_axi_bvalid(bt_s_axi_bvalid), .s_axi_bready(bt_s_axi_bready),
    .s_axi_araddr(bt_s_axi_araddr), .s_axi_arvalid(bt_s_axi_arvalid),
    .s_axi_arready(bt_s_axi_arready), .s_axi_rdata(bt_s_axi_rdata),
    .s_axi_rresp(bt_s_axi_rresp), .s_axi_rvalid(bt_s_axi_rvalid),
    .s_axi_rready(bt_s_axi_rready)
  );

endmodule
