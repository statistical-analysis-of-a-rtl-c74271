// chan_test_platform: processor peripheral for testing the channel emulator.
//
// An AXI4-Lite slave whose registers drive the channel test core
// (emulator -> 5-bit quantizer -> histogram). The processor sets the seed,
// SNR index, quantizer scale and delta and a sample budget, pulses INIT to
// reseed the emulator and clear the histogram, sets RUN, polls DONE and then
// reads the 32 bins.
//
// Register map (byte address, 32-bit registers, write strobes ignored):
//   0x00 CTRL        bit0 INIT (write 1: one-clock pulse), bit1 RUN
//   0x04 SEED        [7:0]            reset value 123
//   0x08 INDEX       [5:0]  4 x Eb/N0 reset value 16 (4 dB)
//   0x0C SCALE       [20:0] Q5.16     reset value 4.0
//   0x10 DELTA       [5:0]            reset value 22
//   0x14 NUM_LO / 0x18 NUM_HI  sample budget (48 bits), reset value 2^20
//   0x1C STATUS      bit0 DONE (read only)
//   0x20 TOTAL_LO / 0x24 TOTAL_HI   samples counted (read only)
//   0x100 + 8*b      bin b, low word; 0x104 + 8*b high word (read only)
//
// From the document: a custom AXI peripheral wrapping the emulator test core,
// controlled by the soft processor, with seed and SNR settings. The register
// map and reset values other than seed 123 / 4 dB are this design's own.
// Every register is written whole, so the write strobes go unread, and the
// core's raw and quantized sample streams are left unconnected here: they
// are observation points for simulation, not part of the register map.
module chan_test_platform
  import ce_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [8:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [8:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready
);

  localparam int CNT_W = 48;

  logic        reg_wr;
  logic [8:0]  reg_waddr, reg_raddr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [3:0]  reg_wstrb;

  axil_slave #(.ADDR_W(9), .DATA_W(32)) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb, .reg_raddr, .reg_rdata
  );

  logic               init_q, run_q;
  logic [SEED_W-1:0]  seed_q;
  logic [INDEX_W-1:0] index_q;
  logic [SCALE_W-1:0] scale_q;
  logic [DELTA_W-1:0] delta_q;
  logic [CNT_W-1:0]   num_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q  <= 1'b0;
      run_q   <= 1'b0;
      seed_q  <= SEED_W'(123);
      index_q <= INDEX_W'(16);
      scale_q <= SCALE_W'(4 << 16);
      delta_q <= DELTA_W'(22);
      num_q   <= CNT_W'(1 << 20);
    end else begin
      init_q <= 1'b0;
      if (reg_wr) begin
        unique case (reg_waddr)
          9'h000: begin init_q <= reg_wdata[0]; run_q <= reg_wdata[1]; end
          9'h004: seed_q  <= reg_wdata[SEED_W-1:0];
          9'h008: index_q <= reg_wdata[INDEX_W-1:0];
          9'h00C: scale_q <= reg_wdata[SCALE_W-1:0];
          9'h010: delta_q <= reg_wdata[DELTA_W-1:0];
          9'h014: num_q[31:0]     <= reg_wdata;
          9'h018: num_q[CNT_W-1:32] <= reg_wdata[CNT_W-33:0];
          default: ;
        endcase
      end
    end
  end

  logic             done;
  logic [4:0]       rd_bin;
  logic [CNT_W-1:0] rd_count, total;
  sample_t          raw_sample;
  logic             raw_valid, q_valid;
  qsample_t         q_sample;

  channel_top #(.CNT_W(CNT_W)) u_core (
    .clk, .rst_n, .init(init_q), .run(run_q), .seed(seed_q), .index(index_q),
    .scale(scale_q), .delta(delta_q), .num_samples(num_q), .done,
    .rd_bin, .rd_count, .total, .raw_sample, .raw_valid, .q_sample, .q_valid
  );

  assign rd_bin = reg_raddr[7:3];

  always_comb begin
    reg_rdata = '0;
    if (reg_raddr[8]) begin
      reg_rdata = reg_raddr[2] ? 32'(rd_count[CNT_W-1:32]) : rd_count[31:0];
    end else begin
      unique case (reg_raddr)
        9'h000: reg_rdata = {30'd0, run_q, 1'b0};
        9'h004: reg_rdata = 32'(seed_q);
        9'h008: reg_rdata = 32'(index_q);
        9'h00C: reg_rdata = 32'(scale_q);
        9'h010: reg_rdata = 32'(delta_q);
        9'h014: reg_rdata = num_q[31:0];
        9'h018: reg_rdata = 32'(num_q[CNT_W-1:32]);
        9'h01C: reg_rdata = {31'd0, done};
        9'h020: reg_rdata = total[31:0];
        9'h024: reg_rdata = 32'(total[CNT_W-1:32]);
        default: reg_rdata = '0;
      endcase
    end
  end

endmodule
