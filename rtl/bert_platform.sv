// bert_platform: six bit error rate testers behind processor registers.
//
// N_BERT testers run in parallel on the same SNR indices, quantizer settings,
// threshold and frame count. Tester k uses channel seed CH_SEED + k and noise
// seed NOISE_SEED + k (8-bit wrap). The processor writes the settings, sets
// START, polls STATUS until every tester is done and reads each tester's bit
// errors, frame errors and frame count. Clearing and setting START again
// reseeds the generators and restarts the counts.
//
// Register map (byte address, 32-bit registers, write strobes ignored):
//   0x00 CTRL        bit0 START (level)
//   0x04 INDEX_CH    [5:0]  reset 18     0x08 INDEX_NOISE [5:0] reset 18
//   0x0C CH_SEED     [7:0]  reset 180    0x10 NOISE_SEED  [7:0] reset 120
//   0x14 NUM_FRAMES  reset 1000000       0x18 THETA [7:0] signed, reset -1
//   0x1C MAX_ITER    [15:0] reset 100    0x20 SCALE [20:0] Q5.16, reset 4.0
//   0x24 DELTA       [5:0]  reset 22     0x28 STATUS bit k = tester k done
//   0x40 + 0x10*k    tester k: +0 bit errors low, +4 bit errors high,
//                    +8 frame errors, +C frames decoded
//
// From the document: six identical testers working in parallel, seeds
// incremented by one per tester, the SNR indices, seeds and frame count used
// in its experiments as reset values. The register map and the other reset
// values are this design's own. Write strobes go unread (registers are
// written whole), and each tester's state and iteration count are left
// unconnected: they are for observation in simulation only.
module bert_platform
  import ce_pkg::*;
  import bert_pkg::*;
#(
  parameter int N_BERT = 6,
  parameter int Z      = 64,
  parameter int KB     = 32,
  parameter int JB     = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready
);

  logic        reg_wr;
  logic [7:0]  reg_waddr, reg_raddr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [3:0]  reg_wstrb;

  axil_slave #(.ADDR_W(8), .DATA_W(32)) u_axi (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb, .reg_raddr, .reg_rdata
  );

  logic                      start_q;
  logic [INDEX_W-1:0]        idx_ch_q, idx_nz_q;
  logic [SEED_W-1:0]         ch_seed_q, nz_seed_q;
  logic [31:0]               num_frames_q;
  logic signed [THETA_W-1:0] theta_q;
  logic [ITER_W-1:0]         max_iter_q;
  logic [SCALE_W-1:0]        scale_q;
  logic [DELTA_W-1:0]        delta_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q      <= 1'b0;
      idx_ch_q     <= INDEX_W'(18);
      idx_nz_q     <= INDEX_W'(18);
      ch_seed_q    <= SEED_W'(180);
      nz_seed_q    <= SEED_W'(120);
      num_frames_q <= 32'd1_000_000;
      theta_q      <= -THETA_W'(1);
      max_iter_q   <= ITER_W'(100);
      scale_q      <= SCALE_W'(4 << 16);
      delta_q      <= DELTA_W'(22);
    end else if (reg_wr) begin
      unique case (reg_waddr)
        8'h00: start_q      <= reg_wdata[0];
        8'h04: idx_ch_q     <= reg_wdata[INDEX_W-1:0];
        8'h08: idx_nz_q     <= reg_wdata[INDEX_W-1:0];
        8'h0C: ch_seed_q    <= reg_wdata[SEED_W-1:0];
        8'h10: nz_seed_q    <= reg_wdata[SEED_W-1:0];
        8'h14: num_frames_q <= reg_wdata;
        8'h18: theta_q      <= reg_wdata[THETA_W-1:0];
        8'h1C: max_iter_q   <= reg_wdata[ITER_W-1:0];
        8'h20: scale_q      <= reg_wdata[SCALE_W-1:0];
        8'h24: delta_q      <= reg_wdata[DELTA_W-1:0];
        default: ;
      endcase
    end
  end

  logic [N_BERT-1:0] done;
  logic [47:0]       bit_errors   [N_BERT];
  logic [31:0]       frame_errors [N_BERT];
  logic [31:0]       frames       [N_BERT];

  for (genvar k = 0; k < N_BERT; k++) begin : g_bert
    bert_state_t       state;
    logic [ITER_W-1:0] last_iter;
    bert #(.Z(Z), .KB(KB), .JB(JB)) u_bert (
      .clk, .rst_n, .start(start_q),
      .channel_seed(ch_seed_q + SEED_W'(k)), .noise_seed(nz_seed_q + SEED_W'(k)),
      .index_channel(idx_ch_q), .index_noise(idx_nz_q),
      .scale(scale_q), .delta(delta_q), .theta(theta_q), .max_iter(max_iter_q),
      .num_frames(num_frames_q), .done(done[k]),
      .bit_errors(bit_errors[k]), .frame_errors(frame_errors[k]),
      .frames(frames[k]), .state, .last_iterations(last_iter)
    );
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_raddr)
      8'h00: reg_rdata = {31'd0, start_q};
      8'h04: reg_rdata = 32'(idx_ch_q);
      8'h08: reg_rdata = 32'(idx_nz_q);
      8'h0C: reg_rdata = 32'(ch_seed_q);
      8'h10: reg_rdata = 32'(nz_seed_q);
      8'h14: reg_rdata = num_frames_q;
      8'h18: reg_rdata = 32'(theta_q);
      8'h1C: reg_rdata = 32'(max_iter_q);
      8'h20: reg_rdata = 32'(scale_q);
      8'h24: reg_rdata = 32'(delta_q);
      8'h28: reg_rdata = 32'(done);
      default: reg_rdata = '0;
    endcase
    for (int k = 0; k < N_BERT; k++) begin
      if (reg_raddr == 8'(8'h40 + 16*k))  reg_rdata = bit_errors[k][31:0];
      if (reg_raddr == 8'(8'h44 + 16*k))  reg_rdata = 32'(bit_errors[k][47:32]);
      if (reg_raddr == 8'(8'h48 + 16*k))  reg_rdata = frame_errors[k];
      if (reg_raddr == 8'(8'h4C + 16*k))  reg_rdata = frames[k];
    end
  end

endmodule
