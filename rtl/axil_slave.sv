// axil_slave: AXI4-Lite slave front end for the processor's slave registers.
//
// Turns AXI4-Lite transactions into a simple register bus. A write is taken
// when the write address and write data are both valid and no write response
// is pending: `reg_wr` pulses for one clock with `reg_waddr`, `reg_wdata`
// and `reg_wstrb`, and BVALID rises on the next clock (OKAY). A read is taken
// when ARVALID is high and no read response is pending: `reg_raddr` follows
// ARADDR combinationally, `reg_rdata` is sampled in the same clock and
// returned with RVALID on the next clock (OKAY). One write and one read may
// be outstanding. Addresses are byte addresses; the register map belongs to
// the module that uses this front end.
//
// The document names this handshaking layer only; the protocol choices above
// are this design's own.
module axil_slave #(
  parameter int ADDR_W = 9,
  parameter int DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite
  input  logic [ADDR_W-1:0]   s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [DATA_W-1:0]   s_axi_wdata,
  input  logic [DATA_W/8-1:0] s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [ADDR_W-1:0]   s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [DATA_W-1:0]   s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // register bus
  output logic                reg_wr,
  output logic [ADDR_W-1:0]   reg_waddr,
  output logic [DATA_W-1:0]   reg_wdata,
  output logic [DATA_W/8-1:0] reg_wstrb,
  output logic [ADDR_W-1:0]   reg_raddr,
  input  logic [DATA_W-1:0]   reg_rdata
);

  logic wr_take, rd_take;

  assign wr_take       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_take;
  assign s_axi_wready  = wr_take;
  assign s_axi_bresp   = 2'b00;

  assign rd_take       = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_take;
  assign s_axi_rresp   = 2'b00;

  assign reg_wr    = wr_take;
  assign reg_waddr = s_axi_awaddr;
  assign reg_wdata = s_axi_wdata;
  assign reg_wstrb = s_axi_wstrb;
  assign reg_raddr = s_axi_araddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (wr_take)                          s_axi_bvalid <= 1'b1;
      else if (s_axi_bready)                s_axi_bvalid <= 1'b0;
      if (rd_take) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= reg_rdata;
      end else if (s_axi_rready)            s_axi_rvalid <= 1'b0;
    end
  end

  // A response stays valid, with its data stable, until it is accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
