// tb_axil_slave: self-checking test of the AXI4-Lite slave front end.
// A small register file (16 words) is built here on the register bus. The
// test writes random data to random registers with random response
// back-pressure, reads them back, checks OKAY responses, that each write
// gives exactly one reg_wr pulse with the right address and data, that a
// write response waits while BREADY is low, and that read data stays stable
// while RREADY is low.
`timescale 1ns/1ps
module tb_axil_slave;
  logic clk = 0, rst_n = 0;
  logic [8:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0] s_axi_wstrb = 4'hF;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  logic reg_wr; logic [8:0] reg_waddr, reg_raddr; logic [31:0] reg_wdata, reg_rdata; logic [3:0] reg_wstrb;
  int checks = 0, failures = 0, wr_pulses = 0;
  logic [31:0] rf [16];
  logic [31:0] model [16];

  axil_slave #(.ADDR_W(9), .DATA_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) if (reg_wr) begin rf[reg_waddr[5:2]] <= reg_wdata; wr_pulses++; end
  assign reg_rdata = rf[reg_raddr[5:2]];

  task automatic axi_write(logic [8:0] a, logic [31:0] d, int bdelay);
    @(negedge clk); s_axi_awaddr = a; s_axi_wdata = d; s_axi_awvalid = 1; s_axi_wvalid = 1; #1;
    while (!(s_axi_awready && s_axi_wready)) @(negedge clk);
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0;
    repeat (bdelay) begin
      checks++; if (!s_axi_bvalid) begin failures++; $display("bvalid dropped"); end
      @(negedge clk);
    end
    s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    checks++; if (s_axi_bresp != 2'b00) failures++;
    @(negedge clk); s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [8:0] a, output logic [31:0] d, input int rdelay);
    logic [31:0] first;
    @(negedge clk); s_axi_araddr = a; s_axi_arvalid = 1; #1;
    while (!s_axi_arready) @(negedge clk);
    @(negedge clk); s_axi_arvalid = 0;
    first = s_axi_rdata;
    repeat (rdelay) begin
      checks++; if (!s_axi_rvalid || s_axi_rdata != first) begin failures++; $display("read not held"); end
      @(negedge clk);
    end
    s_axi_rready = 1;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    checks++; if (s_axi_rresp != 2'b00) failures++;
    @(negedge clk); s_axi_rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 16; i++) begin rf[i] = '0; model[i] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int r; logic [31:0] v;
      r = $urandom_range(0, 15); v = $urandom;
      axi_write(9'(r*4), v, $urandom_range(0, 3));
      model[r] = v;
      r = $urandom_range(0, 15);
      axi_read(9'(r*4), d, $urandom_range(0, 3));
      checks++; if (d != model[r]) begin failures++; $display("reg %0d read %h expected %h", r, d, model[r]); end
    end
    checks++; if (wr_pulses != 200) begin failures++; $display("%0d write pulses", wr_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
