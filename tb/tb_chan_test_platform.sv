// tb_chan_test_platform: self-checking test of the channel emulator
// peripheral through its AXI4-Lite port, as the processor would use it.
// Checks the reset values of the registers (seed 123, index 16, scale 4.0,
// delta 22) and writes and reads back the seed. It then programs a
// 3000-sample run, pulses INIT, sets RUN, polls DONE, and reads all 32 bins
// (low and high words) and the total. The bins must sum to 3000 and equal
// the histogram inside; the mass must sit on the positive levels 1..7 (0.25
// to 2.0, 92% expected at sigma 0.486). A second run with the same seed must
// give the same bins (reset restarts the sequence), and one with seed 221
// different bins.
`timescale 1ns/1ps
module tb_chan_test_platform;
  logic clk = 0, rst_n = 0;
  logic [8:0]  s_axi_awaddr = '0, s_axi_araddr = '0;
  logic        s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0]  s_axi_wstrb = 4'hF;
  logic        s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  int checks = 0, failures = 0;

  chan_test_platform dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); s_axi_awaddr = 9'(a); s_axi_wdata = d; s_axi_awvalid = 1; s_axi_wvalid = 1; #1;
    while (!(s_axi_awready && s_axi_wready)) begin @(negedge clk); #1; end
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 1; #1;
    while (!s_axi_bvalid) begin @(negedge clk); #1; end
    @(negedge clk); s_axi_bready = 0;
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); s_axi_araddr = 9'(a); s_axi_arvalid = 1; #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_axi_arvalid = 0; s_axi_rready = 1; #1;
    while (!s_axi_rvalid) begin @(negedge clk); #1; end
    d = s_axi_rdata;
    @(negedge clk); s_axi_rready = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_hist(input int seed, output int hb [32]);
    logic [31:0] d, hi;
    int sum, core;
    wr(32'h04, seed);
    rd(32'h04, d); checks++; if (d != 32'(seed)) begin failures++; $display("seed readback %0d", d); end
    wr(32'h14, 3000); wr(32'h18, 0);
    wr(32'h00, 32'h1);          // INIT
    wr(32'h00, 32'h2);          // RUN
    do rd(32'h1C, d); while (d[0] == 1'b0);
    rd(32'h20, d);
    checks++; if (d != 3000) begin failures++; $display("total %0d", d); end
    sum = 0;
    for (int b = 0; b < 32; b++) begin
      rd(32'h100 + 8*b, d); rd(32'h104 + 8*b, hi);
      hb[b] = int'(d);
      sum += int'(d);
      checks++; if (hi != 0) failures++;
      checks++; if (48'(d) != dut.u_core.u_hist.count[b]) begin failures++; $display("bin %0d readback", b); end
    end
    checks++; if (sum != 3000) begin failures++; $display("sum %0d", sum); end
    core = hb[1] + hb[2] + hb[3] + hb[4] + hb[5] + hb[6] + hb[7];
    checks++; if (core < 2600) begin failures++; $display("levels 1..7 hold %0d", core); end
    wr(32'h00, 32'h0);
  endtask

  initial begin
    logic [31:0] d;
    int b1 [32], b2 [32], b3 [32];
    int same12, same13;
    repeat (2) @(negedge clk); rst_n = 1;
    rd(32'h04, d); checks++; if (d != 123) begin failures++; $display("seed reset %0d", d); end
    rd(32'h08, d); checks++; if (d != 16) begin failures++; $display("index reset %0d", d); end
    rd(32'h0C, d); checks++; if (d != (4 << 16)) begin failures++; $display("scale reset %h", d); end
    rd(32'h10, d); checks++; if (d != 22) begin failures++; $display("delta reset %0d", d); end
    run_hist(123, b1);
    run_hist(123, b2);
    run_hist(221, b3);
    same12 = 1; same13 = 1;
    for (int b = 0; b < 32; b++) begin
      if (b1[b] != b2[b]) same12 = 0;
      if (b1[b] != b3[b]) same13 = 0;
    end
    checks++; if (!same12) begin failures++; $display("same seed gave different hb"); end
    checks++; if (same13)  begin failures++; $display("seed 221 gave identical hb"); end
    $display("hb seed 123: %0d %0d %0d %0d %0d %0d %0d (levels 1..7)", b1[1], b1[2], b1[3], b1[4], b1[5], b1[6], b1[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
