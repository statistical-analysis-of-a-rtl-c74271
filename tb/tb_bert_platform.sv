// tb_bert_platform: self-checking test of the six-tester platform through
// its AXI4-Lite port, at a reduced frame size (Z=8, KB=8: 64-bit frames).
// Checks the register reset values (indices 18/18, seeds 180/120, one
// million frames), that tester k gets seeds 180+k / 120+k, then runs three
// frames per tester at 1 dB (index 4, 10 iterations), polls STATUS until all
// six are done, and compares every tester's bit errors, frame errors and
// frame count read over the bus with the tester's own counters. Errors must
// occur at this SNR, and the testers must not all report the same counts
// (different seeds).
`timescale 1ns/1ps
module tb_bert_platform;
  logic clk = 0, rst_n = 0;
  logic [7:0]  s_axi_awaddr = '0, s_axi_araddr = '0;
  logic        s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0]  s_axi_wstrb = 4'hF;
  logic        s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  int checks = 0, failures = 0;

  bert_platform #(.N_BERT(6), .Z(8), .KB(8), .JB(6)) dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); s_axi_awaddr = 8'(a); s_axi_wdata = d; s_axi_awvalid = 1; s_axi_wvalid = 1; #1;
    while (!(s_axi_awready && s_axi_wready)) begin @(negedge clk); #1; end
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 1; #1;
    while (!s_axi_bvalid) begin @(negedge clk); #1; end
    @(negedge clk); s_axi_bready = 0;
  endtask
  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); s_axi_araddr = 8'(a); s_axi_arvalid = 1; #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_axi_arvalid = 0; s_axi_rready = 1; #1;
    while (!s_axi_rvalid) begin @(negedge clk); #1; end
    d = s_axi_rdata;
    @(negedge clk); s_axi_rready = 0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ch_seed [6], nz_seed [6];
  logic [47:0] hb [6]; logic [31:0] hf [6], hn [6];
  for (genvar k = 0; k < 6; k++) begin : g_peek
    assign ch_seed[k] = dut.g_bert[k].u_bert.channel_seed;
    assign nz_seed[k] = dut.g_bert[k].u_bert.noise_seed;
    assign hb[k] = dut.g_bert[k].u_bert.bit_errors;
    assign hf[k] = dut.g_bert[k].u_bert.frame_errors;
    assign hn[k] = dut.g_bert[k].u_bert.frames;
  end

  initial begin
    logic [31:0] d, lo, hi, fe, fr;
    int total_fe, distinct;
    repeat (2) @(negedge clk); rst_n = 1;
    rd(32'h04, d); checks++; if (d != 18) failures++;
    rd(32'h08, d); checks++; if (d != 18) failures++;
    rd(32'h0C, d); checks++; if (d != 180) failures++;
    rd(32'h10, d); checks++; if (d != 120) failures++;
    rd(32'h14, d); checks++; if (d != 1000000) failures++;
    for (int k = 0; k < 6; k++) begin
      checks++; if (ch_seed[k] != 8'(180 + k) || nz_seed[k] != 8'(120 + k)) begin failures++; $display("tester %0d seeds %0d/%0d", k, ch_seed[k], nz_seed[k]); end
    end
    wr(32'h04, 4); wr(32'h1C, 10); wr(32'h14, 3);
    wr(32'h00, 1);
    do rd(32'h28, d); while (d[5:0] != 6'h3F);
    total_fe = 0; distinct = 0;
    for (int k = 0; k < 6; k++) begin
      rd(32'h40 + 16*k, lo); rd(32'h44 + 16*k, hi); rd(32'h48 + 16*k, fe); rd(32'h4C + 16*k, fr);
      checks++; if ({hi[15:0], lo} != hb[k] || fe != hf[k] || fr != hn[k]) begin failures++; $display("tester %0d readback", k); end
      checks++; if (fr != 3) begin failures++; $display("tester %0d frames %0d", k, fr); end
      total_fe += int'(fe);
      if (k > 0 && hb[k] != hb[0]) distinct++;
      $display("tester %0d: bitErrors %0d frameErrors %0d frames %0d", k, lo, fe, fr);
    end
    checks++; if (total_fe == 0) begin failures++; $display("no frame errors at 1 dB"); end
    checks++; if (distinct == 0) begin failures++; $display("all testers identical"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
