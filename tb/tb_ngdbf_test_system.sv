// tb_ngdbf_test_system: end-to-end test of the whole design at a reduced
// frame size (six testers, Z=8, KB=8: 64-bit frames), driven through both
// AXI4-Lite ports as the two processors would.
// Channel platform: two 2000-sample histograms with the same seed must be
// identical and sum to 2000.
// BERT platform: 4 frames per tester at 7 dB (index 28), then 4 frames at
// 0 dB (index 0, 10 iterations), then the 0 dB run again.
// Mechanisms counted and required at least once: emulator reseed
// (powerup_decoder), decoder stopping on a satisfied syndrome, decoder
// stopping on the iteration limit, the controller waiting for a full frame,
// error counting, a frame with errors, histogram run completion.
// Also checked: frame counts, no frame errors at 7 dB, some at 0 dB, and the
// repeated 0 dB run giving identical error counts (seeded generators).
`timescale 1ns/1ps
module tb_ngdbf_test_system;
  logic clk = 0, rst_n = 0;
  logic [8:0]  ch_s_axi_awaddr = '0, ch_s_axi_araddr = '0;
  logic        ch_s_axi_awvalid = 0, ch_s_axi_wvalid = 0, ch_s_axi_bready = 0, ch_s_axi_arvalid = 0, ch_s_axi_rready = 0;
  logic [31:0] ch_s_axi_wdata = '0;
  logic [3:0]  ch_s_axi_wstrb = 4'hF;
  logic        ch_s_axi_awready, ch_s_axi_wready, ch_s_axi_bvalid, ch_s_axi_arready, ch_s_axi_rvalid;
  logic [1:0]  ch_s_axi_bresp, ch_s_axi_rresp;
  logic [31:0] ch_s_axi_rdata;
  logic [7:0]  bt_s_axi_awaddr = '0, bt_s_axi_araddr = '0;
  logic        bt_s_axi_awvalid = 0, bt_s_axi_wvalid = 0, bt_s_axi_bready = 0, bt_s_axi_arvalid = 0, bt_s_axi_rready = 0;
  logic [31:0] bt_s_axi_wdata = '0;
  logic [3:0]  bt_s_axi_wstrb = 4'hF;
  logic        bt_s_axi_awready, bt_s_axi_wready, bt_s_axi_bvalid, bt_s_axi_arready, bt_s_axi_rvalid;
  logic [1:0]  bt_s_axi_bresp, bt_s_axi_rresp;
  logic [31:0] bt_s_axi_rdata;
  int checks = 0, failures = 0;
  task automatic ch_wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); ch_s_axi_awaddr = 9'(a); ch_s_axi_wdata = d; ch_s_axi_awvalid = 1; ch_s_axi_wvalid = 1; #1;
    while (!(ch_s_axi_awready && ch_s_axi_wready)) begin @(negedge clk); #1; end
    @(negedge clk); ch_s_axi_awvalid = 0; ch_s_axi_wvalid = 0; ch_s_axi_bready = 1; #1;
    while (!ch_s_axi_bvalid) begin @(negedge clk); #1; end
    @(negedge clk); ch_s_axi_bready = 0;
  endtask
  task automatic ch_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); ch_s_axi_araddr = 9'(a); ch_s_axi_arvalid = 1; #1;
    while (!ch_s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk); ch_s_axi_arvalid = 0; ch_s_axi_rready = 1; #1;
    while (!ch_s_axi_rvalid) begin @(negedge clk); #1; end
    d = ch_s_axi_rdata;
    @(negedge clk); ch_s_axi_rready = 0;
  endtask
  task automatic bt_wr(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); bt_s_axi_awaddr = 8'(a); bt_s_axi_wdata = d; bt_s_axi_awvalid = 1; bt_s_axi_wvalid = 1; #1;
    while (!(bt_s_axi_awready && bt_s_axi_wready)) begin @(negedge clk); #1; end
    @(negedge clk); bt_s_axi_awvalid = 0; bt_s_axi_wvalid = 0; bt_s_axi_bready = 1; #1;
    while (!bt_s_axi_bvalid) begin @(negedge clk); #1; end
    @(negedge clk); bt_s_axi_bready = 0;
  endtask
  task automatic bt_rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bt_s_axi_araddr = 8'(a); bt_s_axi_arvalid = 1; #1;
    while (!bt_s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk); bt_s_axi_arvalid = 0; bt_s_axi_rready = 1; #1;
    while (!bt_s_axi_rvalid) begin @(negedge clk); #1; end
    d = bt_s_axi_rdata;
    @(negedge clk); bt_s_axi_rready = 0;
  endtask

  // channel platform: histogram of n samples with a seed; returns the bins' sum
  task automatic hist_run(input int seed, input int n, output int sum);
    logic [31:0] d;
    ch_wr(32'h04, seed); ch_wr(32'h14, n); ch_wr(32'h18, 0);
    ch_wr(32'h00, 1); ch_wr(32'h00, 2);
    do ch_rd(32'h1C, d); while (!d[0]);
    sum = 0;
    for (int b = 0; b < 32; b++) begin ch_rd(32'h100 + 8*b, d); sum += int'(d); end
    ch_wr(32'h00, 0);
  endtask

  // BERT platform: run all testers, wait, read and print the counters
  task automatic bert_run(input int frames_wanted, output int fe_total, output int fr_total);
    logic [31:0] d, lo, fe, fr;
    bt_wr(32'h14, frames_wanted);
    bt_wr(32'h00, 0); bt_wr(32'h00, 1);
    do bt_rd(32'h28, d); while (d[5:0] != 6'h3F);
    fe_total = 0; fr_total = 0;
    for (int k = 0; k < 6; k++) begin
      bt_rd(32'h40 + 16*k, lo); bt_rd(32'h48 + 16*k, fe); bt_rd(32'h4C + 16*k, fr);
      fe_total += int'(fe); fr_total += int'(fr);
      $display("  tester %0d: bitErrors %0d frameErrors %0d frames %0d", k, lo, fe, fr);
    end
  endtask

  ngdbf_test_system #(.N_BERT(6), .Z(8), .KB(8), .JB(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, taken from inside the design
  int n_reseed = 0, n_converged = 0, n_limit = 0, n_wait = 0, n_count = 0, n_hist_done = 0, n_ferr = 0;
  logic [5:0] pu, dd, ok, inz, ini, cnt, nz, bd;
  for (genvar k = 0; k < 6; k++) begin : g_mon
    assign pu[k]  = dut.u_bert.g_bert[k].u_bert.powerup_decoder;
    assign dd[k]  = dut.u_bert.g_bert[k].u_bert.u_dec.busy && dut.u_bert.g_bert[k].u_bert.u_dec.stop;
    assign ok[k]  = dut.u_bert.g_bert[k].u_bert.u_dec.syndrome_ok;
    assign inz[k] = dut.u_bert.g_bert[k].u_bert.state == bert_pkg::BERT_INIT && dut.u_bert.g_bert[k].u_bert.start;
    assign ini[k] = dut.u_bert.g_bert[k].u_bert.initialized;
    assign cnt[k] = dut.u_bert.g_bert[k].u_bert.count;
    assign nz[k]  = dut.u_bert.g_bert[k].u_bert.ones != 0;
    assign bd[k]  = dut.u_bert.g_bert[k].u_bert.done;
  end
  logic hist_done_d = 0;
  always @(posedge clk) if (rst_n) begin
    hist_done_d <= dut.u_chan.u_core.done;
    if (dut.u_chan.u_core.done && !hist_done_d) n_hist_done++;
    for (int k = 0; k < 6; k++) begin
      if (pu[k]) n_reseed++;
      if (dd[k] && ok[k]) n_converged++;
      if (dd[k] && !ok[k]) n_limit++;
      if (inz[k] && !ini[k] && !bd[k]) n_wait++;
      if (cnt[k]) begin n_count++; if (nz[k]) n_ferr++; end
    end
  end

  initial begin
    int s1, s2, fe, fr, fe0, fr0, fe1, fr1;
    repeat (2) @(negedge clk); rst_n = 1;
    hist_run(123, 2000, s1);
    hist_run(123, 2000, s2);
    checks++; if (s1 != 2000 || s2 != 2000) begin failures++; $display("histogram sums %0d %0d", s1, s2); end
    checks++; if (dut.u_chan.u_core.u_hist.count[4] == 0) begin failures++; $display("empty level 4"); end

    $display("7 dB:");
    bt_wr(32'h04, 28); bt_wr(32'h1C, 30);
    bert_run(4, fe, fr);
    checks++; if (fr != 24) begin failures++; $display("frames %0d", fr); end
    checks++; if (fe != 0) begin failures++; $display("frame errors at 7 dB: %0d", fe); end
    $display("0 dB:");
    bt_wr(32'h04, 0); bt_wr(32'h1C, 10);
    bert_run(4, fe0, fr0);
    checks++; if (fe0 == 0) begin failures++; $display("no frame errors at 0 dB"); end
    bert_run(4, fe1, fr1);
    checks++; if (fe1 != fe0 || fr1 != fr0) begin failures++; $display("repeat run differs"); end

    $display("mechanisms: reseed %0d converged %0d iteration-limit %0d frame-wait %0d counted %0d frame-errors %0d histogram-done %0d",
             n_reseed, n_converged, n_limit, n_wait, n_count, n_ferr, n_hist_done);
    checks++; if (n_reseed == 0)    begin failures++; $display("no reseed"); end
    checks++; if (n_converged == 0) begin failures++; $display("no converged frame"); end
    checks++; if (n_limit == 0)     begin failures++; $display("iteration limit never hit"); end
    checks++; if (n_wait == 0)      begin failures++; $display("never waited for a frame"); end
    checks++; if (n_count != 72)    begin failures++; $display("counted %0d frames", n_count); end
    checks++; if (n_ferr == 0)      begin failures++; $display("no frame with errors"); end
    checks++; if (n_hist_done != 2) begin failures++; $display("histogram done %0d", n_hist_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
