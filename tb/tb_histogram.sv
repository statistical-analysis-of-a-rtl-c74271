// tb_histogram: self-checking test of the 32-bin histogram. Feeds 5000
// random bins with random gaps, keeps its own counts, then compares every
// bin and the total through the read port; checks that clear zeroes all
// counters and that a small counter width saturates instead of wrapping.
`timescale 1ns/1ps
module tb_histogram;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [4:0] bin = '0, rd_bin = '0;
  logic [47:0] rd_count, total;
  logic [3:0] rd_small, tot_small;
  int checks = 0, failures = 0;
  int model [32];

  histogram #(.NBINS(32), .CNT_W(48)) dut (.*);
  histogram #(.NBINS(32), .CNT_W(4)) dut_small (.clk, .rst_n, .clear, .in_valid,
    .bin(5'd3), .rd_bin(5'd3), .rd_count(rd_small), .total(tot_small));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int b = 0; b < 32; b++) model[b] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    n = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      bin = 5'($urandom_range(0, 31));
      if (in_valid) begin model[bin]++; n++; end
    end
    @(negedge clk); in_valid = 0;
    for (int b = 0; b < 32; b++) begin
      rd_bin = 5'(b); #1;
      checks++; if (rd_count != 48'(model[b])) begin failures++; $display("bin %0d: %0d vs %0d", b, rd_count, model[b]); end
    end
    checks++; if (total != 48'(n)) begin failures++; $display("total %0d vs %0d", total, n); end
    checks++; if (rd_small != 4'hF || tot_small != 4'hF) begin failures++; $display("no saturation: %0d", rd_small); end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int b = 0; b < 32; b++) begin
      rd_bin = 5'(b); #1;
      checks++; if (rd_count != 0) begin failures++; $display("bin %0d not cleared", b); end
    end
    checks++; if (total != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
