// tb_channel_top: self-checking test of the emulator test core.
// Runs 4000 samples at 4 dB (index 16) with seed 123, scale 4.0, delta 22.
// Checks: done rises after exactly 4000 counted samples and the run takes
// 4000 + 3 clocks of run (one sample per clock plus pipeline fill); every
// bin equals a count kept here from the quantized output stream; bins sum
// to the total; the shape (mode at level 3 or 4, either side of +1.0, about 2% negative
// samples for sigma 0.486); a pause in `run` loses no sample; init clears
// the histogram.
`timescale 1ns/1ps
module tb_channel_top;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, run = 0;
  logic [7:0] seed = 8'd123;
  logic [5:0] index = 6'd16;
  logic [20:0] scale = 21'(4 << 16);
  logic [5:0] delta = 6'd22;
  logic [47:0] num_samples = 48'd4000;
  logic done;
  logic [4:0] rd_bin = '0;
  logic [47:0] rd_count, total;
  sample_t raw_sample; logic raw_valid;
  qsample_t q_sample;  logic q_valid;
  int checks = 0, failures = 0;
  int model [32];
  int cycles, neg, mode, maxc, sum;

  channel_top dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the quantized stream on the cycles the histogram takes it
  always @(posedge clk) if (rst_n && run && !done && !init && q_valid) model[{q_sample.sign, q_sample.mag}]++;

  initial begin
    for (int b = 0; b < 32; b++) model[b] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    run = 1; cycles = 0;
    while (!done) begin
      @(negedge clk); cycles++;
      if (cycles == 1000) begin run = 0; repeat (7) @(negedge clk); run = 1; end
    end
    checks++; if (cycles != 4003) begin failures++; $display("run took %0d clocks, expected 4003", cycles); end
    checks++; if (total != 48'd4000) begin failures++; $display("total %0d", total); end
    sum = 0; neg = 0; maxc = 0; mode = 0;
    for (int b = 0; b < 32; b++) begin
      rd_bin = 5'(b); #1;
      checks++; if (rd_count != 48'(model[b])) begin failures++; $display("bin %0d %0d vs %0d", b, rd_count, model[b]); end
      sum += int'(rd_count);
      if (b >= 16) neg += int'(rd_count);
      if (int'(rd_count) > maxc) begin maxc = int'(rd_count); mode = b; end
    end
    checks++; if (sum != 4000) begin failures++; $display("bins sum %0d", sum); end
    checks++; if (mode != 3 && mode != 4) begin failures++; $display("mode at level %0d", mode); end
    checks++; if (neg < 30 || neg > 160) begin failures++; $display("negatives %0d", neg); end
    $display("negative samples %0d of 4000, mode level %0d", neg, mode);
    // more run does nothing once done
    repeat (10) @(negedge clk);
    checks++; if (total != 48'd4000) begin failures++; $display("counted past budget"); end
    // init clears
    run = 0; @(negedge clk); init = 1; @(negedge clk); init = 0;
    checks++; if (total != 0 || done) begin failures++; $display("init did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
