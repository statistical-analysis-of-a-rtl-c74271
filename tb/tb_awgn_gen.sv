// tb_awgn_gen: self-checking test of the Gaussian emulator.
// Checks (1) the first samples after init bit-exactly against a reference
// model written here (xorshift32 generators, sum of twelve uniforms, scale by
// sigma computed in floating point, mean, saturation), (2) the two-clock
// latency to the first valid sample, (3) mean and standard deviation of 20000
// samples against +1 and sigma(index), (4) the reset behaviour: seed 123,
// then 221, then 123 again must reproduce the first sequence, and 221 must
// differ, and (5) that `en` low freezes the output.
`timescale 1ns/1ps
module tb_awgn_gen;
  import ce_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [7:0] seed = 8'd123;
  logic [5:0] index = 6'd16;
  sample_t sample;
  logic valid;
  int checks = 0, failures = 0;

  awgn_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model -------------------------------------------------
  localparam logic [191:0] KEY = {
    32'h9E37_79B9, 32'h85EB_CA6B, 32'hC2B2_AE35,
    32'h27D4_EB2F, 32'h1656_67B1, 32'hD3A2_646D };
  logic [31:0] ms [6];
  function automatic logic [31:0] xs(logic [31:0] s);
    s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5); return s;
  endfunction
  task automatic model_seed(logic [7:0] sd);
    for (int g = 0; g < 6; g++)
      ms[g] = xs(({4{sd}} * 32'h0101_0101 ^ KEY[g*32 +: 32]) | 1) | 1;
  endtask
  function automatic int model_sigma_q(int idx);
    real s;
    s = $sqrt(2048.0 / (2.0 * 1723.0 * $pow(10.0, idx / 40.0)));
    return int'($floor(s * 16384.0 + 0.5));
  endfunction
  // next sample of the model (advances the model state)
  function automatic int model_next(int idx);
    longint sum, g, y;
    sum = 0;
    for (int k = 0; k < 6; k++) begin
      sum += ms[k][15:0]; sum += ms[k][31:16];
      ms[k] = xs(ms[k]);
    end
    g = sum - 6*65536;
    y = (g * model_sigma_q(idx)) >>> 14;
    y = y + 65536;
    if (y > 1048575) y = 1048575;
    if (y < -1048576) y = -1048576;
    return int'(y);
  endfunction

  task automatic do_init(logic [7:0] sd);
    @(negedge clk); seed = sd; init = 1; en = 0;
    @(negedge clk); init = 0;
  endtask

  int first [50];
  int other [50];
  real sum, sumsq, mean, sd, exp_sd;
  int n, lat, diffs;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // (1)+(2) exact sequence and latency for seed 123
    do_init(8'd123);
    model_seed(8'd123);
    en = 1;
    lat = 0;
    while (!valid) begin @(negedge clk); lat++; end
    checks++; if (lat != 2) begin failures++; $display("latency %0d, expected 2", lat); end
    for (int i = 0; i < 50; i++) begin
      first[i] = int'(sample);
      checks++;
      if (int'(sample) != model_next(16)) begin
        failures++; $display("sample %0d mismatch: %0d", i, sample);
      end
      @(negedge clk);
    end

    // (5) en low holds the output
    en = 0;
    begin
      int held; held = int'(sample);
      repeat (5) @(negedge clk);
      checks++; if (int'(sample) != held) begin failures++; $display("output moved with en low"); end
    end

    // (3) statistics at index 16 (4 dB)
    en = 1; sum = 0; sumsq = 0; n = 20000;
    for (int i = 0; i < n; i++) begin
      real v; v = real'(sample) / 65536.0;
      sum += v; sumsq += v*v;
      @(negedge clk);
    end
    mean = sum / n; sd = $sqrt(sumsq / n - mean*mean);
    exp_sd = $sqrt(2048.0 / (2.0 * 1723.0 * $pow(10.0, 0.4)));
    checks++; if (mean < 0.98 || mean > 1.02) begin failures++; $display("mean %f", mean); end
    checks++; if (sd < 0.97*exp_sd || sd > 1.03*exp_sd) begin failures++; $display("sd %f exp %f", sd, exp_sd); end
    $display("index 16: mean %f sd %f (expected 1.0, %f)", mean, sd, exp_sd);

    // (4) reset: 221 differs, 123 again repeats
    do_init(8'd221); en = 1;
    while (!valid) @(negedge clk);
    for (int i = 0; i < 50; i++) begin other[i] = int'(sample); @(negedge clk); end
    diffs = 0;
    for (int i = 0; i < 50; i++) if (other[i] != first[i]) diffs++;
    checks++; if (diffs < 45) begin failures++; $display("seed 221 too similar (%0d differ)", diffs); end
    do_init(8'd123); en = 1;
    while (!valid) @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      checks++; if (int'(sample) != first[i]) begin failures++; $display("reseed mismatch at %0d", i); end
      @(negedge clk);
    end

    // index 40 (10 dB): smaller spread
    index = 6'd40; sum = 0; sumsq = 0; n = 5000;
    repeat (3) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      real v; v = real'(sample) / 65536.0;
      sum += v; sumsq += v*v; @(negedge clk);
    end
    mean = sum / n; sd = $sqrt(sumsq / n - mean*mean);
    exp_sd = $sqrt(2048.0 / (2.0 * 1723.0 * 10.0));
    checks++; if (sd < 0.95*exp_sd || sd > 1.05*exp_sd) begin failures++; $display("sd@40 %f exp %f", sd, exp_sd); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
