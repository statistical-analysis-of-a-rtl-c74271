// tb_ngdbf_decoder: self-checking test of the NGDBF decoder at a reduced
// size (Z=8, KB=8, JB=6: 64 bits, 48 checks, six checks per bit).
// 1. Code structure: with flipping disabled (very low theta) random hard
//    decisions are loaded and every check output is compared with the XOR
//    of the bits the quasi-cyclic rule assigns to it; every bit must sit in
//    exactly JB checks and every check must watch KB bits.
// 2. A clean frame (all +4) decodes in 0 iterations to all zeros.
// 3. Frames with one wrong hard decision (channel value -2) are corrected in
//    exactly one iteration: the wrong bit scores 2 - 6 < 0, its neighbours
//    4 + 4 > 0. The iteration count is compared with the cycle count between
//    init and done. (In a code this small, two wrong bits may share three
//    checks, so multi-error frames are not guaranteed to decode.)
// 4. With theta = -100 no bit ever flips, so a wrong frame runs into the
//    iteration limit: done after exactly max_iter iterations, x unchanged.
`timescale 1ns/1ps
module tb_ngdbf_decoder;
  import ce_pkg::*;
  localparam int Z = 8, KB = 8, JB = 6, N = Z*KB, M = Z*JB;
  logic clk = 0, rst_n = 0, init = 0;
  qsample_t y_in [N];
  qsample_t q_in [N];
  logic signed [7:0] theta = 8'sd0;
  logic [15:0] max_iter = 16'd20;
  logic done, busy, syndrome_ok;
  logic [N-1:0] x;
  logic [15:0] iterations;
  int checks = 0, failures = 0;

  ngdbf_decoder #(.Z(Z), .KB(KB), .JB(JB)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // H[c][i] from the quasi-cyclic rule: check b*Z+a watches bit k*Z+(a+b*k)%Z
  bit H [M][N];
  initial begin
    for (int c = 0; c < M; c++) for (int i = 0; i < N; i++) H[c][i] = 0;
    for (int b = 0; b < JB; b++) for (int a = 0; a < Z; a++) for (int k = 0; k < KB; k++)
      H[b*Z + a][k*Z + (a + b*k) % Z] = 1;
  end

  task automatic run_frame(output int cyc);
    @(negedge clk); init = 1; @(negedge clk); init = 0; cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < N; i++) begin y_in[i] = '{sign:0, mag:4}; q_in[i] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;

    // 1. structure
    for (int c = 0; c < M; c++) begin int w; w = 0; for (int i = 0; i < N; i++) w += H[c][i];
      checks++; if (w != KB) begin failures++; $display("check %0d weight %0d", c, w); end end
    for (int i = 0; i < N; i++) begin int w; w = 0; for (int c = 0; c < M; c++) w += H[c][i];
      checks++; if (w != JB) begin failures++; $display("bit %0d weight %0d", i, w); end end
    theta = -8'sd100; max_iter = 16'd1;
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < N; i++) y_in[i] = '{sign:1'($urandom), mag:4'd3};
      run_frame(cyc);
      for (int c = 0; c < M; c++) begin
        bit p; p = 0;
        for (int i = 0; i < N; i++) if (H[c][i]) p ^= x[i];
        checks++; if (dut.viol[c] != p) begin failures++; $display("check %0d: %b vs %b", c, dut.viol[c], p); end
      end
    end

    // 2. clean frame
    theta = 8'sd0; max_iter = 16'd20;
    for (int i = 0; i < N; i++) y_in[i] = '{sign:0, mag:4};
    run_frame(cyc);
    checks++; if (x != '0 || iterations != 0 || !syndrome_ok) begin failures++; $display("clean frame: x=%h it=%0d", x, iterations); end

    // 3. correctable frames
    for (int t = 0; t < 30; t++) begin
      int nerr;
      for (int i = 0; i < N; i++) y_in[i] = '{sign:0, mag:4};
      nerr = 1;
      for (int e = 0; e < nerr; e++) y_in[$urandom_range(0, N-1)] = '{sign:1, mag:2};
      run_frame(cyc);
      checks++; if (x != '0) begin failures++; $display("frame %0d not corrected: %h", t, x); end
      checks++; if (cyc != int'(iterations) + 1) begin failures++; $display("cycles %0d iterations %0d", cyc, iterations); end
      checks++; if (iterations != 1) begin failures++; $display("iterations %0d", iterations); end
    end

    // 4. iteration limit
    theta = -8'sd100; max_iter = 16'd7;
    for (int i = 0; i < N; i++) y_in[i] = '{sign:0, mag:4};
    y_in[5] = '{sign:1, mag:1};
    run_frame(cyc);
    checks++; if (iterations != 16'd7 || cyc != 8) begin failures++; $display("limit: it=%0d cyc=%0d", iterations, cyc); end
    checks++; if (x != N'(1) << 5 || syndrome_ok) begin failures++; $display("limit: x=%h", x); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
