// tb_bitflip_proc: self-checking test of one NGDBF bit-flipping processor.
// Loads a decision from a channel sample, then applies 3000 random
// iterations (random channel value, check outcomes, perturbation, threshold,
// enable) and compares the decision with the rule
//   flip if x*y + sum(s_j) < theta + q,  x,s_j in {+1,-1}
// evaluated here with integers. Includes hand cases at the boundary
// (metric equal to the threshold does not flip).
`timescale 1ns/1ps
module tb_bitflip_proc;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  qsample_t y = '0, q = '0;
  logic [5:0] viol = '0;
  logic signed [7:0] theta = '0;
  logic x;
  int checks = 0, failures = 0;
  logic xm;

  bitflip_proc #(.JB(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int val(qsample_t s);
    return s.sign ? -int'(s.mag) : int'(s.mag);
  endfunction

  task automatic step(qsample_t yy, logic [5:0] vv, qsample_t qq, int th, logic e);
    int m, t;
    @(negedge clk);
    y = yy; viol = vv; q = qq; theta = 8'(th); en = e;
    m = (xm ? -val(yy) : val(yy));
    for (int j = 0; j < 6; j++) m += vv[j] ? -1 : 1;
    t = th + val(qq);
    if (e && (m < t)) xm = ~xm;
    @(negedge clk); en = 0;
    checks++;
    if (x != xm) begin failures++; $display("y=%0d viol=%b q=%0d th=%0d: x=%b exp %b", val(yy), vv, val(qq), th, x, xm); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // load from a negative sample: decision 1
    @(negedge clk); y = '{sign:1, mag:3}; load = 1; @(negedge clk); load = 0; xm = 1;
    checks++; if (x != 1) begin failures++; $display("load failed"); end
    // x=-1, y=-3: x*y=+3, all checks satisfied: +6 -> 9; theta 9 -> no flip (not <)
    step('{sign:1, mag:3}, 6'b000000, '0, 9, 1);
    // theta 10 -> flip
    step('{sign:1, mag:3}, 6'b000000, '0, 10, 1);
    // now x=+1, y=-3: -3, five violated: -3 + 1 - 5 = -7 < 0 -> flip back
    step('{sign:1, mag:3}, 6'b011111, '0, 0, 1);
    for (int i = 0; i < 3000; i++)
      step(qsample_t'($urandom), 6'($urandom), qsample_t'($urandom),
           int'($urandom_range(0, 30)) - 15, $urandom_range(0, 4) != 0);
    // load from a positive sample
    @(negedge clk); y = '{sign:0, mag:2}; load = 1; @(negedge clk); load = 0; xm = 0;
    checks++; if (x != 0) begin failures++; $display("load + failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
