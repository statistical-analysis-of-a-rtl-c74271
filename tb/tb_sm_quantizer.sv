// tb_sm_quantizer: self-checking test of the 5-bit sign-magnitude quantizer.
// Hand-worked cases (1.0 at scale 4.0 / delta 22 is level 4, -0.3 is level
// 1 negative, large values saturate at 15), then 3000 random samples, scales
// and shifts compared with level = min(15, floor(|y| * scale / 2^(10+delta))),
// which is the same arithmetic done in 64-bit integers. Also checks the
// one-clock latency and that `en` low holds the output.
`timescale 1ns/1ps
module tb_sm_quantizer;
  import ce_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  sample_t sample = '0;
  logic [20:0] scale = 21'(4 << 16);
  logic [5:0]  delta = 6'd22;
  qsample_t q;
  logic out_valid;
  int checks = 0, failures = 0;

  sm_quantizer dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int y, int sc, int dl, logic exp_s, int exp_m);
    @(negedge clk); sample = 21'(y); scale = 21'(sc); delta = 6'(dl); in_valid = 1;
    @(negedge clk);
    checks++;
    if (q.sign !== exp_s || int'(q.mag) != exp_m || !out_valid) begin
      failures++;
      $display("y=%0d scale=%0d delta=%0d -> %b/%0d, expected %b/%0d", y, sc, dl, q.sign, q.mag, exp_s, exp_m);
    end
  endtask

  function automatic int ref_level(int y, int sc, int dl);
    longint m, p;
    m = (y < 0) ? -y : y;
    p = (m * sc) >> (10 + dl);
    return (p > 15) ? 15 : int'(p);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check_one(65536, 4<<16, 22, 0, 4);          // +1.0 -> 4
    check_one(-19661, 4<<16, 22, 1, 1);         // -0.3 -> 1.2 -> 1
    check_one(65536*5, 4<<16, 22, 0, 15);       // +5.0 -> 20 -> 15
    check_one(0, 4<<16, 22, 0, 0);
    check_one(-65536*2, 2<<16, 22, 1, 4);       // -2.0 at scale 2 -> 4
    check_one(65536*3, 4<<16, 23, 0, 6);        // one more shift halves
    for (int i = 0; i < 3000; i++) begin
      int y, sc, dl;
      y  = int'($urandom_range(0, 2097151)) - 1048576;
      sc = int'($urandom_range(1 << 14, 1 << 19));
      dl = int'($urandom_range(18, 26));
      check_one(y, sc, dl, y < 0, ref_level(y, sc, dl));
    end
    // en low holds
    en = 0; sample = 21'(65536*2); scale = 21'(4<<16); delta = 22;
    repeat (3) @(negedge clk);
    checks++; if (q.mag == 4'd8) begin failures++; $display("output changed with en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
