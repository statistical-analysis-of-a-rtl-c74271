// tb_parity_check: self-checking test of the parity-check node at degree 32
// (the default) and degree 6. Random inputs; the expected output is the
// parity of the number of ones, counted bit by bit.
`timescale 1ns/1ps
module tb_parity_check;
  logic [31:0] bits32;
  logic [5:0]  bits6;
  logic v32, v6;
  int checks = 0, failures = 0;

  parity_check #(.DEG(32)) dut32 (.bits(bits32), .viol(v32));
  parity_check #(.DEG(6))  dut6  (.bits(bits6),  .viol(v6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int ones32, ones6;
      bits32 = $urandom;
      bits6  = 6'($urandom);
      #1;
      ones32 = 0; for (int b = 0; b < 32; b++) if (bits32[b]) ones32++;
      ones6  = 0; for (int b = 0; b < 6; b++)  if (bits6[b])  ones6++;
      checks += 2;
      if (v32 != ones32[0]) begin failures++; $display("deg32 %h -> %b", bits32, v32); end
      if (v6  != ones6[0])  begin failures++; $display("deg6 %b -> %b", bits6, v6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
