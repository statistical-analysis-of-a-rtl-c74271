// tb_frame_shiftreg: self-checking test of the serial-in parallel-out shift
// register (DEPTH 16, 5-bit words). Shifts random words with random gaps
// and compares every position with a model array after each clock.
`timescale 1ns/1ps
module tb_frame_shiftreg;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [4:0] din = '0;
  logic [4:0] dout [D];
  logic [4:0] model [D];
  int checks = 0, failures = 0;

  frame_shiftreg #(.DEPTH(D), .W(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      din   = 5'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int i = D-1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      #1;
      for (int i = 0; i < D; i++) begin
        checks++;
        if (dout[i] != model[i]) begin failures++; $display("cycle %0d pos %0d: %0d vs %0d", c, i, dout[i], model[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
