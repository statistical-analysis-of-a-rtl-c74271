// tb_bert: self-checking test of one bit error rate tester at a reduced
// frame size (Z=8, KB=8: 64-bit frames, six checks per bit).
// Run 1 (index_channel 28 = 7 dB): 8 frames. Checks done and the frame
//   count; recomputes the error counters from the decoder output seen on
//   every count pulse; checks that decoding never starts before a full
//   frame of N fresh samples has been collected (at least N clocks between
//   parallel loads, and N+3 from start to the first load); checks that the
//   perturbation register shifts every clock.
// Run 2 (index_channel 0 = 0 dB, 10 iterations): errors must occur, and
//   frame_errors <= frames, bit_errors >= frame_errors.
// Run 3: run 2 repeated with the same seeds gives identical counts (reseed
//   on start); with another noise seed the counts differ.
`timescale 1ns/1ps
module tb_bert;
  import ce_pkg::*;
  import bert_pkg::*;
  localparam int Z = 8, KB = 8, JB = 6, N = Z*KB;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] channel_seed = 8'd180, noise_seed = 8'd120;
  logic [5:0] index_channel = 6'd28, index_noise = 6'd18;
  logic [20:0] scale = 21'(4 << 16);
  logic [5:0] delta = 6'd22;
  logic signed [7:0] theta = -8'sd1;
  logic [15:0] max_iter = 16'd30;
  logic [31:0] num_frames = 32'd8;
  logic done;
  logic [47:0] bit_errors;
  logic [31:0] frame_errors, frames;
  bert_state_t state;
  logic [15:0] last_iterations;
  int checks = 0, failures = 0;
  longint m_bits; int m_frames, m_ferr, last_load, since_start, loads;

  bert #(.Z(Z), .KB(KB), .JB(JB)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent error count and frame-collection timing
  always @(posedge clk) if (rst_n) begin
    since_start <= since_start + 1;
    last_load   <= last_load + 1;
    if (dut.powerup_decoder) begin
      m_bits <= 0; m_frames <= 0; m_ferr <= 0; since_start <= 0; loads <= 0;
    end else if (dut.count) begin
      m_bits   <= m_bits + $countones(dut.xhat);
      m_ferr   <= m_ferr + ($countones(dut.xhat) != 0);
      m_frames <= m_frames + 1;
    end
    if (dut.initialize_decoder) begin
      checks++;
      if (loads == 0 && since_start < N + 3) begin failures++; $display("first load after %0d clocks", since_start); end
      if (loads > 0 && last_load < N) begin failures++; $display("loads %0d clocks apart", last_load); end
      last_load <= 1; loads <= loads + 1;
    end
    if (dut.nz_q_vld) begin
      checks++;
      #1 if (dut.nz_sr[1] != $past(dut.nz_sr[0])) begin failures++; $display("noise register did not shift"); end
    end
  end

  task automatic run(output longint be, output int fe);
    @(negedge clk); start = 0; @(negedge clk); start = 1;
    repeat (3) @(negedge clk);
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    be = bit_errors; fe = frame_errors;
    checks++; if (frames != num_frames) begin failures++; $display("frames %0d", frames); end
    checks++; if (longint'(bit_errors) != m_bits || int'(frame_errors) != m_ferr || int'(frames) != m_frames) begin
      failures++; $display("counters %0d/%0d/%0d, expected %0d/%0d/%0d", bit_errors, frame_errors, frames, m_bits, m_ferr, m_frames);
    end
    checks++; if (frame_errors > frames || bit_errors < 48'(frame_errors)) begin failures++; $display("inconsistent counters"); end
    $display("index %0d/%0d seeds %0d/%0d: bitErrors %0d frameErrors %0d frames %0d, last frame %0d iterations",
             index_channel, index_noise, channel_seed, noise_seed, bit_errors, frame_errors, frames, last_iterations);
  endtask

  initial begin
    longint be1, be2, be3; int fe1, fe2, fe3;
    repeat (2) @(negedge clk); rst_n = 1;
    run(be1, fe1);
    index_channel = 6'd0; max_iter = 16'd10; num_frames = 32'd6;
    run(be1, fe1);
    checks++; if (fe1 == 0) begin failures++; $display("no errors at 0 dB"); end
    run(be2, fe2);
    checks++; if (be2 != be1 || fe2 != fe1) begin failures++; $display("same seeds, different counts"); end
    noise_seed = 8'd47; channel_seed = 8'd3;
    run(be3, fe3);
    checks++; if (be3 == be1 && fe3 == fe1) begin failures++; $display("other seeds, same counts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
