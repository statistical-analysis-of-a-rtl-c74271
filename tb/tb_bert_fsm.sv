// tb_bert_fsm: self-checking test of the BERT controller. The testbench
// plays the tester around it: it counts frames on `count`, raises
// `initialized` a random time after each initialize_decoder pulse, and
// raises decoder_done a random time after the decoder is started (clearing
// it on initialize_decoder). Checks: powerup_decoder is one clock long after
// reset and after a rising start; nothing starts while start is low or
// initialized is low; every frame passes INIT -> START -> DECODE -> COUNT in
// that order; initialize_decoder is one clock long; count comes exactly once
// per frame, one clock after decoder_done is seen in DECODE; the controller
// stops (done) after num_frames frames.
`timescale 1ns/1ps
module tb_bert_fsm;
  import bert_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, initialized = 0, decoder_done = 0;
  logic [31:0] num_frames = 32'd5, frames = '0;
  logic powerup_decoder, initialize_decoder, count, counted, done;
  bert_state_t state, prev;
  int checks = 0, failures = 0, pu_len = 0, pulses = 0, counts = 0;
  int init_wait = 0, dec_wait = 0;

  bert_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // environment
  always @(posedge clk) if (rst_n) begin
    if (powerup_decoder) frames <= '0;
    else if (count) frames <= frames + 1;
    if (initialize_decoder || powerup_decoder) begin
      initialized <= 0; init_wait <= $urandom_range(3, 12); decoder_done <= 0;
    end else if (init_wait > 0) init_wait <= init_wait - 1;
    else initialized <= 1;
    if (state == BERT_START && !initialize_decoder) dec_wait <= $urandom_range(1, 6);
    else if (state == BERT_DECODE && dec_wait > 0) dec_wait <= dec_wait - 1;
    else if (state == BERT_DECODE) decoder_done <= 1;
  end

  // protocol checks
  always @(posedge clk) if (rst_n) begin
    prev <= state;
    if (state != prev) begin
      checks++;
      if (!((prev == BERT_INIT && state == BERT_START) || (prev == BERT_START && state == BERT_DECODE) ||
            (prev == BERT_DECODE && state == BERT_COUNT) || (prev == BERT_COUNT && state == BERT_INIT))) begin
        failures++; $display("illegal transition %s -> %s", prev.name(), state.name());
      end
    end
    if (initialize_decoder) begin
      pulses++;
      checks++; if (!(start && prev == BERT_INIT)) begin failures++; $display("initialize_decoder without start/INIT"); end
    end
    if (count) begin
      counts++;
      checks++; if (prev != BERT_DECODE) begin failures++; $display("count not after DECODE"); end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // powerup after reset lasts one clock
    checks++; if (!powerup_decoder) begin failures++; $display("no powerup after reset"); end
    @(negedge clk);
    checks++; if (powerup_decoder) begin failures++; $display("powerup longer than one clock"); end
    // start low: nothing happens
    repeat (30) @(negedge clk);
    checks++; if (state != BERT_INIT || pulses != 0) begin failures++; $display("ran without start"); end
    start = 1;
    @(negedge clk);
    checks++; if (!powerup_decoder) begin failures++; $display("no powerup on start"); end
    while (!done) @(negedge clk);
    repeat (40) @(negedge clk);
    checks++; if (frames != 5 || counts != 5 || pulses != 5) begin failures++; $display("frames %0d counts %0d pulses %0d", frames, counts, pulses); end
    checks++; if (state != BERT_INIT) begin failures++; $display("not idle after done"); end
    // restart
    start = 0; @(negedge clk); start = 1; num_frames = 3; counts = 0; pulses = 0;
    repeat (2) @(negedge clk);
    while (!done || frames == 0) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++; if (frames != 3 || counts != 3) begin failures++; $display("restart: frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
