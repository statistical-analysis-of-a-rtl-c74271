// bert_fsm: four-state controller of one bit error rate tester.
//
// INIT: after reset, and whenever `start` rises, `powerup_decoder` is high
//   for one clock (it reseeds the emulators and clears the error counters).
//   Once powerup_decoder is low, `initialized` is high (a full fresh frame is
//   in the channel shift register), `start` is high and `done` is low, the
//   controller raises `initialize_decoder`, clears `counted` and moves on.
// START: initialize_decoder is high for exactly one clock (the decoder loads
//   the frame). When it is low again and both `counted` and `decoder_done`
//   are low, go to DECODE.
// DECODE: wait for `decoder_done`.
// COUNT: `count` is high for one clock (the tester adds this frame's errors),
//   `counted` is set, and the controller returns to INIT for the next frame.
// `done` is high once `frames` has reached `num_frames`.
//
// The four states, their order and the handshake signal names follow the
// document. Where those signals come from (powerup on reset and on a rising
// start, initialized = fresh frame available) is this design's reading.
module bert_fsm
  import bert_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        initialized,
  input  logic        decoder_done,
  input  logic [31:0] num_frames,
  input  logic [31:0] frames,
  output logic        powerup_decoder,
  output logic        initialize_decoder,
  output logic        count,
  output logic        counted,
  output logic        done,
  output bert_state_t state
);

  logic start_d;

  assign done  = (frames >= num_frames);
  assign count = (state == BERT_COUNT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state              <= BERT_INIT;
      start_d            <= 1'b0;
      powerup_decoder    <= 1'b1;
      initialize_decoder <= 1'b0;
      counted            <= 1'b0;
    end else begin
      start_d         <= start;
      powerup_decoder <= start && !start_d;
      if (start && !start_d) begin
        state              <= BERT_INIT;
        initialize_decoder <= 1'b0;
        counted            <= 1'b0;
      end else begin
        unique case (state)
          BERT_INIT:
            if (!powerup_decoder && initialized && start && !done) begin
              state              <= BERT_START;
              initialize_decoder <= 1'b1;
              counted            <= 1'b0;
            end
          BERT_START:
            if (initialize_decoder)
              initialize_decoder <= 1'b0;
            else if (!counted && !decoder_done)
              state <= BERT_DECODE;
          BERT_DECODE:
            if (decoder_done) state <= BERT_COUNT;
          BERT_COUNT: begin
            counted <= 1'b1;
            state   <= BERT_INIT;
          end
          default: state <= BERT_INIT;
        endcase
      end
    end
  end

  a_init_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    initialize_decoder |=> !initialize_decoder);

endmodule
