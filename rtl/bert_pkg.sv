// bert_pkg: state encoding of the bit error rate tester controller.
//   BERT_INIT   reset/initialise; wait for a full frame and start
//   BERT_START  pulse initialize_decoder, wait for the handshake to settle
//   BERT_DECODE decoder running on the frame
//   BERT_COUNT  add the frame's bit errors and frame error, then repeat
package bert_pkg;
  typedef enum logic [1:0] {
    BERT_INIT   = 2'd0,
    BERT_START  = 2'd1,
    BERT_DECODE = 2'd2,
    BERT_COUNT  = 2'd3
  } bert_state_t;
endpackage
