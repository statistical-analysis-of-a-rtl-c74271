// bert: bit error rate tester around one NGDBF decoder.
//
// An all-zero frame is sent as BPSK +1 through the Gaussian channel emulator
// (mean +1, SNR index_channel, channel_seed). Its samples are quantized to
// 5-bit sign-magnitude codes and shifted serially, one per clock, into the
// channel shift register. A second emulator with mean 0 (SNR index_noise,
// noise_seed) feeds, through its own quantizer, the perturbation shift
// register, which shifts every clock; bit processor i reads position i, so
// it sees a new perturbation sample every iteration.
//
// The controller (bert_fsm) waits until N fresh channel samples have been
// collected, loads them in parallel into the decoder, lets it decode, then
// adds the number of decoded ones to `bit_errors` and, if there was any,
// one to `frame_errors`. While the decoder works the next frame is already
// being collected. This repeats until `frames` reaches `num_frames`.
// A rising `start` reseeds both emulators and clears the counters.
//
// Timing: a frame takes at least N clocks (frame collection); decoding of a
// frame overlaps collection of the next one when it finishes within it.
//
// From the document: the two generators, the serial channel shift register
// with a parallel load into the decoder, the per-clock shifting perturbation
// register, the four-state controller and bit/frame error counting. This
// design's own: the all-zero frame, quantizing the perturbation with the
// channel quantizer's settings, and the counter widths.
module bert
  import ce_pkg::*;
  import bert_pkg::*;
#(
  parameter int Z  = 64,
  parameter int KB = 32,
  parameter int JB = 6,
  localparam int N = Z * KB
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [SEED_W-1:0]         channel_seed,
  input  logic [SEED_W-1:0]         noise_seed,
  input  logic [INDEX_W-1:0]        index_channel,
  input  logic [INDEX_W-1:0]        index_noise,
  input  logic [SCALE_W-1:0]        scale,
  input  logic [DELTA_W-1:0]        delta,
  input  logic signed [THETA_W-1:0] theta,
  input  logic [ITER_W-1:0]         max_iter,
  input  logic [31:0]               num_frames,
  output logic                      done,
  output logic [47:0]               bit_errors,
  output logic [31:0]               frame_errors,
  output logic [31:0]               frames,
  output bert_state_t               state,
  output logic [ITER_W-1:0]         last_iterations
);

  logic powerup_decoder, initialize_decoder, count, counted, decoder_done;
  logic initialized;

  // Channel path.
  sample_t  ch_raw;
  logic     ch_raw_vld, ch_q_vld;
  qsample_t ch_q;
  awgn_gen #(.MEAN_Q16(65536)) u_chan (
    .clk, .rst_n, .init(powerup_decoder), .en(1'b1), .seed(channel_seed),
    .index(index_channel), .sample(ch_raw), .valid(ch_raw_vld)
  );
  sm_quantizer u_chq (
    .clk, .rst_n, .en(1'b1), .in_valid(ch_raw_vld && !powerup_decoder),
    .sample(ch_raw), .scale, .delta, .q(ch_q), .out_valid(ch_q_vld)
  );
  logic [QW-1:0] ch_sr [N];
  frame_shiftreg #(.DEPTH(N), .W(QW)) u_chsr (
    .clk, .rst_n, .shift(ch_q_vld), .din(ch_q), .dout(ch_sr)
  );

  // Count fresh samples since the last parallel load.
  localparam int FILL_W = $clog2(N+1);
  logic [FILL_W-1:0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   fill <= '0;
    else if (powerup_decoder || initialize_decoder) fill <= '0;
    else if (ch_q_vld && fill != FILL_W'(N))    fill <= fill + 1'b1;
  end
  assign initialized = (fill == FILL_W'(N));

  // Perturbation path.
  sample_t  nz_raw;
  logic     nz_raw_vld, nz_q_vld;
  qsample_t nz_q;
  awgn_gen #(.MEAN_Q16(0)) u_noise (
    .clk, .rst_n, .init(powerup_decoder), .en(1'b1), .seed(noise_seed),
    .index(index_noise), .sample(nz_raw), .valid(nz_raw_vld)
  );
  sm_quantizer u_nzq (
    .clk, .rst_n, .en(1'b1), .in_valid(nz_raw_vld && !powerup_decoder),
    .sample(nz_raw), .scale, .delta, .q(nz_q), .out_valid(nz_q_vld)
  );
  logic [QW-1:0] nz_sr [N];
  frame_shiftreg #(.DEPTH(N), .W(QW)) u_nzsr (
    .clk, .rst_n, .shift(nz_q_vld), .din(nz_q), .dout(nz_sr)
  );

  // Decoder.
  qsample_t y_in [N];
  qsample_t q_in [N];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      y_in[i] = qsample_t'(ch_sr[i]);
      q_in[i] = qsample_t'(nz_sr[i]);
    end
  end

  logic [N-1:0]      xhat;
  logic              dec_busy, dec_ok;
  logic [ITER_W-1:0] dec_iter;
  ngdbf_decoder #(.Z(Z), .KB(KB), .JB(JB)) u_dec (
    .clk, .rst_n, .init(initialize_decoder), .y_in, .q_in, .theta, .max_iter,
    .done(decoder_done), .busy(dec_busy), .syndrome_ok(dec_ok), .x(xhat),
    .iterations(dec_iter)
  );

  bert_fsm u_fsm (
    .clk, .rst_n, .start, .initialized, .decoder_done, .num_frames, .frames,
    .powerup_decoder, .initialize_decoder, .count, .counted, .done, .state
  );

  // Error counting: the frame sent is all zeros, so every decoded 1 is an
  // error.
  logic [$clog2(N+1)-1:0] ones;
  always_comb begin
    ones = '0;
    for (int i = 0; i < N; i++) ones = ones + xhat[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_errors      <= '0;
      frame_errors    <= '0;
      frames          <= '0;
      last_iterations <= '0;
    end else if (powerup_decoder) begin
      bit_errors      <= '0;
      frame_errors    <= '0;
      frames          <= '0;
    end else if (count) begin
      bit_errors      <= bit_errors + 48'(ones);
      frame_errors    <= frame_errors + 32'(ones != '0);
      frames          <= frames + 1'b1;
      last_iterations <= dec_iter;
    end
  end

endmodule
