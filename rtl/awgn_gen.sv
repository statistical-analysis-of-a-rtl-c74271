// awgn_gen: Gaussian channel emulator and perturbation-noise generator.
//
// Produces one Gaussian sample per enabled clock, mean MEAN_Q16/65536 and
// standard deviation sigma(index), as a 21-bit Q5.16 two's complement value.
// The bit error rate testers use it twice: with mean +1 as the AWGN channel
// seen by an all-zero BPSK frame, and with mean 0 as the NGDBF threshold
// perturbation source.
//
// How it works: six xorshift32 generators advance every enabled clock; their
// twelve 16-bit halves are summed (central limit theorem). A sum of twelve
// uniform 16-bit words has variance 65536^2, so after removing its mean it is
// a unit-variance Gaussian approximation already in Q16 (range +-6 sigma).
// Stage 2 multiplies by sigma (Q2.14, from a table built at elaboration),
// adds the mean and saturates to the Q5.16 range.
//
// Interface and timing: `init` (one clock) reloads the generator states from
// the 8-bit `seed` and empties the pipeline, so a seed always reproduces the
// same sequence. While `en` is high the pipeline advances; the first `valid`
// sample appears on the second enabled clock after `init`, then one per
// enabled clock. With `en` low everything holds.
//
// From the document: one sample per clock, 21-bit fractional-integer output,
// mean +1, 8-bit seed, restart on reset with a new seed, SNR index = 4 x
// Eb/N0 in dB. This design's own choices: the generation method (the original
// was produced by high-level synthesis and its insides are not described),
// the seed expansion, the code rate in sigma, the saturation and the latency.
module awgn_gen
  import ce_pkg::*;
#(
  parameter int MEAN_Q16 = 65536,   // +1.0
  parameter int RATE_NUM = 1723,
  parameter int RATE_DEN = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic               en,
  input  logic [SEED_W-1:0]  seed,
  input  logic [INDEX_W-1:0] index,
  output sample_t            sample,
  output logic               valid
);

  localparam int NGEN = 6;
  localparam logic [NINDEX*SIGMA_W-1:0] SIGMA_TAB = sigma_table(RATE_NUM, RATE_DEN);
  // Distinct odd constants give each generator its own starting state.
  localparam logic [NGEN*32-1:0] GEN_KEY = {
    32'h9E37_79B9, 32'h85EB_CA6B, 32'hC2B2_AE35,
    32'h27D4_EB2F, 32'h1656_67B1, 32'hD3A2_646D
  };
  localparam int UNIFORM_MEAN = 6 * 65536;   // 12 x 32768

  logic [31:0] state [NGEN];

  function automatic logic [31:0] xorshift32(logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  // Seed expansion: spread the seed over all bytes, mix in the key, then
  // run one xorshift step. The OR with 1 keeps the state non-zero.
  function automatic logic [31:0] seed_state(logic [SEED_W-1:0] sd, int g);
    logic [31:0] s;
    s = ({4{sd}} * 32'h0101_0101) ^ GEN_KEY[g*32 +: 32];
    s = xorshift32(s | 32'd1);
    return s | 32'd1;
  endfunction

  // Stage 1: sum of twelve uniform halves.
  logic [19:0] usum;
  always_comb begin
    usum = '0;
    for (int g = 0; g < NGEN; g++)
      usum = usum + 20'(state[g][15:0]) + 20'(state[g][31:16]);
  end

  logic signed [20:0] gauss;      // unit-variance, Q16
  logic               gauss_vld;
  logic [SIGMA_W-1:0] sigma;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NGEN; g++) state[g] <= seed_state('0, g);
      gauss     <= '0;
      gauss_vld <= 1'b0;
    end else if (init) begin
      for (int g = 0; g < NGEN; g++) state[g] <= seed_state(seed, g);
      gauss_vld <= 1'b0;
    end else if (en) begin
      for (int g = 0; g < NGEN; g++) state[g] <= xorshift32(state[g]);
      gauss     <= signed'({1'b0, usum}) - 21'(UNIFORM_MEAN);
      gauss_vld <= 1'b1;
    end
  end

  assign sigma = SIGMA_TAB[index*SIGMA_W +: SIGMA_W];

  // Stage 2: scale, offset, saturate.
  logic signed [37:0] prod;
  logic signed [23:0] shifted;
  logic signed [24:0] withmean;
  sample_t            sat;
  localparam logic signed [24:0] SMAX = 25'((1 << (SAMPLE_W-1)) - 1);
  localparam logic signed [24:0] SMIN = -25'(1 << (SAMPLE_W-1));

  always_comb begin
    prod     = 38'(gauss) * signed'({1'b0, sigma});
    shifted  = 24'(prod >>> SIGMA_FRAC);
    withmean = 25'(shifted) + 25'(MEAN_Q16);
    if (withmean > SMAX)      sat = SAMPLE_W'(SMAX);
    else if (withmean < SMIN) sat = SAMPLE_W'(SMIN);
    else                      sat = SAMPLE_W'(withmean);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample <= '0;
      valid  <= 1'b0;
    end else if (init) begin
      valid  <= 1'b0;
    end else if (en) begin
      sample <= sat;
      valid  <= gauss_vld;
    end
  end

endmodule
