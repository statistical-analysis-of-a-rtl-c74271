// ce_pkg: types and constants shared by the channel emulator, the quantizer,
// the NGDBF decoder and the bit error rate testers.
//
// Samples leave the emulator as 21-bit two's complement fixed-point numbers
// with 16 fraction bits (Q5.16, so +1.0 is 65536). Quantized samples are
// 5-bit sign-magnitude codes: bit 4 is the sign, bits 3:0 the magnitude,
// giving 32 levels (0..15 positive, 16..31 negative).
//
// The noise standard deviation for an SNR index i (the index is four times
// Eb/N0 in dB) is sigma = sqrt(1 / (2 * R * 10^(i/40))), where R is the code
// rate. The table is computed at elaboration in Q2.14. The rate is a
// parameter; 1723/2048 (the 802.3an code) is this design's default.
package ce_pkg;

  localparam int SAMPLE_W   = 21;   // Q5.16 two's complement
  localparam int FRAC_W     = 16;
  localparam int QW         = 5;    // sign-magnitude quantized sample
  localparam int QMAG_W     = 4;
  localparam int SCALE_W    = 21;   // unsigned Q5.16 scaling factor
  localparam int DELTA_W    = 6;
  localparam int SIGMA_W    = 16;   // unsigned Q2.14
  localparam int SIGMA_FRAC = 14;
  localparam int INDEX_W    = 6;
  localparam int NINDEX     = 1 << INDEX_W;
  localparam int SEED_W     = 8;
  localparam int THETA_W    = 8;
  localparam int ITER_W     = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    logic              sign;   // 1 = negative
    logic [QMAG_W-1:0] mag;
  } qsample_t;

  // Signed integer value (-15..15) of a sign-magnitude code.
  function automatic logic signed [QMAG_W+1:0] q_value(qsample_t q);
    logic signed [QMAG_W+1:0] m;
    m = signed'({2'b00, q.mag});
    return q.sign ? -m : m;
  endfunction

  // sigma(index) in Q2.14 for code rate num/den, saturated to the format.
  function automatic logic [SIGMA_W-1:0] sigma_q(int idx, int rate_num, int rate_den);
    real ebn0, sigma, scaled;
    ebn0   = 10.0 ** (real'(idx) / 40.0);
    sigma  = $sqrt(real'(rate_den) / (2.0 * real'(rate_num) * ebn0));
    scaled = sigma * real'(1 << SIGMA_FRAC) + 0.5;
    if (scaled > real'((1 << SIGMA_W) - 1)) scaled = real'((1 << SIGMA_W) - 1);
    return SIGMA_W'($rtoi(scaled));
  endfunction

  // Whole table, packed so it can initialise a localparam.
  function automatic logic [NINDEX*SIGMA_W-1:0] sigma_table(int rate_num, int rate_den);
    logic [NINDEX*SIGMA_W-1:0] t;
    for (int i = 0; i < NINDEX; i++) t[i*SIGMA_W +: SIGMA_W] = sigma_q(i, rate_num, rate_den);
    return t;
  endfunction

endpackage
