// sm_quantizer: 5-bit sign-magnitude quantizer for channel and noise samples.
//
// The magnitude of the Q5.16 sample is multiplied by an unsigned Q5.16
// scaling factor. The 42-bit product is truncated to its upper 32 bits (the
// "intsample", Q10.22), which is shifted right by `delta` bits. The result,
// saturated to 15, is the 4-bit magnitude; the sample's sign is the code's
// MSB. Codes 0..15 are the positive levels and 16..31 the negative ones.
// With scale = 4.0 and delta = 22 one level is 0.25.
//
// Interface and timing: one register stage. When `en` is high the code of
// `sample` appears on `q` one clock later with `out_valid` = `in_valid`.
//
// From the document: 5-bit sign-magnitude output, the 42-bit scaled
// magnitude, the 32-bit intsample and the shift by delta. This design's own
// choices: which 32 bits are kept, reading "shifted" as a right shift, and
// saturation of large magnitudes.
module sm_quantizer
  import ce_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  input  sample_t            sample,
  input  logic [SCALE_W-1:0] scale,
  input  logic [DELTA_W-1:0] delta,
  output qsample_t           q,
  output logic               out_valid
);

  logic [SAMPLE_W-1:0]         mag;
  logic [2*SAMPLE_W-1:0]       scaled;     // 42 bits
  logic [31:0]                 intsample;
  logic [31:0]                 shifted;
  qsample_t                    code;

  always_comb begin
    mag       = sample[SAMPLE_W-1] ? SAMPLE_W'(-sample) : SAMPLE_W'(sample);
    scaled    = (2*SAMPLE_W)'(mag) * (2*SAMPLE_W)'(scale);
    intsample = scaled[2*SAMPLE_W-1 -: 32];
    shifted   = intsample >> delta;
    code.sign = sample[SAMPLE_W-1];
    code.mag  = (shifted > 32'd15) ? 4'd15 : shifted[QMAG_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      q         <= code;
      out_valid <= in_valid;
    end
  end

endmodule
