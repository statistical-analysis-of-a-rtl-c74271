// channel_top: channel emulator test core.
//
// Chains the Gaussian emulator (mean +1), the 5-bit sign-magnitude quantizer
// and the 32-bin histogram. `init` reseeds the emulator and clears the
// histogram. While `run` is high and `done` is low the pipeline advances one
// sample per clock; each quantized sample is counted in its bin until
// `num_samples` samples have been counted, then `done` rises and the
// pipeline stops. The raw and quantized sample streams are also brought out
// so that a testbench can log them.
//
// The quantizer also clocks during `init` so that its valid flag empties.
//
// Timing: after `init`, the first sample reaches the histogram on the third
// clock with run high (two emulator stages, one quantizer stage).
//
// From the document: emulator, quantization and histogram generation in one
// top module. The sample budget and the done flag are this design's own.
module channel_top
  import ce_pkg::*;
#(
  parameter int CNT_W = 48
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic               run,
  input  logic [SEED_W-1:0]  seed,
  input  logic [INDEX_W-1:0] index,
  input  logic [SCALE_W-1:0] scale,
  input  logic [DELTA_W-1:0] delta,
  input  logic [CNT_W-1:0]   num_samples,
  output logic               done,
  input  logic [4:0]         rd_bin,
  output logic [CNT_W-1:0]   rd_count,
  output logic [CNT_W-1:0]   total,
  output sample_t            raw_sample,
  output logic               raw_valid,
  output qsample_t           q_sample,
  output logic               q_valid
);

  logic en;
  assign done = (total >= num_samples);
  assign en   = run && !done && !init;

  awgn_gen #(.MEAN_Q16(65536)) u_emul (
    .clk, .rst_n, .init, .en, .seed, .index,
    .sample(raw_sample), .valid(raw_valid)
  );

  logic q_vld_raw;
  sm_quantizer u_quant (
    .clk, .rst_n, .en(en || init), .in_valid(raw_valid && !init), .sample(raw_sample),
    .scale, .delta, .q(q_sample), .out_valid(q_vld_raw)
  );
  assign q_valid = q_vld_raw;

  histogram #(.NBINS(32), .CNT_W(CNT_W)) u_hist (
    .clk, .rst_n, .clear(init), .in_valid(en && q_vld_raw),
    .bin({q_sample.sign, q_sample.mag}), .rd_bin, .rd_count, .total
  );

endmodule
