// histogram: counts quantized samples per level.
//
// NBINS saturating counters, one per quantization level, plus a counter of
// all samples taken. Each clock with `in_valid` high adds one to bin `bin`
// and to `total`. `clear` zeroes all counters. `rd_count` shows the counter
// selected by `rd_bin` combinationally.
//
// From the document: 32 levels histogrammed in hardware. This design's own
// choices: flip-flop counters, their 48-bit width and saturation.
module histogram #(
  parameter int NBINS = 32,
  parameter int CNT_W = 48,
  localparam int BIN_W = $clog2(NBINS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [BIN_W-1:0] bin,
  input  logic [BIN_W-1:0] rd_bin,
  output logic [CNT_W-1:0] rd_count,
  output logic [CNT_W-1:0] total
);

  logic [CNT_W-1:0] count [NBINS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBINS; b++) count[b] <= '0;
      total <= '0;
    end else if (clear) begin
      for (int b = 0; b < NBINS; b++) count[b] <= '0;
      total <= '0;
    end else if (in_valid) begin
      if (count[bin] != '1) count[bin] <= count[bin] + 1'b1;
      if (total != '1)      total      <= total + 1'b1;
    end
  end

  assign rd_count = count[rd_bin];

endmodule
