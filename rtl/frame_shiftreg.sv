// frame_shiftreg: serial-in, parallel-out sample shift register.
//
// On each clock with `shift` high, `din` enters at position 0 and every
// stored sample moves up one position; the oldest (position DEPTH-1) is
// dropped. All DEPTH positions are visible on `dout`. Reset clears it.
//
// The bit error rate tester uses one for the channel samples, filled one per
// clock until a frame is complete, and one for the perturbation samples,
// which shifts every clock so that each bit processor sees a new sample each
// iteration. Both uses follow the document.
module frame_shiftreg #(
  parameter int DEPTH = 2048,
  parameter int W     = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) dout[i] <= '0;
    end else if (shift) begin
      dout[0] <= din;
      for (int i = 1; i < DEPTH; i++) dout[i] <= dout[i-1];
    end
  end

endmodule
