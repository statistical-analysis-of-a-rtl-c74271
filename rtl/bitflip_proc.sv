// bitflip_proc: one NGDBF bit-flipping processor.
//
// Holds the decision x_i for one code bit (0 means +1, 1 means -1). On `load`
// it takes the hard decision of its channel sample (the sign of y). On every
// clock with `en` high it evaluates the NGDBF rule
//     flip if  x_i*y_i + sum_j s_j  <  theta + q_i
// where y_i and q_i are the quantized channel and perturbation samples used
// as integers -15..15, and s_j is +1 for a satisfied and -1 for a violated
// parity check (the JB check outputs arrive as `viol`, 1 = violated).
// theta is a signed integer in the same units as the quantized samples.
//
// Timing: the new decision is visible one clock after `en`.
//
// The rule and the six checks per bit follow the document; the encoding of
// inputs, the unweighted check sum and the initial hard decision are this
// design's own choices.
module bitflip_proc
  import ce_pkg::*;
#(
  parameter int JB = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic                      en,
  input  qsample_t                  y,
  input  logic [JB-1:0]             viol,
  input  qsample_t                  q,
  input  logic signed [THETA_W-1:0] theta,
  output logic                      x
);

  localparam int MW = 10;

  logic signed [MW-1:0] xy, ssum, metric, thresh;
  logic                 flip;

  always_comb begin
    xy   = MW'(q_value(y));
    if (x) xy = -xy;
    ssum = '0;
    for (int j = 0; j < JB; j++) ssum = viol[j] ? ssum - MW'(1) : ssum + MW'(1);
    metric = xy + ssum;
    thresh = MW'(theta) + MW'(q_value(q));
    flip   = (metric < thresh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     x <= 1'b0;
    else if (load)  x <= y.sign;
    else if (en)    x <= x ^ flip;
  end

endmodule
