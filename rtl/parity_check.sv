// parity_check: one parity-check node of the LDPC decoder.
//
// Outputs the XOR of the DEG bit decisions it checks: 1 means the check is
// violated, 0 that it is satisfied. Purely combinational.
//
// The XOR check follows the document; the degree default (32, the row weight
// of a 384 x 2048 code with six checks per bit) is this design's own.
module parity_check #(
  parameter int DEG = 32
) (
  input  logic [DEG-1:0] bits,
  output logic           viol
);

  assign viol = ^bits;

endmodule
