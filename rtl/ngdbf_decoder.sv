// ngdbf_decoder: fully parallel noisy gradient descent bit-flip LDPC decoder.
//
// N = Z*KB bit-flipping processors and M = Z*JB parity checks, one iteration
// per clock. On `init` the frame of quantized channel samples on `y_in` is
// copied in parallel into the decoder's own channel registers, every
// processor takes its hard decision, and decoding starts. Each following
// clock the processors apply the NGDBF rule with the perturbation sample on
// `q_in[i]` (the caller supplies a new one each clock). Decoding stops when
// every check is satisfied or after `max_iter` iterations; `done`
// (decoder_done) then rises and stays high until the next `init`, and `x`
// holds the decoded frame (1 = bit decided as 1). `iterations` counts the
// iterations taken.
//
// Code structure: the parity-check matrix is quasi-cyclic, JB x KB blocks of
// Z x Z circulant permutations. Block (b, k) is the identity shifted by
// (b*k) mod Z: check b*Z + a watches bit k*Z + ((a + b*k) mod Z). With the
// defaults this is a 384 x 2048 matrix with six checks per bit and 32 bits
// per check, the shape of the 802.3an code. The actual 802.3an matrix is not
// reproduced here; the decoder is meant to be run on the all-zero codeword,
// which belongs to every linear code.
//
// From the document: one processor per bit (2048), six parity checks per
// bit built from XORs, the decoding rule, a channel frame loaded in parallel
// and held while decoding. This design's own: the matrix, the stopping rule
// and the iteration limit.
module ngdbf_decoder
  import ce_pkg::*;
#(
  parameter int Z  = 64,
  parameter int KB = 32,
  parameter int JB = 6,
  localparam int N = Z * KB,
  localparam int M = Z * JB
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  qsample_t                  y_in [N],
  input  qsample_t                  q_in [N],
  input  logic signed [THETA_W-1:0] theta,
  input  logic [ITER_W-1:0]         max_iter,
  output logic                      done,
  output logic                      busy,
  output logic                      syndrome_ok,
  output logic [N-1:0]              x,
  output logic [ITER_W-1:0]         iterations
);

  // Channel frame registers, loaded in parallel.
  qsample_t y_reg [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < N; i++) y_reg[i] <= '0;
    else if (init) for (int i = 0; i < N; i++) y_reg[i] <= y_in[i];
  end

  // Parity checks.
  logic [M-1:0] viol;
  for (genvar b = 0; b < JB; b++) begin : g_crow
    for (genvar a = 0; a < Z; a++) begin : g_chk
      logic [KB-1:0] bits;
      for (genvar k = 0; k < KB; k++) begin : g_bit
        assign bits[k] = x[k*Z + ((a + b*k) % Z)];
      end
      parity_check #(.DEG(KB)) u_pc (.bits(bits), .viol(viol[b*Z + a]));
    end
  end
  assign syndrome_ok = (viol == '0);

  // Control: stop when all checks pass or the iteration limit is reached.
  logic stop, step;
  assign stop = syndrome_ok || (iterations >= max_iter);
  assign step = busy && !stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      iterations <= '0;
    end else if (init) begin
      busy       <= 1'b1;
      done       <= 1'b0;
      iterations <= '0;
    end else if (busy) begin
      if (stop) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        iterations <= iterations + 1'b1;
      end
    end
  end

  // Bit-flipping processors. The frame is loaded into y_reg and the
  // processors take their hard decisions from y_in in the same clock.
  for (genvar k = 0; k < KB; k++) begin : g_bcol
    for (genvar t = 0; t < Z; t++) begin : g_proc
      localparam int I = k*Z + t;
      logic [JB-1:0] pviol;
      for (genvar b = 0; b < JB; b++) begin : g_conn
        assign pviol[b] = viol[b*Z + ((t + Z - ((b*k) % Z)) % Z)];
      end
      bitflip_proc #(.JB(JB)) u_bfp (
        .clk, .rst_n, .load(init), .en(step), .y(init ? y_in[I] : y_reg[I]),
        .viol(pviol), .q(q_in[I]), .theta, .x(x[I])
      );
    end
  end

endmodule
