// circ_shifter: P-input circular (rotating) shifter used by the alignment and
// reverse alignment blocks of every column sum block.
//
// dout[k] = din[(k + sh) mod P] for a shift value sh in 0..P-1. It is built,
// as the decoder description has it, from ceil(log2 P) = 5 layers of
// multiplexers; layer i rotates by 2^i lanes when bit i of sh is set. Because
// sh < P the rotation amounts of the set layers add up to sh modulo P, so the
// layering works for P = 24, which is not a power of two.
// Purely combinational. W is the lane width (6 bits on the alignment side,
// 7 bits on the reverse alignment side).
module circ_shifter #(
  parameter int unsigned P = 24,
  parameter int unsigned W = 6
) (
  input  logic [P-1:0][W-1:0]    din,
  input  logic [$clog2(P)-1:0]   sh,
  output logic [P-1:0][W-1:0]    dout
);
  localparam int unsigned L = $clog2(P);

  logic [L:0][P-1:0][W-1:0] stage;

  assign stage[0] = din;
  for (genvar i = 0; i < L; i++) begin : g_layer
    for (genvar k = 0; k < P; k++) begin : g_lane
      assign stage[i+1][k] = sh[i] ? stage[i][(k + (1 << i)) % P] : stage[i][k];
    end
  end
  assign dout = stage[L];

endmodule
