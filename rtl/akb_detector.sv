// akb_detector: constant-time test of A + B = K for N-bit operands.
//
// N identical akb_cell instances each compute a predicted carry and a local
// mismatch z_i. The predicted carry of cell i-1 feeds only cell i's final XOR,
// never a further cell, so the delay is independent of N. The result line
// is the NOR of all z_i: eq = 1 exactly when (A + B + c0) mod 2^N == K.
//
// Operands arrive in propagate/generate form (p = a^b, g = a&b, or whatever
// an operand modifier produced), so the same detector serves subtraction and
// logic operations. c0 is the carry into bit 1 and is used as the predicted
// carry q_0; with c0 = 0 this is exactly the published formulation, and the
// correctness argument carries over unchanged for c0 = 1.
//
// In the original circuit the NOR is a precharged wired line pulled low by one
// transistor per cell; here it is the logical NOR of the z vector.
// The predicted carry of the top cell has no consumer and stays unused.
// Interface: p, g, k [N-1:0], c0 -> eq. Timing: purely combinational.
// The default width N = 32 is this design's choice.
module akb_detector #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] g,
  input  logic [N-1:0] k,
  input  logic         c0,
  output logic         eq
);

  logic [N:0]   q;      // q[i] is the predicted carry into cell i; q[0] = c0
  logic [N-1:0] z;      // local mismatches

  assign q[0] = c0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    akb_cell u_cell (
      .p      (p[i]),
      .g      (g[i]),
      .k      (k[i]),
      .q_prev (q[i]),
      .q      (q[i+1]),
      .z      (z[i])
    );
  end

  // Z_n-bar line: high when no cell reports a mismatch.
  assign eq = ~|z;

endmodule
