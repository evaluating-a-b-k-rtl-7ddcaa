// akb_kconst_detector: constant-time test of A + B = K for a constant K.
//
// With K fixed, each cell of akb_detector simplifies:
//   k_i = 0:  q_i = p_i | g_i      z_i =  p_i ^ q_{i-1}
//   k_i = 1:  q_i = g_i            z_i = ~p_i ^ q_{i-1}
// and eq is the NOR of all z_i, i.e. eq = 1 when (A + B + c0) mod 2^N == K.
// With the default K = 0 this is the "A + B = 0" detector that produces the
// zero condition code before the adder has finished.
//
// The two simplified cell forms follow the published constant-K circuit;
// c0 used as q_0, the default width N = 32 and the default K = 0 are this
// design's choices. Interface: p, g [N-1:0], c0 -> eq. Purely combinational.
// The predicted carry of the top cell has no consumer and stays unused.
module akb_kconst_detector #(
  parameter int unsigned   N = 32,
  parameter logic [N-1:0]  K = '0
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] g,
  input  logic         c0,
  output logic         eq
);

  logic [N:0]   q;   // q[i] is the predicted carry into cell i; q[0] = c0
  logic [N-1:0] z;

  assign q[0] = c0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    if (K[i]) begin : g_k1
      assign q[i+1] = g[i];
      assign z[i] = ~p[i] ^ q[i];
    end else begin : g_k0
      assign q[i+1] = p[i] | g[i];
      assign z[i] = p[i] ^ q[i];
    end
  end

  assign eq = ~|z;

endmodule
