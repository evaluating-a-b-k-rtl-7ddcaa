// akb_cell: one bit position of the constant-time "A+B = K" detector.
//
// The cell predicts its own carry-out assuming the sum bit already equals k:
//   q   = (p & ~k) | g          predicted carry q_i
//   s   = p ^ q_prev            predicted sum bit s_i (uses the neighbour's q_{i-1})
//   z   = s ^ k                 local mismatch z_i
// q depends only on this cell's inputs, so no carry ripples through a chain
// of cells: every z is two XOR levels from the inputs. If all z are 0 the real
// sum equals K bit for bit (the predicted carries are then the true carries).
//
// Interface: p = a^b, g = a&b of this bit, k the bit of K, q_prev the predicted
// carry of the next lower cell (the carry-in for bit 1). Outputs q and z.
// Timing: purely combinational.
//
// The gate structure follows the published one-bit cell. There, z drives a
// pull-down transistor on a shared precharged line; here z is a plain output
// and the NOR of all z is formed in akb_detector.
module akb_cell (
  input  logic p,
  input  logic g,
  input  logic k,
  input  logic q_prev,
  output logic q,
  output logic z
);

  always_comb begin
    q = (p & ~k) | g;
    z = (p ^ k) ^ q_prev;
  end

endmodule
