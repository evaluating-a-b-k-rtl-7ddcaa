// pg_adder: adder working from propagate/generate signals.
//
// Implements the full-adder recurrences on the OMU outputs:
//   c_i = (p_i & c_{i-1}) | g_i,   r_i = p_i ^ c_{i-1},   c_0 = c0
// The carry chain is written directly; the adder architecture is not
// prescribed by the original work and synthesis may restructure it. This is
// the slow path whose carry propagation the condition detectors avoid.
// Interface: p, g [N-1:0], c0 -> r [N-1:0], cout (= c_N). Purely combinational.
module pg_adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] g,
  input  logic         c0,
  output logic [N-1:0] r,
  output logic         cout
);

  always_comb begin
    logic c;  // carry into the bit being summed
    c = c0;
    for (int i = 0; i < N; i++) begin
      r[i] = p[i] ^ c;
      c    = (p[i] & c) | g[i];
    end
    cout = c;
  end

endmodule
