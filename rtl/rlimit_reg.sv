// rlimit_reg: the R_limit register of the loop-closing ALU.
//
// Holds the loop bound (n + 1 for "do i = 1, n") whose bits are the K input
// of the A + B = K detector. Loaded with d on a rising clock edge when we = 1;
// cleared by the asynchronous active-low reset. Reset value and write port are
// this design's choices; the register itself is part of the published ALU.
// Timing: q changes one clock edge after a write.
module rlimit_reg #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (we) q <= d;
  end

endmodule
