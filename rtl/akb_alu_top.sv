// akb_alu_top: ALU that evaluates branch conditions in parallel with the add.
//
// A conventional ALU (operand modifier unit + adder) learns whether its result
// is zero only after the carry has rippled through every bit. Here two
// constant-time detectors sit on the propagate/generate bus between the OMU
// and the adder and answer equality questions about the result without
// waiting for it:
//   zero        = (A op B == 0)        A+B=0 detector, constant K = 0
//   limit_match = (A op B == R_limit)  A+B=K detector, K from the R_limit register
// A branch on equality/inequality, or the loop-closing NEXT instruction, can
// therefore be resolved as early as the OMU outputs are valid.
//
// NEXT Ri: the register-file side presents Ri on a with op = OP_NEXT; the ALU
// returns r = Ri + 1 and next_taken = 1 when Ri + 1 != R_limit (branch back to
// the loop head). With R_limit loaded with n + 1, a "do i = 1, n" loop body
// runs n times.
//
// Two clocked assertions state that zero and limit_match always agree with
// the (slower) adder result r.
// Interface: a, b [N-1:0], op, cin -> r [N-1:0], cout, zero, limit_match,
// next_taken (all combinational); limit_we / limit_d load R_limit on the
// rising edge of clk (asynchronous active-low reset clears it).
// The structure follows the published ALU organisations with the early zero
// and the R_limit comparison; combining both detectors in one ALU, the
// next_taken output and the operation set are this design's own choices.
module akb_alu_top
  import akb_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      op,
  input  logic         cin,
  input  logic         limit_we,
  input  logic [N-1:0] limit_d,
  output logic [N-1:0] r,
  output logic         cout,
  output logic         zero,
  output logic         limit_match,
  output logic         next_taken,
  output logic [N-1:0] rlimit
);

  logic [N-1:0] p, g;
  logic         c0;

  omu #(.N(N)) u_omu (
    .a   (a),
    .b   (b),
    .op  (op),
    .cin (cin),
    .p   (p),
    .g   (g),
    .c0  (c0)
  );

  pg_adder #(.N(N)) u_adder (
    .p    (p),
    .g    (g),
    .c0   (c0),
    .r    (r),
    .cout (cout)
  );

  akb_kconst_detector #(.N(N), .K('0)) u_zero_det (
    .p  (p),
    .g  (g),
    .c0 (c0),
    .eq (zero)
  );

  rlimit_reg #(.N(N)) u_rlimit (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (limit_we),
    .d     (limit_d),
    .q     (rlimit)
  );

  akb_detector #(.N(N)) u_limit_det (
    .p  (p),
    .g  (g),
    .k  (rlimit),
    .c0 (c0),
    .eq (limit_match)
  );

  assign next_taken = (op == OP_NEXT) && !limit_match;

  // The early flags must agree with the adder result once it has settled;
  // sampled on the clock so that combinational settling is not flagged.
  a_zero_matches_result: assert property (@(posedge clk)
    zero == (r == '0));
  a_limit_matches_result: assert property (@(posedge clk)
    limit_match == (r == rlimit));

endmodule
