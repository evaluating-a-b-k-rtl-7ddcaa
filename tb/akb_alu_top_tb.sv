// akb_alu_top_tb: end-to-end test of the early-condition ALU at its default
// 32-bit width.
//
// Phase 1: random operations. For every operation the result, carry-out, the
//   early zero flag and the R_limit match flag are compared with values
//   computed here from SystemVerilog arithmetic. Operands are steered so that
//   the result is zero, equals R_limit, or misses R_limit by one bit.
// Phase 2: DO loops "do i = 1, n" run as in the compiled form
//     Ri <- 1;  Rlimit <- n + 1 (computed by the ALU);  body;  NEXT Ri, body
//   The testbench keeps Ri, feeds it to the ALU with OP_NEXT and follows
//   next_taken; the body must run exactly n times, one NEXT per cycle.
// Every mechanism is counted: zero flag raised, limit match raised, R_limit
// written, NEXT taken, NEXT falling through, each operation applied. A
// mechanism that never happened counts as a failure.
module akb_alu_top_tb
  import akb_pkg::*;
;

  localparam int N = 32;

  logic         clk = 1'b0, rst_n;
  logic [N-1:0] a, b, r, limit_d, rlimit;
  alu_op_e      op;
  logic         cin, limit_we, cout, zero, limit_match, next_taken;

  int checks = 0, failures = 0, cycles = 0;
  int n_zero = 0, n_match = 0, n_limit_wr = 0, n_taken = 0, n_exit = 0;
  int per_op [8];

  akb_alu_top dut (
    .clk, .rst_n, .a, .b, .op, .cin, .limit_we, .limit_d,
    .r, .cout, .zero, .limit_match, .next_taken, .rlimit
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Reference model of the ALU result {carry, value}.
  function automatic logic [N:0] model(alu_op_e o, logic [N-1:0] x, logic [N-1:0] y, logic c);
    unique case (o)
      OP_ADD:  return {1'b0, x} + {1'b0, y};
      OP_ADC:  return {1'b0, x} + {1'b0, y} + (N+1)'(c);
      OP_SUB:  return {1'b0, x} + {1'b0, ~y} + (N+1)'(1);
      OP_SBB:  return {1'b0, x} + {1'b0, ~y} + (N+1)'(c);
      OP_NEXT: return {1'b0, x} + (N+1)'(1);
      OP_AND:  return {1'b0, x & y};
      OP_OR:   return {1'b0, x | y};
      default: return {1'b0, x ^ y};
    endcase
  endfunction

  task automatic load_limit(logic [N-1:0] v);
    @(negedge clk);
    limit_we = 1'b1; limit_d = v;
    @(negedge clk);
    limit_we = 1'b0;
    n_limit_wr++;
    check(rlimit == v, $sformatf("R_limit load %h got %h", v, rlimit));
  endtask

  // Apply one operation and check all combinational outputs.
  task automatic apply(alu_op_e o, logic [N-1:0] x, logic [N-1:0] y, logic c);
    logic [N:0] m;
    @(negedge clk);
    op = o; a = x; b = y; cin = c;
    #1;
    m = model(o, x, y, c);
    per_op[int'(o)]++;
    check(r == m[N-1:0], $sformatf("%s a=%h b=%h c=%b: r=%h exp %h", o.name(), x, y, c, r, m[N-1:0]));
    if (o inside {OP_ADD, OP_ADC, OP_SUB, OP_SBB, OP_NEXT})
      check(cout == m[N], $sformatf("%s a=%h b=%h: cout=%b exp %b", o.name(), x, y, cout, m[N]));
    check(zero == (m[N-1:0] == '0), $sformatf("%s a=%h b=%h: zero=%b", o.name(), x, y, zero));
    check(limit_match == (m[N-1:0] == rlimit),
          $sformatf("%s a=%h b=%h K=%h: match=%b", o.name(), x, y, rlimit, limit_match));
    check(next_taken == (o == OP_NEXT && m[N-1:0] != rlimit),
          $sformatf("%s: next_taken=%b", o.name(), next_taken));
    if (zero) n_zero++;
    if (limit_match) n_match++;
  endtask

  // Choose y so that x op y lands on target (arithmetic operations only).
  function automatic logic [N-1:0] steer(alu_op_e o, logic [N-1:0] x, logic [N-1:0] t, logic c);
    unique case (o)
      OP_ADD:  return t - x;
      OP_ADC:  return t - x - N'(c);
      OP_SUB:  return x - t;
      OP_SBB:  return ~(t - x - N'(c));
      default: return $urandom;
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; limit_we = 1'b0; limit_d = '0;
    a = '0; b = '0; op = OP_ADD; cin = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(rlimit == '0, "R_limit not cleared by reset");

    // Phase 1: random operations against random limits.
    for (int blk = 0; blk < 40; blk++) begin
      load_limit($urandom);
      for (int t = 0; t < 200; t++) begin
        alu_op_e o;
        logic [N-1:0] x, y, tgt;
        logic c;
        int unsigned sel;
        o = alu_op_e'($urandom % 8);
        sel = $urandom % 4;
        x = $urandom; c = 1'($urandom);
        unique case (sel)
          0: tgt = '0;
          1: tgt = rlimit;
          2: tgt = rlimit ^ (N'(1) << ($urandom % N));
          default: tgt = $urandom;
        endcase
        if (o == OP_XOR) y = x ^ tgt;          // logic ops can hit any target
        else if (o == OP_NEXT) x = tgt - 1;
        else if (o == OP_OR && ($urandom % 2 == 0)) begin x = '0; y = tgt; end
        else if (o == OP_AND && ($urandom % 2 == 0)) begin x = tgt; y = '1; end
        else y = steer(o, x, tgt, c);
        apply(o, x, y, c);
      end
    end

    // Phase 2: DO loops, do i = 1, n.
    foreach (loop_n[j]) begin
      int unsigned n, body;
      logic [N-1:0] ri;
      logic [N:0]   m;
      n = loop_n[j];
      // Rlimit <- n + 1, computed by the ALU itself.
      apply(OP_ADD, N'(n), N'(1), 1'b0);
      m = model(OP_ADD, N'(n), N'(1), 1'b0);
      load_limit(m[N-1:0]);
      ri = N'(1);                  // Ri <- 1
      body = 0;
      forever begin
        body++;                    // loop body executes with i = ri
        apply(OP_NEXT, ri, '0, 1'b0);
        ri = r;                    // Ri <- Ri + 1
        if (next_taken) n_taken++;
        else begin n_exit++; break; end
        if (body > n + 2) break;   // runaway guard
      end
      check(body == n, $sformatf("loop n=%0d ran %0d times", n, body));
      check(ri == N'(n + 1), $sformatf("loop n=%0d ended with Ri=%0d", n, ri));
    end

    // Every mechanism must have happened.
    check(n_zero > 0,     "early zero flag never raised");
    check(n_match > 0,    "R_limit match never raised");
    check(n_limit_wr > 0, "R_limit never written");
    check(n_taken > 0,    "NEXT never branched back");
    check(n_exit > 0,     "NEXT never fell through");
    for (int i = 0; i < 8; i++)
      check(per_op[i] > 0, $sformatf("operation %0d never applied", i));
    $display("mechanisms: zero=%0d match=%0d limit_writes=%0d next_taken=%0d next_exit=%0d",
             n_zero, n_match, n_limit_wr, n_taken, n_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned loop_n [5] = '{1, 2, 7, 100, 1000};

endmodule
