// omu_tb: checks the Operand Modifier Unit operation by operation.
//
// For every operation and random operands, the propagate/generate/carry-in
// triple is summed here with the full-adder recurrence and the sum compared
// with the operation's intended result computed with SystemVerilog operators
// (a + b, a - b, a & b, ...). For the arithmetic operations p and g must also
// be the propagate/generate of a and the modified b.
module omu_tb
  import akb_pkg::*;
;

  localparam int N = 32;

  logic [N-1:0] a, b, p, g;
  alu_op_e      op;
  logic         cin, c0;

  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;
  int   per_op [8];

  omu dut (.a(a), .b(b), .op(op), .cin(cin), .p(p), .g(g), .c0(c0));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] pg_sum(logic [N-1:0] pp, logic [N-1:0] gg, logic c);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      r[i] = pp[i] ^ c;
      c    = (pp[i] & c) | gg[i];
    end
    return r;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 8000; t++) begin
      logic [N-1:0] exp_r, bm;
      logic         arith;
      op  = alu_op_e'(t % 8);
      a   = $urandom; b = $urandom; cin = 1'($urandom);
      arith = 1'b1;
      unique case (op)
        OP_ADD:  begin exp_r = a + b;             bm = b;  end
        OP_ADC:  begin exp_r = a + b + N'(cin);   bm = b;  end
        OP_SUB:  begin exp_r = a - b;             bm = ~b; end
        OP_SBB:  begin exp_r = a - b - N'(!cin);  bm = ~b; end
        OP_NEXT: begin exp_r = a + 1;             bm = '0; end
        OP_AND:  begin exp_r = a & b; arith = 1'b0; bm = '0; end
        OP_OR:   begin exp_r = a | b; arith = 1'b0; bm = '0; end
        default: begin exp_r = a ^ b; arith = 1'b0; bm = '0; end
      endcase
      @(posedge clk);
      per_op[int'(op)]++;
      check(pg_sum(p, g, c0) == exp_r,
            $sformatf("%s a=%h b=%h cin=%b: sum %h exp %h", op.name(), a, b, cin, pg_sum(p, g, c0), exp_r));
      if (arith)
        check(p == (a ^ bm) && g == (a & bm),
              $sformatf("%s a=%h b=%h: p/g not propagate/generate", op.name(), a, b));
      else
        check(g == '0 && c0 == 1'b0 && p == exp_r,
              $sformatf("%s a=%h b=%h: logic result not on p", op.name(), a, b));
    end
    for (int i = 0; i < 8; i++)
      if (per_op[i] == 0) begin
        failures++;
        $display("FAIL: operation %0d never applied", i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
