// akb_cell_tb: exhaustive check of one detector cell.
//
// All 16 combinations of (p, g, k, q_prev) are applied; q and z are compared
// with the cell equations written out independently as truth-table reasoning:
// the predicted carry is 1 when the bit generates, or when it propagates and
// the expected sum bit k is 0 (so the incoming carry must have been 1); the
// mismatch is 1 when p + q_prev (mod 2) differs from k.
module akb_cell_tb;

  logic p, g, k, q_prev, q, z;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  akb_cell dut (.p(p), .g(g), .k(k), .q_prev(q_prev), .q(q), .z(z));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Watchdog: 1000 cycles is far beyond what the test needs.
  initial begin
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_q, exp_z;
      {p, g, k, q_prev} = 4'(v);
      @(posedge clk);
      exp_q = g ? 1'b1 : (p && k == 1'b0);
      exp_z = ((int'(p) + int'(q_prev)) % 2) != int'(k);
      checks += 2;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL q p=%b g=%b k=%b qp=%b: got %b exp %b", p, g, k, q_prev, q, exp_q);
      end
      if (z !== exp_z) begin
        failures++;
        $display("FAIL z p=%b g=%b k=%b qp=%b: got %b exp %b", p, g, k, q_prev, z, exp_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
