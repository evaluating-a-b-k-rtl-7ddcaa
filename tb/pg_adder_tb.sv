// pg_adder_tb: checks the propagate/generate adder against integer addition,
// exhaustively at 4 bits and with random operands at the default 32 bits,
// including carry-out and carry-in.
module pg_adder_tb;

  localparam int NS = 4;
  localparam int NL = 32;

  logic [NS-1:0] ps, gs, rs;
  logic          c0s, couts;
  logic [NL-1:0] pl, gl, rl;
  logic          c0l, coutl;

  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;

  pg_adder #(.N(NS)) dut_s (.p(ps), .g(gs), .c0(c0s), .r(rs), .cout(couts));
  pg_adder           dut_l (.p(pl), .g(gl), .c0(c0l), .r(rl), .cout(coutl));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [NS-1:0] a, b;
      logic [NS:0]   s;
      {c0s, a, b} = 9'(v);
      ps = a ^ b; gs = a & b;
      s = {1'b0, a} + {1'b0, b} + (NS+1)'(c0s);
      @(posedge clk);
      checks++;
      if ({couts, rs} !== s) begin
        failures++;
        $display("FAIL N4 a=%h b=%h c0=%b: got %b_%h exp %h", a, b, c0s, couts, rs, s);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      logic [NL-1:0] a, b;
      logic [NL:0]   s;
      a = $urandom; b = $urandom; c0l = 1'($urandom);
      if (t % 8 == 0) b = ~a;   // full-length carry chain when c0 = 1
      pl = a ^ b; gl = a & b;
      s = {1'b0, a} + {1'b0, b} + (NL+1)'(c0l);
      @(posedge clk);
      checks++;
      if ({coutl, rl} !== s) begin
        failures++;
        if (failures < 20) $display("FAIL N32 a=%h b=%h c0=%b: got %b_%h exp %h", a, b, c0l, coutl, rl, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
