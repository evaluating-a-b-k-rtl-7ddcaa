// akb_kconst_detector_tb: checks the constant-K detector for several constants.
//
// Instances: K = 0 (the zero detector, default width 32), an alternating
// pattern at width 32, and every K at width 4 (exhaustive over a, b, c0).
// The reference is integer addition compared with the constant.
module akb_kconst_detector_tb;

  localparam int NL = 32;
  localparam logic [NL-1:0] KPAT = 32'hA5C3_0F96;
  localparam int NS = 4;

  logic [NL-1:0] pl, gl;
  logic          c0l, eq_zero, eq_pat;
  logic [NS-1:0] ps, gs;
  logic          c0s;
  logic [15:0]   eq_s;

  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;
  int   hits = 0;

  akb_kconst_detector                       dut_zero (.p(pl), .g(gl), .c0(c0l), .eq(eq_zero));
  akb_kconst_detector #(.N(NL), .K(KPAT))   dut_pat  (.p(pl), .g(gl), .c0(c0l), .eq(eq_pat));

  for (genvar kk = 0; kk < 16; kk++) begin : g_small
    akb_kconst_detector #(.N(NS), .K(NS'(kk))) dut_s (.p(ps), .g(gs), .c0(c0s), .eq(eq_s[kk]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (exp) hits++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    // Exhaustive at N = 4, all sixteen constants at once.
    for (int v = 0; v < 512; v++) begin
      logic [NS-1:0] a, b, s;
      {c0s, a, b} = 9'(v);
      ps = a ^ b; gs = a & b;
      s = a + b + NS'(c0s);
      @(posedge clk);
      for (int kk = 0; kk < 16; kk++)
        check(eq_s[kk], s == NS'(kk), $sformatf("N4 K=%0d a=%h b=%h c0=%b", kk, a, b, c0s));
    end
    // Random at N = 32, steering toward both constants often.
    for (int t = 0; t < 20000; t++) begin
      logic [NL-1:0] a, b, s;
      a = $urandom; c0l = 1'($urandom);
      unique case (t % 4)
        0: b = -a - NL'(c0l);               // sum = 0
        1: b = KPAT - a - NL'(c0l);         // sum = KPAT
        2: b = (KPAT - a - NL'(c0l)) ^ (NL'(1) << ($urandom % NL));
        default: b = $urandom;
      endcase
      s = a + b + NL'(c0l);
      pl = a ^ b; gl = a & b;
      @(posedge clk);
      check(eq_zero, s == '0, $sformatf("K=0 a=%h b=%h c0=%b", a, b, c0l));
      check(eq_pat, s == KPAT, $sformatf("K=pat a=%h b=%h c0=%b", a, b, c0l));
    end
    if (hits == 0) begin
      failures++;
      $display("FAIL: no matching case was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
