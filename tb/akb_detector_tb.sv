// akb_detector_tb: checks the A + B = K detector against integer addition.
//
// Part 1 (N = 4): every a, b, k and carry-in (8192 cases) with p = a^b and
//   g = a&b; eq must equal ((a + b + c0) mod 16 == k).
// Part 2 (N = 32, the default width): random operands, with k set to the true
//   sum, the sum with one bit flipped, or a random value, so both outcomes are
//   exercised often.
// Part 3 (N = 32): arbitrary p/g pairs (including p = g = 1, which an operand
//   modifier may produce); the reference sum is the carry recurrence computed
//   here bit by bit.
// Part 4 (N = 64): random operands, to show the same cell works at any width.
module akb_detector_tb;

  localparam int NS = 4;
  localparam int NL = 32;
  localparam int NW = 64;

  logic [NW-1:0] pw, gw, kw;
  logic          c0w, eqw;

  logic [NS-1:0] ps, gs, ks;
  logic          c0s, eqs;
  logic [NL-1:0] pl, gl, kl;
  logic          c0l, eql;

  logic clk = 1'b0;
  int   checks = 0, failures = 0, cycles = 0;
  int   n_true = 0, n_false = 0;

  akb_detector #(.N(NS)) dut_s (.p(ps), .g(gs), .k(ks), .c0(c0s), .eq(eqs));
  akb_detector           dut_l (.p(pl), .g(gl), .k(kl), .c0(c0l), .eq(eql));
  akb_detector #(.N(NW)) dut_w (.p(pw), .g(gw), .k(kw), .c0(c0w), .eq(eqw));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: ripple the carry recurrence over arbitrary p/g.
  function automatic logic [NL-1:0] ref_sum(logic [NL-1:0] p, logic [NL-1:0] g, logic c);
    logic [NL-1:0] r;
    for (int i = 0; i < NL; i++) begin
      r[i] = p[i] ^ c;
      c    = (p[i] & c) | g[i];
    end
    return r;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (exp) n_true++; else n_false++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    // Part 1: exhaustive at N = 4.
    for (int v = 0; v < (1 << (3 * NS + 1)); v++) begin
      logic [NS-1:0] a, b, k;
      logic [NS:0]   sum;
      {c0s, a, b, k} = (3 * NS + 1)'(v);
      ps = a ^ b; gs = a & b; ks = k;
      sum = {1'b0, a} + {1'b0, b} + {{NS{1'b0}}, c0s};
      @(posedge clk);
      check(eqs, sum[NS-1:0] == k, $sformatf("N4 a=%h b=%h c0=%b k=%h", a, b, c0s, k));
    end
    // Part 2: random operands at N = 32.
    for (int t = 0; t < 20000; t++) begin
      logic [NL-1:0] a, b, s;
      int unsigned sel;
      a = $urandom; b = $urandom; c0l = 1'($urandom);
      if (t % 4 == 0) b = -a;               // A + B = 0 cases
      s = a + b + NL'(c0l);
      sel = $urandom % 3;
      unique case (sel)
        0: kl = s;
        1: kl = s ^ (NL'(1) << ($urandom % NL));
        default: kl = $urandom;
      endcase
      pl = a ^ b; gl = a & b;
      @(posedge clk);
      check(eql, s == kl, $sformatf("N32 a=%h b=%h c0=%b k=%h", a, b, c0l, kl));
    end
    // Part 3: arbitrary p/g at N = 32.
    for (int t = 0; t < 20000; t++) begin
      logic [NL-1:0] s;
      pl = $urandom; gl = $urandom & $urandom; c0l = 1'($urandom);
      s  = ref_sum(pl, gl, c0l);
      kl = (t % 2 == 0) ? s : s ^ (NL'(1) << ($urandom % NL));
      @(posedge clk);
      check(eql, s == kl, $sformatf("pg p=%h g=%h c0=%b k=%h", pl, gl, c0l, kl));
    end
    // Part 4: random operands at N = 64.
    for (int t = 0; t < 10000; t++) begin
      logic [NW-1:0] a, b, s;
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c0w = 1'($urandom);
      if (t % 3 == 0) b = -a - NW'(c0w);
      s = a + b + NW'(c0w);
      kw = (t % 2 == 0) ? s : s ^ (NW'(1) << ($urandom % NW));
      pw = a ^ b; gw = a & b;
      @(posedge clk);
      check(eqw, s == kw, $sformatf("N64 a=%h b=%h c0=%b k=%h", a, b, c0w, kw));
    end
    if (n_true == 0 || n_false == 0) begin
      failures++;
      $display("FAIL: both outcomes not exercised (%0d true, %0d false)", n_true, n_false);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
