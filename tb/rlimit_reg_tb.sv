// rlimit_reg_tb: checks reset, load-on-write-enable and hold of R_limit.
// A model register in the testbench tracks the expected value each cycle.
module rlimit_reg_tb;

  localparam int N = 32;

  logic         clk = 1'b0, rst_n, we;
  logic [N-1:0] d, q, model;
  int           checks = 0, failures = 0, cycles = 0;
  int           n_writes = 0, n_holds = 0;

  rlimit_reg dut (.clk(clk), .rst_n(rst_n), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; d = '1; model = '0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: q=%h", q); end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom);
      d  = $urandom;
      @(posedge clk);
      if (we) begin model = d; n_writes++; end else n_holds++;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 20) $display("FAIL cycle %0d: q=%h exp %h", t, q, model);
      end
    end
    // Asynchronous reset in mid-cycle.
    @(negedge clk);
    #2 rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async reset: q=%h", q); end
    if (n_writes == 0 || n_holds == 0) begin failures++; $display("FAIL: write/hold not both exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
