// tb_acm_match_reg: checks the matching register: cleared by reset, follows
// the comparator one cycle later, recovers from a one-cycle wrong input at the
// next edge, and is forced low by lock.
module tb_acm_match_reg;
  logic clk = 0, rst_n = 0, eq = 0, lock = 0, matched;
  int   checks = 0, failures = 0;
  logic exp_q;

  acm_match_reg dut (.clk(clk), .rst_n(rst_n), .eq(eq), .lock(lock), .matched(matched));

  always #5 clk = ~clk;

  task automatic expect_m(input logic e, input string what);
    checks++;
    if (matched !== e) begin
      failures++;
      $display("FAIL %s: matched=%b exp=%b", what, matched, e);
    end
  endtask

  initial begin
    eq = 1;
    #12;
    expect_m(1'b0, "in reset");
    rst_n = 1;
    @(negedge clk);
    expect_m(1'b1, "after first edge with eq");
    eq = 0;
    @(negedge clk);
    expect_m(1'b0, "eq dropped");
    // one-cycle glitch on eq: matched follows it for exactly one cycle
    eq = 1;
    @(negedge clk);
    eq = 0;
    expect_m(1'b1, "glitch captured");
    @(negedge clk);
    expect_m(1'b0, "recovered next cycle");
    // lock overrides eq
    eq = 1;
    lock = 1;
    @(negedge clk);
    expect_m(1'b0, "lock");
    lock = 0;
    @(negedge clk);
    expect_m(1'b1, "after lock released");
    // random sequence against a reference
    exp_q = 1'b1;
    for (int n = 0; n < 200; n++) begin
      eq   = 1'($urandom);
      lock = ($urandom % 8) == 0;
      @(negedge clk);
      exp_q = lock ? 1'b0 : eq;
      expect_m(exp_q, "random");
    end
    // asynchronous reset
    eq = 1; lock = 0;
    @(negedge clk);
    #1 rst_n = 0;
    #1 expect_m(1'b0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
