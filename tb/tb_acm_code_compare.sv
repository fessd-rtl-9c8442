// tb_acm_code_compare: checks the 128-bit access-code comparator on equal
// codes, codes differing in one bit (every position) and random pairs.
module tb_acm_code_compare;
  logic [127:0] a, b;
  logic         eq;
  int           checks = 0, failures = 0;

  acm_code_compare #(.CODE_W(128)) dut (.a(a), .b(b), .eq(eq));

  task automatic check(input logic exp);
    #1;
    checks++;
    if (eq !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h eq=%b exp=%b", a, b, eq, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 50; n++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = a;
      check(1'b1);
    end
    for (int bit_i = 0; bit_i < 128; bit_i++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = a;
      b[bit_i] = ~b[bit_i];
      check(1'b0);
    end
    for (int n = 0; n < 50; n++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      check(a == b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
