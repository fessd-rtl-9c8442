// tb_acm_code_regs: checks the access-code registers: the stored code starts
// at the factory value and survives reset; presented-code writes land word by
// word; a new code is taken only when matched is high on its last word; lock
// and reset clear the presented code.
module tb_acm_code_regs;
  import fessd_pkg::*;
  localparam logic [127:0] FC = 128'hdeadbeef_01234567_89abcdef_cafef00d;
  logic         clk = 0, rst_n = 0, wr_en = 0, matched = 0, lock = 0;
  logic [3:0]   wr_off = 0;
  logic [31:0]  wr_data = 0;
  logic [127:0] presented, internal;
  logic         updated;
  int           checks = 0, failures = 0;

  acm_code_regs #(.FACTORY_CODE(FC)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_off(wr_off), .wr_data(wr_data),
    .matched(matched), .lock(lock), .presented(presented), .internal(internal),
    .updated(updated));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (presented=%h internal=%h)", what, presented, internal);
    end
  endtask

  task automatic wr(input logic [3:0] off, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_off = off; wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic write_code(input logic [3:0] base, input logic [127:0] c);
    for (int i = 0; i < 4; i++) wr(base + 4'(i), c[32*i +: 32]);
  endtask

  logic [127:0] c1, c2;
  logic         saw_upd;

  always @(posedge clk) if (updated) saw_upd <= 1'b1;

  initial begin
    saw_upd = 0;
    #22 rst_n = 1;
    chk(internal == FC, "factory code");
    chk(presented == '0, "presented cleared");
    c1 = {$urandom, $urandom, $urandom, $urandom};
    write_code(OFF_PRESENT, c1);
    chk(presented == c1, "presented written");
    chk(internal == FC, "internal untouched by present");
    // update attempt while not matched
    c2 = {$urandom, $urandom, $urandom, $urandom};
    matched = 0;
    write_code(OFF_NEWCODE, c2);
    @(negedge clk);
    chk(internal == FC, "update refused when not matched");
    chk(!saw_upd, "no update pulse");
    // update while matched
    matched = 1;
    write_code(OFF_NEWCODE, c2);
    @(negedge clk);
    chk(internal == c2, "update accepted when matched");
    chk(saw_upd, "update pulse");
    // matched only during the first words but not the last: refused
    saw_upd = 0;
    for (int i = 0; i < 3; i++) wr(OFF_NEWCODE + 4'(i), c1[32*i +: 32]);
    matched = 0;
    wr(OFF_NEWCODE + 4'd3, c1[127:96]);
    @(negedge clk);
    chk(internal == c2, "refused when unmatched at last word");
    chk(!saw_upd, "no pulse on refused");
    // status offset write has no effect
    wr(OFF_STATUS, 32'hffff_ffff);
    chk(internal == c2 && presented == c1, "status write ignored");
    // lock clears presented
    @(negedge clk) lock = 1;
    @(negedge clk) lock = 0;
    chk(presented == '0, "lock clears presented");
    chk(internal == c2, "lock keeps internal");
    // reset keeps the non-volatile code
    write_code(OFF_PRESENT, c1);
    rst_n = 0;
    #3 chk(presented == '0, "reset clears presented");
    rst_n = 1;
    @(negedge clk);
    chk(internal == c2, "reset keeps internal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
