// tb_acm: end-to-end check of the access-control memory through its bus.
// Locked: writes are dropped, reads return the reset value, code registers
// read back as the reset value. After the right code is presented the status
// shows matched and the array works; a wrong code relocks it. The code can be
// changed only while matched, after which the new code must be presented.
// lock relocks at once. Runs the single and the redundant variant; the
// redundant one also gets a forced flip of one matching register.
module tb_acm;
  import fessd_pkg::*;
  localparam int           MW  = 64;
  localparam int           AW  = $clog2(MW) + 1;
  localparam logic [31:0]  RV  = 32'h0;
  localparam logic [127:0] FC  = 128'h11112222_33334444_55556666_77778888;
  localparam logic [31:0]  REG = 32'(1) << (AW - 1);

  logic     clk = 0, rst_n = 0, lock = 0;
  acm_req_t req [2];
  acm_rsp_t rsp [2];
  logic     matched [2];
  int       checks = 0, failures = 0;

  acm #(.MEM_WORDS(MW), .REDUNDANT(1'b0), .FACTORY_CODE(FC)) dut0 (
    .clk(clk), .rst_n(rst_n), .req(req[0]), .rsp(rsp[0]), .lock(lock), .matched(matched[0]));
  acm #(.MEM_WORDS(MW), .REDUNDANT(1'b1), .FACTORY_CODE(FC)) dut1 (
    .clk(clk), .rst_n(rst_n), .req(req[1]), .rsp(rsp[1]), .lock(lock), .matched(matched[1]));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one access on DUT d; returns the response seen the next cycle
  task automatic access(input int d, input logic we, input logic [31:0] addr,
                        input logic [31:0] wd, output acm_rsp_t r);
    @(negedge clk);
    req[d] = '0;
    req[d].valid = 1; req[d].we = we; req[d].addr = addr; req[d].wdata = wd;
    @(negedge clk);
    req[d] = '0;
    r = rsp[d];
  endtask

  task automatic present(input int d, input logic [127:0] c);
    acm_rsp_t r;
    for (int i = 0; i < 4; i++) begin
      access(d, 1, REG + 32'(OFF_PRESENT) + 32'(i), c[32*i +: 32], r);
      chk(r.valid && r.ok, "presented word accepted");
    end
  endtask

  task automatic run(input int d);
    acm_rsp_t     r;
    logic [31:0]  v [8];
    logic [127:0] c2;
    // locked
    access(d, 1, 32'd5, 32'hdead_0005, r);
    chk(r.valid && !r.ok, "locked write refused");
    access(d, 0, 32'd5, 32'h0, r);
    chk(r.valid && !r.ok && r.rdata == RV, "locked read returns reset value");
    access(d, 0, REG + 32'(OFF_STATUS), 32'h0, r);
    chk(r.ok && r.rdata[0] == 1'b0, "status unmatched");
    // wrong code
    present(d, ~FC);
    access(d, 0, REG + 32'(OFF_STATUS), 32'h0, r);
    chk(r.rdata[0] == 1'b0 && !matched[d], "wrong code not matched");
    // right code
    present(d, FC);
    access(d, 0, REG + 32'(OFF_STATUS), 32'h0, r);
    chk(r.rdata[0] == 1'b1 && matched[d], "right code matched");
    for (int i = 0; i < 8; i++) begin
      v[i] = $urandom;
      access(d, 1, 32'(8 + i), v[i], r);
      chk(r.ok, "matched write ok");
    end
    for (int i = 0; i < 8; i++) begin
      access(d, 0, 32'(8 + i), 32'h0, r);
      chk(r.ok && r.rdata == v[i], "matched read back");
    end
    // code registers are write-only
    for (int i = 0; i < 8; i++) begin
      access(d, 0, REG + 32'(i), 32'h0, r);
      chk(!r.ok && r.rdata == RV, "code register reads as reset value");
    end
    // relock by presenting a wrong code: data stays hidden
    present(d, FC ^ 128'h1);
    access(d, 0, 32'd8, 32'h0, r);
    chk(!r.ok && r.rdata == RV, "relocked read hidden");
    access(d, 1, 32'd8, 32'h1234_5678, r);
    chk(!r.ok, "relocked write refused");
    // code update refused while unmatched
    c2 = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 4; i++) access(d, 1, REG + 32'(OFF_NEWCODE) + 32'(i), c2[32*i +: 32], r);
    chk(!r.ok, "update refused when unmatched");
    present(d, c2);
    access(d, 0, REG + 32'(OFF_STATUS), 32'h0, r);
    chk(r.rdata[0] == 1'b0, "unauthorised new code not in force");
    // authorised update
    present(d, FC);
    for (int i = 0; i < 4; i++) access(d, 1, REG + 32'(OFF_NEWCODE) + 32'(i), c2[32*i +: 32], r);
    chk(r.ok, "update accepted when matched");
    access(d, 0, REG + 32'(OFF_STATUS), 32'h0, r);
    chk(r.rdata[0] == 1'b0, "old code no longer matches");
    present(d, c2);
    access(d, 0, 32'd8, 32'h0, r);
    chk(r.ok && r.rdata == v[0], "new code opens memory, old data intact");
    // hot-plug lock
    @(negedge clk) lock = 1;
    @(negedge clk) lock = 0;
    access(d, 0, 32'd9, 32'h0, r);
    chk(!r.ok && r.rdata == RV, "lock relocks");
    present(d, c2);
    // put the code back for the next run
    for (int i = 0; i < 4; i++) access(d, 1, REG + 32'(OFF_NEWCODE) + 32'(i), FC[32*i +: 32], r);
    chk(r.ok, "restore code");
  endtask

  initial begin
    req[0] = '0; req[1] = '0;
    #22 rst_n = 1;
    run(0);
    run(1);
    // fault injection on one matching register of the redundant variant:
    // memory stays locked and the register recovers at the next edge
    begin
      acm_rsp_t r;
      present(1, ~FC);
      @(negedge clk);
      force dut1.u_mreg0.matched = 1'b1;
      #1 chk(!matched[1], "redundant: one flipped register does not unlock");
      @(negedge clk);
      release dut1.u_mreg0.matched;
      @(negedge clk);
      chk(dut1.u_mreg0.matched == 1'b0, "flipped register recovered");
      access(1, 0, 32'd8, 32'h0, r);
      chk(!r.ok, "still locked after fault");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
