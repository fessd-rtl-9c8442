// tb_acm_nvm_array: writes random words to a small array, reads them back
// (data must appear exactly one cycle after the read), and checks that a
// read-disabled cycle keeps the output.
module tb_acm_nvm_array;
  localparam int DEPTH = 64;
  logic        clk = 0, en = 0, we = 0;
  logic [5:0]  addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] ref_mem [DEPTH];
  int          checks = 0, failures = 0;

  acm_nvm_array #(.DEPTH(DEPTH), .DATA_W(32)) dut (
    .clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 6'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = 1; addr = 6'($urandom);
      we = ($urandom % 3) == 0;
      wdata = $urandom;
      if (we) begin
        ref_mem[addr] = wdata;
      end else begin
        logic [31:0] e;
        e = ref_mem[addr];
        @(negedge clk);
        en = 0; we = 0;
        checks++;
        if (rdata !== e) begin
          failures++;
          $display("FAIL read addr=%0d got %h exp %h", addr, rdata, e);
        end
        @(negedge clk);
        checks++;
        if (rdata !== e) begin
          failures++;
          $display("FAIL hold addr=%0d got %h exp %h", addr, rdata, e);
        end
      end
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
