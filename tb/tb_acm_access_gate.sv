// tb_acm_access_gate: checks that writes pass only while matched and that
// read data is passed only for a matched read, else the reset value.
module tb_acm_access_gate;
  localparam logic [31:0] RV = 32'h5a5a_0f0f;
  logic        matched, we_in, we_out, rd_matched;
  logic [31:0] rdata_in, rdata_out;
  int          checks = 0, failures = 0;

  acm_access_gate #(.DATA_W(32), .RESET_VALUE(RV)) dut (
    .matched(matched), .we_in(we_in), .we_out(we_out),
    .rd_matched(rd_matched), .rdata_in(rdata_in), .rdata_out(rdata_out));

  initial begin
    for (int n = 0; n < 400; n++) begin
      matched    = 1'($urandom);
      we_in      = 1'($urandom);
      rd_matched = 1'($urandom);
      rdata_in   = $urandom;
      #1;
      checks++;
      if (we_out !== (we_in && matched)) begin
        failures++;
        $display("FAIL we: m=%b we=%b out=%b", matched, we_in, we_out);
      end
      checks++;
      if (rdata_out !== (rd_matched ? rdata_in : RV)) begin
        failures++;
        $display("FAIL rdata: rm=%b in=%h out=%h", rd_matched, rdata_in, rdata_out);
      end
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
