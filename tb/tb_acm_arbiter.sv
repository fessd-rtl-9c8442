// tb_acm_arbiter: three masters issue random requests that they hold until
// granted. Checks: the winner is the round-robin choice of a reference model,
// the forwarded request is the winner's, each response reaches only the master
// granted the cycle before, and no master waits more than N cycles.
module tb_acm_arbiter;
  import fessd_pkg::*;
  localparam int N = 3;
  logic     clk = 0, rst_n = 0;
  acm_req_t m_req [N];
  logic     m_gnt [N];
  acm_rsp_t m_rsp [N];
  acm_req_t s_req;
  acm_rsp_t s_rsp;
  int       checks = 0, failures = 0;
  int       last = N - 1, wait_cnt [N], prev_win = -1, grants [N];
  logic [31:0] prev_addr;

  acm_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .m_req(m_req), .m_gnt(m_gnt),
                            .m_rsp(m_rsp), .s_req(s_req), .s_rsp(s_rsp));

  always #5 clk = ~clk;

  // slave: answers one cycle later with a function of the address
  always_ff @(posedge clk) begin
    s_rsp.valid <= s_req.valid;
    s_rsp.ok    <= 1'b1;
    s_rsp.rdata <= s_req.addr ^ 32'ha5a5_0000;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      m_req[i] = '0; wait_cnt[i] = 0; grants[i] = 0;
    end
    #22 rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 600; cyc++) begin
      int exp_win;
      // responses for last cycle's winner
      for (int i = 0; i < N; i++) begin
        if (prev_win == i)
          chk(m_rsp[i].valid && m_rsp[i].rdata == (prev_addr ^ 32'ha5a5_0000), "response routed");
        else
          chk(!m_rsp[i].valid, "no stray response");
      end
      // new requests
      for (int i = 0; i < N; i++) begin
        if (!m_req[i].valid && ($urandom % 3 != 0)) begin
          m_req[i].valid = 1;
          m_req[i].we    = 1'($urandom);
          m_req[i].addr  = {8'(i), 24'($urandom)};
          m_req[i].wdata = $urandom;
        end
      end
      #1;
      exp_win = -1;
      for (int k = 1; k <= N; k++) begin
        automatic int idx = (last + k) % N;
        if (exp_win < 0 && m_req[idx].valid) exp_win = idx;
      end
      for (int i = 0; i < N; i++) chk(m_gnt[i] == (i == exp_win), "round-robin winner");
      if (exp_win >= 0) begin
        chk(s_req == m_req[exp_win], "forwarded request");
        last = exp_win;
        grants[exp_win]++;
        prev_addr = m_req[exp_win].addr;
      end else begin
        chk(!s_req.valid, "idle slave");
      end
      prev_win = exp_win;
      for (int i = 0; i < N; i++) begin
        if (m_req[i].valid && i != exp_win) begin
          wait_cnt[i]++;
          chk(wait_cnt[i] < N, "bounded wait");
        end else wait_cnt[i] = 0;
      end
      @(negedge clk);
      if (exp_win >= 0) m_req[exp_win] = '0;
    end
    for (int i = 0; i < N; i++) chk(grants[i] > 50, "every master served");
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
