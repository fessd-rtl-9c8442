// acm_arbiter: shares the single access-control-memory port among N bus
// masters (firmware, host-write path, flush path).
//
// Round robin: among the masters with a valid request, the first one after
// the last winner is granted and its request is forwarded in the same cycle;
// m_gnt tells it the request was taken. The ACM answers exactly one cycle
// later and the response is routed back to the master that was granted. A
// master keeps its request up until granted. The FESSD proposal only shows the
// controller and the write buffer sharing the on-chip memory; the arbitration
// scheme is this design's own.
module acm_arbiter
  import fessd_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  acm_req_t m_req [N],
  output logic     m_gnt [N],
  output acm_rsp_t m_rsp [N],
  output acm_req_t s_req,
  input  acm_rsp_t s_rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q, win, win_q;
  logic          any;
  logic [N-1:0]  gnt_vec;

  always_comb begin
    any = 1'b0;
    win = last_q;
    // search N masters starting just after the last winner
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last_q) + k) % N);
      if (!any && m_req[idx].valid) begin
        any = 1'b1;
        win = idx;
      end
    end
    s_req = '0;
    for (int unsigned i = 0; i < N; i++) begin
      m_gnt[i]   = any && (win == IW'(i));
      gnt_vec[i] = m_gnt[i];
      if (m_gnt[i]) s_req = m_req[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
      win_q  <= '0;
    end else begin
      if (any) last_q <= win;
      win_q <= win;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      m_rsp[i] = s_rsp;
      m_rsp[i].valid = s_rsp.valid && (win_q == IW'(i));
    end
  end

  a_onehot_grant : assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(gnt_vec));
endmodule
