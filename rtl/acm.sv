// acm: the access-control memory.
//
// An on-chip non-volatile memory whose port only works for someone who knows
// the access code. The firmware first writes the code it got from the host
// into the presented-code register; the comparator checks it against the
// internal code every cycle and the matching register holds the result. While
// the matching register is set, array reads and writes go through; otherwise
// writes are dropped and reads return RESET_VALUE. No data is encrypted.
//
// Address map (word addresses, AW = clog2(MEM_WORDS)+1 bits are decoded):
//   addr[AW-1] = 0 : storage array, MEM_WORDS words
//   addr[AW-1] = 1 : register window, offset = addr[3:0]
//       0..3  presented code (write-only, always accepted)
//       4..7  new access code (write-only; update attempted on offset 7,
//             accepted only while matched)
//       8     status, bit 0 = matching register (read-only)
//   reads of any code offset return RESET_VALUE and are reported as refused.
//
// Timing: one request per cycle, always accepted; the response (valid, ok,
// rdata) comes exactly one cycle later. ok tells whether the access control
// let the access through. lock clears the presented code and the matching
// register (bus-interface disconnect). With REDUNDANT = 1 the comparator and
// the matching register are duplicated and access needs both, the
// fault-injection countermeasure the FESSD proposal mentions as optional.
//
// From the FESSD proposal: write-only code at a predefined address, reset values on
// refused reads, code update only while matched, a volatile matching register
// reloaded every cycle and cleared at power-up, AND-gated access. This
// design's own: the register map, the status word, the ok bit and the
// single-cycle bus.
module acm
  import fessd_pkg::*;
#(
  parameter int unsigned       MEM_WORDS    = 270336,
  parameter bit                REDUNDANT    = 1'b0,
  parameter logic [DATA_W-1:0] RESET_VALUE  = '0,
  parameter logic [CODE_W-1:0] FACTORY_CODE = 128'h0123456789abcdef_fedcba9876543210,
  parameter int unsigned       AW           = $clog2(MEM_WORDS) + 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  acm_req_t req,
  output acm_rsp_t rsp,
  input  logic     lock,
  output logic     matched
);
  localparam int unsigned MAW = AW - 1;  // array address width

  logic              is_reg;
  logic [3:0]        off;
  logic [CODE_W-1:0] presented, internal;
  logic              code_updated;
  logic              eq0, m0, m1;
  logic              arr_we;
  logic [DATA_W-1:0] arr_rdata, gated_rdata;

  assign is_reg = req.addr[AW-1];
  assign off    = req.addr[3:0];

  // ---- access code registers -------------------------------------------
  acm_code_regs #(.FACTORY_CODE(FACTORY_CODE)) u_codes (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (req.valid && req.we && is_reg),
    .wr_off   (off),
    .wr_data  (req.wdata),
    .matched  (matched),
    .lock     (lock),
    .presented(presented),
    .internal (internal),
    .updated  (code_updated)
  );

  // ---- comparison logic and matching register(s) -------------------------
  acm_code_compare #(.CODE_W(CODE_W)) u_cmp0 (.a(presented), .b(internal), .eq(eq0));
  acm_match_reg u_mreg0 (.clk(clk), .rst_n(rst_n), .eq(eq0), .lock(lock), .matched(m0));

  if (REDUNDANT) begin : g_redundant
    logic eq1;
    acm_code_compare #(.CODE_W(CODE_W)) u_cmp1 (.a(presented), .b(internal), .eq(eq1));
    acm_match_reg u_mreg1 (.clk(clk), .rst_n(rst_n), .eq(eq1), .lock(lock), .matched(m1));
  end else begin : g_single
    assign m1 = m0;
  end

  assign matched = m0 & m1;

  // ---- gated storage array ------------------------------------------------
  logic              rd_matched_q;
  logic              valid_q, we_q, is_reg_q;
  logic [3:0]        off_q;

  acm_access_gate #(.DATA_W(DATA_W), .RESET_VALUE(RESET_VALUE)) u_gate (
    .matched   (matched),
    .we_in     (req.valid && req.we && !is_reg),
    .we_out    (arr_we),
    .rd_matched(rd_matched_q),
    .rdata_in  (arr_rdata),
    .rdata_out (gated_rdata)
  );

  acm_nvm_array #(.DEPTH(MEM_WORDS), .DATA_W(DATA_W), .AW(MAW)) u_array (
    .clk  (clk),
    .en   (req.valid && !is_reg && (!req.we || arr_we)),
    .we   (arr_we),
    .addr (req.addr[MAW-1:0]),
    .wdata(req.wdata),
    .rdata(arr_rdata)
  );

  // ---- response, one cycle after the request --------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= 1'b0;
      we_q         <= 1'b0;
      is_reg_q     <= 1'b0;
      off_q        <= '0;
      rd_matched_q <= 1'b0;
    end else begin
      valid_q      <= req.valid;
      we_q         <= req.we;
      is_reg_q     <= is_reg;
      off_q        <= off;
      rd_matched_q <= matched;
    end
  end

  always_comb begin
    rsp       = '0;
    rsp.valid = valid_q;
    if (!is_reg_q) begin
      rsp.ok    = rd_matched_q;
      rsp.rdata = gated_rdata;
    end else if (we_q) begin
      // presented-code writes are always taken; a new-code word is taken while
      // matched, and its last word only if the update happened
      if (off_q < OFF_PRESENT + 4'(CODE_WORDS))
        rsp.ok = 1'b1;
      else if (off_q == OFF_NEWCODE + 4'(CODE_WORDS - 1))
        rsp.ok = code_updated;
      else if (off_q >= OFF_NEWCODE && off_q < OFF_NEWCODE + 4'(CODE_WORDS))
        rsp.ok = rd_matched_q;
      else
        rsp.ok = 1'b0;
      rsp.rdata = RESET_VALUE;
    end else if (off_q == OFF_STATUS) begin
      rsp.ok    = 1'b1;
      rsp.rdata = RESET_VALUE;
      rsp.rdata[0] = rd_matched_q;
    end else begin
      rsp.ok    = 1'b0;            // code registers cannot be read
      rsp.rdata = RESET_VALUE;
    end
  end

  // A refused access must never show anything but the reset value.
  a_refused_read : assert property (@(posedge clk) disable iff (!rst_n)
      (rsp.valid && !rsp.ok) |-> rsp.rdata == RESET_VALUE);
endmodule
