// acm_code_regs: access-code registers of the access-control memory.
//
// Holds two codes:
//  * internal - the non-volatile access code given by the manufacturer. It
//    has no reset and powers up at its last value (FACTORY_CODE at
//    manufacture). It can only be replaced while the matching register is
//    set, so only someone who knows the current code can change it.
//  * presented - a volatile register holding the code the firmware sent. It
//    is cleared by reset (power loss) and by lock.
// Both are write-only from the bus; nothing here drives read data.
//
// Interface: one DATA_W-wide write per cycle into the register window at word
// offset wr_off. Offsets 0..CODE_WORDS-1 fill the presented code (word 0 is the
// least significant). Offsets 4..4+CODE_WORDS-1 fill a staging register for a
// new code; the write of the last word makes the update attempt, which
// succeeds if matched is high in that cycle and then pulses updated one cycle
// later together with the new internal value. The word-wise protocol and the
// fact that the presented code is kept (so the memory relocks after an update
// until the new code is presented) are this design's own choices; write-only
// codes and match-only updates follow the FESSD proposal.
module acm_code_regs
  import fessd_pkg::*;
#(
  parameter logic [CODE_W-1:0] FACTORY_CODE = 128'h0123456789abcdef_fedcba9876543210
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [3:0]        wr_off,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              matched,
  input  logic              lock,
  output logic [CODE_W-1:0] presented,
  output logic [CODE_W-1:0] internal,
  output logic              updated
);
  localparam int unsigned LAST = CODE_WORDS - 1;

  logic [CODE_W-1:0] present_q;
  logic [CODE_W-1:0] stage_q;
  logic [CODE_W-1:0] code_q = FACTORY_CODE;  // non-volatile: no reset
  logic [CODE_W-1:0] new_code;
  logic              upd_q;
  logic [3:0]        stage_idx;

  assign stage_idx = wr_off - OFF_NEWCODE;

  // New code as it stands once the current write lands.
  always_comb begin
    new_code = stage_q;
    if (wr_en && wr_off >= OFF_NEWCODE && wr_off < OFF_NEWCODE + 4'(CODE_WORDS))
      new_code[DATA_W*int'(stage_idx) +: DATA_W] = wr_data;
  end

  // Volatile part: presented code, staging register, update pulse.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      present_q <= '0;
      stage_q   <= '0;
      upd_q     <= 1'b0;
    end else begin
      upd_q <= 1'b0;
      if (lock) begin
        present_q <= '0;
      end else if (wr_en && wr_off < OFF_PRESENT + 4'(CODE_WORDS)) begin
        present_q[DATA_W*int'(wr_off) +: DATA_W] <= wr_data;
      end
      stage_q <= new_code;
      if (wr_en && wr_off == OFF_NEWCODE + 4'(LAST) && matched && !lock)
        upd_q <= 1'b1;
    end
  end

  // Non-volatile part: the access code itself.
  always_ff @(posedge clk) begin
    if (wr_en && wr_off == OFF_NEWCODE + 4'(LAST) && matched && !lock)
      code_q <= new_code;
  end

  assign presented = present_q;
  assign internal  = code_q;
  assign updated   = upd_q;
endmodule
