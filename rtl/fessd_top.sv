// fessd_top: encrypted-SSD write path built around an access-control memory.
//
// The write buffer is an on-chip non-volatile access-control memory (acm):
// host data is stored there in plain form and committed at once, because the
// memory itself refuses every access until the right access code has been
// presented. Encryption happens later, in the background, on the way to flash
// (wb_ctrl). Three masters share the ACM through a round-robin arbiter:
//   port 0  firmware bus (fw_*): presents or changes the access code, reads
//           status; may also touch the buffer, subject to the same control
//   port 1  host-write path of wb_ctrl
//   port 2  flush path of wb_ctrl
// The encryption engine, the flash packages and the host interface are
// outside this design; their streams are ports here. bus_lock models the
// host bus being disconnected and relocks the memory at once.
//
// Sizes follow the FESSD proposal's main configuration: 1 MB buffer of 512-byte
// sectors (2048 slots), 128-bit access code and keys. The 32-bit bus, the
// slot layout and the arbitration are this design's own choices.
module fessd_top
  import fessd_pkg::*;
#(
  parameter int unsigned       BUF_BYTES    = 1048576,
  parameter int unsigned       SECTOR_BYTES = 512,
  parameter int unsigned       LBA_W        = 32,
  parameter bit                REDUNDANT    = 1'b0,
  parameter logic [CODE_W-1:0] FACTORY_CODE = 128'h0123456789abcdef_fedcba9876543210,
  parameter int unsigned       NSLOTS       = BUF_BYTES / SECTOR_BYTES,
  parameter int unsigned       WORDS        = SECTOR_BYTES / (DATA_W / 8),
  parameter int unsigned       SW           = (NSLOTS > 1) ? $clog2(NSLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_lock,
  output logic              matched,
  // firmware bus
  input  acm_req_t          fw_req,
  output logic              fw_gnt,
  output acm_rsp_t          fw_rsp,
  // host sector writes
  input  logic              host_cmd_valid,
  output logic              host_cmd_ready,
  input  logic [LBA_W-1:0]  host_cmd_lba,
  input  logic [KEY_W-1:0]  host_cmd_key,
  input  logic              host_dat_valid,
  output logic              host_dat_ready,
  input  logic [DATA_W-1:0] host_dat,
  output logic              host_done,
  output logic              host_ok,
  // encryption engine
  output logic              enc_key_valid,
  input  logic              enc_key_ready,
  output logic [KEY_W-1:0]  enc_key,
  output logic              enc_in_valid,
  input  logic              enc_in_ready,
  output logic [DATA_W-1:0] enc_in_data,
  input  logic              enc_out_valid,
  output logic              enc_out_ready,
  input  logic [DATA_W-1:0] enc_out_data,
  // flash program
  output logic              flash_cmd_valid,
  input  logic              flash_cmd_ready,
  output logic [LBA_W-1:0]  flash_cmd_lba,
  output logic              flash_dat_valid,
  input  logic              flash_dat_ready,
  output logic [DATA_W-1:0] flash_dat,
  // status and events
  output logic [SW:0]       occupancy,
  output logic              ev_hit,
  output logic              ev_full_stall,
  output logic              ev_flush_done,
  output logic              ev_flush_retry
);
  localparam int unsigned MEM_WORDS = NSLOTS * (WORDS + KEY_WORDS);

  acm_req_t m_req [3];
  logic     m_gnt [3];
  acm_rsp_t m_rsp [3];
  acm_req_t s_req;
  acm_rsp_t s_rsp;

  assign m_req[0] = fw_req;
  assign fw_gnt   = m_gnt[0];
  assign fw_rsp   = m_rsp[0];

  acm_arbiter #(.N(3)) u_arb (
    .clk(clk), .rst_n(rst_n),
    .m_req(m_req), .m_gnt(m_gnt), .m_rsp(m_rsp),
    .s_req(s_req), .s_rsp(s_rsp)
  );

  acm #(
    .MEM_WORDS   (MEM_WORDS),
    .REDUNDANT   (REDUNDANT),
    .FACTORY_CODE(FACTORY_CODE)
  ) u_acm (
    .clk(clk), .rst_n(rst_n),
    .req(s_req), .rsp(s_rsp),
    .lock(bus_lock), .matched(matched)
  );

  wb_ctrl #(.NSLOTS(NSLOTS), .WORDS(WORDS), .LBA_W(LBA_W)) u_wb (
    .clk(clk), .rst_n(rst_n),
    .host_cmd_valid(host_cmd_valid), .host_cmd_ready(host_cmd_ready),
    .host_cmd_lba(host_cmd_lba), .host_cmd_key(host_cmd_key),
    .host_dat_valid(host_dat_valid), .host_dat_ready(host_dat_ready), .host_dat(host_dat),
    .host_done(host_done), .host_ok(host_ok),
    .wr_req(m_req[1]), .wr_gnt(m_gnt[1]), .wr_rsp(m_rsp[1]),
    .fs_req(m_req[2]), .fs_gnt(m_gnt[2]), .fs_rsp(m_rsp[2]),
    .enc_key_valid(enc_key_valid), .enc_key_ready(enc_key_ready), .enc_key(enc_key),
    .enc_in_valid(enc_in_valid), .enc_in_ready(enc_in_ready), .enc_in_data(enc_in_data),
    .enc_out_valid(enc_out_valid), .enc_out_ready(enc_out_ready), .enc_out_data(enc_out_data),
    .flash_cmd_valid(flash_cmd_valid), .flash_cmd_ready(flash_cmd_ready), .flash_cmd_lba(flash_cmd_lba),
    .flash_dat_valid(flash_dat_valid), .flash_dat_ready(flash_dat_ready), .flash_dat(flash_dat),
    .occupancy(occupancy), .ev_hit(ev_hit), .ev_full_stall(ev_full_stall),
    .ev_flush_done(ev_flush_done), .ev_flush_retry(ev_flush_retry)
  );
endmodule
