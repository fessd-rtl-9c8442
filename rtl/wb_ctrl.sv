// wb_ctrl: secure write-buffer controller of the encrypted SSD.
//
// Host writes land in the access-control memory (ACM) unencrypted, with the
// sector's encryption key next to them, and are committed as soon as the ACM
// has taken them: the host never waits for encryption. In the background the
// oldest buffered sector is read back, sent with its key through the external
// encryption engine, and the ciphertext is streamed to flash; then its slot
// is freed. This is the data path the FESSD proposal proposes (there run by
// firmware); doing it in a hardware controller is this design's choice.
//
// Buffer organisation (this design's own): NSLOTS sector slots used as a
// ring. Slot s keeps its WORDS data words at ACM word address s*WORDS and its
// KEY_WORDS key words at NSLOTS*WORDS + s*KEY_WORDS. Valid bits and LBAs of
// the slots are kept here. A write to an LBA that is already buffered (and not
// being flushed at that moment) overwrites that slot in place, so the same
// data is not encrypted twice. A write that finds the buffer full and misses
// is held off (host_cmd_ready low) until a flush frees a slot.
//
// Host side: host_cmd (lba, key) is accepted with valid/ready, then WORDS data
// words follow on host_dat with valid/ready. When the ACM has answered every
// write, host_done pulses for one cycle with host_ok = 1 if all were granted.
// A refused write (ACM locked) commits nothing. Minimum time from command
// acceptance to host_done is 1 + KEY_WORDS + WORDS + 1 cycles with an
// uncontended ACM port and data always valid.
//
// Flush side: read KEY_WORDS key words, hand the key to enc_key and the LBA to
// flash_cmd, stream the data words into enc_in (up to 3 reads in flight via a
// small FIFO) while enc_out is passed straight to flash_dat. A flush whose key
// read is refused is abandoned and retried; one whose data read is refused
// still completes towards flash but keeps its slot and is redone later.
//
// Both ACM ports follow the arbiter protocol: keep req.valid until gnt; the
// response arrives the cycle after the grant.
module wb_ctrl
  import fessd_pkg::*;
#(
  parameter int unsigned NSLOTS = 2048,          // 1 MB / 512 B sectors
  parameter int unsigned WORDS  = 128,           // 32-bit words per 512-byte sector
  parameter int unsigned LBA_W  = 32,
  parameter int unsigned SW     = (NSLOTS > 1) ? $clog2(NSLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
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
  // ACM port of the host-write path (read data unused: it only writes)
  output acm_req_t          wr_req,
  input  logic              wr_gnt,
  input  acm_rsp_t          wr_rsp,
  // ACM port of the flush path
  output acm_req_t          fs_req,
  input  logic              fs_gnt,
  input  acm_rsp_t          fs_rsp,
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
  // status and events (one-cycle pulses)
  output logic [SW:0]       occupancy,
  output logic              ev_hit,         // a write committed into an already buffered slot
  output logic              ev_full_stall,  // a write waits because the buffer is full
  output logic              ev_flush_done,  // a slot was flushed and freed
  output logic              ev_flush_retry  // a flush was abandoned or must be redone
);
  localparam int unsigned TOTAL_WR = KEY_WORDS + WORDS;
  localparam int unsigned KEY_BASE = NSLOTS * WORDS;
  localparam int unsigned WCW      = $clog2(TOTAL_WR + 1);
  localparam int unsigned DCW      = $clog2(WORDS + 1);

  // ---------------------------------------------------------------- slots
  logic [NSLOTS-1:0] valid_q;
  logic [LBA_W-1:0]  lba_q [NSLOTS];
  logic [SW-1:0]     head_q, tail_q;
  logic [SW:0]       count_q;
  logic              full;

  // ------------------------------------------------------ host-write path
  typedef enum logic [1:0] {W_IDLE, W_KEY, W_DATA, W_WAIT} wstate_t;
  wstate_t           w_state;
  logic [SW-1:0]     w_slot;
  logic              w_new;
  logic [LBA_W-1:0]  w_lba;
  logic [KEY_W-1:0]  w_key;
  logic [WCW-1:0]    w_cnt, w_rsp_cnt;
  logic              w_ok;

  // ------------------------------------------------------------ flush path
  typedef enum logic [2:0] {F_IDLE, F_KEY, F_START, F_DATA} fstate_t;
  fstate_t           f_state;
  logic [2:0]        f_kcnt, f_krsp;
  logic [KEY_W-1:0]  f_key;
  logic              f_key_ok, f_data_ok;
  logic              f_key_sent, f_cmd_sent;
  logic [DCW-1:0]    f_rd_cnt, f_out_cnt;
  logic              f_rd_out;              // a read was granted last cycle
  logic [DATA_W-1:0] fifo [4];
  logic [1:0]        fifo_wp, fifo_rp;
  logic [2:0]        fifo_cnt;
  logic              f_busy;

  // ---------------------------------------------------------------- lookup
  logic              hit;
  logic [SW-1:0]     hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < NSLOTS; i++) begin
      if (!hit && valid_q[i] && lba_q[i] == host_cmd_lba &&
          !(f_busy && head_q == SW'(i))) begin
        hit     = 1'b1;
        hit_idx = SW'(i);
      end
    end
  end

  assign full           = (count_q == (SW+1)'(NSLOTS));
  assign f_busy         = (f_state != F_IDLE);
  assign host_cmd_ready = (w_state == W_IDLE) && (hit || !full);
  assign ev_full_stall  = (w_state == W_IDLE) && host_cmd_valid && !hit && full;
  assign occupancy      = count_q;

  logic          cmd_acc;
  logic [SW-1:0] sel_slot;
  assign cmd_acc  = host_cmd_valid && host_cmd_ready;
  assign sel_slot = hit ? hit_idx : tail_q;

  // host-write ACM requests
  always_comb begin
    wr_req = '0;
    case (w_state)
      W_KEY: begin
        wr_req.valid = 1'b1;
        wr_req.we    = 1'b1;
        wr_req.addr  = ADDR_W'(KEY_BASE) + ADDR_W'(w_slot) * ADDR_W'(KEY_WORDS) + ADDR_W'(w_cnt);
        wr_req.wdata = w_key[DATA_W*int'(w_cnt[1:0]) +: DATA_W];
      end
      W_DATA: begin
        wr_req.valid   = host_dat_valid;
        wr_req.we      = 1'b1;
        wr_req.addr    = ADDR_W'(w_slot) * ADDR_W'(WORDS) + ADDR_W'(w_cnt);
        wr_req.wdata   = host_dat;
      end
      default: ;
    endcase
  end

  assign host_dat_ready = (w_state == W_DATA) && wr_gnt;

  logic commit;
  assign commit    = (w_state == W_WAIT) && (w_rsp_cnt == WCW'(TOTAL_WR));
  assign host_done = commit;
  assign host_ok   = w_ok;
  assign ev_hit    = commit && w_ok && !w_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_state   <= W_IDLE;
      w_slot    <= '0;
      w_new     <= 1'b0;
      w_lba     <= '0;
      w_key     <= '0;
      w_cnt     <= '0;
      w_rsp_cnt <= '0;
      w_ok      <= 1'b0;
    end else begin
      if (wr_rsp.valid) begin
        w_rsp_cnt <= w_rsp_cnt + 1'b1;
        w_ok      <= w_ok & wr_rsp.ok;
      end
      case (w_state)
        W_IDLE: if (cmd_acc) begin
          w_state   <= W_KEY;
          w_slot    <= sel_slot;
          w_new     <= !hit;
          w_lba     <= host_cmd_lba;
          w_key     <= host_cmd_key;
          w_cnt     <= '0;
          w_rsp_cnt <= '0;
          w_ok      <= 1'b1;
        end
        W_KEY: if (wr_gnt) begin
          if (w_cnt == WCW'(KEY_WORDS - 1)) begin
            w_state <= W_DATA;
            w_cnt   <= '0;
          end else begin
            w_cnt <= w_cnt + 1'b1;
          end
        end
        W_DATA: if (wr_gnt) begin
          if (w_cnt == WCW'(WORDS - 1)) w_state <= W_WAIT;
          w_cnt <= w_cnt + 1'b1;
        end
        W_WAIT: if (commit) w_state <= W_IDLE;
        default: w_state <= W_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ flush path
  logic f_start, f_free;
  logic rd_issue, fifo_push, fifo_pop, out_hs;

  assign f_start = (f_state == F_IDLE) && valid_q[head_q] && (count_q != '0) &&
                   !((w_state != W_IDLE) && w_slot == head_q) &&
                   !(cmd_acc && sel_slot == head_q);

  always_comb begin
    fs_req = '0;
    case (f_state)
      F_KEY: begin
        fs_req.valid = (f_kcnt != 3'(KEY_WORDS));
        fs_req.addr  = ADDR_W'(KEY_BASE) + ADDR_W'(head_q) * ADDR_W'(KEY_WORDS) + ADDR_W'(f_kcnt);
      end
      F_DATA: begin
        fs_req.valid = (f_rd_cnt != DCW'(WORDS)) &&
                       ((3'(fifo_cnt) + 3'(f_rd_out)) < 3'd3);
        fs_req.addr  = ADDR_W'(head_q) * ADDR_W'(WORDS) + ADDR_W'(f_rd_cnt);
      end
      default: ;
    endcase
  end

  assign rd_issue        = (f_state == F_DATA) && fs_req.valid && fs_gnt;
  assign enc_key_valid   = (f_state == F_START) && !f_key_sent;
  assign enc_key         = f_key;
  assign flash_cmd_valid = (f_state == F_START) && !f_cmd_sent;
  assign flash_cmd_lba   = lba_q[head_q];

  assign fifo_push       = (f_state == F_DATA) && fs_rsp.valid;
  assign enc_in_valid    = (fifo_cnt != '0);
  assign enc_in_data     = fifo[fifo_rp];
  assign fifo_pop        = enc_in_valid && enc_in_ready;

  assign flash_dat_valid = (f_state == F_DATA) && enc_out_valid;
  assign flash_dat       = enc_out_data;
  assign enc_out_ready   = (f_state == F_DATA) && flash_dat_ready;
  assign out_hs          = flash_dat_valid && flash_dat_ready;

  assign f_free          = out_hs && (f_out_cnt == DCW'(WORDS - 1));
  assign ev_flush_done   = f_free && f_data_ok;
  assign ev_flush_retry  = (f_free && !f_data_ok) ||
                           ((f_state == F_KEY) && (f_krsp == 3'(KEY_WORDS)) && !f_key_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_state    <= F_IDLE;
      f_kcnt     <= '0;
      f_krsp     <= '0;
      f_key      <= '0;
      f_key_ok   <= 1'b0;
      f_data_ok  <= 1'b0;
      f_key_sent <= 1'b0;
      f_cmd_sent <= 1'b0;
      f_rd_cnt   <= '0;
      f_out_cnt  <= '0;
      f_rd_out   <= 1'b0;
      fifo_wp    <= '0;
      fifo_rp    <= '0;
      fifo_cnt   <= '0;
    end else begin
      f_rd_out <= rd_issue;
      if (fifo_push) begin
        fifo[fifo_wp] <= fs_rsp.rdata;
        fifo_wp       <= fifo_wp + 1'b1;
        f_data_ok     <= f_data_ok & fs_rsp.ok;
      end
      if (fifo_pop) fifo_rp <= fifo_rp + 1'b1;
      fifo_cnt <= fifo_cnt + 3'(fifo_push) - 3'(fifo_pop);

      case (f_state)
        F_IDLE: if (f_start) begin
          f_state  <= F_KEY;
          f_kcnt   <= '0;
          f_krsp   <= '0;
          f_key_ok <= 1'b1;
        end
        F_KEY: begin
          if (fs_req.valid && fs_gnt) f_kcnt <= f_kcnt + 1'b1;
          if (fs_rsp.valid) begin
            f_key[DATA_W*int'(f_krsp[1:0]) +: DATA_W] <= fs_rsp.rdata;
            f_key_ok <= f_key_ok & fs_rsp.ok;
            f_krsp   <= f_krsp + 1'b1;
          end
          if (f_krsp == 3'(KEY_WORDS)) begin
            f_state    <= f_key_ok ? F_START : F_IDLE;
            f_key_sent <= 1'b0;
            f_cmd_sent <= 1'b0;
          end
        end
        F_START: begin
          if (enc_key_valid && enc_key_ready)     f_key_sent <= 1'b1;
          if (flash_cmd_valid && flash_cmd_ready) f_cmd_sent <= 1'b1;
          if ((f_key_sent || (enc_key_valid && enc_key_ready)) &&
              (f_cmd_sent || (flash_cmd_valid && flash_cmd_ready))) begin
            f_state   <= F_DATA;
            f_rd_cnt  <= '0;
            f_out_cnt <= '0;
            f_data_ok <= 1'b1;
          end
        end
        F_DATA: begin
          if (rd_issue) f_rd_cnt <= f_rd_cnt + 1'b1;
          if (out_hs)   f_out_cnt <= f_out_cnt + 1'b1;
          if (f_free)   f_state <= F_IDLE;
        end
        default: f_state <= F_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- slot bookkeeping
  logic alloc, release_slot;
  assign alloc        = commit && w_ok && w_new;
  assign release_slot = ev_flush_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
    end else begin
      if (alloc) begin
        valid_q[tail_q] <= 1'b1;
        tail_q          <= (tail_q == SW'(NSLOTS - 1)) ? '0 : tail_q + 1'b1;
      end
      if (release_slot) begin
        valid_q[head_q] <= 1'b0;
        head_q          <= (head_q == SW'(NSLOTS - 1)) ? '0 : head_q + 1'b1;
      end
      count_q <= count_q + (SW+1)'(alloc) - (SW+1)'(release_slot);
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) lba_q[tail_q] <= w_lba;
  end

  a_no_overflow  : assert property (@(posedge clk) disable iff (!rst_n) count_q <= (SW+1)'(NSLOTS));
  a_dat_handshake: assert property (@(posedge clk) disable iff (!rst_n)
      (flash_dat_valid && !flash_dat_ready) |=> flash_dat_valid);
endmodule
