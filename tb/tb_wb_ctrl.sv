// tb_wb_ctrl: drives the write-buffer controller with a 4-slot, 8-word buffer
// against models of the access-control-memory ports (shared word array, a
// 'locked' switch that refuses accesses, random grants), the encryption
// engine stand-in and a flash recorder.
// Checks: commit latency of an uncontended write (KEY_WORDS + WORDS + 2
// cycles) and that it does not wait for encryption; stall when full; in-place
// overwrite of a buffered LBA; refused writes report host_ok = 0; flushes
// refused by a locked memory are retried; after draining, flash holds for
// every LBA the encryption of the last committed data under its key.
module tb_wb_ctrl;
  import fessd_pkg::*;
  localparam int NS = 4, W = 8, SWL = 2;
  localparam int MEMW = NS * (W + KEY_WORDS);

  logic clk = 0, rst_n = 0;
  logic host_cmd_valid = 0, host_cmd_ready, host_dat_valid = 0, host_dat_ready;
  logic [31:0]  host_cmd_lba = 0, host_dat = 0;
  logic [127:0] host_cmd_key = 0;
  logic host_done, host_ok;
  acm_req_t wr_req, fs_req;
  logic     wr_gnt, fs_gnt;
  acm_rsp_t wr_rsp, fs_rsp;
  logic enc_key_valid, enc_key_ready, enc_in_valid, enc_in_ready, enc_out_valid, enc_out_ready;
  logic [127:0] enc_key;
  logic [31:0]  enc_in_data, enc_out_data, flash_cmd_lba, flash_dat;
  logic flash_cmd_valid, flash_cmd_ready, flash_dat_valid, flash_dat_ready;
  logic [SWL:0] occupancy;
  logic ev_hit, ev_full_stall, ev_flush_done, ev_flush_retry;

  wb_ctrl #(.NSLOTS(NS), .WORDS(W), .LBA_W(32)) dut (.*);

  enc_model #(.LAT(40)) u_enc (
    .clk(clk), .rst_n(rst_n), .key_valid(enc_key_valid), .key_ready(enc_key_ready), .key(enc_key),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_data(enc_out_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // ---------------- ACM port models ----------------
  logic [31:0] mem [MEMW];
  logic        locked = 0;
  int          gnt_pct = 100;
  logic        wr_gnt_r, fs_gnt_r;

  always_ff @(posedge clk) begin
    wr_gnt_r <= ($urandom % 100) < gnt_pct;
    fs_gnt_r <= ($urandom % 100) < gnt_pct;
  end
  // only one port may win per cycle, as behind the real arbiter
  assign wr_gnt = wr_req.valid && wr_gnt_r;
  assign fs_gnt = fs_req.valid && fs_gnt_r && !wr_gnt;

  always_ff @(posedge clk) begin
    wr_rsp <= '0;
    fs_rsp <= '0;
    if (wr_gnt) begin
      wr_rsp.valid <= 1'b1;
      wr_rsp.ok    <= !locked;
      if (!locked && wr_req.we) mem[wr_req.addr] <= wr_req.wdata;
    end
    if (fs_gnt) begin
      fs_rsp.valid <= 1'b1;
      fs_rsp.ok    <= !locked;
      fs_rsp.rdata <= locked ? 32'h0 : mem[fs_req.addr];
    end
  end

  // ---------------- flash recorder ----------------
  logic [W*32-1:0] flash_mem [int];
  logic [W*32-1:0] cur;
  logic [31:0]     cur_lba;
  int              wcount = 0, flash_writes = 0;
  assign flash_cmd_ready = 1'b1;
  always_ff @(posedge clk) flash_dat_ready <= ($urandom % 4) != 0;

  always @(posedge clk) begin
    if (flash_cmd_valid && flash_cmd_ready) begin
      cur_lba <= flash_cmd_lba;
      wcount  <= 0;
    end
    if (flash_dat_valid && flash_dat_ready) begin
      cur[32*wcount +: 32] = flash_dat;
      wcount <= wcount + 1;
      if (wcount == W - 1) begin
        flash_mem[cur_lba] = cur;
        flash_writes++;
      end
    end
  end

  // ---------------- event counters ----------------
  int n_hit = 0, n_stall = 0, n_flush = 0, n_retry = 0, n_refused = 0;
  always @(posedge clk) begin
    if (ev_hit) n_hit++;
    if (ev_full_stall) n_stall++;
    if (ev_flush_done) n_flush++;
    if (ev_flush_retry) n_retry++;
  end

  // ---------------- reference ----------------
  logic [W*32-1:0] ref_data [int];
  logic [127:0]    ref_key  [int];

  function automatic logic [31:0] ks(logic [127:0] k, int unsigned i);
    return k[32*(i%4) +: 32] ^ (i * 32'h9e3779b9);
  endfunction

  task automatic write_sector(input logic [31:0] lba, input logic [127:0] key,
                              input logic [W*32-1:0] data, input bit gaps,
                              output logic ok, output int latency);
    int t0;
    @(negedge clk);
    host_cmd_valid = 1; host_cmd_lba = lba; host_cmd_key = key;
    #1;
    while (!host_cmd_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    host_cmd_valid = 0;
    t0 = 1;
    for (int i = 0; i < W; i++) begin
      host_dat_valid = !(gaps && ($urandom % 3 == 0));
      host_dat = data[32*i +: 32];
      #1;
      while (!(host_dat_valid && host_dat_ready)) begin
        @(negedge clk); t0++;
        host_dat_valid = !(gaps && ($urandom % 3 == 0));
        #1;
      end
      @(negedge clk); t0++;
    end
    host_dat_valid = 0;
    while (!host_done) begin
      @(negedge clk); t0++;
    end
    ok = host_ok;
    latency = t0;
    if (ok) begin
      ref_data[lba] = data;
      ref_key[lba]  = key;
    end else n_refused++;
  endtask

  function automatic logic [W*32-1:0] rnd_sector();
    logic [W*32-1:0] d;
    for (int i = 0; i < W; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction

  task automatic drain();
    int guard = 0;
    repeat (2) @(negedge clk);
    while ((occupancy != 0 || dut.f_state != 0) && guard < 20000) begin
      @(negedge clk); guard++;
    end
    chk(occupancy == 0, "buffer drained");
  endtask

  logic ok;
  int   lat;

  initial begin
    #22 rst_n = 1;
    // 1. uncontended write: commit latency, no wait for encryption (LAT=40)
    write_sector(32'd10, {$urandom, $urandom, $urandom, $urandom}, rnd_sector(), 0, ok, lat);
    chk(ok, "first write ok");
    $display("commit latency %0d cycles", lat);
    chk(lat == KEY_WORDS + W + 2, "commit latency");
    @(negedge clk);
    chk(occupancy == 1, "one slot used");
    chk(flash_writes == 0, "committed before encryption finished");
    drain();
    repeat (5) @(negedge clk);
    chk(flash_writes == 1, "one flash write");
    // 2. fill the buffer: hit on a buffered LBA, stall when full
    for (int i = 0; i < 3; i++) begin
      write_sector(32'(20 + i), {$urandom, $urandom, $urandom, $urandom}, rnd_sector(), 0, ok, lat);
      chk(ok, "fill write ok");
    end
    write_sector(32'd22, {$urandom, $urandom, $urandom, $urandom}, rnd_sector(), 0, ok, lat);
    chk(ok, "overwrite ok");
    for (int i = 0; i < 4; i++) begin
      write_sector(32'(30 + i), {$urandom, $urandom, $urandom, $urandom}, rnd_sector(), 0, ok, lat);
      chk(ok, "write past full ok");
    end
    chk(n_hit >= 1, "overwrite hit counted");
    chk(n_stall >= 1, "full stall seen");
    // 3. memory locked: writes refused, flushes retried
    drain();
    write_sector(32'd41, {$urandom, $urandom, $urandom, $urandom}, rnd_sector(), 0, ok, lat);
    chk(ok, "write before lock ok");
    locked = 1;
    write_sector(32'd40, {$urandom, $urandom, $urandom, $urandom}, rnd_sector(), 0, ok, lat);
    chk(!ok, "locked write refused");
    repeat (300) @(negedge clk);
    chk(n_retry >= 1, "flush retried while locked");
    locked = 0;
    drain();
    // 4. random traffic with contention
    gnt_pct = 60;
    for (int n = 0; n < 60; n++) begin
      write_sector(32'(50 + ($urandom % 6)), {$urandom, $urandom, $urandom, $urandom},
                   rnd_sector(), 1, ok, lat);
      chk(ok, "random write ok");
      if (n == 30) begin
        // lock briefly while idle on the host side, flush may be mid-sector
        locked = 1;
        repeat (20) @(negedge clk);
        locked = 0;
      end
    end
    drain();
    // 5. final flash contents
    foreach (ref_data[lba]) begin
      logic [W*32-1:0] e;
      for (int i = 0; i < W; i++) e[32*i +: 32] = ref_data[lba][32*i +: 32] ^ ks(ref_key[lba], i);
      chk(flash_mem.exists(lba) && flash_mem[lba] == e, $sformatf("flash contents lba %0d", lba));
    end
    $display("hits=%0d stalls=%0d flushes=%0d retries=%0d refused=%0d flash_writes=%0d",
             n_hit, n_stall, n_flush, n_retry, n_refused, flash_writes);
    chk(n_flush >= 1 && n_refused == 1, "event totals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
