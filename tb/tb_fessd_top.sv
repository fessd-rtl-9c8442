// tb_fessd_top: end-to-end test of the encrypted write path, with a 4-sector
// buffer of 512-byte sectors (the FESSD proposal's sectors, a smaller buffer).
// A firmware model drives the ACM bus, a host model writes sectors, the
// encryption stand-in (enc_model) and a flash recorder close the loop.
// Mechanisms that must each happen at least once (counted):
//   locked_refusal  host write refused before the code is presented
//   fw_read_hidden  firmware read of the buffer while locked gives the reset value
//   wrong_code      a wrong code leaves the memory locked
//   unlock          right code sets the matching register
//   code_hidden     reading the code registers gives the reset value
//   early_commit    a write commits before its sector has reached flash
//   hit             a write to a buffered LBA overwrites it in place
//   full_stall      a write waits because the buffer is full
//   flush           a sector is encrypted and written to flash
//   retry           a flush refused by a relocked memory is retried
//   bus_lock        bus disconnect relocks the memory
//   update_refused  a code change while locked is refused
//   code_update     a code change while matched takes effect
// At the end flash must hold, for every LBA, the encryption of the last
// committed data under its key.
module tb_fessd_top;
  import fessd_pkg::*;
  localparam int unsigned SB = 512, NS = 4, W = SB / 4;
  localparam logic [127:0] FC = 128'h0123456789abcdef_fedcba9876543210;
  localparam int unsigned MAW = $clog2(NS * (W + KEY_WORDS)) + 1;
  localparam logic [31:0] REG = 32'(1) << (MAW - 1);

  logic clk = 0, rst_n = 0, bus_lock = 0, matched;
  acm_req_t fw_req;
  logic     fw_gnt;
  acm_rsp_t fw_rsp;
  logic host_cmd_valid = 0, host_cmd_ready, host_dat_valid = 0, host_dat_ready, host_done, host_ok;
  logic [31:0]  host_cmd_lba = 0, host_dat = 0;
  logic [127:0] host_cmd_key = 0;
  logic enc_key_valid, enc_key_ready, enc_in_valid, enc_in_ready, enc_out_valid, enc_out_ready;
  logic [127:0] enc_key;
  logic [31:0]  enc_in_data, enc_out_data, flash_cmd_lba, flash_dat;
  logic flash_cmd_valid, flash_cmd_ready, flash_dat_valid, flash_dat_ready;
  logic [2:0] occupancy;
  logic ev_hit, ev_full_stall, ev_flush_done, ev_flush_retry;

  fessd_top #(.BUF_BYTES(NS * SB), .SECTOR_BYTES(SB)) dut (.*);

  enc_model #(.LAT(172)) u_enc (
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

  // ---------------- mechanism counters ----------------
  typedef enum int {M_LOCKED, M_FWHIDE, M_WRONG, M_UNLOCK, M_CODEHIDE, M_EARLY, M_HIT,
                    M_STALL, M_FLUSH, M_RETRY, M_BUSLOCK, M_UPDREF, M_UPD, M_N} mech_t;
  int mech [M_N];
  always @(posedge clk) begin
    if (ev_hit)         mech[M_HIT]++;
    if (ev_full_stall)  mech[M_STALL]++;
    if (ev_flush_done)  mech[M_FLUSH]++;
    if (ev_flush_retry) mech[M_RETRY]++;
  end

  // ---------------- flash recorder ----------------
  logic [W*32-1:0] flash_mem [int];
  logic [W*32-1:0] cur;
  logic [31:0]     cur_lba;
  int              wcount = 0;
  int              flash_seen [int];
  assign flash_cmd_ready = 1'b1;
  always_ff @(posedge clk) flash_dat_ready <= ($urandom % 8) != 0;
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
        flash_seen[cur_lba] = flash_seen.exists(cur_lba) ? flash_seen[cur_lba] + 1 : 1;
      end
    end
  end

  // ---------------- firmware model ----------------
  task automatic fw(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                    output acm_rsp_t r);
    @(negedge clk);
    fw_req = '0;
    fw_req.valid = 1; fw_req.we = we; fw_req.addr = addr; fw_req.wdata = wd;
    #1;
    while (!fw_gnt) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    fw_req = '0;
    r = fw_rsp;
    chk(r.valid, "firmware response");
  endtask

  task automatic present(input logic [127:0] c);
    acm_rsp_t r;
    for (int i = 0; i < 4; i++) fw(1, REG + 32'(OFF_PRESENT) + 32'(i), c[32*i +: 32], r);
  endtask

  task automatic new_code(input logic [127:0] c, output logic ok);
    acm_rsp_t r;
    for (int i = 0; i < 4; i++) fw(1, REG + 32'(OFF_NEWCODE) + 32'(i), c[32*i +: 32], r);
    ok = r.ok;
  endtask

  function automatic logic status_matched();
    return matched;
  endfunction

  // ---------------- host model and reference ----------------
  logic [W*32-1:0] ref_data [int];
  logic [127:0]    ref_key  [int];

  function automatic logic [31:0] ks(logic [127:0] k, int unsigned i);
    return k[32*(i%4) +: 32] ^ (i * 32'h9e3779b9);
  endfunction

  function automatic logic [W*32-1:0] rnd_sector();
    logic [W*32-1:0] d;
    for (int i = 0; i < W; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction

  task automatic write_sector(input logic [31:0] lba, output logic ok, output int latency);
    logic [W*32-1:0] data;
    logic [127:0]    key;
    int              seen0;
    data = rnd_sector();
    key  = {$urandom, $urandom, $urandom, $urandom};
    seen0 = flash_seen.exists(lba) ? flash_seen[lba] : 0;
    @(negedge clk);
    host_cmd_valid = 1; host_cmd_lba = lba; host_cmd_key = key;
    #1;
    while (!host_cmd_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    host_cmd_valid = 0;
    latency = 1;
    for (int i = 0; i < W; i++) begin
      host_dat_valid = 1;
      host_dat = data[32*i +: 32];
      #1;
      while (!host_dat_ready) begin
        @(negedge clk); latency++;
        #1;
      end
      @(negedge clk); latency++;
    end
    host_dat_valid = 0;
    while (!host_done) begin
      @(negedge clk); latency++;
    end
    ok = host_ok;
    if (ok) begin
      ref_data[lba] = data;
      ref_key[lba]  = key;
      if ((flash_seen.exists(lba) ? flash_seen[lba] : 0) == seen0) mech[M_EARLY]++;
    end
  endtask

  task automatic drain();
    int guard = 0;
    repeat (2) @(negedge clk);
    while ((occupancy != 0 || dut.u_wb.f_state != 0) && guard < 100000) begin
      @(negedge clk); guard++;
    end
    chk(occupancy == 0, "buffer drained");
  endtask

  logic     ok;
  int       lat;
  acm_rsp_t r;
  logic [127:0] c2;

  initial begin
    fw_req = '0;
    for (int i = 0; i < M_N; i++) mech[i] = 0;
    #22 rst_n = 1;
    // locked after power-up
    write_sector(32'd7, ok, lat);
    chk(!ok, "host write refused while locked");
    if (!ok) mech[M_LOCKED]++;
    fw(0, 32'd3, 32'h0, r);
    chk(!r.ok && r.rdata == 32'h0, "firmware read hidden while locked");
    if (!r.ok && r.rdata == 0) mech[M_FWHIDE]++;
    c2 = {$urandom, $urandom, $urandom, $urandom};
    new_code(c2, ok);
    chk(!ok, "code update refused while locked");
    if (!ok) mech[M_UPDREF]++;
    present(~FC);
    fw(0, REG + 32'(OFF_STATUS), 32'h0, r);
    chk(r.rdata[0] == 1'b0, "wrong code keeps lock");
    if (r.rdata[0] == 1'b0) mech[M_WRONG]++;
    present(FC);
    fw(0, REG + 32'(OFF_STATUS), 32'h0, r);
    chk(r.rdata[0] == 1'b1 && matched, "right code unlocks");
    if (r.rdata[0]) mech[M_UNLOCK]++;
    for (int i = 0; i < 8; i++) begin
      fw(0, REG + 32'(i), 32'h0, r);
      chk(!r.ok && r.rdata == 32'h0, "code register hidden");
      if (!r.ok && r.rdata == 0) mech[M_CODEHIDE]++;
    end
    // buffered writes commit without waiting for encryption
    write_sector(32'd100, ok, lat);
    chk(ok, "first buffered write");
    $display("commit latency %0d cycles (uncontended minimum %0d)", lat, KEY_WORDS + W + 2);
    chk(lat == KEY_WORDS + W + 2, "uncontended commit latency");
    for (int i = 0; i < 2; i++) begin
      write_sector(32'(101 + i), ok, lat);
      chk(ok, "buffered write");
    end
    write_sector(32'd102, ok, lat);
    chk(ok, "overwrite of buffered LBA");
    for (int i = 0; i < 4; i++) begin
      write_sector(32'(110 + i), ok, lat);
      chk(ok, "write into full buffer");
    end
    // bus disconnect while sectors wait
    @(negedge clk) bus_lock = 1;
    @(negedge clk) bus_lock = 0;
    chk(!matched, "bus lock relocks");
    if (!matched) mech[M_BUSLOCK]++;
    repeat (400) @(negedge clk);
    present(FC);
    drain();
    // code change while matched
    new_code(c2, ok);
    chk(ok, "code update accepted");
    @(negedge clk);
    chk(!matched, "old code no longer matches");
    present(c2);
    @(negedge clk);
    chk(matched, "new code unlocks");
    if (ok && matched) mech[M_UPD]++;
    write_sector(32'd100, ok, lat);
    chk(ok, "write after code change");
    drain();
    // flash contents
    foreach (ref_data[lba]) begin
      logic [W*32-1:0] e;
      for (int i = 0; i < W; i++) e[32*i +: 32] = ref_data[lba][32*i +: 32] ^ ks(ref_key[lba], i);
      chk(flash_mem.exists(lba) && flash_mem[lba] == e, $sformatf("flash contents lba %0d", lba));
    end
    for (int i = 0; i < M_N; i++) begin
      automatic mech_t m = mech_t'(i);
      $display("mechanism %-12s %0d", m.name(), mech[i]);
      chk(mech[i] > 0, $sformatf("mechanism %s happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
