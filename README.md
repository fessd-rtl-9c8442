# FESSD: an encrypted SSD write path with an access-control write buffer

An encrypting SSD has to encrypt every sector before it reaches flash. If the
host must wait for that, encryption latency is added to every write. A write
buffer can hide it: a sector is acknowledged as soon as it is in the buffer and
encrypted later. But a plain buffer holds unencrypted data. Anyone who runs
their own (compromised) firmware on the drive's controller can then read it out.
Encrypting the buffer as well brings the latency back.

This design uses a buffer that needs no encryption: an **access-control memory
(ACM)**. It is an on-chip non-volatile memory with a hardware lock on its port.
Reads and writes pass only after the correct 128-bit access code has been
presented. The code comes from the host at boot and is never stored in
readable form on the drive. Firmware cannot switch this lock off, because the
lock is not under firmware control. Host writes go into the ACM in plain form
together with their encryption key and are committed at once. A background
engine then reads each buffered sector, encrypts it and writes the ciphertext
to flash.

The RTL covers the ACM and the write-buffer data path around it. The AES engine,
the flash packages, the host interface and the controller CPU with its ROM and
DRAM are outside the design. Their signals are ports of `fessd_top`.

## Block structure

```
                 fw_*  (firmware bus)
                   |
 host_cmd/dat ->  wb_ctrl --wr port--> acm_arbiter --> acm
 host_done    <-     |    --fs port-->  (3 ports,       |- acm_code_regs   (code store, presented code)
                     |                 round robin)     |- acm_code_compare (128-bit equality)
 enc_key/in   <------+                                  |- acm_match_reg   (matching register)
 enc_out      ------>+                                  |- acm_access_gate (AND gating)
 flash_cmd/dat <-----+                                  |- acm_nvm_array   (storage array)
                                          bus_lock ---->|
```

| file | role |
|---|---|
| `rtl/fessd_pkg.sv` | widths, register offsets, the `acm_req_t`/`acm_rsp_t` bus structs |
| `rtl/acm.sv` | the access-control memory: address decode, lock, response |
| `rtl/acm_code_regs.sv` | non-volatile access code with authorised update; volatile presented code |
| `rtl/acm_code_compare.sv` | code comparator |
| `rtl/acm_match_reg.sv` | matching register |
| `rtl/acm_access_gate.sv` | gates array writes and read data |
| `rtl/acm_nvm_array.sv` | storage array (single-port synchronous RAM, no reset) |
| `rtl/acm_arbiter.sv` | shares the ACM among firmware, host-write and flush ports |
| `rtl/wb_ctrl.sv` | write-buffer controller: buffering, overwrite, stall, background flush |
| `rtl/fessd_top.sv` | top level |

## How the lock works

### The comparator and the matching register

The ACM keeps two codes. The **internal code** is non-volatile: reset does not
clear it, and it starts at the manufacturer's value (`FACTORY_CODE`). The
**presented code** is volatile and holds what the firmware last wrote. A 128-bit
comparator compares the two all the time. Its result is loaded every cycle into
the **matching register**, and only that register opens the memory. There are
two reasons for the register:

* The wide comparison is kept out of the memory access path: an access only
  looks at one flip-flop.
* The register reloads every cycle. If a fault flips it, the fault lasts one
  cycle at most while the codes differ. With `REDUNDANT = 1` the comparator and
  the register are duplicated, and access needs both copies set. A single
  flipped register then cannot open the memory at all.

Reset models power loss. It clears the presented code and the matching
register, so after any power cycle the memory is locked until the host supplies
the code again. `bus_lock` clears both at once. It models the drive's host bus
being unplugged, which defends against moving a powered drive to another
machine.

### Register map and bus protocol

The ACM has a 32-bit word bus. One request per cycle is always accepted, and the
response comes exactly one cycle later:

* `acm_req_t`: `valid`, `we`, `addr` (a word address), `wdata`
* `acm_rsp_t`: `valid`, `ok`, `rdata`. `ok` says whether the lock let the access
  through.

With `AW = clog2(MEM_WORDS) + 1`, address bit `AW-1` selects the register
window. Within the window, word offsets are:

| offset | access | meaning |
|---|---|---|
| 0..3 | write only | presented code, word 0 least significant; always accepted |
| 4..7 | write only | new access code; the write to offset 7 replaces the code if matched at that moment |
| 8 | read only | bit 0 = matching register |

Any read of offsets 0..7 returns the reset value (0) with `ok = 0`, so no code
can be read back over the bus. A refused array access works the same way: a
write is dropped, and a read returns 0 with `ok = 0`. An assertion in `acm.sv`
checks that a refused response never carries anything but the reset value.

The sequences firmware uses:

* **Unlock:** write the code to offsets 0..3. Two cycles after the last write,
  the status bit reads 1.
* **Change the code:** while unlocked, write the new code to offsets 4..7. The
  update takes effect on offset 7. The memory then locks again, because the
  presented code still holds the old code. Present the new code to unlock.
  If the memory is locked, the update is refused. So only someone who knows
  the current code can change it.

## The write buffer (`wb_ctrl`)

### Layout

The buffer has `NSLOTS = BUF_BYTES / SECTOR_BYTES` sector slots: 2048 for the
default 1 MB of 512-byte sectors. Each slot takes 128 data words and 4 key
words in the ACM:

* data of slot `s`: words `s*128 .. s*128+127`
* key of slot `s`: words `NSLOTS*128 + s*4 .. +3`

So the default ACM holds 270,336 words (1 MB of data plus 32 KB of keys). The
controller keeps a valid bit and an LBA register for every slot. Slots are used
as a ring: new sectors go in at the tail, and the head is the next one to be
flushed.

### Host writes

1. The host offers `host_cmd` (LBA and 128-bit key) with valid/ready.
2. The controller compares the LBA with every buffered slot in one cycle.
   * If the LBA is already buffered, and that slot is not being flushed right
     now, the sector overwrites that slot. The old version is never encrypted.
   * Otherwise it takes the tail slot.
   * If the buffer is full and the LBA misses, `host_cmd_ready` stays low until
     a flush frees a slot. `ev_full_stall` marks each such cycle.
3. The key words and then the 128 data words are written to the ACM.
4. When the last write has been answered, `host_done` pulses. `host_ok` is 1
   only if the ACM accepted every word. A refused write (memory locked) adds
   no slot.

The write never waits for encryption. With an uncontended ACM port and no gaps
in the data, `host_done` comes `KEY_WORDS + WORDS + 2` = 134 cycles after the
command is accepted.

### Background flush

Whenever the head slot is valid and the host is not writing into it:

1. The flush engine reads the 4 key words.
2. It hands the key to the encryption engine (`enc_key`) and the LBA to flash
   (`flash_cmd`). These two handshakes may complete in either order.
3. It streams the 128 data words into `enc_in`. A 4-entry FIFO allows up to 3
   reads in flight.
4. `enc_out` is passed straight through to `flash_dat`.
5. After the 128th word has gone to flash, the slot is freed (`ev_flush_done`).

If the ACM refuses the key reads, because it was relocked, the flush is
abandoned and tried again. If it refuses a data read, the sector still goes to
flash but the slot is kept, so it is flushed again later with the right data.
`ev_flush_retry` marks both cases.

### Ordering and interlocks

* A flush does not start on a slot the host is currently writing.
* A host write does not hit a slot that is being flushed. The new version gets a
  slot of its own instead and is flushed after the old one. Flash therefore
  always ends up with the newest data.

## Parameters (`fessd_top`)

| parameter | default | meaning |
|---|---|---|
| `BUF_BYTES` | 1048576 | buffer size (the other size studied for this design is 32768) |
| `SECTOR_BYTES` | 512 | sector size |
| `LBA_W` | 32 | logical block address width |
| `REDUNDANT` | 0 | duplicate comparator and matching register |
| `FACTORY_CODE` | a fixed 128-bit value | initial access code |

`CODE_W` and `KEY_W` (128) and `DATA_W` (32) are set in `fessd_pkg`.

## What follows the original design and what is this implementation's choice

The following come from the FESSD proposal:

* an ACM used as the write buffer, with no encryption in it
* a write-only access code at a fixed address, whose reads return a reset value
* code changes only while the code matches
* a volatile matching register that reloads every cycle and starts cleared
* access gated by AND logic
* the optional redundant comparator and register
* keys stored next to the buffered data
* immediate commit, and background encryption on the way to flash
* pending writes while the buffer is full
* buffer sizes of 1 MB and 32 KB, 512-byte sectors, and a code of at least 128 bits

The following are choices of this implementation:

* the 32-bit bus, the register map, the status word and the `ok` response bit
* the word-by-word code update
* the presented code being held inside the ACM
* the single-cycle array, which does not model STT-RAM timing (about 1.9 µs to
  read and 3.2 µs to write a sector in the reference evaluation)
* the round-robin arbiter
* the FIFO slot ring with in-place overwrite, and the retry policy
* a hardware controller for buffering and flushing. The original places this
  data movement in firmware. Here the firmware keeps a bus port only for
  unlocking, code management and status.
* `bus_lock` as the hot-plug countermeasure

Not included: host reads (including reads that hit the buffer), flash address
translation and garbage collection, and the AES engine itself.

Because of the single-cycle array, the timing checks in the testbenches count
clock cycles of this implementation, not the STT-RAM or AES latencies of the
original study. Synthesis of the full-size top is slow, because the 2048-entry
LBA comparison and the slot registers are large. The lookup could be made
narrower or sequential if area matters more than single-cycle hits.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops itself through a cycle watchdog. With Verilator 5, from the project
root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fessd_top \
    -y rtl -y tb +libext+.sv rtl/fessd_pkg.sv tb/tb_fessd_top.sv
./obj_dir/Vtb_fessd_top
```

| testbench | what it shows |
|---|---|
| `tb_acm_code_compare`, `tb_acm_match_reg`, `tb_acm_access_gate`, `tb_acm_nvm_array`, `tb_acm_code_regs` | the leaf blocks against reference values |
| `tb_acm` | lock and unlock, hidden reads, code change, `bus_lock`; `REDUNDANT=1` with a forced fault on one matching register |
| `tb_acm_arbiter` | round-robin order, response routing, bounded waiting |
| `tb_wb_ctrl` | a 4-slot buffer with random grants, lock episodes and gaps in the host data. Checks the commit latency, overwrite, stall and retry, and the final flash contents. |
| `tb_fessd_top` | end to end with a 4-sector buffer. Counts 13 mechanisms (refused write, hidden reads, wrong code, unlock, early commit, hit, full stall, flush, retry, bus lock, refused and accepted code change) and checks that each happened. |
| `tb_fessd_top_full` | the top at its default 1 MB size: unlock, four sector writes (one of them an overwrite), drain, flash contents |
| `tb_fessd_workload` | 32 KB buffer (64 slots): 300 back-to-back sector writes, half of them to 8 hot LBAs, against a 172-cycle encryption latency. Reports mean and worst response time, overwrites and stall cycles, and checks all flash contents. |

`tb/enc_model.sv` stands in for the encryption engine. It is not AES: it XORs
each word with a key-derived stream `key[32*(i%4)+:32] ^ (i * 32'h9e3779b9)`
after a fixed latency, so the testbenches can predict the exact flash contents.
In `tb_fessd_top` its latency is 172 cycles. That is the 1,720 ns per sector of
the reference AES engine, taken at an assumed 100 MHz clock.
