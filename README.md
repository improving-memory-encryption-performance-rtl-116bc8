# Pseudo-one-time-pad memory encryption with a sequence number cache

A secure processor that trusts nothing outside its own die must encrypt every
cache line it sends to DRAM and decrypt every line it fetches. Done with a block
cipher on the data (`c = E_k(p)`), the cipher sits in series with the memory:
a 100-cycle read becomes 100 + 50 cycles with a 50-cycle cipher.

This RTL implements the alternative described by Yang, Gao and Zhang,
*Improving Memory Encryption Performance in Secure Processors*: a
**pseudo-one-time pad (POTP)**. Memory holds

    ciphertext = plaintext XOR AES_K(seed)

and the seed does not depend on the data, only on where the data lives and how
often it has been written. The pad `AES_K(seed)` can therefore be computed
*while* the memory access is in flight. When the ciphertext arrives, one XOR
produces the plaintext, so a read miss costs about `max(mem, crypto) + 1`
instead of `mem + crypto`.

## How a line is enciphered

A 128-byte L2 line is cut into eight 128-bit segments, one AES block each.
Segment `k` of a line at virtual address `VA` uses

    seed_k = (VA + 16*k) + SN

where `SN` is the line's 16-bit **sequence number**:

* It starts at 0 for every line.
* It is advanced on every write to memory: `SN_i = SN_{i-1} + system_timer`.
  The same data written twice to the same place therefore gets a different pad.
* Instruction lines are never written back, so their seed is the segment VA
  alone (`SN = 0`).
* Lines of plaintext regions pass through unchanged. Examples are shared
  libraries and program input.

Virtual addresses are used because a program's physical placement changes
across context switches, while its virtual layout does not. The L2 cache
therefore has to keep each line's VA next to its physical tag. That L2 is not
part of this RTL.

## Where the sequence numbers live

Every line that has ever gone to memory needs its sequence number when it comes
back. All the numbers live in a plain (unencrypted) region of memory: one
2-byte slot per line, at

    slot(VA) = A_SN + ((VA - MEM_ADDR0) / 128) * 2

These numbers need no protection: without the key, knowing a seed reveals
nothing.

The **sequence number cache (SNC)** keeps the recently used numbers on chip so
that, usually, no extra memory access is needed. The default is 64 KB of
2-byte numbers: 32768 entries, fully associative, with exact LRU replacement.
That covers 32K lines, or 4 MB of data. A displaced number that changed since it
was loaded (dirty) is written back to its slot; a clean one is dropped.
`SNC_WAYS = 32` gives the 32-way set-associative variant.

## Block structure

```
            L2 cache (keeps each line's VA)
      read miss |   ^ plaintext      | eviction (plaintext)
                v   |                v
   +------------------------+   +-----------------------------+
   |       potp_ctrl        |-->| potp_write_buffer           |
   |  sequencing, seeds,    |   |  data section | pad section |
   |  read-path XOR         |   |  retire: data ^ pad         |
   +--+---------+------+----+   +-----^--------------+--------+
      |         |      ^              | pads (tag=wb) | ciphertext
      v         v      | pads (tag=rd)|               v
   potp_snc  potp_pad_engine ---------+        potp_mem_arbiter
   (SN cache) (AES-128, 50 cy,                      |
               1 seed/cycle)       potp_ctrl ------>|  (line reads, SN reads/writes)
                                                    v
                                   ---- chip boundary ----
                                         main memory
```

| module | role |
|---|---|
| `potp_pkg` | widths, types (`mem_req_t`, `pad_tag_t`, event struct), AES helper functions, computed S-box |
| `potp_pad_engine` | fully pipelined AES-128: 10 round stages plus a delay line, so the latency is exactly `CRYPTO_LAT`. Each pad carries a tag saying whether it goes to the read path or to a write-buffer entry, and which segment it is. |
| `potp_snc` | the sequence number cache; parameterised sets and ways, exact LRU ranks |
| `potp_write_buffer` | 8-entry FIFO of evicted lines, each with room for its pad; lazy retirement; read-miss lookup |
| `potp_mem_arbiter` | one memory bus shared by the controller and the write buffer |
| `potp_ctrl` | the request sequencer described below |
| `potp_top` | wires them together |

## Request sequencing (potp_ctrl)

The controller serves one L2 request at a time. Read misses go before
evictions. A new request is accepted only after the previous request's eight
seeds have gone into the AES pipeline.

**Read miss.** The write buffer is checked first. If the line is waiting
there, its plaintext is returned in the next cycle and memory is not touched.
Otherwise the path depends on `rd_kind`:

| case | what happens |
|---|---|
| data, SNC query hit | The eight seeds go to the AES pipeline on consecutive cycles. The line read is issued on the bus. When both data and pads are in, they are XORed and returned. |
| data, SNC query miss | First the sequence number is read from its slot, one full memory access. Then the line is handled as for a hit. After the reply the number is installed in the SNC as clean. A dirty LRU victim is written back to its own slot. |
| instruction | Seeds use `SN = 0`; the SNC is not used. |
| plain | The line is read and returned with no pads. |

**Eviction (dirty line leaving L2).** The plaintext line enters the write buffer
at once, so later read misses can find it. Then:

| case | what happens |
|---|---|
| SNC update hit | `SN += system_timer` |
| SNC update miss | `SN` is read from its slot in memory, then `SN += system_timer`. |
| then, in both cases | The new number is written to the SNC as dirty; an install may push out a victim, which is written back if dirty. The eight seeds go to the AES pipeline tagged with the write-buffer entry, and the pads land in that entry's pad section. |
| plain line | Enters the write buffer with an all-zero pad, marked ready. |

`system_timer` is an input; the design adds whatever value it carries.

## Write buffer and bus policy

* Entries leave in FIFO order, one at a time, and only with all eight pads
  present. What goes on the bus is `data ^ pad`.
* Retirement is lazy. The head leaves when occupancy is above the high-water
  mark (`WB_HWM`, default 4) and the controller is not using the bus.
* When the buffer is full it gets the bus ahead of the controller. It still
  releases only the oldest entry, and evictions stall (`ev_ready` low) until
  there is room.
* Pads are kept beside the plaintext, not XORed in place. A read miss that hits
  the buffer can then be answered in plaintext at once.
* A retirement can be held up only at cold start. This happens when occupancy
  jumps past the mark faster than the 50-cycle pad latency. The
  `wb_head_pad_wait` output shows it.

## Timing

These figures assume a memory that accepts one transaction at a time and
answers reads `LAT` cycles after accepting them.

| access | cycles from acceptance to `rsp_valid` (100-cycle memory, 50-cycle AES) |
|---|---|
| write-buffer hit | 1 |
| instruction or plain line | `LAT + 2` = 102 |
| data, SNC query hit | `LAT + 3` = 103: SNC lookup, bus request, memory, XOR |
| data, SNC query miss | `2*LAT + 4` = 204 |
| data, SNC query hit, slow cipher | `CRYPTO_LAT + 11` when that is larger (113 with a 102-cycle cipher): the eighth pad, not the data, is last |

The ideal `max(100, 50) + 1 = 101` is met up to two cycles of bookkeeping:
the registered SNC lookup and the bus request. The line read is only issued
after the SNC answers. A serial cipher would give 150 cycles or more.

The AES pipeline takes one seed per cycle, so a line's eight pads arrive on
eight consecutive cycles `CRYPTO_LAT` after their seeds.

## Interfaces

All handshakes are valid/ready, and a transfer happens on a clock edge where
both are high. The reset `rst_n` is asynchronous and active low.

* **L2 read miss:** `rd_valid/rd_ready`, `rd_va` (48 bits), `rd_pa` (32 bits)
  and `rd_kind` (`RD_DATA`, `RD_INSTR`, `RD_PLAIN`). The reply is a one-cycle
  `rsp_valid` with `rsp_data`, 1024 bits of plaintext.
* **L2 eviction:** `ev_valid/ev_ready`, `ev_va`, `ev_pa`, `ev_data` and
  `ev_plain`.
* **Memory:** `mem_req_valid/mem_req_ready` with
  `mem_req = {op, addr, data}`. `op` is one of `MEM_RD_LINE`, `MEM_WR_LINE`,
  `MEM_RD_SN`, `MEM_WR_SN`; a sequence number travels in `data[15:0]`. Read
  data come back on `mem_rsp_valid/mem_rsp_data`. There is no response to
  writes. Only one transaction may be outstanding: the controller waits for
  each read, and `mem_req_ready` must stay low while the memory is busy.
* **Key:** `key` is the program's 128-bit key. The round keys are expanded
  combinationally, so `key` must be stable while pads are being made.
* **Status:** `events` carries one-cycle pulses: query hit and miss, update
  hit and miss, sequence-number victim write-back, write-buffer read hit,
  instruction read, plain access and read done. Also brought out are
  `wb_full`, `wb_head_pad_wait`, and which kind of retirement was granted
  (`wb_retire_urgent` when full, `wb_retire_lazy` otherwise).

## Parameters

| parameter (potp_top) | default | meaning |
|---|---|---|
| `SNC_ENTRIES` | 32768 | 64 KB of 2-byte sequence numbers |
| `SNC_WAYS` | 32768 | fully associative; 32 for the set-associative variant |
| `WB_ENTRIES` | 8 | write-buffer depth (at most 8: the pad tag has 3 index bits) |
| `WB_HWM` | 4 | retire when occupancy exceeds this |
| `CRYPTO_LAT` | 50 | pad latency in cycles, at least 11; 102 models a slower cipher |
| `A_SN` | `32'h3000_0000` | physical base of the sequence-number region |
| `MEM_ADDR0` | 0 | first virtual address of user memory |

Fixed in `potp_pkg`: 48-bit VA, 32-bit PA, 128-byte lines, 128-bit segments,
16-bit sequence numbers.

## What comes from the scheme and what was chosen here

Taken from the scheme:

* the POTP equations, the per-segment seeds and the timer-advanced sequence
  numbers;
* the constant seed for instructions, and plaintext regions;
* the SNC size, its LRU replacement and victim write-back;
* the plaintext sequence-number region and its slot formula;
* the 8-entry write buffer with a pad section, FIFO lazy retirement above a
  high-water mark, priority when full and read hits;
* the 50-cycle fully pipelined cipher.

Chosen here, where the scheme is silent:

* AES-128 as the cipher (the scheme just says AES);
* 128-bit segments for instruction lines too (the scheme's instruction example
  uses a 64-bit block);
* the HWM value of 4;
* the 32-bit physical address and the `A_SN` value;
* serving one request at a time;
* the write-buffer check before the SNC;
* exact LRU by per-way ranks;
* storing the whole virtual line number as the SNC tag;
* using the virtual address in the slot formula, since an SNC victim carries
  only its VA;
* the bus protocol and the event outputs;
* the reset behaviour.

Not built:

* the L2 cache and its VA field;
* the core and the XOM machinery: compartments, key delivery, integrity hashes;
* protecting SNC contents across context switches (flush with encryption, or
  tag entries with IDs; the scheme leaves the choice open);
* the direct block-cipher path that the no-replacement SNC variant and aliased
  shared pages would need.

Lines with aliased virtual addresses should be sent as plain here, or handled
outside this block.

## Known limitations

* Seeds are `address + SN`. Two different (line, SN) pairs can therefore give
  the same seed, and a sequence number wraps after 2^16 increments; in both
  cases a pad repeats. The scheme accepts this. A wider `SN_W` makes it rarer.
* If `system_timer` happens to be 0 at an eviction, the sequence number does
  not change.
* The SNC at its default size is a 32K-entry CAM with 15-bit LRU ranks:
  2.4 Mbit of state, all compared in parallel. As RTL it is correct and
  simulates quickly, but gate-level synthesis of the fully associative
  default is very slow. The 32-way configuration is the realistic one to
  implement.
* The controller does not overlap requests. A read miss that arrives while an
  eviction's sequence number is being fetched waits.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog that
counts a failure and stops the run if it hangs.

| testbench | checks |
|---|---|
| `tb_potp_pad_engine` | FIPS-197 C.1 vector; 64 random seeds with a gap in the stream against an independent AES model (`tb/aes_ref_pkg.sv`, S-box from log/antilog tables); exact latency and tags |
| `tb_potp_snc` | 3000 random queries and writes on a 2x4 and a 1x4 SNC against a list-based LRU model, victims included |
| `tb_potp_write_buffer` | random enqueues, pads, lookups and grants against a queue model, checked every cycle |
| `tb_potp_mem_arbiter` | all 16 input combinations |
| `tb_potp_ctrl` | directed walk through every case above, with exact latencies (102, 204, 1, 103) and slot addresses |
| `tb_potp_top` | 1500 random operations on 48 lines with a 16-entry SNC. Checks every returned line, every ciphertext line and every sequence number written to memory, and that each mechanism occurs: query and update hits and misses, victim write-back, write-buffer hit, lazy and urgent retirement, full stall, pad wait, instruction and plain traffic. |
| `tb_potp_top_cfg` | the same random test on the evaluated variants: 32-way set-associative SNC (2 sets) and a 102-cycle cipher, with the pad-limited read latency |
| `tb_potp_top_full` | the same test at the default parameters (32K-entry fully associative SNC), 200 operations; no SNC victim can occur with so few lines |

`tb/potp_mem_model.sv` is a behavioural DRAM: 100-cycle latency, one
transaction at a time, sparse contents.

To run one testbench with Verilator (5.x), from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/potp_pkg.sv tb/aes_ref_pkg.sv tb/tb_potp_top.sv --top tb_potp_top -o sim
./obj_dir/sim
```

Packages must come first on the command line. The full-size test builds in
about 15 s and runs in about 15 s.
