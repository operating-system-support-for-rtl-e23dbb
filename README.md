# Virtualised coprocessor interface: IMU, dual-port RAM and three coprocessors

A coprocessor in an FPGA usually exchanges data with the processor through a
small shared memory. Normally both the software and the hardware designer
have to know that memory's size and address, and they have to cut large
data sets into pieces that fit. This design removes that knowledge from both
sides, in the same way virtual memory removes it from ordinary programs:

* The **coprocessor** names its data only as *(object, index)*: "element
  `i` of vector 2". It never computes a physical address and does not know
  how big the shared memory is.
* An **Interface Management Unit (IMU)**, a small MMU-like block, translates
  each (object, index) into an address in the shared dual-port RAM through a
  TLB.
* When the data is not in the RAM, the IMU **stalls** the coprocessor and
  interrupts the processor. Software in the operating system, the
  **interface manager**, then copies the missing page in, evicting another if
  needed. It updates the TLB and lets the IMU retry. The coprocessor only
  sees a longer access.

As a result, the same coprocessor RTL and the same application code work for
any data size and any size of shared memory. The RTL here contains the
hardware half: the IMU, the 16 KB dual-port RAM and three example
coprocessors. The processor and its operating system are outside the top
module. The end-to-end testbench contains a behavioural model of the
interface manager.

```
                 portable                  |        platform-specific
                                           |
 +-------------+  CP_OBJ, CP_ADDR   +------+------+  DP_ADDR/EN/WR   +-----------+  cpu_dp_*
 | coprocessor |------------------->| IMU  AR     |----------------->| dual-port |<---------- processor
 |  vecadd     |  CP_DOUT           |      TLB    |  DP_DOUT         |   RAM     |   (copies pages
 |  adpcm      |------------------->|      SR     |  DP_DIN          |  16 KB    |    in and out)
 |  idea       |<-------------------|      CR     |<-----------------| 8 x 2 KB  |
 |             |  CP_DIN            |             |                  +-----------+
 |             |<==== control =====>|             |---- INT_PLD ---------------------> processor
 +-------------+  START ACCESS WR   +-------------+<--- reg_* (AR, SR, CR, TLB) ------- processor
                  TLBHIT FIN PINV
```

## Coprocessor side of the interface

| signal | dir (coprocessor) | meaning |
|---|---|---|
| `cp_obj[3:0]` | out | object number (agreed between software and hardware designer) |
| `cp_addr[19:0]` | out | element index within the object |
| `cp_dout[31:0]` | out | write data |
| `cp_din[31:0]` | in | read data, valid while `cp_tlbhit` is high |
| `cp_access` | out | a request is pending |
| `cp_wr` | out | the request is a write |
| `cp_tlbhit` | in | the request completes in this cycle |
| `cp_start` | in | one-cycle start pulse |
| `cp_fin` | out | one-cycle end-of-operation pulse |
| `cp_pinv` | out | one-cycle pulse: "I have read my parameters, the parameter page can be reused" |

**Handshake.** The coprocessor raises `cp_access` with object, index, write
flag and write data. It holds all of them until the cycle in which
`cp_tlbhit` is high. For a read, it takes `cp_din` on the clock edge that
ends that cycle. It may present its next request straight after that edge.
This is the only rule a coprocessor has to follow. A translation miss
simply delays `cp_tlbhit` by any number of cycles. The IMU checks both rules
with assertions: the request must stay stable until the hit, and a hit only
comes while a request is pending.

**Timing of a hit.** A translated access takes four clock edges from the
request to the data:

```
 edge:        0         1          2          3          4
 cp_access  __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__  (or the next request)
 IMU state    IDLE  | LOOKUP   |  MEM      |  DATA     | IDLE
 action             latch AR   TLB match   RAM read/   coprocessor
                               registered  write       takes cp_din
 cp_tlbhit  _____________________________________/‾‾‾‾‾‾‾‾‾\__
```

A coprocessor that streams requests back to back therefore gets one access
every four cycles. On a miss, LOOKUP goes to a FAULT state instead of MEM.
The IMU stays there until software writes `CR.RESTART`, then repeats the
lookup.

**Parameters.** Scalar arguments (a vector length, a key) are passed in a
reserved object, number 15 (`PARAM_OBJ`). Software writes them into a page
mapped as object 15 before it starts the coprocessor. The coprocessor
reads them like any other data and then pulses `cp_pinv`. The IMU then
invalidates every TLB entry of object 15, so the interface manager can
reuse that page for data.

## Address translation

The shared RAM holds 4096 32-bit words (16 KB) in eight pages of 512 words
(2 KB). A coprocessor address is split as:

```
  cp_obj[3:0] | cp_addr[19:9]  -> virtual page, matched in the TLB
              | cp_addr[8:0]   -> word offset in the page
  RAM address = {ppn[2:0], cp_addr[8:0]}
```

The TLB (`imu_tlb`) has eight entries, one per physical page. It is fully
associative: all entries are compared at once, and if several match, the
lowest index wins. Each entry is 20 bits:

```
  bit 19   valid
  bit 18   dirty      set by the IMU when the coprocessor writes through the entry
  17:14    obj
  13:3     vpn        cp_addr[19:9]
  2:0      ppn        physical page
```

An object can be up to 2^20 words (4 MB), and there are 15 data objects.

## Processor side: registers

The processor reaches the IMU through a simple word-addressed register port
(`reg_en`, `reg_wr`, `reg_addr[4:0]`, `reg_wdata`, `reg_rdata`). Reads are
combinational. The processor reaches the RAM through the second RAM port
(`cpu_dp_*`), whose read data arrives one cycle after the request.

| address | register | contents |
|---|---|---|
| 0 | CR | bit 0 START (write 1: pulse `cp_start`), bit 1 RESTART (write 1: retry the faulting translation), bit 2 IRQ_EN (stored), bit 3 ACK (write 1: clear DONE). START, RESTART and ACK read back as 0. |
| 1 | SR | bit 0 FAULT (translation miss, coprocessor stalled), bit 1 DONE (`cp_fin` seen), bit 2 BUSY (between START and FIN), bit 3 WRITE (the access in AR is a write) |
| 2 | AR | `{cp_obj, cp_addr}` of the most recent access (24 bits): after a fault it names the missing page |
| 8..15 | TLB entry 0..7 | the 20-bit entry above, readable and writable |

`int_pld = IRQ_EN & (FAULT | DONE)`.

## What the interface manager does

The hardware relies on the following software protocol. The end-to-end
testbench implements it behaviourally.

1. **Execute.** Invalidate all TLB entries. Copy the parameter words into a
   free page and map it as object 15. Copy in as many pages of the mapped
   objects as fit, writing a TLB entry for each. Then write
   `CR = IRQ_EN | START`.
2. **Page fault** (`int_pld` with `SR.FAULT`). Read AR for the object and the
   virtual page. Choose a frame: a free one, else one whose entry the
   coprocessor invalidated, else the oldest (FIFO). If the victim's entry is
   dirty, copy that page back to user memory first. Then copy the missing
   page in, write its TLB entry, and write `CR = IRQ_EN | RESTART`.
3. **End of operation** (`int_pld` with `SR.DONE`). Copy every valid, dirty
   page back to user memory, clear the TLB, and write `CR = IRQ_EN | ACK`.

The replacement policy is entirely software. FIFO is only one choice; LRU,
random and prefetching need no hardware change.

## The coprocessors

All three are written against the interface above and contain no physical
address. `vim_soc` has all three built in. The 2-bit `cp_sel` input chooses
the "loaded" one: only that one gets `cp_start` and `cp_tlbhit`, and only
its requests reach the IMU. This stands in for loading a configuration into
the FPGA. `cp_sel` must not change during a run.

### `vecadd_cp`: C[i] = A[i] + B[i]

This is the elementary example. A, B and C are objects 0, 1 and 2; parameter
word 0 is the length. For each i it reads A[i], reads B[i] and writes the
32-bit sum to C[i]. That is three accesses, or 12 cycles per element when
every access hits. A length of 0 finishes at once.

### `adpcm_cp`: ADPCM decoder

This is an IMA/DVI ADPCM decoder with 4-bit codes, the 89-entry step-size
table, the index adjust table {-1,-1,-1,-1,2,4,6,8}, and 16-bit saturation.
It follows the arithmetic of the widely used C reference decoder.

* Parameter word 0: number of 32-bit input words N.
* Object 0: input. Byte 0 is in bits 7:0, and each byte holds two codes,
  high nibble first.
* Object 1: output. Each word holds two 16-bit samples, the earlier one in
  bits 15:0.

One input word produces eight samples, or four output words, so the output
is four times the size of the input. The predictor and the index start at 0
on every run. Each input word takes one read plus four rounds of (two
decode cycles + one write): 28 cycles when every access hits. The step
table is a `case` statement in the RTL.

### `idea_cp`: IDEA encryption

This is the standard IDEA cipher: 64-bit blocks, a 128-bit key, eight rounds
and the output transformation. The 52 subkeys come from the key by
successive 25-bit left rotations.

* Parameter word 0: number of blocks. Words 1..4: the key, with word 1
  holding bits 127:96.
* Object 0: plaintext. Object 1: ciphertext.
* Each block is two words, `{X1,X2}` then `{X3,X4}`.

The core cuts a round into **three pipeline stages**:

1. the two input multiplications and two additions;
2. the middle multiplication and addition;
3. the last multiplication and the XORs.

The output of stage 3 feeds stage 1 again, so the three stages form a ring
that holds three blocks at once. Each block passes through the ring once
per round. The unit works in groups of up to three blocks:

1. **load:** 2 reads per block;
2. **run:** 27 core steps for 8 rounds of 3 blocks;
3. **store:** 2 writes per block.

The core is slower than its memory side. It takes one step every
`CORE_DIV` clocks (default 4: a 6 MHz core behind a 24 MHz memory side
and IMU). It does this through a clock enable, not a second clock.
While the memory side loads and stores, and while the IMU stalls an access,
the core waits. The memory side in turn waits for the core to finish a
group. Multiplication is modulo 2^16+1, where 0 stands for 2^16, using
the usual low/high-half subtraction. With every access hitting, a run
takes 29 + 16·N + 27·CORE_DIV·ceil(N/3) clocks from start to end.

## Sizes, and how the measured workloads map onto them

| item | value |
|---|---|
| dual-port RAM | 16 KB = 8 pages x 2 KB, 32-bit words |
| TLB | 8 entries, fully associative |
| objects | 15 data objects + parameter object 15, 2^20 words each |
| access latency | 4 cycles per translated access |

The decoder and the cipher were evaluated with the input sizes below. The
"fits" column shows whether all data fits in the eight pages at once.

| workload | pages needed (in + out + parameters) | fits at once |
|---|---|---|
| ADPCM, 2 KB input | 1 + 4 + 1 = 6 | yes: no page faults |
| ADPCM, 4 KB | 2 + 8 = 10 | no: faults, evictions |
| ADPCM, 8 KB | 4 + 16 = 20 | no |
| IDEA, 4 KB | 2 + 2 + 1 = 5 | yes |
| IDEA, 8 KB | 4 + 4 + 1 = 9 | no (the parameter page is freed only after it is read) |
| IDEA, 16 KB / 32 KB | 16 / 32 | no |

All of these run to completion and are checked in the end-to-end
testbench. The cases that do not fit are handled by the fault mechanism
without any change to the coprocessor.

The four-cycle translation costs a noticeable share of run time. Take a
group of three IDEA blocks with every access hitting: it uses 12 accesses
x 4 = 48 clocks of memory traffic and 27 x 4 = 108 clocks in the core.
With single-cycle accesses the memory part would be 12 clocks, so about
36 / 156, or 23 %, of the hardware time goes into translation. The
original system reports about 20 % for IDEA. A pipelined IMU would remove
most of this; it is not built here.

## Where this RTL departs from, or goes beyond, the original system

* **One clock.** In the original system the decoder and IMU ran at 40 MHz,
  and the IDEA core at 6 MHz with its memory side and IMU at 24 MHz. Here
  everything shares one clock and one synchronous active-high reset. The
  IDEA core's slower rate is kept as a 1-in-4 clock enable.
* **Register map, bit positions, the `cp_pinv` line.** The original only
  names AR, SR and CR and says that the coprocessor invalidates the
  parameter page. The encodings and the extra one-cycle line are choices
  made for this RTL.
* **Split of the four cycles.** The total of four cycles per access is
  given. The split into LOOKUP, MEM and DATA is this design's choice.
* **The TLB** is a register array with parallel comparators, not a
  vendor CAM block. It has one entry per page.
* **Bus and processor.** The processor's bus (AMBA AHB on the original
  device) is replaced by a plain register port and a plain RAM port.
* **Coprocessor loading.** Reconfiguration is replaced by the `cp_sel`
  input.
* **Internals of the two application coprocessors.** The originals are
  described only by name, clock rate and, for IDEA, the number of pipeline
  stages. Both algorithms are the standard ones. Their micro-architecture
  and data layout are this design's own choices.
* **IDEA at 4 KB.** The measurements report translation misses "from 4 KB
  onwards" for both applications. With 4 KB of IDEA input and 4 KB of
  output, the data here needs only 5 of the 8 pages and runs without faults.
* **Not built.** The pipelined IMU, mentioned as future work, is not built.
  Neither are IDEA decryption, the operating system, the processor, the
  AHB bus, or the mechanism that loads a configuration.

## Files

| file | contents |
|---|---|
| `rtl/vim_pkg.sv` | sizes, register map, TLB entry type, IMU state type |
| `rtl/imu_tlb.sv` | fully associative TLB with valid/dirty bits |
| `rtl/imu.sv` | the IMU: access state machine, AR/SR/CR, interrupt, start/finish |
| `rtl/dp_ram.sv` | true dual-port RAM, registered reads |
| `rtl/vecadd_cp.sv`, `rtl/adpcm_cp.sv`, `rtl/idea_cp.sv` | the coprocessors |
| `rtl/vim_soc.sv` | top: IMU + RAM + the three coprocessors, `cp_sel` chooses one |
| `tb/cp_mem_model.sv` | behavioural stand-in for the IMU (flat memory, 4-cycle hits, optional random stalls) used by the coprocessor testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M` at the end. A watchdog ends a hung run
with a failure. Build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_vim_soc rtl/vim_pkg.sv tb/tb_vim_soc.sv
./obj_dir/Vtb_vim_soc
```

Replace `tb_vim_soc` with `tb_imu_tlb`, `tb_dp_ram`, `tb_imu`,
`tb_vecadd_cp`, `tb_adpcm_cp` or `tb_idea_cp` for the unit tests.

What the tests cover:

* `tb_imu_tlb`: random fill, lookup, dirty marking and invalidation
  against a model.
* `tb_dp_ram`: both ports at once, and hold-when-idle.
* `tb_imu`:
  * the exact four-edge latency;
  * the dirty bit;
  * a fault: stall, AR, SR and INT_PLD, then restart;
  * parameter page release, start/finish/acknowledge, and interrupt
    masking.
* `tb_vecadd_cp`, `tb_adpcm_cp`, `tb_idea_cp`:
  * results against independent reference models (ADPCM by the C
    algorithm; IDEA also against the published test vector, key
    0001...0008, plaintext 0000 0001 0002 0003, ciphertext 11FB ED2B
    0198 6DE5);
  * request counts and cycle counts without stalls;
  * correct results under random long stalls.
* `tb_vim_soc`:
  * runs at full size (no parameter overrides), the whole protocol above
    with all three coprocessors and every workload in the table;
  * counts translation hits, page faults, stall cycles, evictions, dirty
    write-backs, parameter-page releases and end-of-operation interrupts,
    and fails if any of them never happens;
  * finishes in well under a second of run time.

To change the memory size, edit `N_PAGES` / `PAGE_BYTES` in `vim_pkg.sv`.
The page offset, the TLB size and the address widths follow from them. The
testbench's interface manager reads the same constants.
