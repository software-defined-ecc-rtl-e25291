# SDECC memory controller: recovering reads that ECC can only detect

A SECDED code on a DRAM channel corrects any single flipped bit in a 72-bit
codeword and detects any two. Detection alone usually kills the machine: the
controller reports a *detected-but-uncorrectable error* (DUE) and the OS
panics or rolls back to a checkpoint. Yet a double-bit DUE leaves surprisingly
little doubt. Only about 21 valid codewords on average (never more than 36)
sit at distance two from the received string. One of them is the word that
was stored. Software that knows which code is in use can list them. It can
then pick the most plausible one, using what the rest of the cacheline looks
like and an optional short hash stored with the line.

This RTL is the hardware half of that scheme, **Software-Defined ECC
(SDECC)**, built into a DDRx-style memory controller:

* Reads without a DUE take the normal path and pay nothing for SDECC.
* A DUE read is retried once. If the error is still there, the raw
  cacheline (all 8 codewords, parity bits included) is held in a small
  buffer called the **Penalty Box**. The controller sets a SERVICE_REQ status
  bit and pulses a non-maskable interrupt.
* While software works on it, every other read keeps completing, out of
  order with respect to the blocked one.
* Software reads the Penalty Box over a register interface, decides, writes
  the chosen codewords back and releases the read. It may also give up, and
  the requester then gets a poisoned response.
* On every write, an 8-bit hash of the line is computed and sent over one
  extra channel wire. After a DUE, software uses it to throw out wrong
  candidates.

The recovery policy itself (candidate search, hash pruning, entropy-based
choice and the panic decision) is software. A reference model of it is in
`tb/tb_ref_pkg.sv`, and the testbenches use that model to act as the OS.

## Datapath

```
          req (64 B line, tag, we, prefetch)                      rsp (tag, status, line)
              |                                                        ^
        [request queue]                                          [data buffer] <--- release (Penalty Box message bits)
              |                                                        ^
        [scheduler] <----------- read-retry ---------------+     ecc_read_path
         |       \ write data                              |     8 x SECDED decode,
  [transaction    [ECC encode x8 + hash] -> [write queue]  +---- retry / capture / poison
     queue]                                       |                    ^   \
         |                                        |              [read buffer] \ shift raw beats
  [addr translation] -> [command queue] ---> dram_cmd / dram_wdata     ^    [Penalty Box 72x8 + hash]
                                                                  dram_rd_beat      ^  |
                                                                                    |  v
                                           cfg bus <-----> [status registers: SERVICE_REQ, PHY_ADDR, ...] --> nmi
```

| Module | Role |
|---|---|
| `sdecc_pkg` | Sizes, types, and the Hsiao parity-check matrix built by a function |
| `sync_fifo` | The queues: valid/ready FIFO with a type parameter, first-word fall-through |
| `mc_scheduler` | Chooses between a read-retry and the next request; a write also needs write-queue room |
| `addr_xlate` | Line address to rank / bank / row / column, with bank XOR swizzle |
| `ecc_write_path` | 8 encoders plus the cacheline hash, one register stage, builds the 73-bit beats |
| `secded_encoder`, `secded_decoder` | [72,64,4] Hsiao SECDED |
| `cacheline_hash` | Vertical parity plus balanced random parity trees |
| `ecc_read_path` | Decodes each beat and decides what happens to each line |
| `penalty_box` | 72-bit x 8 shift register plus hash register, writable by software |
| `sdecc_csr` | Error status registers, configuration bus, NMI and release handshake |
| `sdecc_mc` | Top level; connects everything |

The DDR PHY and the DRAM chips are outside this RTL. `sdecc_mc` issues one
command per cacheline on `dram_cmd_*`; a write carries all 8 beats in
`dram_wdata`. Read data comes back on `dram_rd_*` one beat per cycle, in command
order. The controller never has more reads in flight than its read buffer
holds (`RD_LINES` lines), so the read-data port needs no backpressure.
`tb/dram_model.sv` is a behavioural DRAM with fault injection for simulation.

## The code: [72,64,4] Hsiao SECDED

Each 64-bit word is one codeword: 64 message bits plus 8 parity bits, sent as
one beat. Eight beats make a 64-byte line. The parity-check matrix H (8 x 72)
is built at elaboration by `hsiao_h()` in `sdecc_pkg`:

* data bits 0-55: all 56 weight-3 columns of 8 bits, in ascending numeric order;
* data bits 56-63: weight-5 columns, the complement of `00001011` rotated left by 0..7;
* parity bits 64-71: the identity.

All columns are distinct and of odd weight. So a single error gives a syndrome
equal to one column (corrected), and a double error gives a non-zero syndrome
of even weight, which is no column (detected). Hsiao's own matrix is not
reproduced here; this one follows his rules (odd-weight columns, rows of
nearly equal weight). It has 8392 codewords of weight 4. The usual Hsiao
matrix has 8404. That number sets the average candidate count
μ = 6·W/2556 + 1 = 20.70 here (20.73 for the usual one). The chance that a
random guess among the candidates is right is 4.97 % in both.

The encoder is combinational: `parity[r] = ^(data & H[r])`. The decoder
computes the syndrome and returns OK, CE (with the bit it flipped) or DUE.
Changing the code means changing `hsiao_h()`. The testbench reference
derives its columns independently, so it will flag the change. Update
`tb_ref_pkg::derive_col` to match.

## Read path and DUE handling

This is where the design's behaviour lives. `ecc_read_path` takes a line's 8
beats, one per cycle, from the read buffer. It decodes each beat and collects
three 8-bit masks (DUE per codeword, CE per codeword, and the hash bit carried
on wire 72). After the eighth beat it spends one cycle deciding. A full-rate
line therefore takes 9 cycles. The decision uses the head of the in-flight
read list, which records for each outstanding read its tag, whether it is a
prefetch, whether it is already a retry, and its address:

| Situation | Action |
|---|---|
| no DUE in any codeword | respond OK, or CORRECTED if any codeword had a CE |
| DUE, read was a prefetch | respond DROPPED; nothing is reported |
| DUE, first attempt | send the read back to the scheduler once (read-retry), marked `retried` |
| DUE after the retry, Penalty Box free and holding this line | **capture**: load the hash, set SERVICE_REQ, pulse `nmi`; no response yet |
| DUE after the retry, Penalty Box busy | respond POISON and set the overflow bit in ERROR_TYPE |

The retry filters out transient faults such as a bus glitch. Only an error
that is actually stored in the DRAM cells reaches software.

**How the Penalty Box gets the line without a copy.** While SERVICE_REQ is low,
every raw 72-bit beat that the read path accepts is also shifted into the
Penalty Box. Entry *b* ends up holding beat *b*. So when a line finishes, the
box already holds that line exactly as received, parity bits included. The
read path keeps a `captured` flag, true only if all 8 beats of this line were
shifted in while the box was free. Capture needs that flag. Once SERVICE_REQ
is set the shifting stops and the box is frozen for software. A second DUE
during service cannot be held and is poisoned. Other reads (clean, corrected,
dropped, or retried once) keep flowing, so responses overtake the blocked
read.

**Service protocol** (`sdecc_csr`, 64-bit registers on an 8-bit word address,
read data one cycle after the request):

| Address | Register | Contents |
|---|---|---|
| 0x00 | ERROR_TYPE | [7:0] codewords with a DUE, [15:8] codewords with a CE, [16] a later DUE was poisoned |
| 0x01 | SERVICE_REQ | [0] a line is waiting for software |
| 0x02 | PHY_ADDR | byte address of the line |
| 0x03 | ECC_ID | which code is in use (0x01 = [72,64] Hsiao) |
| 0x04 | HASH | hash read from memory with the line |
| 0x05 | CONTROL | write [0] = release as RECOVERED, [1] = abandon (POISON) |
| 0x06 | CE_COUNT | corrected-error counter |
| 0x07 | TAG | tag of the blocked request |
| 0x10 + 2i | entry i low | message bits 63:0 of codeword i (read/write) |
| 0x11 + 2i | entry i high | parity bits 71:64 of codeword i (read/write) |

Writes to entries and CONTROL are ignored unless SERVICE_REQ is set and no
release is pending. A software write to an entry wins over a shift in the
same cycle. After a CONTROL write, the release is offered to the data buffer
and held until accepted. The read path has priority at the data buffer; a
release waits at most for the current response. When the release is taken,
SERVICE_REQ clears and the box starts shifting again. The released line is the
message half (bits 63:0) of the 8 entries. Hardware does not re-check it, so
software must write back the full corrected line.

## The cacheline hash and its wire

`cacheline_hash` compresses a line in two steps:

1. **Vertical parity:** XOR of the 8 words gives one 64-bit value.
2. **Balanced trees:** hash bit *t* is the parity of a fixed half (32) of those
   64 bits. The half is picked by a seeded shuffle in `hash_tree_mask()`.

The result is registered (one cycle). The write path sends hash bit *b* on
wire 72 of beat *b*, so an 8-bit hash fills the 8 beats. The channel is 73
bits wide and needs one extra DRAM bit per beat. On a read, the 8 wire bits are
collected and loaded into the Penalty Box hash register at capture.

For a candidate line, software computes the same hash. Candidates whose hash
differs from the stored one cannot be the original. A 4-bit hash is the low 4
bits, which come from the first 4 trees. The module is parameterised
(`WORD_BITS`, `WORDS`, `H`) and is also tested at 128-bit words, 4 words and 16
bits. That is the size a ChipKill memory would need.

## What the software handler has to do

`tb_ref_pkg::recover()` is a complete model. On the interrupt:

1. Read ERROR_TYPE, PHY_ADDR, HASH and the 8 entries.
2. For each codeword with a DUE, list the candidates. Flip each of the 72 bits
   in turn and decode. Every flip that leads to a single-bit correction gives a
   codeword at distance 2. Keep the distinct ones.
3. Build every candidate line. Drop those whose hash does not match (if none
   match, keep them all).
4. Score each remaining line by the Shannon entropy of its 64 bytes and choose
   the lowest. Panic (write CONTROL[1]) if two lines tie, or if the average
   entropy is above 4.5 bits per byte. Otherwise write the chosen codewords to
   the entries and CONTROL[0].

A line with DUEs in more than one codeword should be abandoned. Lists of
candidates then multiply, and the scheme assumes one DUE per line.

## Top-level interface and timing

`sdecc_mc` parameters: `REQ_DEPTH=8`, `TXN_DEPTH=8`, `CMD_DEPTH=4`,
`WQ_DEPTH=4`, `RD_LINES=4`, `RSP_DEPTH=4`, `RETRY_EN=1`.

* `req_valid/req_ready/req` (`mem_req_t`: tag, we, prefetch, 30-bit line
  address, 512-bit data). Writes get no response.
* `rsp_valid/rsp_ready/rsp` (`mem_rsp_t`: tag, status, data). Status is one of
  OK, CORRECTED, RECOVERED, DROPPED or POISON.
* `dram_cmd_valid/ready`, `dram_cmd_we`, `dram_cmd_pa` (rank 2 bits, bank 3,
  row 18, column 7), `dram_wdata` (8 x 73 bits); `dram_rd_valid`,
  `dram_rd_beat` (73 bits).
* `cfg_valid/we/addr/wdata`, `cfg_rvalid/rdata`; `nmi` (one-cycle pulse),
  `service_req`.

All handshakes are valid/ready on the rising clock edge. `rst_n` is an
active-low asynchronous reset. A clean read costs the queue stages, the DRAM
latency, 8 beat cycles and the decision cycle. Recovery time is set by
software.

## Departures and omissions

* **Only the [72,64,4] Hsiao SECDED code is built.** The analysis also covers
  32-bit SECDED, DECTED and a [36,32,4] over GF(16) ChipKill code. Those need
  other codecs and a 144-bit-wide Penalty Box. Only the hash is sized for
  ChipKill.
* **Parity-check matrix** is this design's own Hsiao-style one (see above), not
  Hsiao's published one.
* **Read-retry once, POISON response, CONTROL/TAG/CE_COUNT registers, the
  overflow bit, and all register widths and addresses** are this design's
  choices. The scheme only names SERVICE_REQ, an error status register, the
  Penalty Box and an NMI.
* **The recovered line is not written back to DRAM.** If the error is
  persistent, the next read of that line fails again. An OS would normally
  rewrite or retire the page.
* **The scheduler is simple in-order FIFO with retries first**, with no bank or
  row-buffer reordering and no refresh. Queue depths are guesses. The DDR
  timing is left to the PHY, which is not built, and no DRAM is built either.
* **Instruction-fetch recovery and the page-table walk** are software and are
  not modelled.
* The hash wire carries bit *b* in beat *b*. The exact beat mapping is this
  design's choice.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=… failures=…` and has a watchdog. The reference functions in
`tb/tb_ref_pkg.sv` are written independently of the RTL. They include their own
derivation of the H columns, the encoder and hash, the candidate search, and
Entropy-8.

| Testbench | What it covers | Checks |
|---|---|---|
| `tb_secded_encoder` / `tb_secded_decoder` | every single and double error, random data | 12 128 / 21 144 |
| `tb_cacheline_hash` | against the reference at both sizes; bucket uniformity | 24 609 |
| `tb_sync_fifo`, `tb_penalty_box`, `tb_addr_xlate`, `tb_mc_scheduler` | random traffic and backpressure against models | 75 695 / 5 200 / 25 000 / 13 146 |
| `tb_sdecc_csr`, `tb_ecc_write_path`, `tb_ecc_read_path` | protocol, register map, every decision | 1 128 / 1 911 / 15 048 |
| `tb_sdecc_mc` | end to end, default parameters | 355 |
| `tb_due_campaign` | code properties and a recovery campaign | 3 605 |

`tb_sdecc_mc` drives these cases, and checks that each one actually happened:
clean reads, a CE, a transient DUE cured by retry, a persistent DUE captured
while other reads overtake it, a prefetch DUE dropped, a second DUE poisoned,
recovery by the software model, an abandoned high-entropy line, a response
stall, and 40 recoveries using the hash.

`tb_due_campaign` first checks the code itself. It counts the weight-4
codewords and checks that 6·W/2556 + 1 equals the mean candidate count over
all 2556 double errors. It also checks that no list exceeds 36. Then it runs
300 DUEs on synthetic lines (integer arrays, pointers, doubles, text, random
bytes). Each line goes through the controller and lands in the Penalty Box,
where the contents are checked bit for bit. The line is then scored with no
hash, the 4-bit hash and the 8-bit hash:

| Hash | Success | Panic | Wrong line |
|---|---|---|---|
| none | 73.3 % | 21.7 % | 5.0 % |
| 4 bits | 86.3 % | 13.3 % | 0.3 % |
| 8 bits | 98.7 % | 1.3 % | 0.0 % |

The data are synthetic and the random lines are the hard cases, so these
numbers are indicative only. Real memory contents will give other rates.

## Simulating with Verilator

The two packages have to come first. Other files are found through `-y`.
For the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sdecc_pkg.sv tb/tb_ref_pkg.sv tb/tb_sdecc_mc.sv --top-module tb_sdecc_mc
./obj_dir/Vtb_sdecc_mc +verilator+rand+reset+2
```

Replace `tb_sdecc_mc` with any other testbench name. `+verilator+rand+reset+2`
starts all state random, so any reset bug shows up. The RTL contains
concurrent assertions (FIFO overflow, in-flight and read-buffer room, NMI and
release protocol); `--assert` enables them.

## Size

The Penalty Box is 576 flip-flops plus the 8-bit hash register. The hash uses
448 XORs for the vertical parity at most, and 8 trees of 31 XORs. At default
parameters the whole controller has about 2 000 flip-flops of control and
pipeline state. Its queues and buffers hold about 12 000 bits, mostly 512-bit
lines in the request queue, write queue, read buffer and data buffer.
