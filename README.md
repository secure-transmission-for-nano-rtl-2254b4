# Fault-secure EG-LDPC protected memory

Error-correcting codes usually protect only the storage cells of a memory.
The encoder that builds codewords and the corrector that repairs them are
assumed to be perfect. In nanoscale technologies that assumption breaks: the
logic around the memory suffers transient faults too. This design protects the
whole path. It uses a code whose syndrome checker is so simple and so redundant
that it can itself be built from unreliable logic and still never wrongly
accept a bad word: a *fault-secure detector*. One such detector watches the
encoder and another watches the corrector. When a detector objects, the unit
it watches repeats its operation. Stored words are also scrubbed periodically,
so that errors cannot accumulate beyond what the code can repair.

The code is the (15,7,5) type-I two-dimensional Euclidean-Geometry LDPC
(EG-LDPC) code. It maps 7 information bits to a 15-bit codeword, corrects any
2 bit errors in a word, and detects any 4. The RTL is SystemVerilog-2017 and
is organised after the architecture of the paper *Secure Transmission for
Nano-Memories using EG-LDPC*. Where that paper is silent, the choices made
here are stated below and in each file's header.

## The code and why its detector is fault secure

The parity-check matrix H is a 15×15 circulant. Parity row *j* checks bits
C*j*, C*j*+8, C*j*+9 and C*j*+11 (indices mod 15). Two properties follow:

* **Every bit is covered by exactly 4 rows, and those 4 rows share no other
  bit.** They are *orthogonal* on that bit. This is what allows one-step
  majority-logic correction (below).
* **The code is cyclic.** A circuit that corrects bit 14 corrects any bit once
  the word is rotated, and the parity rows are rotations of each other.

The detector (`fsd_detector`) computes the 15 syndrome bits, each a 4-input
XOR, and ORs them into one error flag. The minimum distance is 5. So every
error pattern of up to 4 bits gives a non-zero syndrome, whether the error
sits in the word being checked or in the detector's own XOR gates, and it is
flagged. Only the final OR has to be reliable.

The encoder (`eg_encoder`) is systematic: C0..C6 are the information bits and
C7..C14 are parity bits. Each parity bit is the XOR of a fixed subset of the
information bits, given by G = [I : X]. The parity part X, one row per
information bit (C7..C14), is:

| info bit | C7..C14  |
|----------|----------|
| i0       | 10001011 |
| i1       | 11001110 |
| i2       | 01100111 |
| i3       | 10111000 |
| i4       | 01011100 |
| i5       | 00101110 |
| i6       | 00010111 |

Each row is the unique word with that information part that satisfies all 15
parity checks. The constants live in `rtl/eg_ldpc_pkg.sv`.

## One-step majority-logic correction

Four check sums are orthogonal on C14:

    {C3, C11, C12, C14}  {C1, C5, C13, C14}  {C0, C2, C6, C14}  {C7, C8, C10, C14}

Suppose C14 is wrong and at most one other bit is too. Then at least 3 of the
4 sums are 1, because the other error can disturb only one of them. Now
suppose C14 is right and at most two other bits are wrong. Then at most 2 of
the sums are 1. So C14 is inverted exactly when **at least 3 of 4** checks
fail. A 2–2 tie keeps the bit.

`osml_bit` builds the four sums for any bit position BIT by rotating the sets
above by BIT+1. It votes with `majority_gate`. That gate is a 4-input binary
sorting network of five comparators, each an OR (max) and an AND (min). Once
the bits are sorted, "at least 3 ones" is simply sorted output 2.

There are two correctors:

* **`serial_corrector`** keeps the word in a cyclic shift register. Each cycle
  it decides C14 and feeds it, corrected, back in at C0, while every other bit
  moves up one place. After 15 shifts every bit has passed position 14 once,
  and the word is back in its original alignment. It costs one `osml_bit` and
  takes 16 cycles: one to load and 15 to shift.
* **`parallel_corrector`** uses 15 copies of `osml_bit`, one per bit,
  followed by a register. It accepts a new word every cycle.

## The memory system

`eg_ldpc_memory_system` is the top level.

**Write path.** `wr_data` is encoded and checked by the encoder's detector in
the same cycle. If the detector flags the word, it is not stored, `wr_ready`
stays low, and the encoding is redone in the next cycle. A transient encoder
fault therefore costs one cycle and never reaches memory.

**Memory.** `banked_memory` holds BANKS banks (`mem_bank`) on a common row
address. Address *a* is stored in bank *a* / BANK_WORDS at row
*a* % BANK_WORDS. A write goes only to its bank. On a read, all banks read the
row and a mux picks the addressed bank.

**Read path, parallel (default, `SERIAL=0`, `parallel_read_path`).** Every
word goes through the parallel corrector, and the corrector's detector checks
the result. A correct memory word, or one with 1–2 errors, comes out clean. A
flagged result can therefore only come from a fault in the corrector itself.
The input mux then feeds the corrector's output back into the corrector, and
the correction is repeated; the read pipeline holds meanwhile. If a result
still fails after MAX_RETRY repeats, it is returned with `rsp_err` set.

**Read path, serial (`SERIAL=1`, `serial_read_path`).** This suits low error
rates. The detector checks each memory word directly, and clean words leave
at once. A flagged word goes to the serial corrector. Its result comes back
through the mux and is checked again. If that check fails, the corrector is
run again, up to MAX_RETRY times.

**Clusters.** The banks can be grouped into CLUSTERS clusters
(`memory_cluster`). Each cluster has its own read path, with its own corrector
and detector. With one cluster (the default) all banks share one read path.
With several, as in the paper's organisation with clusters of 2 banks, a final
mux picks the result of the active cluster. A further detector checks the mux
output. If it flags a word that left its cluster clean, the fault lies in the
mux, and the selection is repeated in the next cycle (`ev_mux_retry`). Word
address *a* lives in cluster *a* / (BANKS/CLUSTERS × BANK_WORDS).

**Scrubbing.** When `scrub_en` is high, `scrub_controller` raises a request
every SCRUB_INTERVAL cycles, for addresses 0, 1, 2, … in turn. The word is
read through the normal read path. If it comes out clean, it is written back
(`ev_scrub_wb`), which removes any errors that had built up in it.

### Timing

| operation                                         | cycles from request accepted to `rsp_valid` |
|---------------------------------------------------|---------------------------------------------|
| read, parallel path                               | 2 (1 bank read + 1 corrector stage); one read per cycle |
| each corrector repeat (parallel)                  | +1, read port held                          |
| read of a clean word, serial path                 | 2; one read per cycle                       |
| read of a word with errors, serial path           | 19 (2 + 16 corrector + 1 re-check)          |
| each corrector rerun (serial)                     | +17                                         |
| each final-mux repeat (CLUSTERS > 1)              | +1                                          |
| read to another cluster than the reads in flight  | waits until those have been delivered       |
| write                                             | stored at the accepting edge; +1 cycle per encoder redo |

### Arbitration and ordering (design choices)

* A pending scrub read takes the read slot ahead of a user read. `rd_ready`
  drops and `ev_scrub_steal` pulses. This is the "cycles lost to scrubbing".
* While a scrub read is in flight, user writes wait. A write-back can then
  never overwrite newer data. Only one scrub is in flight at a time.
* Responses come back in request order and have no back-pressure. With
  several clusters, a read to another cluster waits until the active cluster
  has delivered all its reads. So `rd_ready` depends on `rd_addr`.
* Inside the system, each read path has a valid/ready handshake on its
  output. A result that the final mux is not taking holds its read path.
* A read and a write to the same address in the same cycle return the old
  word.
* A word that is still flagged after all retries is not written back by a
  scrub.

### Fault-injection inputs

Faults are physical in the real system. To exercise them in simulation, the
top has three inputs, which should be tied to zero in normal use:

* `enc_upset` is XORed into the encoder output.
* `cor_upset` is XORed into the corrector output, sampled when the corrector
  takes its input. With several clusters it goes to every cluster.
* `mux_upset` is XORed into the final mux output. It is unused with a single
  cluster, which has no final mux.
* `mem_upset` / `mem_upset_addr` / `mem_upset_mask` flip stored bits, the way
  soft errors accumulate in memory.

The `ev_*` outputs are one-cycle event strobes for counting retries,
corrections, write-backs and stolen read slots.

## Parameters (top level)

| parameter        | default | meaning |
|------------------|---------|---------|
| `BANKS`          | 4       | number of banks, as in the banked organisation of the paper |
| `CLUSTERS`       | 1       | number of clusters, each with its own read path; must divide BANKS. 2 gives the paper's clusters of 2 banks |
| `BANK_WORDS`     | 69906   | 15-bit words per bank: the smallest count holding the paper's 1 Mb (2^20-bit) bank |
| `SCRUB_INTERVAL` | 1024    | cycles between scrub reads (own choice; the paper gives no rate) |
| `MAX_RETRY`      | 3       | corrector repeats before a word is declared uncorrectable (own choice) |
| `SERIAL`         | 0       | 0: parallel pipelined corrector (the paper's main system); 1: serial corrector off the fast path |

The address width is `$clog2(BANKS*BANK_WORDS)`, which is 19 bits at the
defaults. The code itself (n=15, k=7) is fixed in `eg_ldpc_pkg`.

## Module hierarchy

    eg_ldpc_memory_system
    ├── eg_encoder, fsd_detector          write path
    ├── scrub_controller
    ├── fsd_detector                      final mux check (CLUSTERS > 1)
    └── memory_cluster × CLUSTERS
        ├── banked_memory → mem_bank × BANKS/CLUSTERS
        └── parallel_read_path            (SERIAL=0)
            ├── parallel_corrector → osml_bit × 15 → majority_gate → sort_cmp × 5
            └── fsd_detector
            serial_read_path              (SERIAL=1)
            ├── serial_corrector → osml_bit
            └── fsd_detector

## Departures from the paper and what is not here

* **Only the (15,7,5) code is implemented.** The paper also evaluates the
  (63,37,9) and (255,175,17) EG-LDPC codes. They need 8 and 16 orthogonal
  checks per bit and matrices derived over GF(64) and GF(256); they are not
  built.
* **The nanowire crossbar itself is not modelled.** The paper's memory core is
  a nanowire crossbar with stochastic and deterministic address decoders.
  `mem_bank` is a plain array with the same storage function.
* **Ordinary reads do not write back.** As in the paper, corrected words are
  written back only by scrubbing. A word found in error by an ordinary read is
  corrected on its way out, but the stored copy stays as it is until it is
  scrubbed.
* **One serial corrector per read path.** For large codes the paper suggests
  several copies of the serial corrector to cut the throughput loss. With the
  15-bit code one copy (16 cycles) is used; the parallel corrector is the
  fast alternative.
* **Own choices.** The retry limit, the scrub interval and order, the
  arbitration, the in-order rule across clusters, the address split between
  clusters, the handshakes and the single pipeline register in the
  parallel corrector are this design's own.
* **Not reproduced.** The area and FIT (reliability) analyses of the paper
  are not reproduced. Neither is the system size they assume (10^12 bits).

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Mdir obj -y rtl -y tb \
        rtl/eg_ldpc_pkg.sv tb/tb_code_pkg.sv tb/<testbench>.sv --top-module <testbench>
    ./obj/V<testbench>

| testbench | what it checks |
|-----------|----------------|
| `tb_fsd_detector` | all 128 codewords pass; every error of weight 1–2 and a sample of weight 3–4 is flagged; syndrome values |
| `tb_eg_encoder` | all 128 codewords against literal generator rows and the parity checks |
| `tb_majority_gate` | all 16 inputs: sorted order and 3-of-4 majority |
| `tb_osml_bit` | bits 14 and 5 correct under every 0–2-bit error of every codeword |
| `tb_parallel_corrector` | every codeword with every 0–2-bit error, one-cycle latency, hold |
| `tb_serial_corrector` | random words with 0–2 errors, 16-cycle latency, start ignored while busy |
| `tb_parallel_read_path`, `tb_serial_read_path` | data, order, latency, repeat after an injected corrector upset, out_err after MAX_RETRY, holding under back-pressure |
| `tb_mem_bank`, `tb_banked_memory` | random writes, reads and upsets against a shadow model |
| `tb_scrub_controller` | request interval, address sequence, hold until ack |
| `tb_memory_cluster` | 2 banks × 8 words: corrected reads with tags and 2-cycle latency; rd_ok drops and results are held under back-pressure |
| `tb_eg_ldpc_memory_system` | end to end at 4×16 words; both corrector variants, each with 1 and 2 clusters; see below |
| `tb_eg_ldpc_memory_system_full` | end to end at the default size (4 × 69906 words, scrub interval 1024); about 33,000 cycles |

The end-to-end test runs each of these mechanisms and fails if one never
occurs:

* encoder redo
* corrector repeat
* correction of stored errors
* an uncorrectable result
* scrub write-back
* a read slot taken by scrubbing
* a write held during a scrub
* a final-mux repeat (2 clusters only)

It also checks throughput: 64 back-to-back reads take 64 cycles with one
cluster, plus at most 4 cycles for the single cluster switch with two. After
scrubbing, it checks that no word needs correction any more. `tb_code_pkg`
holds a reference model of the code, written from literal generator rows,
independent of the RTL package.

Memory contents are not reset. Write a word before reading it: uninitialised
words read as random data and are usually reported uncorrectable.
