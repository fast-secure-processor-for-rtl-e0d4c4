# One-time-pad memory encryption for an execute-only secure processor

A secure processor of the XOM ("execute-only memory") kind trusts nothing but
its own die: code and data are kept enciphered in external memory and are
deciphered only inside the chip. The straightforward way to do this puts a
block cipher between the L2 cache and memory. Every L2 miss then pays for
the memory access *and* for the cipher, for example 100 + 50 = 150 cycles.

This RTL takes the cipher off that path. A line is not stored as
`E_k(plaintext)`. It is stored as

    ciphertext = plaintext XOR E_k(seed)

where the seed does not depend on the data, so the pad `E_k(seed)` can be
computed while the memory access is still in flight. When the line arrives,
a single XOR gives the plaintext. An L2 read miss that finds its seed on chip
costs `max(memory, cipher) + 1` = 101 cycles instead of 150. The scheme
follows "Fast Secure Processor for Inhibiting Software Piracy and Tampering"
(one-time-pad encryption with a sequence number cache). The RTL, its
interfaces and the details listed under *Choices made here* are this
design's own.

## Seeds and sequence numbers

The cipher is DES, with 64-bit blocks. A 128-byte L2 line is 16 blocks, and
every block gets its own seed:

    seed(block b of line L) = (virtual address of L + 8*b) + seq(L)

* **Virtual, not physical, address.** Pages may move in physical memory
  between runs, but the seed must not change. The L2 therefore keeps each
  line's virtual address next to its physical tag. This RTL receives both
  addresses with every request.
* **Sequence number `seq(L)`.** If the address alone were the seed, every
  write of line L would use the same pad. Successive values stored there
  would then leak their XOR differences. So each time a data line goes to
  memory its number changes:

      seq_new = seq_old + system_timer        (first write of a line: seq = 0)

  The number must be known again when the line is read back, possibly much
  later. It is kept in the **sequence number cache (SNC)**.
* **Code** is never written back, so a code line needs no sequence number.
  Its seed is just the block address, and the software vendor can encipher
  the program in advance.
* **Plain lines** bypass the cipher. These are shared libraries, program
  inputs, and memory shared under two virtual addresses (for which the
  scheme gives up on one-time pads).

## The sequence number cache

The SNC holds 32768 16-bit numbers (64 KB). That covers 32768 lines, i.e.
4 MB of data. It is tagged by the 41-bit virtual line number
(48-bit VA, 128-byte lines). By default it is **fully associative with LRU
replacement**. `SNC_WAYS = 32` turns it into the 32-way set-associative
variant, whose set index is the low bits of the line number.

A line whose number is not on chip still has one. It lives in memory,
enciphered directly with DES (not with a pad: a pad would itself need a
sequence number). When the SNC must make room, the least recently used
number is evicted, pushed into the write buffer, enciphered, and written
out. A later SNC miss fetches it and deciphers it. That costs a memory
access plus a cipher pass before the pads can even start, which is why
replacement order matters.

LRU is kept as one age per way. The ages of a set are always a permutation
of `0..WAYS-1`. A touched way becomes 0, and every way younger than it ages
by one. The victim is the first invalid way, or else the way whose age is
`WAYS-1`. This gives exact LRU.

Each request gets its result one cycle later. The operations are:

* `SNC_LOOKUP`: a query; a hit counts as a use.
* `SNC_UPDATE`: overwrite the number of a line that is present.
* `SNC_INSERT`: write a line's number, returning the evicted entry if a
  valid one had to go.

## What each operation does

The controller in `otp_secure_mem` runs one operation at a time. Reads come
first. The write buffer drains whenever no read is waiting.

**Read, SNC hit**

| cycle | event |
|---|---|
| 0 | Miss accepted. The memory line read is issued at once, and the SNC is looked up in parallel. |
| 1 | SNC hit. `seed_gen` streams 16 seeds into the cipher, one per cycle (cycles 1–16). |
| 51–66 | The 16 pads leave the cipher and are parked in the read-side `otp_line_xor`. |
| 100 | The ciphertext line arrives from memory. |
| 101 | The XOR is registered; the plaintext goes to the L2. |

**Read, SNC miss**

1. The line read is already under way.
2. The controller reads the line's sequence-number word from memory and
   deciphers it (about 150 cycles).
3. It then streams the seeds.
4. When the pads and the buffered line meet, the plaintext goes to the L2,
   about 220 cycles after the request.
5. The number is inserted into the SNC. The evicted entry, if any, goes to
   the write buffer.

**Write-back, SNC hit.** The L2 hands a dirty line (in plaintext) to the
write buffer and goes on. Later the controller pops the line and sets
`seq = seq + timer` in the SNC. It streams the seeds, XORs the pads into the
line, and writes the ciphertext to memory.

**Write-back, SNC miss.** The controller fetches and deciphers the stored
number, adds the timer, and enciphers and writes the line. It then inserts
the number and evicts as above.

**Evicted number.** The controller enciphers the word
`{1, 000000, line tag, seq}` directly with DES and writes it to
`seq_base + 8 * line_tag`.

**Code read.** The same as a read hit with `seq = 0`; the seeds start in
the acceptance cycle. **Plain read/write.** The line goes straight through.

## Keeping pending writes visible

The write buffer holds data that memory does not have yet. The controller
handles this in two ways, neither described by the scheme itself:

* **An L2 read of a line still in the buffer** (matched on physical line
  address) is held off. The buffer drains until the line has reached
  memory.
* **An SNC miss whose number is still in the buffer** as an evicted entry
  takes the youngest such number from there instead of reading stale
  memory.

Reads are accepted only while the buffer is not full. L2 write-backs may
fill it only to `WB_DEPTH-1`. Together these always leave one slot for a
number the current operation may evict.

## Blocks

| module | role |
|---|---|
| `otp_secure_mem` | top: controller FSM and wiring |
| `crypto_engine` | fully pipelined DES: one block per cycle in, result exactly `LAT` (50) cycles later, with a tag. Rounds take the first 16 stages; the rest are delay stages up to the specified latency. |
| `des_pkg` | DES (FIPS 46-3) tables and round functions |
| `snc` | sequence number cache |
| `seed_gen` | 16 seeds per line, one per cycle |
| `otp_line_xor` | gathers 16 pads and a line in any order; `done` one cycle after the last piece |
| `write_buffer` | FIFO of evicted lines and numbers, with the two search ports |
| `system_timer` | free-running 16-bit counter that mutates sequence numbers |
| `otp_pkg` | widths, request classes, entry and event types |

## Interface of `otp_secure_mem`

Every transfer uses valid/ready; it happens in a cycle where both are 1.

| group | signals | notes |
|---|---|---|
| key | `key_we`, `key_i[63:0]` | the program's DES key, already unwrapped by the processor's key unit |
| table | `seq_base[47:0]` | physical base of the in-memory sequence-number table |
| L2 read miss | `l2_rd_valid/ready`, `l2_rd_pa`, `l2_rd_va`, `l2_rd_kind` | `kind` is `REQ_DATA`, `REQ_INSTR` or `REQ_PLAIN` |
| read data | `l2_rd_resp_valid`, `l2_rd_resp_data[1023:0]` | plaintext line; no back-pressure |
| L2 write-back | `l2_wb_valid/ready`, `l2_wb_pa`, `l2_wb_va`, `l2_wb_kind`, `l2_wb_data` | plaintext line |
| memory | `mem_req_valid/ready`, `mem_req_we`, `mem_req_word`, `mem_req_addr`, `mem_req_wdata`; `mem_rsp_valid`, `mem_rsp_rdata` | line or 64-bit word (in bits 63:0); read data returns in order |
| status | `events` | one-cycle flags: SNC query/update hit/miss, eviction, number written back, number forwarded, first write, read held for the buffer, code read, plain read/write |

The reset `rst_n` is asynchronous and active low.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `SNC_SIZE` | 32768 | numbers held (64 KB) |
| `SNC_WAYS` | 32768 | associativity (= `SNC_SIZE`: fully associative; 32 for the set-associative variant) |
| `CIPHER_LAT` | 50 | cipher latency in cycles, at least 16 (102 models a slower cipher) |
| `WB_DEPTH` | 8 | write-buffer entries |

Fixed in `otp_pkg`: 48-bit virtual and physical addresses, 128-byte lines,
16-bit sequence numbers.

## Choices made here

These details are not fixed by the scheme and were chosen for this RTL:

* **DES tables.** They are the standard ones.
* **Pipeline split.** The cipher's 16 rounds are followed by delay stages to
  reach 50 cycles.
* **One cipher, one block per cycle.** The 16 seeds of a line enter the
  single pipeline on consecutive cycles, so the last pad is ready 17 cycles
  after the cipher latency. At 50 cycles this is hidden behind the
  100-cycle memory. With a 102-cycle cipher a read hit takes 120 cycles, not
  the 103 a line-wide cipher would give; 16 parallel pipelines would close
  that gap at 16 times the area.
* **LRU implementation.** Per-way ages, and a one-cycle SNC access.
* **In-memory numbers.**
  * Format: `{valid, 6'b0, line tag, seq}`. The tag identifies a word that
    was never written for this line: when a fetched word does not decipher
    to the right tag, the line is taken as never enciphered with a number.
    A write then uses `seq = 0` and a read uses the address alone.
  * Location: `seq_base + 8*tag`.
* **Timer.** 16 bits, one count per clock, reset to 1.
* **Concurrency and hazards.** One operation at a time with reads first,
  the write-buffer checks above, and a depth of 8.
* **Code seeds.** The vendor's base address for code is the line's own
  virtual address.
* **Shared data.** Data shared under two virtual addresses travels in
  plaintext.
* **Memory interface.** Whole-line or whole-word transfers.
* **Tag width.** The SNC tag is 41 bits (the full line number).

## Not included

* **The processor, L1 and L2 caches.** This RTL sits on the L2's memory
  side; the L2 must store each line's virtual address.
* **Main memory.** A behavioural model is in `tb/tb_mem_model.sv`.
* **The public-key unwrapping of the program key.**
* **XOM compartment tagging and memory-integrity hashing.**
* **Context-switch handling of the SNC.** Flushing it or tagging entries
  with a compartment ID are both possible; neither is built.
* **The no-replacement SNC policy and the conventional encrypt-on-path
  design.** They are only points of comparison.

## How far it is verified

Every module has a self-checking testbench in `tb/`:

* **DES:** the standard known-answer vectors, and results that must appear
  exactly 50 cycles later.
* **SNC:** random operations compared with an LRU list model, fully
  associative and 4-way.
* **Seeds, combiner, write buffer, timer:** each against a reference model.
* **`tb_otp_secure_mem`** runs a 4-entry SNC and a 4-entry write buffer with
  random concurrent reads and write-backs against a 100-cycle memory that
  stalls at random. It checks:
  * every read returns the last data written;
  * SNC hits and code reads take exactly 101 cycles, and misses at least
    150;
  * no data block reaches memory in plaintext;
  * a rewrite always gets a new pad;
  * every stored number deciphers to its own line;
  * code pads match DES computed by the testbench.

  It also requires that each mechanism above actually happened.
* **`tb_otp_secure_mem_full`** runs the top at its default sizes (32K-entry
  fully associative SNC) through a first write, read hits, a rewrite, a
  read miss, a code read and plain traffic.
* **`tb_otp_slow_cipher`** builds the top with a 102-cycle cipher next to
  one with 50 cycles. With 102 cycles the pads, not memory, set the pace:
  a read hit takes 17 + 102 + 1 = 120 cycles, still far below the
  100 + 102 = 202 of a cipher on the memory path.

The performance figures of the scheme (average slowdown across benchmarks)
come from whole-processor simulation and are not reproduced by this RTL.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/otp_pkg.sv rtl/des_pkg.sv tb/tb_otp_secure_mem.sv \
        --top-module tb_otp_secure_mem --Mdir obj
    ./obj/Vtb_otp_secure_mem

Each testbench prints `TB_RESULT checks=N failures=M` at the end. The same
command with another `tb/tb_*.sv` file and top name runs that testbench.
The fully associative 32K-entry SNC is large: roughly 2.4 Mbit of state plus
a 32K-way compare. It simulates quickly, but logic synthesis of it takes a
long time.
