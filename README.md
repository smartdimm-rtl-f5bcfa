# SmartDIMM buffer-device logic: TLS encryption done by a memory copy

A server that sends TLS traffic spends much of its CPU time on AES-GCM, and
most of the rest moving the same bytes between cache and DRAM. This design puts
the encryption into the buffer chip of a DDR4 DIMM. The host keeps its normal
memory controller and DDR protocol. Software asks for an offload by copying a
plaintext page (the *source*) to a ciphertext page (the *destination*). The
copy makes the CPU read every source line from DRAM and, later, write every
destination line back to DRAM. Both transfers pass through the buffer chip:

* when a source line is read, the chip gives the data to the host as usual
  and also encrypts a copy;
* the ciphertext waits in an on-chip **Scratchpad**;
* when the host reads a destination line, the chip answers from the
  Scratchpad;
* when the host writes a destination line back to DRAM, the chip swaps the
  host's (stale) data for the ciphertext. This step is called **recycling**
  and frees the Scratchpad line.

The chip never starts a DRAM transaction of its own. It only watches the
command bus and picks the data on the data bus. This works because the host
controller keeps ownership of DRAM timing, refresh and addressing.

The RTL covers the buffer-chip logic for the TLS (AES-GCM encryption) case:

* command decoding;
* recovery of the physical address;
* the page mapping table;
* the decision made for every read/write command;
* the MMIO control interface;
* Scratchpad and context memories;
* the AES-GCM engine.

It does not include the DDR PHYs, the DRAM chips or a compression engine.

## Seeing addresses on a DDR bus

The buffer chip runs at a quarter of the DRAM clock. Each of its cycles
therefore brings four DDR4 command slots (`slot_i[0..3]`, slot 0 issued
first). The top relays them unchanged to `slot_o`.

A read or write command (CAS) carries only bank group, bank and column. The
row was given by an earlier ACTIVATE to the same bank. So the chip tracks the
open row of every bank:

* `slot_decoder` decodes ACT, PRE, PREA, RD and WR using the DDR4 truth table.
* `bank_table` applies ACT/PRE/PREA in slot order. A PREA followed by an ACT
  in the same cycle leaves that one bank open.
* `addr_remap` inverts the host's address map. The map assumed here is:
  * the physical line address is `{row[16:0], f[3:0], col[9:3]}`, 28 bits
    (16 GB). That is a 22-bit physical page number (PPN) plus a 6-bit line
    within the 4 KB page;
  * the host sends line `f` to DRAM bank `{bg, ba} = f ^ row[3:0]`, the
    common row-XOR bank hash.

  So the module computes `f = {bg, ba} ^ row[3:0]`. Parameter `BANK_XOR = 0`
  selects a plain linear map instead.

This address map is an assumption. A real host has its own, and only
`addr_remap` (and the host model in the end-to-end testbench) would need to
change. Under either map, one 4 KB page is 64 lines of one row in one bank.

Only one CAS per chip cycle is handled. A BL8 burst occupies the data bus for
four DRAM clocks, which is one chip cycle. `multi_cas_o` flags a violation.

## Which pages are special: the Translation Table

Every CAS looks up its PPN in `translation_table`. The answer arrives one
cycle later: miss, or `{is_cfg, idx}`.

* `is_cfg = 1` means a source page. Its context lives in Config Memory page
  `idx`.
* `is_cfg = 0` means a destination page. Its results live in Scratchpad page
  `idx`.

A source page and its destination use the same index. One free list manages
both memories.

A lookup happens every cycle, so a large CAM would cost too much power. The
table is instead a 3-way cuckoo hash:

* three RAM ways of 4096 entries each, each indexed by its own multiplicative
  hash of the PPN, all three read in parallel;
* 12288 entries for at most 4096 live mappings (2048 page pairs), so the
  load stays at or below one third and displacements are rare;
* new mappings go into an 8-entry CAM first, so a registration never waits
  for the hash;
* a background engine moves CAM entries into a way. If all three candidate
  slots are full, it displaces a resident entry and re-inserts it, up to 16
  times. It also removes entries on request.

The engine's in-flight entry is searched too. Together with read-first RAMs,
this means a lookup sees one consistent table even while an entry is moving.
After reset the engine clears the ways for 4096 cycles (`ready_o` low). If an
insertion runs out of displacements, `tt_err_o` latches.

## The per-command decision

`arbiter_ctrl` classifies each CAS in the cycle after it arrives, once the
table answer is in. Numbers in brackets are the states of the design's
decision flowchart. The outcome counters `act_count_o[]` follow this order:

| Access | Condition | Action |
|---|---|---|
| any | no mapping | plain DRAM access [S2] |
| MMIO page, write | | registration or context command [S17] |
| MMIO page, read | | status word or pending-page list |
| source line, read | not yet taken | DRAM data goes to the host **and** to the DSA [S16] |
| source line, read or write | already taken | nothing more; the DRAM access still happens [S18] |
| destination line, read | result ready | data from the Scratchpad [S10] |
| destination line, write | result ready | write data replaced by the result; line recycled [S11] |
| destination line, write | result not ready | write passes to DRAM; line kept for later [S7] |
| destination line, read | computing | `alert_n_o` low: the host retries the read [S13] |
| destination line, read | not started | plain DRAM read |

Command and data are decoupled. A CAS is decided at cycle t+1, but its data
beat comes at least two cycles later:

* `hw_*` carries host write data.
* `dr_*` carries DRAM read data.

Each kind arrives in command order. The decision waits in a per-direction
FIFO until its beat comes. The beat leaves one cycle later on `dram_w*` or
`host_r*`, through a multiplexer that picks one of:

* pass-through data;
* the Scratchpad line (read one cycle ahead);
* the tag line;
* MMIO read data.

`alert_n_o` is pulled low in the cycle the data of a retried read leaves.

## Encrypting lines in any order

The host may read source lines in any order: prefetchers, several cores, or
reads that were retried. AES-CTR does not care about order. The GHASH of
GCM is a chained polynomial, and this design reorders it into independent
terms.

Take a record of L lines. Line j holds blocks C0..C3, which are 16-byte GCM
blocks numbered 4j..4j+3. Its term in the hash is

```
share_j = (C0·H^5 ⊕ C1·H^4 ⊕ C2·H^3 ⊕ C3·H^2) · H^(4(L−1−j))
```

The tag is `T = EIV ⊕ len·H ⊕ XOR of all share_j`, where:

* `H = AES_K(0)` is the hash key;
* `EIV = AES_K(IV‖1)` is the encrypted initial counter;
* `len` is the GCM length block.

Each share depends only on its own line, so lines can finish in any order.
Each finished share is XORed into a 128-bit tag kept per destination page in
the Scratchpad.

Division of work:

* The CPU computes H and `EIV ⊕ len·H`. Each costs one AES instruction and
  one multiply.
* The chip computes everything that depends on the data.

`hpow_gen` fills the source page's Config Memory with the powers of H when
the context arrives. It does one GF(2^128) multiply per cycle, so a page is
ready 67 cycles later. The layout is:

* line 0: `{lines, tag_init, key, iv}` (`cfg_line0_t`);
* line 1: H^2, H^3, H^4 and H^5;
* lines 2..17: H^(4k) for k = 0..63, four per line.

`tls_dsa` then handles one line per cycle:

1. Read the three context lines (1 cycle).
2. Encrypt the four counter blocks `IV ‖ (4j+b+2)` in the 11-stage AES-128
   pipeline `aes128_pipe`, and XOR them with the plaintext.
3. Form the four products with H^5..H^2 (1 cycle).
4. Multiply by the stride power (1 cycle).

The total latency is 14 cycles. The ciphertext line goes to the Scratchpad;
the share is XORed into the page tag.

Source lines that arrive before their page's powers are ready wait in a
64-line FIFO; `dsa_stall_o` counts the waiting cycles. A line that finds the
FIFO full is lost and counted in `err_dsa_overflow_o`. With this depth, a
full page can arrive before its powers are ready without loss.

The tag is line L of the destination page. It behaves like a result line:

* it is ready when all L lines are done;
* a read returns it;
* a write-back recycles it.

Its 16 bytes come first in the line, in GCM byte order; the other 48 bytes
are zero.

Byte order: byte 0 of a 64-byte line is bits [7:0]. GCM blocks are
big-endian, so block b is bytes 16b..16b+15, with byte 16b as the most
significant byte.

## Page life cycle, self-recycling and forced recycling

1. **Register.** Software writes a 64-byte MMIO command
   `{op=1, src, dst, lines, key, iv}` to line 0 of the MMIO region (4 pages
   from PPN `MMIO_BASE` = 0x3FFFFC). The chip then:
   * takes a free index;
   * writes config line 0;
   * inserts the two mappings.

   The chip refuses the command (`reg_reject_o`) if any of these hold:
   * there is no free index;
   * the 8 registrations awaiting context are all in use;
   * the CAM lacks room;
   * `lines` is 0 or above 63.
2. **Context.** A second MMIO write to line 1, `{op=2, src, H, tag_init}`,
   does three things:
   * starts `hpow_gen`;
   * sets the page tag;
   * allows DSA work on that page.

   It is matched to its registration through a table of 8 registrations
   awaiting context.
3. **Copy.** Source reads feed the DSA. Destination reads and write-backs are
   served or recycled as in the table above.
4. **Free.** When all L result lines and the tag line have been recycled, the
   chip:
   * removes both mappings from the Translation Table;
   * returns the index to the free list once both removals are done;
   * increments `pages_freed_o`.

Normally the host's own cache evictions do the recycling. Software that
runs low on pages reads MMIO line 0, where bits [15:0] hold the free-page
count. It can then read the pending list (lines 2 and up: sixteen 32-bit
entries `{valid, 9'b0, dst_ppn}` per line) and flush those pages to force
write-backs.

Line 0 of the status read also holds these counters:

* pages freed, in bits [47:16];
* refused registrations, in bits [79:48];
* DSA overflows, in bits [111:80].

## Files

| File | Contents |
|---|---|
| `rtl/smartdimm_pkg.sv` | sizes, DDR slot and MMIO structs, action enum, GCM block helpers |
| `rtl/slot_decoder.sv`, `bank_table.sv`, `addr_remap.sv` | command decoding and address recovery |
| `rtl/translation_table.sv` | cuckoo table with CAM, insertion and removal engine |
| `rtl/arbiter_ctrl.sv` | decision logic, MMIO, page bookkeeping, data muxes, ALERT_N |
| `rtl/scratchpad.sv`, `config_memory.sv` | 2048-page result and context memories (8 MB each) |
| `rtl/gf128_mul.sv`, `aes128_pipe.sv`, `hpow_gen.sv`, `tls_dsa.sv` | the AES-GCM engine |
| `rtl/smartdimm_top.sv` | everything wired together |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end test |
| `tb/tb_gcm_ref_pkg.sv` | plain reference AES and GF(2^128) multiply used by the testbenches |

The default sizes are 2048 pages and 12288 table entries. The top's data ports
carry 512-bit lines. Each testbench prints
`TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, for a testbench `tb_X`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/smartdimm_pkg.sv tb/tb_gcm_ref_pkg.sv \
          -y rtl tb/tb_X.sv --top-module tb_X -Mdir obj_X -o sim
./obj_X/sim
```

The design uses only two-state values. Every register that is read is
reset, and memories are written before they are read.

What the testbenches check:

| Testbench | Checks |
|---|---|
| `tb_smartdimm_top` | Full size, defaults. Models the host controller (ACT/PRE/CAS slots, data beats, retries after ALERT_N) and DRAM, then runs two records through registration, context, copy, read-back and recycling: 8 lines in order with early reads and early write-backs, and 63 lines in reverse order. Compares every ciphertext line and both tags with a software AES-GCM, and the pending list and free counts with expectations. Counts every outcome of the decision table, stalls, retries, a refused registration and page frees; any of these that never happens is a failure. Builds in about a minute and runs in well under a second. |
| `tb_tls_dsa` | GCM test case 3 (one line, known ciphertext and tag), plus random records of 63 and 17 lines fed in random order; checks the 14-cycle latency. |
| `tb_aes128_pipe` | The FIPS-197 vector, H and EIV of GCM test case 3, and random blocks; checks the 11-cycle latency. |
| `tb_gf128_mul`, `tb_hpow_gen` | Against the reference multiply and GCM test case 2. |
| `tb_translation_table` | A 48-entry table to force displacements; random insert, remove and lookup against a reference map. |
| others | Randomised against small reference models. |

## Where this design departs from, or goes beyond, the source description

* **One record per 4 KB page pair, at most 63 lines (4032 bytes).** The tag
  goes in the line after the payload. Records that cross pages, such as a
  full 4 KB or 16 KB TLS record, are not supported. Supporting them needs
  counter and power offsets per page and a shared tag.
* **Encryption only.** No decryption and no associated data. The host folds
  the length block into the initial tag.
* **No Deflate compression engine.**
* **AES-128 only.**
* **Context size.** The context is 18 lines (1152 bytes) per page: one line
  more than a 1 KB context, to hold H^2..H^5.
* **Own choices.** These were not specified and are this design's own:
  * MMIO command formats and the split into a REGISTER and a CONTEXT write;
  * the MMIO base address;
  * the address map;
  * the hash functions;
  * queue depths;
  * the choice that a write to a source page, or a repeated source read, is
    simply passed through.
* **Single rank, one CAS per chip cycle.** Data beats must come in command
  order, at least two chip cycles after their CAS.
* **Not modelled.** DDR PHY, MIG PHY and DRAM timing. The top sees decoded
  slots and whole 64-byte lines.

## Tool notes

Lint reports unused bits for padding fields of the MMIO structs and for
unused hash-product bits; these are intentional. It also notes that `rst_n`
is used both as an asynchronous reset and in assertion `disable iff`
clauses. The memories are plain arrays that synthesis maps to block RAM.
The full-size top has 16 MB of line memory, so synthesis takes a long time.
