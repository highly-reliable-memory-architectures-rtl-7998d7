# Self-repairing, aging-aware ECC memory block

An on-chip SRAM that has to last decades, for example in automotive or power-plant
control, wears out. Cells become weak ("aged") before they fail, and some cells
fail outright ("hard" faults). On top of that, particles flip bits at random ("soft"
errors). A single-error-correcting code (SEC ECC) on its own runs out of margin
once a word holds one hard fault: the next soft error in that word cannot be
corrected. Classic built-in self-repair, for its part, only replaces words that are
already uncorrectable.

This design combines three mechanisms in one memory block:

* **ECC** on every word. Each 16-bit word is stored as a 21-bit Hamming codeword.
* **Periodic in-field self-test.** The block stops while it is idle and runs two tests:
  * a MATS+ march test, which finds hard faults;
  * an aging test, which uses an on-chip aging sensor to find weak cells.
* **Self-repair by vulnerability.** A small pool of spare words (50 for 100,000 user
  words) is handed out again after every test. It always goes to the words that are
  closest to an uncorrectable error. The repair does not wait for a word to fail.
  When the spares run out, a more endangered word takes the spare of a less
  endangered one.

The main idea is the ranking. Every word is put in one of five classes, from most
to least vulnerable:

| class | contents of the word | what one more bad event does |
|---|---|---|
| 2F | two or more faulty cells | already beyond SEC: data is lost now |
| 1FA | one faulty cell and at least one aged cell | the aged cell failing makes it 2F |
| 1F0 | one faulty cell, no aged cell | a soft error makes it uncorrectable |
| A | no faulty cell, at least one aged cell | still fully protected by ECC |
| H | healthy | nothing is done |

Spares go to 2F words first, then 1FA, 1F0 and A words. With the aging test switched
off, only 2F and 1F0 occur. The block then behaves as a simpler two-class scheme that
repairs uncorrectable words first and correctable ones after them.

## Structure

```
              user port                           test_start / aging_en
                 |                                        |
                 v                                        v
   +-------------+-------------+              +-----------+------------+
   | remap CAM  (50 slots)     |<-- commands -| remap controller       |
   | {valid, word, spare}      |              | (5-class strategy)     |
   +-------------+-------------+              +-----------+------------+
                 | physical address                       ^ reads entries
                 v                                        |
   +-------------+-------------+   fault masks +----------+------------+
   | SRAM 100,050 x 21 bits    |-------------->| diagnosis CAM (256)   |
   | (user words, then spares) |   aged masks  | {word, faulty, aged}  |
   +--+-------+----------+-----+-------------->+-----------------------+
      |       ^          ^                           ^          ^
  ECC decode  ECC encode |                           |          |
      |                  +--- MATS+ BIST ------------+          |
      +--> scrubber      +--- aging test + aging sensor --------+
```

| module | role |
|---|---|
| `rel_mem_top` | the block: mode control, access arbitration, wiring |
| `sram_sp` | one array holding the user words (0..N-1) and then the spares (N..N+Ns-1) |
| `ecc_enc`, `ecc_dec` | SEC Hamming code. The decoder also returns the corrected codeword for scrubbing |
| `remap_cam` | fully associative table: word address to spare address |
| `diag_cam` | per test period, the faulty-cell and aged-cell masks of each reported word |
| `remap_ctrl` | updates the remap CAM from the diagnosis CAM after each test |
| `mbist_mats` | MATS+ march test over all user and spare words |
| `aging_test` | per-word write sequence that lets the aging sensor probe each cell |
| `ocas_model` | behavioural stand-in for the analog on-chip aging sensor |
| `scrub_ctrl` | periodic read, correct and write-back of all user words |
| `mem_pkg` | shared sizes, word classes, CAM command codes, classifier |

## The repair algorithm (remap controller)

This is the part to read carefully. It decides where every word sits in the remap
CAM. The layout is what keeps each update down to a few slot moves.

### Layout of the remap CAM

There is one slot per spare word. A slot holds `{valid, word address, spare address}`.
After reset, slot *i* owns spare *N+i*. Slots are only ever **swapped as a whole** or
have their word field written or invalidated. As a result, each spare word stays
owned by exactly one slot. The slots are kept sorted by class:

```
 slot S-1  +-----------+
           |  2F words |  grows downwards      RC2F  = S-1-c2f         (next 2F slot)
           +-----------+
           | 1FA words |                       RC1FA = S-1-c2f-c1fa    (next 1FA slot)
           +-----------+
           |   free    |
           +-----------+
           |  A words  |                       RCA   = cbad+c1f0+ca    (next A slot)
           +-----------+
           | 1F0 words |  grows upwards        RC1F0 = cbad+c1f0       (next 1F0 slot)
           +-----------+
           | retired   |  faulty spares, never used again
 slot 0    +-----------+
```

The controller keeps five counters: `c2f`, `c1fa`, `c1f0`, `ca` and `cbad`. All the
boundary pointers above are derived from them.

The two most important classes sit at the two ends, 2F at the top and 1F0 at the
bottom. The class that can follow each of them (1FA and A) sits just inside it. So
with aging off (no 1FA or A words), the CAM is simply "uncorrectable words from the
top, correctable words from the bottom".

### Processing one test period

After BIST and the aging test, the diagnosis CAM holds every word that showed a faulty
or aged cell in this period. The controller reads the entries in order. For each
entry it classifies the word from the popcount of the faulty mask and the aged mask.
It also searches the remap CAM for the word. Then it does one of the following:

* **New word, a slot is free.** Write it at the next slot of its region. If a 2F
  word arrives while 1FA words exist, the top 1FA word is first swapped down to the
  free end of the 1FA region. That frees the slot right under the 2F region. 1F0
  versus A works the same way, mirrored. Cost: at most one SWAP and one WRITE.
* **New word, CAM full.** Take the slot of the least vulnerable entry that ranks
  *below* the new word (A first, then 1F0, then 1FA). That entry sits at the inner
  edge of its region, so it is invalidated and the new word inserted as above. If
  no such entry exists, the word is dropped and left to ECC. A dropped **2F** word
  sets the sticky `fail` output, because the memory can no longer guarantee its data.
* **Known word whose class changed.** The word is removed. Its slot is swapped with
  the inner-edge slot of its region. If the next region inward is not empty, that
  hole is moved past it with a second swap. The hole is then invalidated and the word
  inserted again with its new class.
* **Known word, same class.** Nothing to do.
* **Faulty spare word.** The BIST also tests the spares. A spare with a faulty
  cell is retired for good:
  1. If the spare holds a word, that word is removed as above.
  2. The now-free slot is rotated into the retired zone with three swaps: free slot,
     then first free slot, then bottom of A, then bottom of 1F0.
  3. `cbad` is incremented.
  4. The displaced word is placed again with its class, through the same
     insert / evict / drop rules.

  A spare with only aged cells stays in use.

Each entry takes one cycle to fetch and classify, plus 0 to 10 cycles of CAM commands
(the longest case retires a spare whose word then evicts another). Even a full
256-entry diagnosis CAM is processed in under 3,000 cycles.

### Worked example (two classes, 4 spares)

Slots are listed from 0 to 3; `-` means empty.

| period reports | CAM after | what happened |
|---|---|---|
| 10:1F, 20:2F | `10 - - 20` | 1F from the bottom, 2F from the top |
| 30:1F, 40:1F | `10 30 40 20` | full |
| 50:2F | `10 30 50 20` | CAM full: the newest 1F entry gives its slot to the 2F word |
| 10:2F | `30 10 50 20` | 10 leaves the 1F region and joins the 2F region |
| 60:1F, 70:2F | `70 10 50 20` | 60 dropped (nothing below 1F); 70 takes the last 1F slot |
| 80:2F | unchanged | CAM full of 2F words: `fail` set |

`tb_remap_ctrl` replays exactly this sequence and several aging-aware cases.

## Modes and timing of the block

**User mode.**
* Every access searches the remap CAM and uses the SRAM in the same cycle. A hit
  redirects the access to the slot's spare word.
* `u_ready` high means the request is accepted in that cycle.
* Read data arrives one cycle later with `u_rvalid`, already ECC-corrected. Three
  flags come with it:
  * `u_rerr`: a single-bit error was corrected;
  * `u_runcorr`: the syndrome points outside the codeword, so the error is
    uncorrectable;
  * `u_rspare`: the read was served by a spare.
* The scrubber runs every `SCRUB_INTERVAL` cycles. It sweeps all user words through
  the same remap path, taking only idle cycles for its reads. When a word had a
  correctable error, it writes the corrected codeword back in the next cycle. That
  write-back holds `u_ready` low for one cycle.

**Test period** (`test_start` pulse, taken in user mode):

| step | cycles (W = N + Ns physical words) |
|---|---|
| clear diagnosis CAM | 1 |
| MATS+ `{any(w0); up(r0,w1); down(r1,w0)}` on raw codewords | 5W + 1 |
| aging test, if `aging_en` (write all-ones, then all-zeros while sensing) | 2W + 2 |
| remap controller | 1 to 11 per diagnosis entry, plus 2 |

`u_ready` is low for the whole period, and `test_done` pulses at its end. At the
default size a period with the aging test takes about 700,000 cycles.

**The test overwrites the stored data**, because the march test is not transparent.
The owner of the block must reload it afterwards, as the testbenches do. The idea is
that each block is tested while the system has no use for it.

## ECC

The code is a textbook Hamming SEC code. Check bits sit at codeword positions 1, 2, 4,
8 and 16, and data bits fill the other positions in order. Codeword bit *i* holds
position *i+1*. For other data widths, `DW` is a parameter and the number of check
bits is derived from it (for example, 512 data bits give a 522-bit codeword).

There is no double-error detection. A double error is flagged as an error and is
usually mis-corrected. That is why 2F words must never be left unrepaired.

## Aging sensor

`ocas_model` stands in for an analog on-chip aging sensor. During a write, it
compares how fast the cell's supply node discharges with a reference cell, so a weak
cell shows up as slow.

The model is a table of aged cells. Testbenches fill it through the functions
`mark_aged(addr, mask)` and `clear_aged()`. The model answers one cycle after `sense`
with the aged-bit mask of the word, and gives 0 unless `test_en` is high. A silicon
implementation would replace this module with the real sensor and keep its ports.

## Interface of `rel_mem_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of all control state |
| `u_req`, `u_we`, `u_addr`, `u_wdata` | in | 1, 1, 17, 16 | user request (`u_addr` < `N_USER`) |
| `u_ready` | out | 1 | request taken this cycle |
| `u_rvalid`, `u_rdata` | out | 1, 16 | read data, one cycle after the request |
| `u_rerr`, `u_runcorr`, `u_rspare` | out | 1 | corrected / uncorrectable / served by a spare |
| `test_start`, `aging_en` | in | 1 | start a test period; include the aging test |
| `test_busy`, `test_done` | out | 1 | period running; end-of-period pulse |
| `fail` | out | 1 | sticky: an uncorrectable word could not be repaired |
| `diag_overflow` | out | 1 | more words reported than the diagnosis CAM holds |
| `n_2f`, `n_1fa`, `n_1f0`, `n_a`, `n_bad` | out | 6 | remap CAM region sizes, retired spares |
| `ev_insert`, `ev_evict`, `ev_reclass`, `ev_drop`, `ev_spare_fault` | out | 1 | one-cycle event strobes of the remap controller |
| `ev_scrub_fix`, `ev_scrub_sweep` | out | 1 | scrub write-back; end of a scrub sweep |
| `obs_idx` → `obs_valid`, `obs_orig`, `obs_spare` | in → out | 6 → 1, 17, 17 | read any remap CAM slot (debug, test) |

Default parameters:

| parameter | default |
|---|---|
| `N_USER` | 100000 |
| `N_SPR` | 50 |
| `DIAG_N` | 256 |
| `DW` | 16 (`CW` is derived as 21) |
| `ADDR_W` | 17 |
| `SCRUB_INTERVAL` | 1,000,000 cycles |

The array is 2.1 Mbit. The two CAMs together are about 17 kbit of flip-flops
(50 × 34 and 256 × 59 bits).

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<n>` and
has a watchdog. Each one can be built with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/mem_pkg.sv tb/tb_rel_mem_top.sv --top-module tb_rel_mem_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_ecc_enc` | all 65,536 data words against a reference encoder |
| `tb_ecc_dec` | random words with every single-bit flip (corrected) and random double flips (flagged) |
| `tb_sram_sp` | read latency, write/read, read data held while idle or writing |
| `tb_remap_cam` | commands, both searches, spare-address search, spares stay a permutation |
| `tb_diag_cam` | merging of repeated reports, clear, overflow |
| `tb_remap_ctrl` | the worked example above slot by slot; aging-aware cases; spare retirement; 120 random periods against a list-based reference model of the layout |
| `tb_mbist_mats` | operation count 5W, detection of stuck-at-0/1 cells in user and spare words |
| `tb_aging_test`, `tb_ocas_model` | sequence, 2W+2 cycles, reported masks |
| `tb_scrub_ctrl` | interval, sweep, write-back only of corrected words |
| `tb_rel_mem_top` | 64 + 5 words, 8 test periods. Covers scrub stalls, scrub fixes, spare reads, insert, evict, drop, re-classification, both kinds of spare retirement, memory failure, diagnosis overflow, and periods with and without the aging test |
| `tb_rel_mem_full` | the default size with no parameter overrides: one full test period (about 700,000 cycles) with faults spread over the address range, then read-back |
| `tb_rel_mem_sizes` | one test period each at 8K and 512K user words, and at 100,000 words with 500 spares and 66 damaged words (parameters overridden) |
| `tb_rel_mem_words` | one test period each with 32-bit and 512-bit data words (38- and 522-bit codewords) at 8K words |

Hard faults are modelled in the testbenches as stuck-at cells, forced back into the
array after every clock edge.

## Where this RTL goes beyond or departs from the source design

* **Choices where the source gives no detail.** These are:
  * the CAM command set;
  * swap-only movement of slots;
  * the retired zone for faulty spares;
  * removal-then-reinsertion on a class change;
  * the victim order A, then 1F0, then 1FA;
  * arbitration, in the order scrub write-back, then user, then scrub read;
  * the port handshake.

  The source states the ranking, the four boundary pointers and the rule that a less
  vulnerable repair is cancelled for a more vulnerable word. The rest of the list
  above is this design's own.
* **Scrub interval.** The source gives 6 minutes of wall time, with a test every 10
  days. Here the scrub interval is in clock cycles, and test periods are started
  from outside.
* **Diagnosis CAM contents.** The diagnosis CAM is cleared at the start of each
  period. A word's class is therefore set by the faults seen in the latest test.
  Its earlier repair is known from its position in the remap CAM.
* **Test data.** The march test is not transparent, so the data has to be reloaded
  after each test.
* **Not included:**
  * the self-test and repair of the CAMs themselves, for which the source refers to
    other work;
  * block-level repair for burst-access memories;
  * per-word ECC inside 512-bit cache blocks.

  The last two are only sketched as possible extensions. The CAM search and the
  memory access already happen in the same cycle.
* **Overflow and failure.** If the diagnosis CAM overflows, further new words are not
  recorded in that period, and `diag_overflow` is raised. A memory failure (`fail`)
  is sticky until reset.
