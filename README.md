# HyBP: a branch prediction unit that isolates small tables and randomizes large ones

Branch predictors are shared state. One program can train entries that another
program then uses, or watch which entries another program evicts. On a
simultaneously multithreaded (SMT) core, this is true even across hardware
threads and across the user/kernel boundary. Spectre-style attacks that inject
branch targets, and side channels that probe BTB or direction-predictor
contents, both rely on that sharing.

There are two usual defences, and each has a cost:

- **Physical isolation.** Every context gets its own copy of each table. This
  is cheap for tables of a few dozen entries. It is far too expensive for
  multi-kilobyte tables.
- **Randomization with a cipher on the lookup path.** The index and contents
  of each entry are encrypted. This lets large tables be shared safely, but a
  cipher in the fetch stage costs several cycles on every prediction.

This design combines the two, and picks the mechanism per table:

| Table | Size | Protection |
|---|---|---|
| L0 BTB | 16 entries per thread | physically private per context |
| L1 BTB | 512 entries per thread | physically private per context |
| TAGE bimodal base predictor | 8 Kbit + 4 Kbit per thread | physically private per context |
| L2 BTB | 7K entries, 7-way, 1024 sets | shared, randomized |
| TAGE tagged components | 30 × 1K entries | shared, randomized |

Randomization does not run a cipher per lookup. Instead, each context owns a
**code book**: a table of 1024 precomputed 10-bit *index keys*. It also owns a
64-bit *content key*.

- A lookup reads the index key selected by the branch PC.
- The table index becomes `hash(PC) XOR index_key`.
- Stored tags, targets and prediction counters are XORed with the content key.

The code book is read in the first fetch stage, in fixed time. It has no misses
and holds no secrets beyond the keys themselves. The cipher only runs in the
background, to refill a code book.

A *context* is one (hardware thread, privilege level) pair. This unit serves an
SMT-2 core, so it has four contexts:

    ctx = {thread, privilege}   // 0: T0 user, 1: T0 kernel, 2: T1 user, 3: T1 kernel

## What a context switch does

Nothing is cleared on a context switch. Instead, both contexts of the hardware
thread that switched get a new code book and a new content key:

- In the shared tables, their old entries now sit at indices the new keys do
  not map to.
- Any entry that is still reached decodes to a garbage tag, so it misses.
- The private tables use the same encoding, so for them a key change is a
  flush.

The code book can be renewed for three reasons:

1. After reset, for all four contexts.
2. On a context switch (`cs_valid`, `cs_thread`, with the new ASID and VMID),
   for both privilege contexts of that thread.
3. When the context's lookup counter reaches `threshold`. The counter restarts
   at zero when the renewal is requested. A threshold around 2^27 lookups is
   the suggested operating point.

Limiting how many lookups a key pair serves bounds how long an attacker can
search for colliding addresses under one key.

## Code book renewal (`codebook_gen`, `keys_table`)

Each code book is stored as 256 rows of 40 bits, with four keys per row. The
PC selects a key as follows:

- PC bits `[11:4]` select the row.
- PC bits `[3:2]` select the key within the row.

A renewal of context `c` runs these steps:

1. Latch the index seed: `RAND ^ {VMID, ASID}`. RAND comes from a random
   number source outside this unit.
2. Issue 256 encryption requests to an external pipelined 64-bit block cipher,
   one per cycle. Each request uses the seed as the key and the current timer
   value as the plaintext.
3. As each ciphertext returns, write its low 40 bits as the next code book row.
4. The first ciphertext is also loaded whole as the context's content key. That
   takes one cycle, so the content key changes at the start of the refresh.

With a 7-cycle cipher, a renewal takes 7 + 256 = **263 cycles** from the first
request to the last row. If all four contexts are pending, they are served one
after another, lowest number first.

Prediction is never stalled during a renewal. A lookup into a context that is
being refreshed may get a key from the old book or from the new one. The
predictor is only a hint, so this costs accuracy, never correctness.

The cipher interface is a plain valid/data pair with no back-pressure. The
cipher must accept one request per cycle and return responses in order after a
fixed latency: `ciph_req_valid/key/pt` and `ciph_rsp_valid/ct`.

The testbenches use `tb/cipher_model.sv`. It is a 7-stage pipeline around a
keyed mixing function. It is **not** a secure cipher. A real implementation
would connect QARMA-64 or a similar low-latency block cipher here.

## Three-level BTB (`hybp_btb`, `btb_l0`, `btb_sa`)

```
 IF0  PC, thread, privilege ──► keys_table (per-context code book)
 IF1  index key ─► enc_idx = hash(PC) ^ key ; enc_tag = PC[13:2] ^ ckey[63:52]
      L0 (8 entries, fully associative, one per context) answers
 IF2  L1 (64 sets x 4 ways, one per context) answers
 IF3  L2 (1024 sets x 7 ways, shared) answers; final pick L0 > L1 > L2
```

**Entries.** Each entry is 60 bits:

| Field | Bits | Encoding |
|---|---|---|
| valid | 1 | plain |
| branch type | 2 | plain |
| tag | 12 | XORed with content-key bits `[63:52]` |
| partial target | 45 | bits `[46:2]` of the target, XORed with content-key bits `[44:0]` |

The upper target bits come from the branch PC. The hash is an XOR fold of
`PC[47:2]` down to 10 bits.

**Capacity.** Each thread's 16 L0 entries and 512 L1 entries are split evenly
between its two privilege levels. Each context therefore has 8 L0 entries and
64 × 4 L1 entries.

**Replacement.** All levels use random replacement, driven by small LFSRs.

**Fill policy.** This is the part that makes the hierarchy part of the defence:

- A resolved taken branch is always written into its context's L0 and L1.
- It is written into the shared L2 only if its own lookup missed in both
  private levels. The core passes back the `level` the lookup reported.

The private levels absorb the working set of a program. Entries that are hit
often never disturb the L2. An attacker who wants to build an eviction set in
the L2 first has to push their own entries out of L0 and L1. A victim's
entries reach the L2 only after repeated evictions.

**Update timing.** The update is read-then-write: the set is read in the cycle
of `up_valid` and written at the end of the next cycle. A lookup may be issued
every cycle.

## TAGE direction predictor (`hybp_tage`, `tage_table`, `tage_base`)

The direction predictor is a TAGE predictor with these parts:

- **Base predictor:** a bimodal predictor per context. It holds 4096 prediction
  bits and 2048 hysteresis bits, shared by neighbouring pairs. The stored
  prediction bit is XORed with a content-key bit.
- **Tagged components:** 30 shared components of 1024 entries each. The first
  10 have 8-bit tags and the other 20 have 11-bit tags. Each entry holds a
  3-bit signed counter, its tag and a 1-bit useful flag.
- **History lengths:** geometric from 4 to 640 bits of the thread's global
  history.
- **Randomization:**
  - component index = `hash(PC, folded history) XOR index key`, with the same
    index key as the BTB;
  - tag = `hash(PC, history) XOR content key`;
  - counter stored XORed with content-key bits;
  - the useful flag is stored plain.

**Prediction.** It arrives in IF2, one cycle after the key:

- The longest matching component provides the direction.
- The next matching component, or the base predictor, is the alternate.

**Update.** The update takes the PC, the outcome, the index key and the
history snapshot returned with the prediction. It reads in cycle t and writes
in t+1:

- The provider's counter moves toward the outcome.
- Its useful bit is set or cleared when provider and alternate disagree.
- On a wrong prediction, one entry is allocated in the first longer component
  whose useful bit is clear. The scan starts at the next or the second-next
  component, chosen at random. If no such entry exists, the useful bits of the
  longer components are cleared.
- The global history of each thread advances with every update, in commit
  order.

The statistical corrector, loop predictor and local history of a full
TAGE-SC-L are **not** included. The direction output is the TAGE decision
itself.

## Top level (`hybp_top`)

| Port group | Purpose |
|---|---|
| `lk_valid`, `lk_thread`, `lk_priv`, `lk_pc` | one lookup per cycle (IF0) |
| `btb_if1_*`, `btb_if2_*` | early L0 / L1 answers |
| `btb_valid/hit/level/target/type/pc/key` | final BTB answer, IF3 |
| `tage_valid/taken/from_tag/prov/key/hist` | direction and metadata, IF2 |
| `bu_*` | BTB update: taken branch, target, type, key and level from its lookup |
| `tu_*` | TAGE update: outcome, key and history snapshot from its lookup |
| `threshold`, `cs_*`, `rand_in`, `timer` | key management inputs |
| `ciph_req_*`, `ciph_rsp_*` | external block cipher |
| `renew_busy/done/pending`, `l2_write`, `tage_alloc`, `tage_mispred` | status and event pulses |

The code book is read once per lookup. The BTB and TAGE share that read.

Metadata travels with the branch to commit, and the core returns it with the
update. This is why the update ports carry the key, the BTB level and the
history.

All tables are written as arrays with synchronous reads, so they map onto
SRAMs. The exceptions are the valid bits and the L0 entries, which are
flip-flops so that reset clears them. Code book and SRAM contents are not
reset: the renewal after reset fills every code book before it matters.

## Departures and own choices

The overall structure follows the published HyBP proposal:

- which tables are isolated and which are randomized;
- the 16/512/7K BTB sizes and the 60-bit entry;
- the 1K × 10-bit code book kept as 256 × 40-bit rows;
- the 263-cycle renewal;
- the three renewal triggers;
- the 30-component TAGE with 8/11-bit tags and 1K entries;
- the bimodal base size.

The following are choices of this implementation:

- **Four code books.** There is one code book per (thread, privilege) context.
  Some descriptions of the scheme speak of one per hardware thread.
- **Private partitions.** The per-thread private tables are split evenly
  between privilege levels.
- **Bit-level details:**
  - XOR as the way the index key combines with the hashed index;
  - the PC hash;
  - the seed formula;
  - the content key taken from the first ciphertext of a renewal;
  - the entry field split.
- **L1 shape:** 4-way, 64 sets per context.
- **L2 fill policy:** fill only after a miss in both private levels.
- **TAGE details:**
  - history lengths;
  - 3-bit counters and 1-bit useful flags, so entries are 12 and 15 bits;
  - hashes;
  - the simplified allocation, with no periodic useful-bit reset and no
    "use alternate on new entry" logic;
  - histories updated at commit rather than speculatively.
- **Update interfaces.** All metadata hand-back interfaces are this
  implementation's own.

These parts are not included:

- the block cipher, random number source and timer, which are ports;
- the TAGE-SC-L statistical corrector, loop predictor and local history.

The idle output bits that a netlist report shows are intentional:

- the low two bits of every target and PC output are zero because
  instructions are 4-byte aligned;
- the cipher plaintext is the timer input passed straight through;
- code book rows are cipher responses passed straight through.

## Simulating

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. The package must come
first on the command line; the other modules are found through `-y`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/hybp_pkg.sv tb/tb_hybp_top.sv --top-module tb_hybp_top -Mdir obj -o sim
./obj/sim
```

| Testbench | What it checks |
|---|---|
| `tb_keys_table` | key selection by PC, one-cycle read, key holds while the PC changes, context separation |
| `tb_codebook_gen` | seed, row contents against the cipher model, 263-cycle renewal, content key, reset / switch / threshold triggers, counter restart |
| `tb_btb_l0`, `tb_btb_sa` | hit/miss, replacement, update timing (the set-associative test uses 16 × 4) |
| `tb_hybp_btb` | L0/L1/L2 stage timing, fill policy, context isolation, key-change flush, pipelined lookups |
| `tb_tage_table`, `tb_tage_base` | storage ports, counter and hysteresis behaviour, content-key encoding |
| `tb_hybp_tage` | prediction timing, returned key and per-thread history, misprediction reporting, a period-5 pattern learned by the tagged components, allocation, a new content key hiding trained entries |
| `tb_hybp_top` | the whole unit at its default sizes (below) |

`tb_hybp_top` runs the whole unit at its default sizes. Its sequence is:

1. Reset, with all four code books filled (263 cycles each).
2. Traffic that hits each BTB level.
3. A periodic conditional branch that TAGE must learn.
4. Cross-thread lookups that must miss.
5. A context switch and a threshold-triggered renewal, with lookups continuing
   during both.

It counts each of these mechanisms and fails if one never occurred. It runs in
about a second.

To change sizes, override the top's parameters:

- `L0_ENTRIES`, `L1_SETS`, `L1_WAYS`, `L2_SETS`, `L2_WAYS` for the BTB;
- `NTAB`, `NSHORT`, `T_ENTRIES`, `HMIN`, `HMAX`, `BASE_ENTRIES` for TAGE;
- `CNT_W` for the access counters.

Code book geometry is set in `hybp_pkg`. Index width equals key width, so
`L2_SETS` and `T_ENTRIES` must stay at most 1024 unless `KEY_W` grows with
them.
