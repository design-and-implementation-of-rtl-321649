# SHA-1 collision-search engine and SHA-1 hash core

Differential attacks on SHA-1 look for a message pair whose internal values
follow a *differential characteristic*: a list of conditions that the 80
expansion words W(i) and the 80 state words A(i) of both messages must meet,
step by step. Most candidate pairs break a condition within a few steps, so
the search is dominated by starting a step, checking it, and giving up early.
This RTL is a building block for that search. It computes the SHA-1 steps of
two messages side by side, checks the pair against the characteristic after
every step, and abandons the pair at the first violation, all at one step per
clock cycle. When a pair survives up to a chosen end step it stops and leaves
the pair in its message memories. Counters record how often each step was
reached.

The same step logic also serves a plain SHA-1 hash unit: a padder
(`sha1_pad`) in front of a compression core (`sha1_hash`). The top level,
`sha1_top`, holds the search block and the hash unit side by side, each with
its own ports.

The organisation follows the FPGA platform of *Design and Implementation of
Cryptography Hash Function*. That design has two message lanes, a sixteen-word
expansion register and five A registers per lane, and shared memories for the
W and A parts of the characteristic. It also has a message memory per lane,
an LFSR for message enumeration, an auxiliary-path flipper, an evaluate
block, statistics counters, an FSM and a bus interface. Much of what is
inside these blocks is this implementation's own choice. The section
[Departures and gaps](#departures-and-gaps) lists where.

## One step per cycle: the A-register form

The SHA-1 step normally updates five words a, b, c, d and e. All of them are
earlier values of `a`, some rotated:

    a = A(i), b = A(i-1), c = ROTL30(A(i-2)), d = ROTL30(A(i-3)), e = ROTL30(A(i-4))

So each lane keeps only the last five A words (`sha1_areg`). A step computes
one new word:

    A(i+1) = ROTL5(A(i)) + F_i(A(i-1), ROTL30(A(i-2)), ROTL30(A(i-3)))
             + ROTL30(A(i-4)) + W(i) + K_i

`F_i` is *choose* for steps 0-19, *parity* for 20-39, *majority* for 40-59
and *parity* for 60-79. `K_i` is the standard constant of each group of
twenty steps. `sha1_round` is this adder tree. It is purely combinational, so
that within one clock the datapath can:

* form W(i) in Generate W (`gen_w`),
* compute A(i+1) for both lanes,
* check W(i) and A(i+1) of both lanes in `evaluate`,
* shift A(i+1) into the A registers and W(i) into the expansion register,
* increment the counter of step i.

That is one *elementary operation*. The clock rate is set by this path: a
five-input 32-bit addition, a condition compare and a counter increment.

The expansion register (`sha1_wexp`) holds the last sixteen W words. Its XOR
network gives the next word, ROTL1(W(i-2) ^ W(i-7) ^ W(i-13) ^ W(i-15)). For
the first sixteen steps of a run, Generate W takes the stored word from the
message memory. After that it takes the XOR-network output.

## Conditions: how a characteristic is stored

Each 32-bit word of the characteristic is a `cond_t` of four fields (see
`sha1_pkg`):

| field   | meaning |
|---------|---------|
| `dmask` | bits whose difference lane1 ^ lane2 is fixed |
| `dval`  | the value of that difference |
| `vmask` | bits whose lane-1 value is fixed |
| `vval`  | the value of those bits |

A pair meets the word when both masked comparisons hold (`cond_ok`). With
this format the usual signed-difference symbols become:

| symbol | dmask/dval | vmask/vval |
|--------|------------|------------|
| `u` | 1/1 | 1/0 |
| `n` | 1/1 | 1/1 |
| `x` | 1/1 | 0/- |
| `-` | 1/0 | 0/- |
| `0` | 1/0 | 1/0 |
| `1` | 1/0 | 1/1 |
| `?` | 0/- | 0/- |

The W part has one row per step (80 rows). The A part has one row per word
A(-4) to A(80) (85 rows), and row r holds the conditions of A(r-4). Step i
checks W-part row i and A-part row i+5, the row of the word A(i+1) it has
just computed.

Random words come from one 32-bit LFSR (`lfsr32`) shared by both lanes, so
both lanes see the same random word. Generate W and Generate A (`gen_a`)
force the value-fixed bits and XOR the required difference into lane 2. A
freshly generated pair therefore meets its own row by construction.

## A trial, cycle by cycle

The host sets a start step `s` and an end step `e`. The search may begin in
the middle of the characteristic: the state A(s-4)..A(s) is drawn at random
and meets the A-part rows s..s+4. The search then runs from there. The FSM
(`search_fsm`) runs these phases:

| phase | cycles | what happens |
|-------|--------|--------------|
| SEED | 16 | sixteen new random words per lane, word k meeting W-part row b+k, written to both message memories |
| LOADA | 5 | the random state A(s-4)..A(s) is shifted into the A registers and kept as a snapshot |
| PREW | s-b | the stored words W(b)..W(s-1) are shifted into the expansion register; no A words are computed |
| RUN | 1 per step | step i for both lanes plus the check; a violation ends the trial, a pass at step e ends the search |
| NEXT | 1 | picks the next pair (below); a stop request ends the search here |
| APSTEP / SEGSTEP | 1 | new pair from the current one; the snapshot state is restored |
| COMMIT | 16 | after a find, the auxiliary-path flips are written into the message memories |

Here b = 0 when s <= 16, and b = s-16 when s > 16. For an early start the
memories therefore hold a real message, W(0)..W(15). For a late start they
hold the window W(s-16)..W(s-1) itself: sixteen random words that meet their
W-part rows. Later W words follow from the window by the normal expansion.
For any s > 0 the state is random rather than computed from the initial
value. A pair found that way shows that the characteristic's region can be
passed; it is not a collision.

From `start`, a fully compliant run from step 0 to step 79 takes
16 + 5 + 80 + 16 = 117 cycles. A failing trial that started by AP or
segmented-counter enumeration costs 1 + (s-b) + (steps run) + 1 cycles. The
(s-b) term is never more than 16.

NEXT tries the cheapest new pair first:

1. **Auxiliary paths** (`ap_unit`, one per lane). An auxiliary path is a set
   of message bits that can be flipped together without breaking the
   conditions up to some step. The host writes up to `NAP` = 8 path masks of
   sixteen words each, one per stored word. A counter runs through every
   combination of paths. The flip mask of the current combination is XORed
   into each stored word as it is read, so a new pair costs one cycle and no memory writes.
2. **Segmented counter** (`seg_counter`). A chosen stored word (`enum_word`)
   has free bits, the bits with no value condition, and they need not be
   adjacent. The counter runs through every value of them. It does this by
   setting the fixed bits to one before adding one, so the carry runs across
   them: `next = ((q | ~mask) + 1) & mask`. Each new value is written into
   both message memories; lane 2 keeps its difference. The AP counter then
   starts over.
3. **Reseed**: a whole new random message pair and state (SEED, LOADA).

Both enumeration modes can be switched off. With both off, every trial is a
fresh random pair.

The control word that the FSM drives (`search_ctrl_t`) depends only on its
state, never on the evaluate result of the same cycle. The evaluate result
only selects the next state, so the datapath has no combinational loop.

## Statistics

`stat_counters` keeps a 64-bit counter N(i) per step: how many trials
executed step i. It also keeps totals of elementary operations, trials,
reseeds and found pairs. N(s) equals the number of trials. N(i) never grows
with i. The sum of all N(i) is the number of elementary operations. The
ratio N(i+1)/N(i) is the measured probability that step i is passed, which
is the quantity a performance model of the attack is built on. 64 bits are
enough for the 2^54.5 elementary operations of a full SHA-1 collision search.

## Register map (system bus)

The bus uses 12-bit word addresses. A write takes effect on the edge where
`bus_we` is high. A read issued with `bus_re` returns `bus_rdata` with
`bus_rvalid` on the next cycle. Read or write the memories only while
`busy` is low: during a search their ports belong to the FSM.

| address | access | contents |
|---------|--------|----------|
| 0x000 | W | bit 0 start, bit 1 stop, bit 2 load LFSR seed, bit 3 clear statistics |
| 0x000 | R | bit 0 busy, bit 1 found |
| 0x001 | R/W | config: [6:0] start step, [14:8] end step, [16] AP enable, [17] segmented-counter enable, [18] check W, [19] check A, [27:24] enumerated word |
| 0x002 | R/W | LFSR seed (0 is replaced by 1) |
| 0x003 | R | last step evaluated (the end step after a find) |
| 0x004-0x00B | R | trials, elementary operations, reseeds, finds (64 bits each: low word, then high word) |
| 0x200 + 4r + f | R/W | W-part row r, field f (0 dmask, 1 dval, 2 vmask, 3 vval) |
| 0x400 + 4r + f | R/W | A-part row r (word A(r-4)) |
| 0x600 + k / 0x610 + k | R/W | stored word k of lane 1 / lane 2, that is W(b+k) |
| 0x800 + 16p + k / 0x900 + 16p + k | W | AP mask of path p, word k, lane 1 / lane 2 |
| 0xA00 + 2i (+1) | R | N(i), low (high) word |

After reset the config is: start step 0, end step 79, both checks on, no
enumeration.

Typical use:

1. Write the characteristic and the AP masks.
2. Write the seed to 0x002, then write 4 to 0x000 to load it.
3. Write the config, then write 9 to 0x000 (clear statistics and start).
4. Wait for `found`, or write 2 to 0x000 to stop.
5. Read the pair at 0x600 and 0x610, and the statistics.

## SHA-1 hash unit

The message enters the top as 512-bit chunks on a valid/ready handshake
(`hash_in_*`). Byte 0 of a chunk is bits 511:504. Every chunk but the last
is full; the last one gives its byte count, 0 to 64.

`sha1_pad` passes full chunks straight through, adding no cycles. It counts
the message length in bits in a 64-bit counter. In the last chunk it keeps
the valid bytes, writes 0x80 after them and clears the rest. If at most 55
bytes are valid, the 64-bit length fills the last eight bytes of that block.
Otherwise the length does not fit, and the padder sends one more block: zeros
and the length, starting with 0x80 when the last chunk was full. The padder
marks the first block of a message, which restarts the core at the standard
initial value, and its final block.

`sha1_hash` compresses one 512-bit block in 80 cycles, one step per cycle.
It uses the same `gen_w`, `sha1_wexp`, `sha1_areg` and `sha1_round` modules
as a search lane. Its own `digest_valid` pulses 81 clock edges after it
accepts a block. It takes the next block one edge later, so blocks follow
every 82 cycles. The top flags only the digest that follows a message's final
block as `hash_digest_valid`. That is 81 cycles after the last chunk, or 163
when an extra length block was needed. `hash_digest` is {H0..H4}.

## Files

| file | role |
|------|------|
| `rtl/sha1_pkg.sv` | types (`cond_t`, `search_cfg_t`, `search_ctrl_t`), constants, F/K functions, address map |
| `rtl/sha1_top.sv` | top level: search block plus hash core |
| `rtl/sha1_search_core.sv` | the two-lane search building block |
| `rtl/search_fsm.sv` | trial sequencing |
| `rtl/bus_io.sv` | system-bus registers and decoding |
| `rtl/sha1_round.sv`, `rtl/sha1_wexp.sv`, `rtl/sha1_areg.sv` | step, expansion register, A registers |
| `rtl/gen_w.sv`, `rtl/gen_a.sv`, `rtl/lfsr32.sv` | word generation |
| `rtl/char_mem.sv`, `rtl/msg_mem.sv` | characteristic and message memories |
| `rtl/ap_unit.sv`, `rtl/seg_counter.sv` | auxiliary-path flipper, segmented counter |
| `rtl/evaluate.sv`, `rtl/stat_counters.sv` | compliance check, statistics |
| `rtl/sha1_pad.sv`, `rtl/sha1_hash.sv` | SHA-1 message padder and compression core |
| `tb/sha1_ref_pkg.sv` | textbook SHA-1 reference model (a..e form) for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv tb/tb_sha1_top.sv --top-module tb_sha1_top
    obj_dir/Vtb_sha1_top

For another testbench, replace `tb_sha1_top` with its name. `tb_sha1_top`
runs the whole design at its default parameters in a few seconds:

* SHA-1 of "abc", of the empty message, of the 448-bit standard test
  message and of random messages up to 200 bytes, some of which need an
  extra padding block. Digests are compared with known values and the
  reference model, and each digest's latency is checked. The search block
  runs at the same time.
* A characteristic fixed to the SHA-1("abc") computation. It takes one
  trial of exactly 117 cycles, and the statistics are checked.
* An unmeetable condition at step 40, ended by a stop request.
* A probabilistic characteristic with a message difference. This run uses
  AP flips, segmented-counter steps and reseeds. The found pair is read back
  and its 25 steps are recomputed by the reference model for both lanes.
* A search from start step 30 with a reconstructed state. The random window
  W(14)..W(29) and the expanded words must meet their W rows; the test
  checks both.

`tb_round_stats` measures the per-step statistics of searches that start
at step 64 and use per-step pass probabilities taken from published tables
for the last steps of a SHA-1 characteristic. There are three profiles: with
inter-bit constraints (steps 64 to 71, where about 2^20 trials are expected
before a pair passes), with constraint relaxation, and with neither. Each
run ends at its first find, so its trial count is a single geometric
sample. The seeds are fixed, so the run is reproducible. It
checks that the measured N(i+1)/N(i) matches each step's probability. It
also checks that the cycle count of each run is exactly the overhead plus one
cycle per elementary operation. It prints log2 N(i) for comparison with
such tables.

`tb_sha1_search_core` repeats the search cases with `NAP` = 2. The unit
testbenches check each module against independent models: the bit-serial
LFSR, the textbook SHA-1 step and schedule, a queue model of the A
registers, and so on.

## Departures and gaps

* **Run-time instead of synthesis-time specialisation.** The original design
  builds the auxiliary-path bit positions, the compliance-check logic and
  the segmented counters into the FPGA configuration for one
  characteristic. Here they are masks the host writes at run time, so one
  netlist serves any characteristic.
* **Not built:** the XOR network for inter-bit constraints and the
  constraint-relaxation logic. Both are named in the source, but their
  function is not specified. The FPGA reconfiguration flow and the host
  processor are outside this RTL.
* **Own choices**, where the source gives only a block name or its purpose:
  * the condition encoding and the register map;
  * the 32-bit LFSR and its polynomial, x^32+x^22+x^2+x+1;
  * the trial order AP, then segmented counter, then reseed;
  * the placement of the segmented counter on one message word;
  * the state snapshot reused by AP and segmented trials;
  * for a start step s > 16, storing the window W(s-16)..W(s-1) instead of
    a message, and reloading it into the expansion register (at most 16
    cycles) for every trial;
  * the commit of AP flips after a find;
  * the number of auxiliary paths (8);
  * asynchronous-read memories;
  * the chunk interface of the hash unit and the 81-cycle core latency.
* **SHA-1 constants** follow the SHA-1 standard. That covers the K_i
  values, the fifth initial word 0xc3d2e1f0 and the message-schedule taps.
* **Cost of a late start.** Every trial reloads up to sixteen W words
  before its first step. When trials end after a few steps, this overhead
  lowers the fraction of cycles that are elementary operations.
