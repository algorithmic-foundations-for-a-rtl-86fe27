# Parallel Vector Access (PVA) memory controller

Programs that walk a matrix by column, or a structure array by one field, read
memory with a constant stride. A cache fetches whole lines for them and throws
most of each line away. This design lets the processor ask for a base-stride
vector `<B, S, L>` (base word address, stride in words, number of elements) and
get back only those `L` words, packed into one dense cache line. Strided
stores (scatters) work the same way in the other direction.

The memory has `M` SDRAM banks, interleaved in blocks of `N` words. The main
idea is that no central unit expands the vector element by element. The
command is broadcast to all `M` bank controllers at once. Each controller then
works out by itself, in a few cycles and with no loop over the elements, which
elements live in its bank. It then streams the accesses to its own SDRAM, in
parallel with the other banks.

The RTL implements the published PVA algorithm (B. Mathew, S. McKee, J. Carter,
A. Davis, *Algorithmic Foundations for a Parallel Vector Access Memory
System*). Where that work leaves a choice open, this RTL makes its own choice,
and the sections below say which is which.

## How a bank finds its elements

### Word-wide logical banks

Block interleaving (`N > 1`) makes the question "which elements hit bank `b`"
hard, because the offset inside a block drifts from element to element. The
design avoids this. It treats the memory as `N·M = 2^m` **logical banks, each
one word wide**. Logical bank `j` holds every address with `addr mod 2^m = j`.
Physical bank `p` holds logical banks `p·N … p·N+N-1`. For example, with 2
banks of 8-word blocks, words 0–7 and 16–23 are in physical bank 0 and they
make up logical banks 0–7. By default each physical bank controller runs one
small FirstHit unit for each of its `N` logical banks.

With word interleaving, only `S mod 2^m` matters for which banks are hit. Write
that part of the stride as `σ·2^s` with `σ` odd. Then:

* **Which banks are hit.** Let `b0 = B mod 2^m` be the logical bank of the base.
  Let `d = (b − b0) mod 2^m` be the distance of bank `b` from it. Bank `b` holds
  elements only if `2^s` divides `d`.
* **NextHit.** A bank that holds `V[k]` also holds `V[k + δ]`, where
  `δ = 2^(m−s)`. No element between them falls in that bank.
* **FirstHit.** Let `K1` be the smallest index that lands `2^s` banks past `b0`.
  `K1` is the inverse of `σ` modulo `2^(m−s)`. The first element in bank `b` is
  `K_i = (K1 · i) mod 2^(m−s)`, where `i = d >> s`. That element exists only if
  `K_i < L`.

The elements of bank `b` are therefore `K_i, K_i+δ, K_i+2δ, … < L`. Their
addresses are `B + S·K_i`, then repeated additions of `S << (m−s)`.

A worked case, with 16 one-word banks and stride 10 (`s = 1`, `σ = 5`,
`K1 = 5`, `δ = 8`): from bank 2, the elements fall in banks
2, 12, 6, 0, 10, 4, 14, 8, 2, …. Bank 4 is at `d = 2`, so `i = 1` and its
first element is `K = 5`. The odd banks are never hit.

In hardware this costs very little:

* `s`, `K1` and `δ` come from one table indexed by `S mod 2^m` (`stride_pla`).
  There is one table per controller, shared by its `N` FirstHit units.
* Each FirstHit unit (`firsthit_unit`) needs a subtraction, a mask test, a
  shift, a small multiply kept to its low `m − s` bits, and a compare with `L`.
* The table has `2^m` entries (128 at the default size). It is filled at
  elaboration by a constant function: the smallest `k` with
  `k·S ≡ 2^s (mod 2^m)`. It becomes a ROM in synthesis.

A stride that is a multiple of `2^m` (`s = m`) sends every element to the
base's logical bank, with `δ = 1`.

### One bank controller (`bank_controller`)

The controller has a three-stage pipeline after a command arrives:

| edge | work |
|---|---|
| E0→E1 | table lookup, then `N` FirstHit units in parallel; each logical bank ("lane") registers *hit* and `K_i` |
| E1→E2 | each lane computes its first address `B + S·K_i` |
| E2→ | one word access per cycle: the lane with the lowest pending index goes next, then steps its index by `δ` and its address by `S << (m−s)` |

The first SDRAM command therefore leaves 3 clock edges after the command
reaches the controller. Only a table and a few small adders and multipliers
are used; strides that are not a power of two take no longer. Lanes are served
lowest index first, so words come back in index order within a bank, and a
positive-stride vector walks its rows upward. The `N` logical banks of one
physical bank share its data bus, so each physical bank makes one access per
cycle.

### Three ways to build FirstHit (`FH_STYLE`)

The FirstHit stage can be built in three ways. All three produce the same
lanes, so the controller behaves the same cycle for cycle whichever one is
used. `FH_STYLE` picks one:

| `FH_STYLE` | build | cost |
|---|---|---|
| 0 (default) | one `K1` table per controller, and one `firsthit_unit` (`K1·i` multiply) per logical bank | `N` small multipliers |
| 1 | one `firsthit_pla` per logical bank: a table indexed by `{S mod 2^m, d}` that returns `K_i` or "no hit" | `2^(2m)` entries per table, so only for about 16 logical banks or fewer |
| 2 | `firsthit_block`: one `firsthit_unit` for the first hitting lane of the block, then a chain of adders | one multiplier, but a longer combinational path |

Style 2 works because the logical banks of one controller have consecutive
distances `d`. Only every `2^s`-th lane can hit. The first of those is
`j0 = (−d_0) mod 2^s`. Each later one is one step further in `i`, so its index
is the previous index plus `K1`, taken mod `2^(m−s)`.

Style 0 is the default because it suits a few banks interleaved in blocks.
The table of style 1 would have 16,384 entries for each of the 128 logical
banks at the default size.

## Blocks

```
 system bus ──> vector_command_unit ──> vector_bus ──┬──> bank_controller 0 ──> SDRAM bank 0
   (req/resp)     page_splitter                      ├──> bank_controller 1 ──> SDRAM bank 1
                  line buffer <── gathered words ────┤          ...
                                                     └──> bank_controller M-1 ──> SDRAM bank M-1
 bank_controller = stride_pla + N × firsthit_unit + lane registers + sdram_sequencer
```

| file | block |
|---|---|
| `rtl/pva_pkg.sv` | widths, the vector command struct `vec_cmd_t`, the SDRAM command enum |
| `rtl/stride_pla.sv` | table `S mod 2^m → (s, K1, δ)` |
| `rtl/firsthit_unit.sv` | FirstHit for one logical bank |
| `rtl/firsthit_pla.sv` | FirstHit for one logical bank read from a `(d, S)` table (`FH_STYLE = 1`) |
| `rtl/firsthit_block.sv` | FirstHit for a whole physical bank from one unit and adders (`FH_STYLE = 2`) |
| `rtl/bank_controller.sv` | one controller per physical bank: lanes, address generation, access order |
| `rtl/sdram_sequencer.sv` | ACT / PRE / READ / WRITE issue for one bank, open-row tracking, read tag pipeline |
| `rtl/vector_bus.sv` | broadcasts a command to all controllers and reports when all are done |
| `rtl/page_splitter.sv` | cuts a vector at a superpage boundary |
| `rtl/vector_command_unit.sv` | system-bus side: takes requests, issues the pieces, assembles the line |
| `rtl/pva_top.sv` | the whole subsystem; the SDRAM pins of each bank are ports |

### Vector command unit and superpages

A vector can be gathered in parallel only while it stays in physically
contiguous memory, which here means one superpage. `page_splitter` works out
how many elements fit before the end of the page without a divider. It rounds
the stride up to a power of two and shifts:
`count = min(L, ((page_end − B) >> ⌈log2 S⌉) + 1)`. That is a lower bound, and
it is always at least 1. The VCU issues the pieces one after another. Each
piece carries the line position of its first element (`offset`), so the words
of every piece land in the right place in the line.

The pieces use the addresses as given. No address translation is done between
pieces.

### SDRAM sequencing

`sdram_sequencer` keeps the last row open (open-page policy). An access to the
open row needs only a column command and is accepted in the same cycle, so row
hits stream one word per cycle. An access to another row first precharges,
waits `T_RP`, then activates and waits `T_RCD`. Read data come `T_CL` cycles
after READ. A tag pipeline of the same depth brings each word out together
with its line position. Accesses are single words (burst length 1).

**Memory slots.** A bank can be grown by adding slots: further groups of DRAM
chips on the same command, address and data pins. Set `SLOTS` to the number of
slots. The sequencer then keeps one open-row register per slot. It drives
`sd_cs[slot]` with each command, one-hot. The slot is taken from the top
`log2(SLOTS)` bits of the address inside the bank, which are also the top bits
of `sd_row`. One controller therefore keeps a hot row open in every slot, and
moving between slots costs no precharge. One wait counter is shared by all
slots, which is conservative: an ACT in one slot delays a column command in
another by up to `T_RCD`. No command leaves the sequencer while reset is
asserted.

## Interfaces and timing

**System bus (`pva_top`).**

* A request is taken on a clock edge where `req_valid && req_ready`. It carries
  `req_write`, `req_base`, `req_stride`, `req_len` (0–16) and, for a scatter,
  `req_wdata[16]`.
* The answer is `resp_valid` for one cycle. For a gather, the line is on
  `resp_rdata`: element `k` is in word `k`, and unused words are 0.
* There is no back-pressure on the response, and only one request is in flight
  at a time.

**SDRAM side.** Each bank has `sd_cmd[p]` (`SD_NOP/ACT/READ/WRITE/PRE`),
`sd_cs[p]` (`SLOTS` bits, one-hot with a command), `sd_row[p]`, `sd_col[p]`, `sd_wdata[p]` and `sd_rdata[p]`. Read data are
sampled `T_CL` edges after the READ edge.

**Event strobes.** `ev_split`, `ev_access[p]`, `ev_row_hit[p]` and
`ev_row_miss[p]` are for performance counters.

**Reset.** Reset is synchronous and active low.

**Measured latencies at the default size, from request accepted to
`resp_valid`:**

| operation | cycles |
|---|---|
| 16-word line fill, row closed | 27 |
| 16-word line fill, row open | 25 |
| 16 elements with stride 16 (2 per bank, all 8 banks) | 13–15, depending on row state |

The line fill issues its 16 READs on 16 consecutive cycles. The 27 cycles break
down as:

| cycles | step |
|---|---|
| 1 | VCU |
| 1 | bus register |
| 2 | FirstHit and address stages |
| 1 | ACT |
| 2 | RAS latency |
| 16 | words |
| 2 | CAS latency |
| 1 | completion |
| 1 | response |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M_PHYS` | 8 | physical SDRAM banks (power of two, ≥ 2) |
| `N_WORDS` | 16 | interleave block in words (power of two, ≥ 1); `N_WORDS·M_PHYS` logical banks |
| `PAGE_BITS` | 20 | superpage size `2^PAGE_BITS` words |
| `T_RCD`, `T_CL`, `T_RP` | 2, 2, 2 | activate-to-column, column-to-data, precharge cycles |
| `FH_STYLE` | 0 | FirstHit build: 0 per-lane `K1·i`, 1 per-lane `(d, S)` table, 2 one unit plus adders |
| `SLOTS` | 1 | memory slots per bank, each with its own open row and chip select (power of two) |

The package fixes these sizes:

* 32-bit word addresses and data words.
* Vectors of at most `LMAX = 16` elements, one 16-word cache line.
* 512-word rows (`COL_W = 9`).

The defaults follow the 8-bank memory with 16-word cache-line interleaving and
2-cycle RAS/CAS latencies that the PVA work uses for its timing examples. Other
sizes used by that work's examples also build and are tested: 8 × 4, 2 × 8 and
16 × 1.

## What follows the published design, and what is this RTL's own

The following follow the published design:

* Broadcasting vector commands to independent bank controllers.
* The word-interleaved logical view.
* DecodeBank by bit selection.
* The FirstHit and NextHit formulas and their table-plus-multiply form.
* One FirstHit unit per logical bank when the number of banks is small.
* Address generation by shift and add.
* Open rows giving row hits that need only a column command.
* RAS and CAS latency of 2.
* The superpage split with a rounded-up stride.
* The three ways of building FirstHit: a `K1` table with multiply, a `(d, S)`
  table, and one unit plus an adder for each following bank.
* Growing capacity with several slots per bank served by one controller that
  tracks a current row per slot.

The following are this RTL's own choices:

* All handshakes and the vector-bus completion protocol.
* The three-stage controller pipeline.
* Lowest-index-first access order inside a bank.
* The open-page policy, single-word accesses and `T_RP = 2`.
* The data paths: gathered words return with their line position, and scatters
  read their word from the broadcast line.
* Word, address, row and superpage sizes.
* Unsigned strides only.
* No translation between superpage pieces.
* Slot selection by the top address bits, and one wait counter for all slots.

One point in the source was resolved on purpose. The distance `d` is defined in
one place as `b0 − b` and elsewhere as `(b − b0) mod M`. The RTL uses
`(b − b0) mod M`, the form under which the hit lemma holds.

Not included:

* The earlier block-interleaved FirstHit, which is recursive and needs
  divisions. The logical-bank view replaces it.
* The other way of adding slots, with one controller per slot and chip
  selects decoded per controller.
* SDRAM internal banks and bus-turnaround delays.
* Indirect (indexed) scatter/gather.
* The processor-side protocol that hands vectors to the VCU, which is left
  open by the source.

The DRAM chips themselves are outside the design.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The testbenches work out their expected values
independently, mostly by expanding each vector element by element.

| testbench | what it checks |
|---|---|
| `tb_stride_pla` | every stride at m = 7 and m = 4 against a serial walk; the stride-10 case |
| `tb_firsthit_unit` | 4000 random (bank, base, stride, length) cases, and the 16-bank stride-10 sequence |
| `tb_firsthit_pla` | the `(d, S)` table at 16 and 8 banks, every stride, base and bank, against a serial walk |
| `tb_firsthit_block` | one unit plus adders at 8 × 16, 2 × 8 and 16 × 1, every lane against a serial walk |
| `tb_fh_styles` | controllers with each `FH_STYLE` at 4 × 4 and 2 × 8, fed the same vectors: identical commands, data and busy every cycle, and the right number of accesses |
| `tb_sdram_sequencer` | closed-row, row-hit and row-miss latencies, one-per-cycle row hits, write/read back, protocol |
| `tb_bank_controller` | 400 random gathers and scatters on one bank: exact element set, order and data; first command ≤ 5 cycles; line fill at one word per cycle |
| `tb_vector_bus` | one-cycle broadcast, no overlap, `op_done` exactly when the slowest controller finishes |
| `tb_page_splitter` | count never exceeds the true number in the page, equals the rounded-stride formula |
| `tb_vector_command_unit` | line assembly and scatter data with stand-in controllers, number and offsets of superpage pieces |
| `tb_pva_top` | the whole subsystem at default size with 8 SDRAM models: about 400 random gathers and scatters against a shadow memory, line-fill rate, and a count of each mechanism (page split, row hit, row miss, idle controller, NextHit repeat, parallel banks) |
| `tb_pva_examples` | worked examples at 8 × 4, 2 × 8, 16 × 1 and 8 × 16: the bank of every element matches the listed sequences |
| `tb_pva_slots` | 8 × 16 with two slots per bank: a line fill alternating between slots keeps both rows open (no precharge, 25 cycles), a vector spanning both slots, 200 random gathers against the model's data, chip selects and timing |

`tb/sdram_bank_model.sv` is a behavioural SDRAM model for simulation only. It
uses associative-array storage, and a word never written reads as a fixed hash
of its address. It counts protocol violations: a column command too early or on
a closed row, an activate with a row already open, or a chip select that is not
one-hot or does not match the slot bits of the row.

To run a testbench with Verilator 5, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/pva_pkg.sv tb/tb_pva_top.sv --top-module tb_pva_top
./obj_dir/Vtb_pva_top
```

Replace `tb_pva_top` with any other testbench name. Each testbench runs in
seconds. The designs use only synthesizable constructs outside `tb/`.
Assertions guard the handshakes:

* commands reach a controller only while it is idle;
* every issued address belongs to the controller's bank;
* a waiting SDRAM request stays stable;
* the request length is at most 16.

## Limits

* Only one request is in flight at a time. The VCU waits for the slowest bank
  before it takes the next vector, so there is no overlap between vectors and
  no reordering across vectors.
* Reads and writes are not mixed within a command, so bus turnaround never
  arises and is not modelled.
* Row state is one open row per slot. Real SDRAM internal banks would allow
  more overlap.
* The `sd_row` ports are `ROW_W = 23` bits wide for every configuration. The
  upper `log2(M_PHYS)` bits are always zero.
