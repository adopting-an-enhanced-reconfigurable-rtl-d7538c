# Self-test and self-repair for an SoC: reconfigurable BISR for RAMs and MSIC pattern generation

Embedded RAMs dominate the area of a system-on-chip, so a defect in one of
them usually kills the chip. A **built-in self-repair (BISR)** loop fixes
that on the chip itself. A BIST engine tests each RAM. A redundancy analyser
(BIRA) decides which spare row and spare column replace the defective ones.
The decision, the *repair signature*, is blown into fuses. At every power-up
the signatures are shifted from the fuses into repair registers next to each
RAM, and the RAM's address multiplexers steer around the bad row and column.
In this design one BIST and one analyser serve several RAMs of different
sizes: they are reconfigured for the RAM under test (Re-BISR, Re-BIRA).

The same RTL also holds a second, independent piece of test hardware: the
**multiple single-input-change (MSIC) test pattern generator**. It feeds
scan chains or primary inputs of logic under test with low-transition
patterns, to keep test power down. Its idea fits in one line:

    chain i input = (Johnson codeword bit i) XOR (LFSR seed bit i)

A Johnson counter changes one bit per step, so every chain sees a word with
at most two transitions. The seed gives each chain a different polarity and
is changed only rarely.

Both parts sit side by side in `selfrepair_soc_top`. They share only clock
and reset.

---

## Part 1 — Re-BISR for embedded RAMs

### Blocks

| module | role |
|---|---|
| `repairable_ram` | bit-oriented RAM with one spare row, one spare column and a serial repair register |
| `march_bist` | March C- BIST for a RAM whose size is chosen at run time |
| `re_bira` | fail bitmap and spare allocation, reconfigured per RAM size |
| `fuse_macro` | behavioural model of the one-time-programmable fuse box |
| `fuse_register` | parallel load from the fuses, serial shift into the repair registers |
| `rebisr_ctrl` | sequencer for test, analysis, fuse blowing and signature load |
| `rebisr` | the subsystem: RAM 0 is 8×8 bits, RAM 1 is 16×8 bits |
| `bisr_pkg` | signature type `repair_sig_t` and the maximum address widths |

### The repair flow

`start_test` runs these steps for RAM 0 and then for RAM 1:

1. Clear the bitmap.
2. Run March C- on the RAM. The BIST drives the RAM; the normal-mode port is ignored.
3. For each failing read, hand the fault to the Re-BIRA and wait for it.
4. Allocate the spares.
5. If the RAM is repairable, blow its 10-bit signature into its fuse word.

After the last RAM, the fuse register loads all fuse words. It then shifts
them through the chain *fuse register → RAM 1 → RAM 0*, one bit per clock,
LSB first. After 20 shifts each wrapper holds its own signature, `done`
pulses, and `repair_ok` says whether every RAM could be repaired.

`start_load` does only the last step. This is the power-up path of a part
whose fuses were blown earlier. The repair registers are reset by `rst_n`;
the fuses are not.

### Repairable RAM: spares by shifting

The physical array has (2^ROW_AW+1) × (2^COL_AW+1) cells. The last row and
the last column are the spares. The signature packs, from bit 0:

    RAE | RRA[3:0] | CAE | CRA[3:0]

With RAE set, every logical row at or above RRA maps one physical row
further. The defective row is skipped and the top logical row lands on the
spare row. Columns work the same way with CAE/CRA. A RAM with fewer than 16
rows or columns ignores the upper address bits of the signature.

Defects are injected through `defect_mask`/`defect_val`. A masked physical
cell reads as its stuck value. The cell index is `prow*(COLS+1)+pcol`. This
port exists only so that a defective RAM can be simulated.

Reads are synchronous: data appear on `rdata` one cycle after `en` with
`we=0`.

The BIST tests only the logical address space, with the repair registers
cleared. The spare row and spare column are therefore not tested before
they are used. A defect in a spare shows up only when the repaired RAM is
tested again.

### The Fail_h / Hold_l handshake

This is the timing detail most worth reading before changing either block.

- The BIST compares the read data in a *compare* cycle. On a mismatch it
  raises the RAM's bit of `fail_h` and presents `fail_row`, `fail_col` and
  `hs` in that same cycle. `hs` is the failing-bit syndrome, read XOR
  expected.
- The Re-BIRA raises `hold_l` **combinationally** in that same cycle. It is
  enabled with `bira_en`, and the controller ties `bira_en` to test mode.
  The BIST stays in its compare cycle, so its outputs stay stable. An
  assertion in `march_bist` checks this.
- Next cycle: `hold_l` is still high and the Re-BIRA writes the bitmap bit.
- Third cycle: `hold_l` is low. The BIST moves on. The Re-BIRA ignores the
  `fail_h` it still sees in this cycle.

Each fault therefore costs the BIST exactly two cycles. There is no
combinational loop: `fail_h` does not depend on `hold_l`.

### Re-BIRA: allocation on a fail bitmap

Faults go into a 16×16 bitmap. A bit set to 1 marks a failing cell. When
`analyze` pulses, the allocator tries the rows one per cycle as the
spare-row candidate `r`:

- It ORs every row except `r` onto one column vector, masked to the RAM's
  2^col_aw columns.
- If that vector has at most one bit set, the search ends:
  - RAE is set only if row `r` itself has faults.
  - CAE is set only if the vector is not empty, and CRA is that column.
  - `repairable` goes high.
- If no row works, `repairable` goes low and the signature is zero.

For one spare row and one spare column this search is exact. It finds a
repair whenever one exists and never uses a spare that is not needed. It
takes at most 2^row_aw cycles plus one. `fault_cnt` counts distinct failing
cells, saturating at 255.

### Timing

| step | cycles |
|---|---|
| March C- on N cells | 15·N + 1, plus 2 per fault (N = 64 for RAM 0, 128 for RAM 1) |
| allocation | 1 with no faults, at most 2^row_aw + 1 (9 for RAM 0, 17 for RAM 1) |
| signature transfer | 21 (load plus 20 shifts) |
| whole `start_test` run, fault-free RAMs | 2916 (961 + 1921 of BIST, 34 of sequencing, allocation and transfer) |

---

## Part 2 — MSIC test pattern generators

### Blocks

| module | role |
|---|---|
| `seed_lfsr` | W-stage maximal-length LFSR (primitive polynomials for W = 3..40), stepped by CLK1 |
| `reconfig_johnson` | L-stage Johnson counter with three modes |
| `scalable_sic` | SIC generator from a K-bit counter, a K-bit down-counter and an M-bit shift register |
| `msic_xor_net` | one XOR gate per output |
| `msic_ctrl` | test-per-scan schedule |
| `msic_tpg_scan` | test-per-scan generator; `USE_SCALABLE` selects the SIC source |
| `msic_tpg_clock` | test-per-clock generator, an N×M grid of XOR gates |

CLK1 (seed clock) and CLK2 (test clock) are clock enables on a single clock.

### Reconfigurable Johnson counter

Output `q[i]` is stage J_i. Each step does one of three things:

| rj_mode | init | step does | use |
|---|---|---|---|
| 1 | 0 | a 0 enters J_0 | L steps clear the counter |
| 1 | 1 | J_0 ← J_{L−1} (rotate) | L steps give every stage one codeword; the vector comes back unchanged |
| 0 | – | J_0 ← ¬J_{L−1} | Johnson counting: 2L distinct vectors, one bit changes per step |

### Test-per-scan schedule (`msic_ctrl`)

1. Clear the Johnson counter: L cycles.
2. For each seed: one seed step. Then repeat 2L times:
   - one Johnson step;
   - L shift cycles (`se=1`), in which the counter rotates and chain *i*
     takes J_i ⊕ S_i;
   - one `capture` cycle.
3. `done` pulses.

Each chain receives a rotation of the current Johnson vector, XOR its seed
bit. The ten chains of one load therefore hold ten different words. The
exceptions are the all-0 and all-1 vectors, where a chain's word is its
constant seed bit. Over one seed each chain receives 2L different words.

The seed also drives the primary-input outputs `pi`.

A run takes `L + seeds·(1 + 2L(L+2))` cycles. That is 8 513 cycles for one
seed at the defaults, M = 10 chains of L = 64 cells (the s13207 example). The
seed width defaults to SEED_W = 20.

### Scalable SIC counter

This form is for chains much longer than they are many. A K-bit count
(K = log2 L) advances on each falling edge of `se`, i.e. once per scan load.
A fill value `pol` toggles when the count wraps.

While `se` is low, the down-counter loads the count. In the cycle of the
falling edge it loads the new count. While `se` is high, the down-counter
counts to zero. The shift register takes `pol` while the down-counter is
non-zero, and `¬pol` after that. Load *n* therefore streams (n mod L)
copies of `pol` followed by `¬pol`. Shift-register stage *i* carries that
stream *i* cycles later to chain *i*.

This needs 2K + M flip-flops instead of L. For 10 chains of 64 cells that
is 6 + 6 + 10 = 22. Two more hold the fill value and the delayed SE used for
edge detection, 24 in all, against 64 for a Johnson counter.

Because the count wraps at 2^K, this form assumes L is a power of two. For
other chain lengths use the Johnson-counter form. Counting on the falling
edge of SE is this design's choice: the new count is then ready when SE
drops for the capture.

### Test-per-clock

The inputs form an N×M grid. Input (i, j) = J_i ⊕ S_j, and it appears on
`pi[i*M+j]`. Per seed there is one seed step, then 2N Johnson steps with one
pattern per cycle, flagged by `valid`. Consecutive patterns differ in exactly
one row of M inputs. The default grid, 8×8, is this design's choice.

---

## Decisions not fixed by the scheme

The scheme gives the block structure, the repair flow, the handshake names,
the Johnson-counter modes, the scalable counter and both test procedures.
The following are this design's own choices:

- **RAM sizes.** The 8×8 RAM with one spare row and one spare column is the
  scheme's example. The 16×8 second RAM was added to exercise
  reconfiguration.
- **Memory timing.** Reads and writes are synchronous, with one cycle of read
  latency.
- **Spare replacement.** Rows and columns are replaced by shifting.
- **BIST algorithm.** The BIST runs March C-.
- **HS.** HS is read as the syndrome bit.
- **Allocation.** The analyser uses the exact row-candidate search
  described above.
- **Signature format and transfer.** Signatures are 10 bits for every RAM
  and are transferred serially, LSB first.
- **Irreparable RAMs.** Nothing is blown into the fuses for an irreparable
  RAM.
- **Not implemented.** Adaptive fusing, which cuts repair setup time, is not
  implemented because it is not specified. The transfer always moves all
  signatures.
- **MSIC sizes.** The seed width is 20. The test-per-clock grid is 8×8. The
  LFSR is in Fibonacci form and resets to state 1.
- **Tap table.** The tap table covers seeds of 3 to 40 bits. Each entry
  was checked to be primitive: the order of x modulo the polynomial is
  2^W − 1. Full periods were simulated only for 8, 10 and 20 bits.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

Highlights:

- **March C- BIST.** The cycle count is checked exactly, including the
  2-cycle hold per fault. Stuck-at-1 cells are reported three times and
  stuck-at-0 cells twice, with the right address.
- **Re-BIRA.** Its verdicts are compared with an exhaustive search on 60
  random fault sets.
- **LFSR.** Full periods are checked for 8, 10 and 20 bits.
- **MSIC generators.** Every scan-in bit is compared with a model.
- **`tb_msic_workloads`.** This test runs the Johnson-counter test-per-scan
  generator at both ends of the ISCAS'89 size range it targets: a 20-bit
  seed with 54-cell chains, and a 38-bit seed with 87-cell chains.
- **`tb_selfrepair_soc_top`.** This test runs the whole design at its
  default sizes:
  - It repairs a bad row and a bad column in each RAM.
  - It verifies every cell of both RAMs.
  - It resets and reloads the repair from the fuses.
  - It runs all three pattern generators.
  - It checks that each mechanism happened at least once: fault report,
    hold, spare row, spare column, fuse transfer, reload, the three Johnson
    modes, seed step, fill flip, and test-per-clock pattern.

To simulate one testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -Irtl rtl/bisr_pkg.sv \
        tb/tb_selfrepair_soc_top.sv --top tb_selfrepair_soc_top -o sim
    ./obj_dir/sim

Replace the testbench name for any other block. All testbenches finish in
seconds.
