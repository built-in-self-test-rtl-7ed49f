# Built-in self-test for the programmable I/O tiles of a Virtex-4 FPGA

An FPGA's I/O cells hold more than buffers. Each has multiplexers, flip-flops,
serializers, delay lines and a programmable buffer. Boundary-scan EXTEST
reaches only the pads, and it cannot reach the logic behind them or the I/O
cells that are not bonded out. This RTL holds the self-test circuitry that
the FPGA fabric builds around its own I/O tiles so that they can test
themselves:

* Every I/O tile under test is configured the same way, with bidirectional
  buffers. A test vector leaves through the output logic and the pad, comes
  straight back through the input buffer and the input logic, and returns to
  the fabric. No external wiring or test fixture is needed, so bonded and
  unbonded pads are tested alike.
* Several identical **test pattern generators** (TPGs) feed the tiles. Each
  is a counter reading vectors from a block RAM.
* Output response analysers (**ORAs**) compare every tile with its neighbour
  in a ring. There is no golden reference: a faulty tile, or a faulty TPG,
  makes two neighbouring comparisons disagree. The ORA flip-flops are read
  back at the end.

One FPGA configuration tests one mode of the I/O tiles. The full scheme uses
78 of them: 8 for the SERDES modes, 8 for the ILOGIC/OLOGIC flip-flop paths,
and 62 more for the I/O standards. This RTL is the circuitry that all of those
configurations share. Their differences are carried in a small configuration
record (`bist_cfg_t`) and in the contents of the TPG RAMs.

## Structure

```
bist_top                  one I/O column, NUM_TILES tiles (default 32 = one bank of 64 buffers)
 ├─ clk_div               TCK divider for the SERDES configurations
 ├─ tpg  x NUM_TPG        two per four tile rows (default 16)
 │   ├─ tpg_counter       address counter (a DSP slice in the FPGA)
 │   └─ tpg_bram          18 Kbit RAM, read as 512 x 36 or 1K x 18
 ├─ bitslip_sync x 2/tile one per ISERDES/OSERDES pair
 └─ ora_ring              NUM_TILES x 12 comparison ORAs in a ring
     └─ ora
bist_pkg                  geometry, test-vector bit map, bist_cfg_t, divider helpers
```

The I/O tiles are not in `rtl/`. They are fixed silicon: the thing under
test, not part of the test circuit. `bist_top` drives `tile_vec` to them and
takes `tile_resp` and drives `tile_bitslip` back. For simulation,
`tb/io_tile_model.sv` is a behavioural stand-in with three modes, one per
architecture below. It can force any pad to a stuck value.

## One BIST run

1. **Download.** `rst` initialises every BIST flip-flop. The TPG RAMs are
   filled through the shared load port (`ld_we`, `ld_addr`, `ld_data`, one
   36-bit row per BIST clock). All TPGs get the same contents. `rst` is then
   pulsed again, which clears the ORAs and synchronizers but keeps the RAMs.
2. **Training** (SERDES configurations only). With `tdi` low the counters hold
   at address 0, so every tile keeps receiving word 0, the training word. In
   that word the synchronizer-enable line is set. The synchronizers now
   shift each deserializer until its words line up (next section).
3. **Sequence.** Raising `tdi` enables the counters and the ORAs together.
   Each TPG presents the rest of its words, one per BIST clock. `bist_done`
   rises once all TPGs have shown their last word. That is
   `2 + (words − 1)` BIST clocks after `tdi` is first sampled high: one clock
   to register TDI and one for the RAM read. `words` is 512 in 36-bit mode
   and 1024 in 18-bit mode. A short test, such as the 8 clocks of alternating
   data used for I/O standards, just stops clocking early.
4. **Readback.** `ora_fail[tile][bit]` is sticky. In the FPGA it is read
   through configuration readback. `any_fail` is its OR.

The three test architectures differ only in configuration:

| architecture | `cfg.wide` | `cfg.use_div` | ORAs per tile (`cfg.ora_mask`) | TPG lines used |
|---|---|---|---|---|
| ILOGIC/OLOGIC (and single-ended standards) | 0 (1K x 18) | 0 (run on TCK) | 6 | 18 |
| ISERDES/OSERDES, widths 2–8 SDR, 10 DDR | 1 (512 x 36) | 1 (TCK / D) | Q1..QN of each cell | 20 |
| complementary differential | 0 | 0 | 1 | 2 (data, tristate) |

## BITSLIP alignment

This is the least obvious part. An ISERDES turns a serial stream back into
parallel words, but nothing tells it where a word starts. Each deserializer
may come up with its words rotated by a different amount. Because the ORAs
compare tiles with each other, every deserializer must be rotated the same
way before the sequence starts. The ISERDES has a BITSLIP input that rotates
its output by one bit position.

The training word puts ones on D1..DN with a single zero. Alignment is
defined as "the zero is on Q2". `bitslip_sync` watches Q2 through three
flip-flops X, Y and Z on the divided clock:

* `X <= Q2`, `Y <= X`, `Z <= Y`;
* `BITSLIP = sync_en & X & Y & ~Z`: Q2 has been 1 for two samples and the
  pipeline is fresh;
* when Z becomes 1, X, Y and Z are all cleared.

While Q2 stays 1, the states run 000 → 100 → 110 (pulse) → 111 → 000. That
is exactly one BITSLIP pulse every four divided-clock cycles. The four
cycles leave room for the ISERDES to show the rotated word before Q2 is
sampled again. Once Q2 reads 0, X and Y are never both 1 again and the
pulses stop. A deserializer needs at most N−1 rotations, so alignment takes
at most 4(N−1) divided-clock cycles. The end-to-end test checks this bound
for every width, with one cell started in the worst case. The
synchronizer-enable line is set only in the training word, so the
synchronizers are idle during the sequence.

When a configuration makes the data inputs active-low, the tile inverts
every vector it receives. The training word stored in the RAM is then stored
inverted, so the tile still sees five ones and a zero; no change to the
circuit is needed. The end-to-end test does this at width 6.

A second TPG line, the *bitslip test line*, is OR-ed onto BITSLIP. The
vectors can then pulse BITSLIP on all tiles together during the sequence,
which exercises the BITSLIP logic of the tiles without breaking their
common alignment.

Widths above six use both cells of a tile as master and slave. In the model,
only the master's synchronizer acts then. The slave's data inputs D3..D6 act
as D7..D10 and take their own four TPG lines.

## Test pattern generators

In the FPGA, a column of DSP slices acts as counters, and these address two
columns of 18 Kbit block RAMs. That gives two TPGs per four rows of tiles,
and the two drive alternating rows: tile row r uses TPG `2*(r/4) + (r%2)`.
Several TPGs keep the fan-out of each one low. They also mean that a fault
in one TPG shows up as a ring mismatch like any other fault.

`tpg_bram` stores 512 rows of 36 bits. In the 1K x 18 mode, address bit 0
selects the low or high half of a row, and the word appears on bits [17:0].
The read is synchronous, with one clock of latency. The vector contents are
not fixed in hardware: the testbench writes deterministic words (training
word, alternating data) and pseudo-random words (`$urandom`).

Bit map of a test word (`bist_pkg`):

| 36-bit SERDES word | bits | 18-bit ILOGIC/OLOGIC word | bits |
|---|---|---|---|
| D1..D10 (D7..D10 = slave D3..D6) | 0–9 | output data, cell 0 / 1 | 0, 1 |
| T1..T4 tristate | 10–13 | tristate, cell 0 / 1 | 2, 3 |
| OCE, TCE | 14, 15 | input clock enable CE1 | 4 |
| SR, REV | 16, 17 | SR, REV | 5, 6 |
| bitslip test line | 18 | IDELAY increment, step enable | 7, 8 |
| synchronizer enable | 19 | — | — |

Bits 18 and 19 lie outside the 18-bit words. The synchronizers therefore
stay disabled in the 18-bit configurations.

## Clock division

The serializers run on TCK. The TPGs, ORAs and synchronizers run on TCK
divided by D, where D is the data width in SDR and half of it in DDR.
`clk_div` is a 4-bit counter feeding a 16-entry LUT. The LUT outputs 1 only
at count D−1, and that output resets the counter on the next TCK edge. The
LUT output is the divided clock: high for one TCK period in every D.
`bist_pkg::div_lut_for(D)` builds the truth table, and
`serdes_divisor(width, ddr)` picks D. In the FPGA the LUT output goes
through a global clock buffer. Here `clk_bist` is that signal, or TCK itself
when `cfg.use_div` is 0.

The serializer models load and capture a parallel word on the TCK edge at
which `clk_bist` is high. That is one TCK after the divided clock's rising
edge, where the TPG and ORAs act.

## Response analysis

`ora` compares one output of two neighbouring tiles. A mismatch while
enabled sets its flip-flop, and the flip-flop's output is fed back so the
bit stays set. `ora_ring` builds `NUM_TILES x 12` of them: tile k against
tile k+1, and the last tile against the first. A single faulty tile
therefore shows up in exactly two ORA columns. The 12 positions per tile are
Q1..Q6 of both cells. `cfg.ora_mask` enables the ones a configuration uses,
and ORAs outside the mask never fail. The ORAs are disabled during training,
when the tiles are not yet aligned.

### Reserved reference pads

Some I/O standards need a reference voltage, and DCI standards need two
reference resistors. The pads that carry them are driven from outside the
chip, so they cannot take part in the test. One buffer in every 16 carries
the reference voltage; the fifth one in the group is used here. Both
buffers of the tenth tile row in every 32 buffers carry the DCI resistors.
`cell_excl[tile][cell]` marks such cells. Their six response bits are then
skipped by `ora_ring`. The skipped cell has no active ORA, and the ORA
before it compares with the next tile that takes part. The ring stays closed
around the gap, and a fault next to a reserved pad is still seen by two
ORAs. The positions are only a testbench setting; the RTL takes any pattern.
The search for the next tile that takes part is a chain of multiplexers
for every ORA. After synthesis it accounts for most of the ring's logic. If
the excluded positions are fixed for a device, hard-wiring the ring order
removes it.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that ends with a
`TB_RESULT checks=… failures=…` line. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/bist_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top -o sim
./obj_dir/sim
```

Replace `tb_bist_top` with `tb_tpg`, `tb_tpg_counter`, `tb_tpg_bram`,
`tb_clk_div`, `tb_bitslip_sync`, `tb_ora` or `tb_ora_ring` for a unit test.

`tb_bist_top` runs the top at its default size: 32 tiles, 16 TPGs and 384
ORAs. It runs all eight SERDES widths, an ILOGIC/OLOGIC run and a
complementary-differential run. Each runs fault-free, and several run again
with a stuck pad, including one next to the ring's wrap-around. It checks:

* the divided-clock period at every width;
* alignment within 4(N−1) cycles, with identical words on every tile and at
  most N−1 rotations per cell;
* the exact clock count from `tdi` to `bist_done`;
* that only the two ORA columns next to a faulty tile fail;
* the same checks with reference-voltage and DCI pads left out of the ring.

It also counts how often each mechanism occurred, and fails if any never did:
clock division, synchronizer pulses, TPG bitslip pulses, both RAM aspect
ratios, the differential mode and detected faults. The whole run takes well
under a second.

To change the array size, override `NUM_TILES` on `bist_top`. `NUM_TPG`
follows it. The default (`DEPTH` = 512 rows of 36 bits) is the 18 Kbit RAM
and should stay.

## Choices made here, and limits

The overall scheme follows the published BIST approach:

* bidirectional loopback;
* several identical RAM-based TPGs, two per four rows on alternating rows;
* a 4-bit counter plus LUT divider;
* a three-flip-flop BITSLIP synchronizer with a one-shot every four cycles;
* circular comparison ORAs with sticky results;
* TDI as the start signal.

These were decided in this RTL:

* **Reset.** `rst` is an asynchronous initialisation of all BIST flip-flops.
  It stands for the state a configuration download leaves behind. It has to
  be asynchronous, because the divided clock stops while the divider is
  held in reset.
* **Synchronizer clear.** Clearing X, Y and Z when Z is set is inferred from
  the published timing example and its 4(N−1) bound. The example's
  transitions for the first five cycles are reproduced exactly. Its later
  columns are not consistent with any shift of its Q2 row, so they are not
  reproduced.
* **Counter behaviour.** The counter holds at 0 until started, and stops at
  the last word and raises `bist_done`.
* **Layouts.** The test-vector bit map, the 12-bit response layout per tile,
  the narrow-mode RAM packing and the ORA mask are this design's own.
* **Array size.** The default of 32 tiles is one I/O bank. A whole SX35 or
  LX60 in the FF668 package has about 224 tiles; set `NUM_TILES`
  accordingly.
* **Parts not present.** The I/O tiles and their standards, pull resistors,
  DCI and IDELAY are vendor circuitry. The same holds for JTAG, which
  provides TCK and TDI, and for configuration readback. None of them is in
  `rtl/`. The tile model in `tb/` only captures enough behaviour to exercise
  the test circuit. It does not claim to model the silicon, and it has no
  IDELAY, SR/REV or clock-enable polarity behaviour.
* **What the scheme cannot catch.** The approach finds logic and routing
  faults and gross buffer defects. Parametric faults such as drive strength,
  slew rate or input thresholds are out of its reach. So are delay faults
  when the test is clocked slowly.
