# Multimode IEEE 802.16e block interleaver with an FSM address generator

An 802.16e (WiMAX) transmitter permutes every block of coded bits before
mapping. The permutation depends on the modulation type and on the block size
Ncbps (the interleaver depth), and the standard allows 17 combinations:

| MOD_TYPE | modulation | ID | Ncbps |
|---|---|---|---|
| 00 | BPSK | ignored | 48 |
| 01 | QPSK | 000..111 | 96, 144, 192, 288, 384, 432, 480, 576 |
| 10 | 16-QAM | x00..x11 | 192, 288, 384, 576 |
| 11 | 64-QAM | x00..x11 | 288, 384, 432, 576 |

This design computes the interleaved address of every bit on the fly, one per
clock, for any of these modes. It uses no multiplier, divider or address ROM:
only a small mux tree of step constants, a 10-bit adder, an accumulator and a
few counters. The addresses drive a ping-pong bit memory, so a continuous
stream of coded bits goes in and a continuous stream of interleaved bits comes
out.

## The permutation and why an adder is enough

With d = 16 columns, s = 1 (BPSK, QPSK), 2 (16-QAM) or 3 (64-QAM), bit k of a
block (k = 0 .. Ncbps-1) goes to position

    m_k = (Ncbps/16)·(k mod 16) + floor(k/16)
    j_k = s·floor(m_k/s) + (m_k + Ncbps − floor(16·m_k/Ncbps)) mod s

Write k = 16·r + q. Here q (0..15) is the position inside a run of 16 bits,
called an *iteration*, and r (0 .. Ncbps/16 − 1) is the iteration number. Then
m_k = (Ncbps/16)·q + r, and floor(16·m_k/Ncbps) = q. So inside one iteration
j_k climbs in steps of about Ncbps/16:

* **BPSK, QPSK (s = 1):** j = m. The step is always Ncbps/16.
* **16-QAM (s = 2):** j is m with its LSB replaced by (q + r) mod 2. The step
  alternates between Ncbps/16 + 1 and Ncbps/16 − 1. The larger step comes
  when (q + r) is even.
* **64-QAM (s = 3):** j = m − (r mod 3) + ((r − q) mod 3). The steps cycle
  +2, −1, −1 around Ncbps/16. The larger step comes when (r − q) mod 3 = 0.

Every iteration starts at j = r. For all supported depths, Ncbps/16 is even
for 16-QAM and a multiple of 3 for 64-QAM, which is what makes these closed
forms hold. The generator therefore works like this:

1. Load the accumulator with r (0 for the first iteration).
2. Add the right step 15 times.
3. Preset the accumulator to r + 1 and repeat.
4. After Ncbps/16 iterations, start again at 0.

For example, 16-QAM with Ncbps = 192 gives 0, 13, 24, 37, 48, … for r = 0 and
1, 12, 25, 36, 49, … for r = 1. 64-QAM with 288 gives 0, 20, 37, 54, 74, … and
1, 18, 38, 55, 72, ….

## Address generator (`addr_gen`)

```
 mod_type, id ──► addr_fsm ──cfg, tff, mod3──► incr_mux ──6b──► 0-pad ─┐
                     │ reload / next_start                              ▼
                     └──────────────────────────────► ACC ◄── csa_adder(ACC + step)
                                                       │
                                                       └─► wr_addr
                 read_counter (0 .. Ncbps−1) ─────────────► rd_addr
```

* **`incr_mux`: three stages of muxes over the step constants**
  * Stage 1 has eight 2:1 muxes. Four pick the larger or smaller 16-QAM step
    for each 16-QAM depth, steered by the T flip-flop. Four pick the larger or
    smaller 64-QAM step for each 64-QAM depth, steered by the MOD-3 counter.
  * Stage 2 selects by ID:
    * an 8:1 mux over the equally spaced QPSK steps 6, 9, 12, 18, 24, 27, 30
      and 36;
    * a 4:1 mux over the 16-QAM stage-1 outputs, for step pairs {13,11},
      {19,17}, {25,23} and {37,35};
    * a 4:1 mux over the 64-QAM stage-1 outputs, for {20,17}, {26,23},
      {29,26} and {38,35}.
  * Stage 3 selects by MOD_TYPE between the BPSK step (3) and the three
    stage-2 outputs. The constants are in `intlv_pkg`.
* **`csa_adder`: a carry select adder in its low power form.** It is built
  from 4-bit groups. Each upper group has one ripple carry adder, plus a
  binary-to-excess-1 converter that supplies the carry-in-1 sum. This replaces
  the second ripple adder of a classic carry select adder.
* **Accumulator.** The accumulator holds the current write address. On each
  enabled clock it takes either the sum or, on the 16th address of an
  iteration, the preset value from the FSM.
* **`read_counter`.** A ten-bit up counter that wraps at Ncbps − 1 of the
  current mode. It reaches its terminal count on the same clock as the last
  write address of the block, and an assertion checks this.

### Control (`addr_fsm`) and the step phase

After `clr` the FSM spends one clock in its first state. It then enters one
state per modulation type and latches the depth code. A 4-bit counter q counts
the 16 addresses of an iteration. An iteration counter r counts the
iterations. Two small registers steer the unequal steps:

* **T flip-flop = (q + r) mod 2.** It toggles on every step and *holds* when
  the accumulator is preset for the next iteration. At that point q goes from
  15 to 0 and r goes up by one, so the parity stays the same. Step selection:
  0 → larger 16-QAM step.
* **MOD-3 counter = (r − q) mod 3.** It counts *down* on every step and *up*
  on a preset. Step selection: 0 → larger 64-QAM step.

Both are reset at every block start. Getting these update rules right is the
part of the design that is easiest to break. The address generator testbench
compares every address of every mode with the formula above.

At the end of a block the FSM samples `mod_type`/`id` again and toggles
`sel`. So a mode change takes effect only on a block boundary.

## Interleaver memory (`interleaver_memory`, `bit_ram`)

The memory has two 576×1 single-port RAMs, two address muxes, an inverter on
the write enable of RAM 2, and an output mux.

* `sel = 0`: RAM 1 gets the read address and RAM 2 gets the write address and
  write enable.
* `sel = 1`: the roles are swapped.

Reads are synchronous, with one clock of latency and read-first behaviour. For
that reason the output mux is steered by `sel` delayed one clock. This way the
last bit of a block is still taken from the correct RAM after `sel` toggles.

## Top level (`interleaver`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| clr | in | 1 | synchronous, active-high clear |
| en | in | 1 | one coded bit in and one address pair per clock when high; low stalls everything |
| mod_type, id | in | 2, 3 | mode (table above), sampled one clock after clr and at each block end |
| din | in | 1 | coded bit, written at `wr_addr` in the same clock |
| dout, dout_valid | out | 1, 1 | interleaved bit stream |
| wr_addr, rd_addr | out | 10, 10 | current address pair (for observation) |
| sel, blk_last | out | 1, 1 | RAM select, last address of a block |

**Timing**

* After `clr` is released, the first address pair is valid one clock later.
* Bit k of block b is written to address j_k.
* During block b + 1, the block is read in address order. Output bit i of
  block b therefore equals the input bit k with j_k = i.
* The first output bit of a block comes N + 1 enabled clocks after its first
  input bit (N = Ncbps). After that, one bit comes out per enabled clock.

**`dout_valid`**

`dout_valid` is low during the first block after `clr`, and during the first
block after any change of `mod_type`/`id`. In those blocks, the RAM being read
does not hold a complete block of the current size. As a result, the last
block written before a mode change is not output. The comparison uses all five
mode bits, so changing only the ignored ID[2] bit also counts as a change.

## What is taken as given, and what is this design's own choice

These parts follow the source architecture:

* the 17 modes and their step constants;
* the three-stage mux tree;
* the T flip-flop and MOD-3 step selection;
* the zero-padded carry select adder with its accumulator;
* the 4-bit counter FSM with a preset to the next iteration start;
* the ten-bit read counter;
* the two-RAM ping-pong memory with its inverter and three muxes.

These are this design's own choices:

* the update rules of the T flip-flop and MOD-3 counter, and their
  polarities (derived from the formula);
* the iteration counter;
* the enable input;
* the synchronous clear;
* switching modes only at block boundaries;
* the one-clock RAM read, and the delayed output select that goes with it;
* the `dout_valid` flag;
* the group size (4) and BEC form of the carry select adder;
* ignoring ID[2] for 16-QAM and 64-QAM.

The code rate is not an input. For a given modulation type and depth the
addresses do not depend on it; the depth code already selects the block size
that goes with each rate.

Not included:

* the surrounding transmitter chain (randomizer, Reed-Solomon and
  convolutional encoders, mapper, IFFT);
* any deinterleaver.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/intlv_ref_pkg.sv` computes j_k straight from the formula and is
independent of the step tables.

* `tb_addr_gen` runs all 32 MOD_TYPE/ID codes (all 17 depths), two blocks
  each, with a random enable and a mode change in mid-block. It checks:
  * every write and read address;
  * block length;
  * the first 32 addresses of BPSK/48, QPSK/96, 16-QAM/192 and 64-QAM/288
    against a published address listing.
* `tb_addr_fsm` checks q, r, the T flip-flop and MOD-3 phases, preset values,
  block ends and `sel` on every clock.
* `tb_interleaver` streams random bits through all 17 modes at full size. It
  checks:
  * every output bit against the reference permutation;
  * the N + 1 latency;
  * `clr` in mid-block.

  It also counts each mechanism and fails if one never occurs: equal, larger
  and smaller steps, iteration presets, RAM swaps, mode changes, stalls and
  clear.
* `tb_incr_mux`, `tb_csa_adder`, `tb_read_counter`, `tb_bit_ram` and
  `tb_interleaver_memory` cover the leaf blocks.

To simulate one of them with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_interleaver \
  -y rtl -y tb +libext+.sv rtl/intlv_pkg.sv tb/intlv_ref_pkg.sv tb/tb_interleaver.sv
./obj_dir/Vtb_interleaver
```

Every run finishes in well under a second. Verilator models two states only,
so every register that is read is cleared by `clr`. The RAM contents are not
cleared, which is why `dout_valid` masks the first block.

## Changing it

* **Step constants and depth table:** `rtl/intlv_pkg.sv`. Keep `iterations()`
  consistent with the step constants: the step is Ncbps/16, ±1 for 16-QAM, and
  +2/−1 for 64-QAM.
* **A larger maximum depth:** raise `NCBPS_MAX`, and `ADDR_W` / `ITER_W` if
  needed. The RAM depth in `interleaver` follows `NCBPS_MAX`.
* **New depths:** they must keep Ncbps/16 even (16-QAM) or a multiple of 3
  (64-QAM). Otherwise the simple phase rules above no longer give the
  standard's permutation.

## Files

| file | contents |
|---|---|
| `rtl/intlv_pkg.sv` | mode types, step constants, depth functions |
| `rtl/incr_mux.sv` | three-stage step mux tree |
| `rtl/csa_adder.sv` | carry select adder (BEC form) |
| `rtl/addr_fsm.sv` | FSM, counters, T flip-flop, MOD-3 counter, preset control |
| `rtl/read_counter.sv` | read address counter |
| `rtl/addr_gen.sv` | address generator |
| `rtl/bit_ram.sv` | single-port bit RAM |
| `rtl/interleaver_memory.sv` | ping-pong memory |
| `rtl/interleaver.sv` | top level |
| `tb/*.sv` | testbenches and reference model |
