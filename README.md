# CRC-32 generator for 10 Gigabit Ethernet, one byte per clock

Every Ethernet frame ends in a 32-bit frame check sequence (FCS), a CRC over
the whole frame. At 10 Gb/s the CRC has to keep up with the line without
buffering the frame. Ethernet frames are whole bytes, so a generator that
takes exactly one byte per clock never has to deal with a partial first or
last word. The price is the clock: 10 Gb/s / 8 bits = 1.25 GHz, an 800 ps
period. All of the design is therefore about keeping the next-state logic
of the CRC register as shallow as possible.

This RTL models that generator at gate and latch level in SystemVerilog. It
follows a published VLSI design, which was built twice: once as a
synthesized standard-cell block and once as a full-custom block with its
logic merged into latches. Both versions are included here. They sit side by
side behind one input register and compute the same FCS.

## The main idea: the augmented CRC form

The usual hardware CRC (the "direct" form) starts the register at
`FFFFFFFF`, and each byte enters at the top of the register, mixed with the
bits being shifted out. This generator uses the *augmented* form instead.
The register R(x) is treated as an element of GF(2)[x]/G(x), and each clock
computes

    R' = (R · x^8 + D) mod G,     G = x^32 + 04C11DB7

where D is the new byte, added into the eight lowest coefficients. Each
output bit is then:

* one term shifted up from eight places below (`R[i-8]`), or the data bit
  `D` for bits 7..0, plus
* some of the eight fed-back bits `R[31:24]`, taken through x^32..x^39 mod G.

No output bit needs more than **eight inputs**; bit 5 is the only one that
needs all eight. With 2-input XOR gates that is a balanced tree of **depth
3**, which sets the clock period.

Two corrections make the augmented form produce the Ethernet CRC:

1. **Preset `46AF6449`.** Starting the augmented register from this value is
   the same as starting the direct form from `FFFFFFFF`.
2. **Four zero bytes after the frame.** The augmented form delays the data by
   the register length, so 32 zero bits must be fed after the last data byte.

The FCS is then the complement of the register.

The network is not written out by hand. `crc32_pkg::crc_step` defines one
byte step as eight single-bit shifts. The modules call it as a constant
function at elaboration time to find each output bit's input set (`input_mask`),
and each output is the XOR reduction of those inputs.

### Bit order

The choices below are this design's own. They match Ethernet's wire order.

* `data_i[0]` is the first bit on the wire. It is shifted in first, so it
  becomes the coefficient of x^7.
* `fcs_o[31]` is the coefficient of x^31 of the complemented register, and it
  is sent first.
* If you reverse the 32 bits of `fcs_o`, you get the familiar software CRC-32
  value. For example, the ASCII string `123456789` gives `CBF43926`. The
  testbenches compare against this value.

## Block structure

```
             8            8                 32                   32
 data_i ──/──► input reg ─┬─► crc32_sc_core ────► crc_out_reg ──────► fcs_o
             (crc_in_reg) │   (CL + FF register,   (invert + FF)
                          │    parallelized FFs)
                          └─► crc32_fc_core ────► crc_out_latch_reg ► fcs_fc_o
                              (XOR trees merged     (invert + latch pair)
                               into two latch stages)
```

| module | role |
|---|---|
| `crc32_10ge` | top: input register, both cores, both output registers |
| `crc32_pkg` | polynomial, preset, widths; constant functions that derive the XOR network |
| `crc_in_reg` | 8-bit input register, no set/reset |
| `crc_cl` | next-state XOR network ("CL"), ≤ 8 inputs per bit |
| `crc_reg` | 32-bit CRC register with asynchronous preset; bits 31:24 built from `crc_par_ff` |
| `crc_par_ff` | parallelized flip-flop: two flip-flops on one D |
| `crc32_sc_core` | standard-cell core = `crc_cl` + `crc_reg` |
| `xor_latch_pos` | XOR merged into a positive latch, with set (or reset) |
| `xor_latch_neg` | XOR merged into a negative latch |
| `crc32_fc_core` | full-custom core: tree levels spread over the two latch stages |
| `crc_out_reg` | inverter + 32-bit output register (flip-flops), no set/reset |
| `crc_out_latch_reg` | inverter + output register built from a negative/positive latch pair |

## Standard-cell core: parallelized flip-flops

In the standard-cell core, the critical path runs from a CRC register bit
through three XOR levels and back to the register. Each fed-back bit
`R[31:24]` drives many trees, and that load slows the flip-flop. The fix is to
**parallelize** the flip-flop: two flip-flops take the same D. One drives
only the gate on the critical path, and the other drives everything else. The
D input is not on a critical path, so the extra load there costs nothing.

* `crc_reg` does this for the bits in `DUP_MASK`. The default is `FF000000`,
  the eight fed-back bits.
* `crc_cl` gives each output tree with at least `CRIT_MIN_IN` = 5 inputs (the
  trees that need all three XOR levels) its register inputs from the critical
  copy `crit_i`. The other trees use `crc_i`.

The published design names only "the flip-flops that drive critical paths"
and does not say which trees are critical. Both choices above are this
design's own. A synthesis tool will merge the two copies unless it is told to
keep them. That is why the duplication is written out by hand in the RTL.

## Full-custom core: the XOR tree spread over two latch stages

The full-custom core has no flip-flop register. The CRC register is two
stages of latches, with the XOR gates merged into them. Each output bit's
depth-3 tree is split across the two stages like this:

| tree level | where it sits | module |
|---|---|---|
| 1 | plain 2-input XORs on pairs of inputs | `crc32_fc_core` (`pair[3:0]`) |
| 2 | two XORs merged into **negative** latches (open while `clk` is low) | `xor_latch_neg` ×2 |
| 3 | one XOR merged into a **positive** latch (open while `clk` is high); this latch *is* the CRC register bit | `xor_latch_pos` |

The critical path of the published layout runs from one positive-latch XOR,
through a plain XOR and a negative-latch XOR, to the next positive-latch XOR.
This split reproduces that path. The cycle runs as follows:

* **Clock low.** The positive latches hold R. The negative latches are open
  and compute the two half-sums of every bit from R and the input byte.
* **Rising edge.** The negative latches close. The positive latches open and
  produce the new R from the two held half-sums.

The pair therefore acts as one rising-edge register, with the logic placed
inside it. Only the positive latches are preset. The negative latches need no
preset: the clock is low during preset, so they simply pass on the preset
state.

Each bit's inputs are grouped into first-level pairs in index order, two at a
time (`crc32_pkg::quarter_mask`). The published design shares logic between
bits and puts the faster input of its XOR cell on the critical path. Neither
affects the logic function, and neither is modelled here.

**Lint and synthesis warnings.** Both report a combinational loop through
`crc32_fc_core`: positive latch → XOR → negative latch → positive latch. The
loop always contains two latches of opposite phase, which are never open at
the same time, so it is the register itself. The latches are intentional.

**Output register of the full-custom path.** The full-custom CRC latches
change just after the rising edge. An edge-triggered output register clocked
on that same edge would depend on the latch delay, and a simulator could
sample the new value. `crc_out_latch_reg` therefore builds the output
register from the same kind of latches:

* A negative latch, with the inverter merged in as an XOR with 1, holds ~R
  while R is stable (clock low).
* A positive latch then passes the value on at the rising edge.

Its timing is identical to `crc_out_reg`. The published design leaves the
input and output registers out of its full-custom layout, so this structure
is this design's own.

## Using the generator

Ports of `crc32_10ge`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; must stay low while `set_n` is low |
| `set_n` | in | 1 | active-low asynchronous preset of both CRC registers to `46AF6449` |
| `data_i` | in | 8 | data byte, bit 0 first on the wire |
| `fcs_o` | out | 32 | FCS from the standard-cell core, bit 31 sent first |
| `fcs_fc_o` | out | 32 | FCS from the full-custom core (identical) |

There is no data-valid signal. A byte is taken on every rising edge. An
assertion in the top reports any rising clock edge while `set_n` is low.
Stopping the clock, as well as generating the clock and preset, is left to
the surrounding system.

Sequence for one frame of N bytes:

1. Put byte 0 on `data_i` and give one rising edge. The byte is now in the
   input register.
2. With `clk` low, pulse `set_n` low.
3. Give one edge each for bytes 1 … N-1, then four edges with `data_i = 0`.
4. Two edges later, `fcs_o` and `fcs_fc_o` hold the FCS.

Throughput is one byte per clock: 8 Gb/s per GHz. Latency is two clocks from
the last zero byte entering the input register. Frame length has no limit:
only the 32-bit remainder is stored.

## Where this RTL stops

These points are not modelled, because they are physical properties of the
published implementations rather than logic:

* The clock rates and areas: 1.09 GHz, 432 cells and 11111 µm² for the
  standard cells in 0.18 µm; 625 MHz and 908 transistors for the full custom
  in 0.35 µm.
* Gate sizing, the fast-input XOR cell, and wire loads.

These points are this design's choices, where the published material gives
no detail:

* The explicit XOR equations. They are derived here from the polynomial and
  the preset, and they meet the stated eight-input limit.
* The bit order.
* Which flip-flops are parallelized.
* The pairing of inputs in the full-custom trees.
* The reset variant of the positive XOR latch, for preset bits that are 0.
* The start-of-frame sequence.
* The latch-built output register of the full-custom path.
* Placing both cores behind one input register.

## Simulating

Every testbench in `tb/` is self-checking and ends with
`TB_RESULT checks=N failures=M`. The reference models in
`tb/crc_ref_pkg.sv` are written independently of the RTL's formulation:

* a bit-serial reflected CRC-32 (start `FFFFFFFF`, polynomial `EDB88320`);
* a long-division model of one augmented step.

The end-to-end test `crc32_10ge_tb` runs the top as it is (it has no
parameters). It sends 41 frames, among them the check string and frames of
64 and 1518 bytes. It checks:

* the FCS of both cores;
* the one-byte-per-edge rate;
* that the result appears exactly two edges after the tail, and not one.

Run it with plain Verilator:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/crc32_pkg.sv tb/crc_ref_pkg.sv tb/crc32_10ge_tb.sv --top-module crc32_10ge_tb
./obj_dir/Vcrc32_10ge_tb
```

For the other blocks, replace the testbench file and the top module. For
example, use `crc32_fc_core_tb` to test the latch core alone, or `crc_cl_tb`
to compare the XOR network with the long-division model and check the
eight-input limit. To change the polynomial or preset, edit `crc32_pkg`; the
XOR network follows automatically.
