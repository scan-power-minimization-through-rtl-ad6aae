# Low-power scan chain with XOR and inverter gates on the scan path

Shifting test data through a scan chain toggles every scan cell that a
changing bit passes. Those toggles ripple into the core logic and set the
test power, and the power limit decides how many cores of a system-on-chip
can be tested at once. This design cuts the toggles by placing XOR gates and
inverters **on the scan path**, between scan cells. The tester no longer
shifts in the test vector itself. It shifts in a pre-transformed *stimulus*
that has few transitions, and the gates turn it into the intended vector on
the way in. Captured responses pass through the same gates on the way out.
They leave as *observed responses*, which the gate placement can also make
low in transitions. The gates sit only between the scan flip-flops, so the
functional path from the core logic to each flip-flop gains no delay.

The RTL implements the technique published as *Scan Power Minimization
Through Stimulus and Response Transformations*. It covers the modified chain
and its building blocks. The gate placement for a given core comes from an
off-line search, which is software. Here the placement is a parameter.

## Files

| file | what it is |
|---|---|
| `rtl/xor_scan_chain.sv` | top: N scan cells with a gate in front of each, configured by `TAPS` and `INV` |
| `rtl/scan_xor_gate.sv` | the gate in front of one cell: chain input XOR selected taps, optional inversion |
| `rtl/scan_cell.sv` | mux-D scan flip-flop |
| `tb/tb_xor_scan_chain.sv` | end-to-end test of the default five-cell chain |
| `tb/tb_xor_scan_chain_six.sv` | six-cell chains: interfering gates, inverters, toggle count against a plain chain |
| `tb/tb_xor_scan_chain_iscas.sv`, `tb/chain_load_check.sv` | chains of 19 to 1728 cells with random gate placements |
| `tb/tb_scan_xor_gate.sv`, `tb/tb_scan_cell.sv` | unit tests |

## Numbering and the gate placement

Cells are numbered 1..N from scan-in to scan-out. The scan-in pin counts as
cell 0. A stimulus is written as bits 1..N, where bit j is the bit meant to
end up in cell j. Bit N is therefore shifted in first and bit 1 last.

In front of every cell `s` sits a `scan_xor_gate`. Its *chain input* is cell
`s-1`. Setting `TAPS[s][d]` adds a *tap* of reach `d`, which reads cell
`s-1-d`, skipping `d` cells. Setting `INV[s]` complements the gate output.
With everything zero the chain is an ordinary scan chain. A tap must not
reach past the scan-in pin (`d <= s-1`). An assertion checks this at
elaboration.

## What the gates do to a stimulus: I2D and bands

Load a stimulus `IS` with N shifts and the cells hold the test vector
`TV = IS · I2D`, all over GF(2). `I2D` is an upper-triangular N×N matrix with
ones on the diagonal. Inverters add a constant vector on top. The scan-in
side goes from the inverse map `D2I = I2D⁻¹`: the tester sends `TV · D2I`.

The way to read `I2D` is by *bands*. `B_c^d` is the matrix with ones on the
d-th upper off-diagonal, from column `c` to the right edge. It adds
"delivered bit k also gets stimulus bit k-d" for every k ≥ c.

* A single gate in front of cell `s` with taps of reach `d1..dm` gives
  `I2D = I + B_s^d1 + ... + B_s^dm`.
* A gate whose tap reads a cell that already lies behind an earlier gate
  interferes with that gate, and the product of their bands appears too.
  That product is again a band: `B_a^d1 · B_b^d2 = B_b^(d1+d2)` (for `b ≥ a + d2`).
* Any upper-triangular matrix is an XOR of bands. Each *discontinuity* along
  an off-diagonal, where a run of ones starts or stops, is one band. So the
  number of bands a target `I2D` needs estimates its gate cost.

**Default, five cells.** There is one gate in front of cell 3, with taps of
reach 1 and 2 (cell 1 and scan-in). There is a second in front of cell 5,
with a tap of reach 2 (cell 2). The second gate's tap reads a cell in front
of the first gate, so no product band arises:

```
I2D = I + B_3^1 + B_3^2 + B_5^2      D2I = I2D^-1
1 0 1 0 0                            1 0 1 1 1
0 1 1 1 0                            0 1 1 0 0
0 0 1 1 0                            0 0 1 1 1
0 0 0 1 1                            0 0 0 1 1
0 0 0 0 1                            0 0 0 0 1
```

Delivered bit 3 is stimulus bits 1^2^3. Delivered bit 5 is bits 4^5.

**Six cells, interfering gates** (used in `tb_xor_scan_chain_six`). There
are gates in front of cells 2 and 5, each with a tap of reach 1. Both inputs
of the second gate already passed the first. So
`I2D = I + B_2^1 + B_5^1 + B_5^2`: band 1 holds ones in columns 2-4 only,
and band 2 holds ones in columns 5-6. The stimulus `111011` arrives as
`100101`.

## What the gates do to a response: C2O and the chain characteristic

Unloading a captured response overlaps with loading the next stimulus, so
responses are transformed in a less obvious way. A response bit in cell i
passes only the gates of cells i+1..N. The taps of those gates can read
cells that already hold bits of the next stimulus. The observed bit is
therefore a XOR of captured bits and next-stimulus bits 2..N. Stimulus bit
1, the last one shifted in, never meets a response. This map is called
`C2O` (captured to observed). It has 2N-1 inputs and N outputs.

The two maps are tied together. A bit shifted from scan-in all the way to
scan-out is transformed by the *scan chain characteristic* (SCC), which is
the last column of `I2D`. For any cell, the part of the chain in front of it
(`I2D`) composed with the part behind it (`C2O`) gives that same SCC. For
the default chain the SCC is "XOR with the bit shifted in right after it".
After a capture of `t1..t5`, with stimulus bits `s5, s4, ...` following,
scan-out shows:

```
t5,  t4^t2,  t3^t1,  t2^t1,  t1^s5
```

The first response bit picks up the last bit of the next stimulus. The third
picks up the first response bit. The search that picks the placement has to
weigh these response transitions together with the stimulus ones.

## Choosing a placement (not in the RTL)

The placement comes from a design-time procedure:

1. Write every `D2I` and `C2O` entry in terms of the unknown `I2D` entries.
2. Form the *transition columns*: the XOR of neighbouring columns of the
   transformed stimuli `IS = TV · D2I` and of the observed responses.
3. Try to force each column to all-0s or all-1s by solving it as a linear
   system with Gaussian elimination. Take the most costly columns first.
   A stimulus transition at position i toggles about i cells, and a response
   transition at the same position about N-i cells.
4. When a column comes out all-1s, fix it with an inverter.
5. Map the resulting `I2D` onto a small number of taps, band by band from
   the diagonal outwards. Decide for each gate whether it should interfere
   with earlier ones so that as few taps as possible remain.

The published evaluation gives average shift-power reductions around 70%,
at about 10% area cost, on ISCAS89 circuits. This RTL does not reproduce
those numbers: the test sets and placements behind them are not available.

## Interface and timing (`xor_scan_chain`)

| parameter | default | meaning |
|---|---|---|
| `N` | 5 | scan cells |
| `DMAX` | N-1 | longest tap reach offered (lower it for long chains to shrink `TAPS`) |
| `TAPS` | five-cell example above | `logic [N:1][DMAX:1]`, `TAPS[s][d]` = tap of reach d in front of cell s |
| `INV` | 0 | `logic [N:1]`, inverter in front of cell s |

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous active-low clear of all cells |
| `se` | in | 1 | 1 = shift one bit per clock, 0 = capture `d` |
| `si` | in | 1 | scan-in |
| `d` | in | N | functional inputs (responses from the core logic), `d[s]` for cell s |
| `q` | out | N | cell outputs (test vector to the core logic) |
| `so` | out | 1 | scan-out, equal to cell N |

A full load or unload takes N shift cycles, and a capture takes one. A
complete test therefore costs N+1 cycles per vector, the same as a plain
chain.

## Design choices not fixed by the method

* The scan cell is a mux-D flip-flop with an asynchronous clear. The method
  works with any scan cell whose functional input does not pass the inserted
  gates.
* Every cell position gets a gate instance. Unused taps are masked at
  elaboration, so synthesis keeps only the XORs and inverters the placement
  asks for.
* In a gate, the inverter follows the XOR. Together they realise an XNOR.
* The method's gate equation counts only taps, not the gate's chain input.
  The tap reach d counts the cells skipped between gate and tap. These
  readings reproduce both worked examples above.
* In the example matrices, the response map `C2O` of the default chain was
  checked only through the statements above (first bit, third bit, SCC). The
  full matrix was not available to compare against.

## Simulating

Any testbench runs with plain Verilator from the repository root, for
example:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_xor_scan_chain tb/tb_xor_scan_chain.sv
./obj_dir/Vtb_xor_scan_chain
```

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

* `tb_xor_scan_chain` runs the default chain unchanged. It checks every
  `I2D` row, `I2D·D2I = I`, 200 load/capture/unload cycles with `D2I`
  pre-transformed vectors and the response pattern above, the SCC on a free
  bit stream, load cycle counts and reset. It counts each mechanism and
  fails if one never occurs.
* `tb_xor_scan_chain_six` builds `I2D` from bands in the testbench and
  compares it with the chain. It also checks the product rule and an
  inverter alone: a loaded vector is complemented from cell 4 on, an
  unloaded response from cell 3 down, and each time exactly one transition
  flips. It also checks gates plus inverter as an affine map. It compares
  scan-cell toggles with an unmodified chain that delivers the same vectors. The modified chain has
  about 40% fewer on its test set.
* `tb_xor_scan_chain_iscas` builds ten chains with the flip-flop counts of
  the ISCAS89 benchmarks (19 to 1728 cells), each with a random placement.
  It computes every stimulus by running the chain backwards from the wanted
  vector. This inverse model never uses the forward shift rule. On the
  response side it flips one captured bit in cell k and unloads again. The
  observed bit N-k+1 must change, and the bits observed after it must not.
  Whatever the placement, a captured fault effect therefore always reaches
  the tester. Compiling the 1728-cell chains takes about two minutes.

To build a chain for a real core, set `N` to its flip-flop count and `TAPS`
and `INV` to the chosen placement. The tester must then send `TV · D2I` for
each vector and interpret scan-out through `C2O`.
