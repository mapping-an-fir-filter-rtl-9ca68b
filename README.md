# A 16-tap FIR filter on a mesh of small processors

This RTL runs a direct-form FIR filter, y(k) = Σ h(n)·x(k−n), on a
two-dimensional array of very simple processors. Each processor talks only to
its four nearest neighbours. There is no shared bus, so the filter has to be
cut into pieces: delaying the samples, multiplying, adding and accumulating.
Each piece goes to a processor, and the pieces are wired together through the
neighbour links. How the filter is cut decides both the number of processors
it takes and the samples it can accept per clock. On the same hardware, the
range runs from one processor doing all sixteen multiply-accumulates of a
sample in turn (18 clocks per sample) to 54 processors that take a new sample
every clock.

The mesh itself is generic: 10 × 10 identical processor units by default. A
mapping is nothing more than configuration: one role, a few tags and some
coefficients per unit. The testbench builds the mappings and loads them.

## How a processor unit talks to its neighbours

Every unit (`pu`) has two input buffers (IBuf0, IBuf1), one output buffer
(OBuf) and an execution unit.

* **Broadcast with tags.** Each word a unit produces carries a 4-bit tag. The
  head of OBuf is offered to all four neighbours at the same time.
* **Selection.** Each input buffer is configured with one direction (N, E, S,
  W), one tag and a tag mask. It takes exactly the words from that neighbour
  whose tag equals the selected one in every bit where the mask is 1, and
  ignores the rest. Both buffers may listen to the same
  neighbour under two different tags. This is how a unit that sends two kinds
  of word on one link (samples and partial sums, say) is split at the
  receiver. A buffer set to `DIR_NONE` reads as a constant zero that is
  always available, which the first unit of an adder chain uses.
* **Handshake.** A neighbour that wants the offered word but has a full buffer
  raises `stall_to_nbr` towards the sender. The sender pops its head only in a
  cycle with no such stall, and every buffer that wants the word writes it in
  that same cycle. So a word reaches every unit that selects it exactly once,
  and a word nobody selects is dropped. Back-pressure therefore travels
  upstream link by link, and nothing is ever lost.
* **Clocks.** Every unit runs from its own clock (`pu_clk`, one bit per
  unit), as the processors this follows do. Each input buffer is a dual-clock
  FIFO. Its write side runs on the clock of the neighbour it listens to, and
  that clock is picked by the same static direction setting. So the whole
  handshake (tag match, full flag, stall, write) happens in the sender's clock
  domain, and only the Gray-coded FIFO pointers cross into the receiver's
  domain. Setting `ASYNC_LINKS = 0` swaps in single-clock buffers; all units
  must then share one clock.
* **Timing.** A result pushed into OBuf is offered from the next cycle. A
  word written into a dual-clock input buffer can be used about three
  receiver cycles later (one cycle with single-clock buffers). A link still
  passes one word per cycle. Buffer depths are 16 (input) and 4 (output).
  Sixteen input words cover the longer round trip of the clock crossing, so
  the one-sample-per-clock mapping keeps its rate; with 8 it drops to about
  1.4 cycles per sample.

## The execution unit: programs as step sequences

The processors are meant to be programmable DSPs with a MAC unit, address
generators and zero-overhead loops. Each mapping is described by a short
loop of single-cycle instructions such as MOVE, MULT, ADD, MAC and CLACC, and
the loop's closing branch costs no cycle. No instruction encoding is
specified. `pu_exec` therefore does not fetch code. It hard-wires each loop as
a step sequence with the same number of cycles, chosen by the unit's `role`:

| role | per sample | cycles |
|---|---|---|
| `ROLE_DIST` | OBuf ← IBuf0, or the previous IBuf0 word if `delay` is set | 1 |
| `ROLE_MULT` | OBuf ← IBuf0 · h0 | 1 |
| `ROLE_ADD` | OBuf ← IBuf0 + IBuf1 | 1 |
| `ROLE_MULT_ADD` | W ← IBuf0 · h0; OBuf ← W + IBuf1 | 2 |
| `ROLE_DIST_MULT` | W ← IBuf0; OBuf ← W or previous W (forward tag); OBuf ← W · h0 | 3 |
| `ROLE_MAC` | load x; forward the oldest sample (`fwd`); clear ACC (if K > 1); K MACs; add IBuf1 (`psum`) | 1 + fwd + (K>1) + K + psum |
| `ROLE_DIST_WIN` | load x (or the previous x) into a K-word window; send the window newest first, the oldest word under the forward tag | 1 + K |
| `ROLE_MACS` | clear ACC; K MACs of words arriving on IBuf0; add IBuf1 (`psum`) | 1 + K + psum |
| `ROLE_ADD3` | clear ACC; ACC = IBuf0 + IBuf1; send IBuf0 + ACC | 3 |

Things worth knowing about these roles:

* **The delay line's z⁻¹.** A distribute unit with `delay` set sends the
  previous sample it received, and 0 first. Because every link is an ordered
  FIFO, this single offset is exactly one sample of delay: the words of all
  streams line up by position, not by time.
* **The MAC segment.** A `ROLE_MAC` unit holding K taps keeps the K newest
  samples it has seen in a circular working memory. A wrap-around pointer
  modulo K acts as the address generator. For each new sample it:
  1. overwrites the oldest entry;
  2. forwards that evicted sample to the next unit, which therefore sees the
     input delayed by K;
  3. walks the memory from newest to oldest against coefficients h0…h(K−1);
  4. adds the partial sum arriving from the previous unit.

  Without `psum`, the result leaves in the cycle of the last MAC.
* **Windows for multi-tap units.** When a function is spread over fewer
  units, each with K taps, a `ROLE_DIST_WIN` unit sends its K-sample window
  to a `ROLE_MACS` multiplier. The last, oldest word of each window carries a
  different tag (`TF` rather than `TW`, differing only in bit 0). The
  multiplier's input selects with a mask that ignores bit 0, so it takes all
  K words. The next distribute unit selects only `TF`, and with `delay` set it
  holds that word back one sample. That makes its newest sample exactly K
  behind its predecessor's.
* **Stalls.** A step that needs an empty input or a full output simply
  waits. `stall` is high during such a cycle, and `sample_done` pulses at the
  end of each pass.

All arithmetic is 32-bit two's complement and wraps. Samples, coefficients,
products and partial sums all use the same word.

## Mappings and what they achieve

These mappings are built by the end-to-end testbench (`tb/tb_fir_mesh.sv`)
and simulated on the default 10 × 10 mesh. Every output matches a reference
filter. The measured steady-state spacing of outputs is exact for every row
except the U-shaped ones, which are explained below:

| mapping | units | cycles/sample | samples/clock |
|---|---|---|---|
| I-type, 1 unit (16 taps) | 1 | 18 | 0.056 |
| I-type, 2 units (8 + 8) | 2 | 12 | 0.083 |
| I-type, 3 units (6 + 5 + 5) | 3 | 10 | 0.100 |
| I-type, 4 units | 4 | 8 | 0.125 |
| I-type, 8 units | 8 | 6 | 0.167 |
| I-type, 16 units | 16 | 4 | 0.250 |
| method 1: distribute + multiply-add | 36 | 2 | 0.5 |
| method 2: distribute-multiply + add | 36 | 3 | 0.333 |
| method 3: distribute, multiply, add all separate | 54 | 1 | 1.0 |
| method 3, 3 / 4 / 8 units per function | 9 / 12 / 24 | 7 / 5 / 3 | 0.143 / 0.2 / 0.333 |
| method 1, 4 / 8 units per function | 8 / 16 | 6 / 4 | 0.167 / 0.25 |
| method 2, 2 / 4 units per function | 4 / 8 | 11 / 7 | 0.091 / 0.143 |
| U-shaped method 3 / 1 / 2 | 57 / 39 / 39 | 2.69 / 3.88 / 4.25 (1 / 2 / 3 with 128-word input buffers) | 0.37 / 0.26 / 0.24 |

**I-type** is a chain of `ROLE_MAC` units laid out as a snake across the rows.
Unit j receives samples and partial sums from unit j−1 on one link, under two
tags. It adds its K products and sends samples and sums on to unit j+1. In a
chain of two or more units, every unit runs the same loop (K + 4 cycles). The
first unit adds a zero partial sum, and the last unit's forwarded samples go
nowhere. The uneven splits give the extra taps to the first units.

**Methods 1–3** use a folded two-band placement. Taps 0–7 run east along the
top band and taps 8–15 run west along the band below it. Pass units
(`ROLE_DIST` without delay) down column 8 carry the sample line from one band
to the other. For method 3 the bands are:

* row 0: delay line;
* row 1: multipliers;
* row 2: adder chain, going east;
* row 3: adder chain, going west;
* row 4: multipliers;
* row 5: delay line.

The output is taken at unit (3,0).

**U-shaped placements** run the sample line down column 0, along row 9 and
back up another column. Each arm has its multipliers and a partial-sum chain
on the inner side. The two chains climb to row 0, where one adder joins them
and gives the output. Both arms start from the same sample. The right arm's
partial sums, however, reach the join about 28 hops after the left arm's.
Keeping one sample per clock therefore needs the short path to buffer that
whole difference, around a hundred words. With the default 16-word input
buffers, the join stalls the left arm, and through the shared sample line
everything else. The results stay exact, but the rate drops to the
figures in the table. Rebuilt with `IN_DEPTH = 128`, the three U placements
run at exactly 1, 2 and 3 cycles per sample. The folded placements avoid
the issue because their two paths to every adder have nearly equal length.

The forms of methods 1–3 with several taps per unit use a straight layout of
M columns with K = ⌈16/M⌉. Method 3 uses window distributors in row 0,
streaming MACs in row 1 and an adder chain in row 2, giving K + 1 cycles.
Method 1 drops the adders, and the streaming MACs add the partial sum
themselves, giving K + 2. Method 2 uses forwarding `ROLE_MAC` units over an
adder chain, giving K + 3. Sums are always formed by chains of two-input
adders. `ROLE_ADD3` is a three-operand output adder for a unit where
partial results meet, and it is tested on its own. No mapping here uses it.
It needs two of its three operands to arrive in strict turn on IBuf0. Only
a single neighbour that sends both can guarantee that order: words from two
different senders can overtake each other.

## Configuration and streams (`fir_mesh`)

* **Loading a mapping.** With `en` low, write each unit's `pu_cfg_t` through
  `cfg_we/cfg_row/cfg_col/cfg_wdata`. Write its coefficients through
  `coef_we/coef_row/coef_col/coef_addr/coef_wdata`. Then raise `en`.
  Configuration and coefficients must not change while `en` is high; an
  assertion in `pu_exec` checks the coefficients. A reset (`rst_n`) clears all
  unit state, including delay lines, and returns every unit to `ROLE_IDLE`.
* **Input stream.** Samples enter on `x_valid/x_data/x_ready` in the
  `io_clk` domain. They cross into the clock of unit (0,0) through a
  dual-clock Gray-pointer FIFO (`async_fifo`). Inside the mesh they appear as the west
  neighbour of unit (0,0), tagged `in_tag`.
* **Output stream.** The output is whatever unit (`out_row`, `out_col`)
  broadcasts under `out_tag`. It crosses back to `io_clk` through a second
  dual-clock FIFO, written in that unit's clock, and leaves on `y_valid/y_data/y_ready`. This listener takes
  part in the unit's handshake, so a slow reader stalls the mesh instead of
  losing results.
* **Status outputs.** `pu_exec_stall` and `pu_sample_done` give the per-unit
  stall and end-of-sample strobes, indexed row·COLS + col. `link_stall` is
  high whenever some unit refuses a neighbour's word. These bits come from the
  units' own clock domains; treat them as asynchronous.
* **Clocks and reset.** `clk` is only the configuration clock. `en` is
  synchronised into each unit's clock. `rst_n` resets every domain and should
  be released while the clocks run. Where the unit clocks come from is left
  to the surrounding chip.

## How far to trust it, and where it departs

* **Clock crossing.** Each link crosses clock domains with a dual-clock
  FIFO. The write clock of an input buffer is selected by configuration,
  which amounts to a clock multiplexer. That is safe only because the
  selection changes while the unit is held idle, but a real implementation
  would want a glitch-free clock switch or one buffer per direction. With
  different unit clocks, a mapping runs at the pace of its slowest unit.
* **Single-unit I-type.** This takes 18 cycles per sample, which is the length
  of the single-processor loop. The expected figure quoted for this mapping is
  19 cycles. Which one is right depends on a cycle outside the loop that is
  not described.
* **Not programmable.** There is no instruction memory and no decoder. The
  per-sample loops are fixed roles, so a program other than these cannot be
  run.
* **Window hand-over.** How a distribute unit hands the sample line on to
  the next distribute unit, when it serves a multi-tap multiplier, is this
  design's choice: the second tag and the mask described above.
* **Own placements.** The folded placements are this design's own. The unit
  counts, 54 for the one-sample-per-clock form and 36 for methods 1 and 2,
  match the counts reported for the L-shaped placements. The U-shaped
  placements here take 57, 39 and 39 units, against 58, 40 and 32 reported.
  The 32-unit form of method 2 would need `ROLE_ADD3` at the join. The
  rates the U placements are credited with assume buffers large enough to
  absorb the skew described above.
* **Sizes chosen here.** None of these values is specified:
  * word width: 32 bits;
  * tag width: 4 bits;
  * buffer depths: 16 (input), 4 (output), 16 (boundary);
  * mesh size: 10 × 10.

  With these depths, the folded placement sustains one sample per clock even
  through its longer sample path.
* **Overflow.** Results are exact only while they fit in 32 bits. Nothing
  saturates.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build
and run one with plain Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/fir_mesh_pkg.sv rtl/sync_fifo.sv rtl/async_fifo.sv rtl/pu_exec.sv \
  rtl/pu.sv rtl/fir_mesh.sv tb/tb_fir_mesh.sv --top-module tb_fir_mesh
./obj_dir/Vtb_fir_mesh
```

| testbench | what it checks |
|---|---|
| `tb_fir_mesh` | every mapping above at the default mesh size: results, cycles per sample (a 1× to 4× band for the U shapes), stalls, reconfiguration; two mappings with a different clock per unit (9 to 12.5 ns); a slower io clock with a pausing reader (about half a minute) |
| `tb_pu` | tag and direction selection, the broadcast handshake under random refusals, both inputs on one link, neighbours on a faster clock than the unit |
| `tb_pu_exec` | every role against a model, with and without stalls, and each role's cycles per sample |
| `tb_sync_fifo`, `tb_async_fifo` | order, flags and throughput of the buffers |

For the unit-level benches, pass only the files each one uses; the package
comes first. To try a new mapping, copy one of the `map_*` tasks in
`tb_fir_mesh.sv`. Give each stream its own tag, so that a unit never selects a
word meant for another unit on the same link.

## Files

* `rtl/fir_mesh_pkg.sv`: word, tag, flit, direction, role and configuration
  types.
* `rtl/sync_fifo.sv`, `rtl/async_fifo.sv`: the buffers.
* `rtl/pu_exec.sv`: role sequencer, MAC, coefficient and working memories.
* `rtl/pu.sv`: one processor unit.
* `rtl/fir_mesh.sv`: the mesh, the configuration port and the io boundary.
* `tb/`: one self-checking testbench per module.
