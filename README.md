# Orthogonal RTL scan chain: a byte multiplier with a stack-form scan chain

A scan chain makes every register of a sequential circuit controllable and
observable for test. The usual way to get one is to swap each flip-flop for a
scan flip-flop at gate level and stitch them into one long serial chain. That
costs a multiplexer per flip-flop and a shift time equal to the flip-flop
count.

This RTL shows a cheaper alternative. The scan paths are chosen at register
transfer level and run along data paths the circuit already has. Each path
is a whole register wide, and the paths are stacked side by side so that the
primary inputs act as scan inputs and the primary outputs as scan outputs.
The main design is a small pipelined byte multiplier. Its four byte registers
and 16-bit output register form a 16-bit-wide scan chain only four columns
long. Three smaller circuits show what each kind of data path costs when a
scan path is routed through it.

## The three link costs

The method rests on one observation. How much a scan link from register *i*
to register *j* costs depends on the data path that already joins them:

| data path into *j*            | example         | what scan insertion adds                              | weight used to rank paths |
|-------------------------------|-----------------|-------------------------------------------------------|---------------------------|
| delay (`j <= i`)              | `delay_scan_example` | nothing: the scan data uses the functional path | 0                         |
| conditional (`j <= c ? i : k`)| `cond_scan_example`  | one OR gate: `scan_en` is ORed into the multiplexer select | N (register width) |
| operational (`j <= i op k`)   | `mult_scan_example`  | a new 2:1 multiplexer that bypasses the operator     | 3N                        |

The two cells that add logic are `rule2_cond_reg` and `rule3_op_reg`. The
multiplier builds every one of its scan links from plain registers and these
two cells.

## The multiplier and its chain

Functional behaviour of `mul_orth_scan` (`scan_en = 0`). It is a three-stage
pipeline, and all byte arithmetic wraps modulo 256:

```
temp1 <= in1            temp2 <= in2
addr=1: temp3 <= temp1 - 10,  temp4 <= temp2
addr=0: temp3 <= temp2 + 10,  temp4 <= temp1
out1  <= temp3 * temp4        (16-bit product)
```

Each register-to-register edge gets the weight from the table above:

```
in1 -0-> temp1      in2 -0-> temp2
temp1 -8-> temp4    temp2 -8-> temp4      (conditional)
temp1 -24-> temp3   temp2 -24-> temp3     (subtract / add)
temp3 -24-> out1    temp4 -24-> out1      (multiply)
```

A greedy search picks source-to-sink paths of least weight, longest first,
and removes the edges each chosen path uses. It yields two orthogonal paths:

- SP1: `in1 -> temp1 -> temp4 -> out1`, weight 0 + 8 + 24 = 32
- SP2: `in2 -> temp2 -> temp3`, weight 0 + 24

SP2 ends on an internal register, so it cannot be observed on its own, and
the two paths have different widths. Both problems go away when the paths are
stacked as columns of one "stack form". Inputs go in the first column,
internal registers are packed as tightly as possible into the middle columns,
and outputs go in the last column:

```
column:    1            2               3               4
        +-------+   +---------+     +---------+     +--------+
 upper  |  in2  |-->|  temp2  | --> |  temp3  | --> |        |
        +-------+   +---------+     +---------+     |  out1  |
 lower  |  in1  |-->|  temp1  | --> |  temp4  | --> | 16 bit |
        +-------+   +---------+     +---------+     +--------+
```

The width of the form is N = max(min(N_in, N_out), N_reg) = max(min(16, 16),
16) = 16, and its length is M = 4 columns. `scan_pkg` holds both numbers and
the width formula as a function.

What each link costs in hardware:

- `temp1`, `temp2`: delay paths, used as they are.
- `temp4`: `rule2_cond_reg`. The scan source `temp1` sits on the `addr=0`
  side of the existing multiplexer, so the cell's select is `~addr`, and
  `scan_en` is ORed into it.
- `temp3`: `rule3_op_reg`. A new multiplexer picks `temp2` instead of the
  subtract/add result.
- `out1`: `rule3_op_reg`, 16 bits wide. A new multiplexer picks the whole
  column `{temp3, temp4}` instead of the product.

### Scan operation and timing

With `scan_en` high, the chain moves one column per rising edge. A pair
`(in1, in2)` applied at one edge appears on `out1` as `{in2, in1}` after the
second edge that follows, which is three edges in all. Within each column
the lower entry (SP1) is the low byte, and the entry stacked on it is the
high byte.

One test pattern takes five edges. Two scan edges fill `{temp4, temp3}` and
then `{temp1, temp2}`. One functional edge with `scan_en` low captures the
response: `out1` now holds `temp3 * temp4`, and `temp3`, `temp4`, `temp1`
and `temp2` hold their new values. Two more scan edges bring `{temp3, temp4}`
and then `{temp2, temp1}` to `out1`. The next pattern's load can overlap with
that unload. By comparison, a single gate-level chain through the same 48
flip-flops needs 48 shift edges per load.

The RTL also carries an assertion (`a_scan_transfer`) that checks the
three-edge transfer whenever `scan_en` stays high.

## What is taken from the method and what is chosen here

Taken from the method:

- the multiplier's function, widths and the ±10 constants;
- the edge weights, the two scan paths and their stacking order;
- the resulting chain, and the stack form's N = 16 and M = 4;
- the OR-gated select of a conditional link and the bypass multiplexer of an
  operational link;
- the register widths and operations of the three small circuits.

Chosen here, because the method does not specify them:

- **Reset.** All modules use a synchronous, active-high reset that clears
  every register. The original multiplier has a reset input that does
  nothing.
- **Byte order within a column.** The first path pushed (SP1) is the low
  byte of `out1` in scan mode.
- **`scan_en` as a port.** It is a port of the multiplier and of the
  conditional and operational circuits. The delay circuit has none, because
  its scan and functional paths are the same logic.
- **Register sources in the small circuits.** Registers whose sources the
  small circuits leave open (`A` in the delay circuit, `B` and `C` in the
  other two) load from input ports every clock.
- **Truncated product.** In `mult_scan_example`, `A` is a byte and keeps the
  low byte of `B * C`.

Not built:

- **The scan-insertion tool.** The flow that finds and reconstructs the
  paths (module ordering, data path graph, path search, stack
  reconstruction) is software that rewrites RTL, not hardware. Only its
  result for the multiplier is given here, worked out by hand.
- **The larger circuits.** The method was also evaluated on the ITC'99
  benchmarks, a 1-D wavelet filter and a 2-D CORDIC. Those circuits are not
  part of this RTL.
- **The register-identification example.** A small example used only to
  explain register identification has no outputs and gets no scan chain, so
  it is not included.

## Files

| file | contents |
|------|----------|
| `rtl/scan_pkg.sv` | widths, the ±10 offset, stack-form N and M, the `column_t` struct, the width function |
| `rtl/rule2_cond_reg.sv` | register behind a conditional path, with `scan_en` ORed into the select |
| `rtl/rule3_op_reg.sv` | register behind an operational path, with the scan bypass multiplexer |
| `rtl/mul_orth_scan.sv` | the byte multiplier with its 16-bit, 4-column scan chain |
| `rtl/delay_scan_example.sv` | delay-path circuit A -> B (no scan cost) |
| `rtl/cond_scan_example.sv` | conditional-path circuit A <= addr ? B : C |
| `rtl/mult_scan_example.sv` | operational-path circuit A <= B * C |
| `rtl/orth_scan_top.sv` | all four circuits side by side, with a shared clock and reset |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks its own results and ends with a line
`TB_RESULT checks=<n> failures=<m>`. To build and run one with Verilator 5,
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/scan_pkg.sv tb/tb_orth_scan_top.sv --top-module tb_orth_scan_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `tb_orth_scan_top` runs the
whole design at its default sizes:

- random traffic on all four circuits, compared every cycle with a cycle
  model;
- 50 complete scan patterns (load, capture, unload) on the multiplier;
- a measurement of the three-edge input-to-output time of the chain.

It counts each mechanism and fails if one never occurs. The mechanisms are:
functional cycles with `addr = 1` and `addr = 0`, scan shifts, scan
overriding the multiplier's select, complete patterns, the conditional
circuit's override, and the operational circuit's bypass and product.
`tb_mul_orth_scan` runs the same checks on the multiplier alone, with 100
patterns and 2000 cycles of random traffic.

All modules pass Verilator's lint with `-Wall`. The only warnings are
package constants that a given module does not use.

## Changing it

`DATA_W`, `PROD_W` and `OFFSET` in `scan_pkg` set the multiplier's sizes.
`STACK_N` must stay equal to `PROD_W` and to two bytes, and an `initial`
assertion in `mul_orth_scan` checks this. To add a scan link to another
register, pick the cell that matches the path into it:

- a plain register for a delay path;
- `rule2_cond_reg` for a multiplexer, with the scan source on `d1` (invert
  the condition if needed);
- `rule3_op_reg` for an operator, with the operand on the scan path wired to
  `scan_d`.
