# Four 32-bit rotators: barrel and logarithmic, pass transistors and transmission gates

A datapath often has to rotate a word by any amount in a single clock cycle.
This RTL describes four ways of building that circuit for a full-custom
ASIC, all with the same function and interface. Each one rotates a 32-bit word
right by a 5-bit binary amount:

    out[j] = in[(j + s) mod 32]        e.g. in = 88888888, s = 1 -> 44444444

The four variants span two architectures and two switch styles:

| name | architecture | switch style | clock |
|------|--------------|--------------|-------|
| Barrel 1 (`barrel_shifter_pt`) | single 32 x 32 switch field + decoder | nMOS pass transistors | two-phase, dynamic decoder |
| Barrel 2 (`barrel_shifter_tg`) | single 32 x 32 switch field + decoder | CMOS transmission gates | two-phase, dynamic decoder |
| Logarithmic 1 (`log_shifter_pt`) | 5 multiplexer stages (shift 1, 2, 4, 8, 16) | nMOS pass transistors | none |
| Logarithmic 2 (`log_shifter_tg`) | 5 multiplexer stages | CMOS transmission gates | none |

Only the circular right shift is implemented. A left rotation by m equals a
right rotation by 32 - m. Logical and arithmetic shifts and masking need extra
circuitry around the core, and none is included here.

The circuits were designed at transistor level. This RTL is a logic model
of them: every structural element of the transistor circuits appears as a
module or signal. The switch-level behaviour is kept where it affects logic
values. This covers a switch that is open or closed, a node that keeps its
charge when nothing drives it, and a control pair that must be complementary.
Voltage levels, delays and power are outside a two-state model.

## Barrel shifters

### Main field: a crossbar with diagonal control lines

An N x N crossbar (`crossbar_switch`) has one switch at each crossing of an
input line and an output line. It can connect any input to any output.
The barrel field uses it with a fixed wiring. Decoded control line
`sel[k]` drives every switch that joins input `(j + k) mod N` to output `j`.
These switches lie on one wrapped diagonal of the array. Raising exactly one
line `sel[k]` therefore rotates the whole word by k in one step, through a
single switch per bit.

* `barrel_field_pt`: each switch is one nMOS transistor gated by `sel[k]`.
* `barrel_field_tg`: each switch is a transmission gate. Its nMOS device is
  gated by `sel[k]` and its pMOS device by the complement line `sel_n[k]`. The
  model treats a gate as closed when either device is on (`sel | ~sel_n`).
  With correct controls this is the same as `sel`. It also means the
  transmission-gate field still works if only one control polarity is right,
  as the real gate would, although with degraded levels.

The data passes through an inverter column before the field. It passes
through an inverter column (Barrel 2) or a column of level-restoring buffers
(Barrel 1) after it, so the output is in phase with the input. The restoring
buffer (`restoring_buffer`) is an inverter with a pMOS feedback device. That
device pulls a weak high level, left by an nMOS pass transistor, up to the
supply. In logic terms it is an inverter.

### Decoder and the two clock phases

The shift amount arrives binary-coded. A precharged NOR decoder
(`nor_decoder`) turns it into 32 one-hot lines:

* **Precharge, `phi` low:** every decoder line is pulled high.
* **Evaluation, `phi` high:** every line whose number differs from `s_code`
  in some bit is discharged. Only line `s_code` stays high.

A precharged line that reached the field directly would close *every* switch
during precharge. The inputs would then short together, which costs a lot of
power. So each line passes through an interface clocked buffer
(`interface_buffer`). The buffer forces a safe level in precharge and passes the
decoded value in evaluation:

| signal | buffer output used | clocked by | precharge (`phi`=0, `phi_n`=1) | evaluation (`phi`=1, `phi_n`=0) |
|--------|--------------------|-----------|------|------|
| `word_line[i]` | (decoder line) | `phi` | 1 | `s_code == i` |
| `sel[i]` | non-inverting | `phi_n` | 0 | `word_line[i]` |
| `sel_n[i]` | inverting | `phi` | 1 | `~word_line[i]` |

Barrel 1 needs only `sel`. Barrel 2 also needs `sel_n` for the pMOS sides.
`barrel_decoder` with `COMPLEMENT = 1` builds it. With `COMPLEMENT = 0`,
`sel_n` is tied high.

### Timing of a barrel shift

```
phi     ____/‾‾‾‾‾‾‾‾‾\_________/‾‾‾‾‾‾‾‾‾\____
phi_n   ‾‾‾‾\_________/‾‾‾‾‾‾‾‾‾\_________/‾‾‾‾
s_code, in   <apply new>         <apply new>
out     ==old==X==== new ==================X===
             (held in precharge)
```

* Apply `s_code` and `in_bits` while `phi` is low. Keep `s_code` stable while
  `phi` is high: a discharged dynamic line cannot recharge before the next
  precharge.
* While `phi` is high, exactly one diagonal conducts and `out_bits` follows
  `in_bits` rotated by `s_code`. A rotation completes within the cycle in which
  it is applied.
* While `phi` is low, every switch is open. The field's output lines float
  and keep their charge, so `out_bits` holds the last result. The model
  represents this charge storage as one level-sensitive latch per output line,
  inside `crossbar_switch`. These are the only latches in the design (32 per
  barrel shifter). They are intended.
* `phi` and `phi_n` are a non-overlapping pair generated outside the shifter.
  An assertion checks that they are never high together. The testbenches drive
  `phi_n` as the exact inverse of `phi`. A real non-overlap gap, with both
  clocks low, would let the precharged lines through `sel` for a moment. That is
  an electrical hazard the original circuit accepts, and the model does not
  reproduce it.

## Logarithmic shifters

A logarithmic shifter breaks the amount into its binary bits. Stage k
(`log_stage`, k = 0..4) is a column of 32 two-input multiplexer cells. When
control bit `s_code[k]` is 1, the stage rotates by 2^k. When it is 0, the data
goes straight through. No decoder is needed. The stage numbering follows the
stage inputs: the inverter column feeds stage 0, which shifts by 1.

* **Switch field.** In front of each column, output m of the previous column
  goes to two cells: the unshifted input of cell m, and the shifted input of
  cell (m - 2^k) mod 32. Cell j thus chooses between `in[j]` and
  `in[(j + 2^k) mod 32]`.
* **Control buffers.** Two inverters at the top of each column derive the
  complementary pair `C'` and `C` from the stage's control bit.
* **Cells.** `log_mux_pt` joins its two inputs through nMOS pass transistors
  gated by `C` and `C'`, followed by a level-restoring buffer. `log_mux_tg` uses
  two transmission gates followed by an inverter. Both cells invert:
  `d = ~(C ? s2 : s1)`. An assertion checks that `C` and `C'` are complementary.
* **Phase.** An input inverter column plus five inverting stages gives six
  inversions, so the output is in phase with the input. With a width whose
  stage count is even (16, 64, ...), the modules add an output inverter column
  to keep the function. The 32-bit circuit has no such column.

The logarithmic shifters have no clock and no state.

## Module hierarchy

```
shifters_top                 four shifters side by side, own ports each; phi/phi_n shared
├─ barrel_shifter_pt         Barrel 1
│  ├─ inverter_column        input interface
│  ├─ barrel_decoder (COMPLEMENT=0)
│  │  ├─ nor_decoder
│  │  └─ interface_buffer x32
│  ├─ barrel_field_pt ─ crossbar_switch
│  └─ restoring_buffer (W=32)
├─ barrel_shifter_tg         Barrel 2
│  ├─ inverter_column
│  ├─ barrel_decoder (COMPLEMENT=1) ─ nor_decoder, interface_buffer x64
│  ├─ barrel_field_tg ─ crossbar_switch
│  └─ inverter_column        output interface
├─ log_shifter_pt            Logarithmic 1: inverter_column + log_stage x5 (log_mux_pt x32 each)
└─ log_shifter_tg            Logarithmic 2: inverter_column + log_stage x5 (log_mux_tg x32 each)
```

`shifter_pkg` holds the default width (32) and the switch-style enum used by
`log_stage`. Every module takes the width `N` (or `W`) as a parameter with
default 32. `LOGN` defaults to `$clog2(N)`. The logarithmic shifters need N to
be a power of two.

## Simulating

Every testbench in `tb/` checks its own results. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`. Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/shifter_pkg.sv \
    tb/tb_shifters_top.sv --top-module tb_shifters_top -Mdir obj_top
./obj_top/Vtb_shifters_top
```

* `tb_shifters_top` drives all four shifters at full size for 400 cycles of a
  20-unit clock. The inputs are independent and random, after the sequence
  88888888 with S = 1..4. Every shift amount is applied to every shifter. The
  testbench checks the barrel hold in precharge, the same-cycle result in
  evaluation and the combinational logarithmic outputs. It counts how often
  each mechanism happened: each amount, evaluations, holds, and each stage
  shifting and passing.
* `tb_toggle_workload` applies data that toggles every cycle
  (55555555 / AAAAAAAA with amounts 0 / 2). Every output bit of every shifter
  then switches in every cycle. This is the kind of stimulus used to measure
  worst-case dynamic power. The exact pattern used for the published power
  numbers is not known.
* `tb_width_64` builds the top at 64 bits, the other usual datapath width.
  At that width the logarithmic shifters have six stages and use their extra
  output inverter column. All 64 shift amounts are applied.
* Each module also has its own testbench, `tb_<module>.sv`. The references are
  computed independently of the RTL: a rotation is the low half of
  `{in, in} >> s`.

The simulator has two states. Drive or reset every input before it is read.

## Reference characteristics of the transistor circuits

The numbers below were reported for the original layouts, which use a
0.8 µm, 5 V CMOS process and minimum-size switches. They are given only to
guide a choice between the variants. Nothing in this RTL reproduces them.

| variant | transistors | area, mm² | S→O delay, ns | I→O delay HL / LH, ns | power at 50 MHz, mW |
|---------|-------------|-----------|---------------|------------------------|---------------------|
| Barrel 1 | 1544 | 0.134 | 7.1 | 1.7 / 1.1 | 6.4 |
| Barrel 2 | 2632 | 0.218 | 1.4 | 0.6 / 0.5 | 6.0 |
| Logarithmic 1 | 884 | 0.111 | 2.6 | 1.8 / 1.6 | 5.8 |
| Logarithmic 2 | 1024 | 0.217 | 2.4 | 1.2 / 1.1 | 5.2 |

Each variant wins on something different:

* Barrel 2 is the fastest.
* Logarithmic 2 uses the least power.
* Logarithmic 1 is the smallest.
* Barrel 1 has by far the slowest path from shift amount to output (7.1 ns).

## Choices made in this model

These points are not fixed by the original circuit description. They are this
model's own choices:

* **Ports.** The shift amount is a 5-bit binary input named `s_code`. Data
  are `in_bits` and `out_bits`. The top gives each shifter separate ports so
  that the four can be compared side by side.
* **Charge storage.** Charge kept on floating nodes is modelled as a latch
  only where the logic depends on it: the barrel field outputs in precharge.
* **Contention.** If several switches drive one node, the model resolves it
  as a wired OR, and an assertion reports it. This never happens in correct
  operation.
* **Dynamic decoder.** The decoder lines are computed from `phi` and
  `s_code` without memory. This is exact when `s_code` is stable during
  evaluation.
* **Interface buffer.** The buffer's two outputs have these forced levels:
  the inverting output is 1 while its clock is low, and the non-inverting
  output is 0 while its clock is high. Each is driven from the clock phase
  that makes the field switches open during precharge.
* **Even stage counts.** The output inverter column that is added for even
  stage counts exists only at non-default widths.
* **Not modelled.** Level restoration, transistor sizing, delays and power
  are not modelled. The two-phase clock generator is not part of the design.
