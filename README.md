# Master–slave D flip-flop with PRESET and CLEAR, gate by gate

This is a positive-edge D flip-flop built the way a static-CMOS standard-cell
designer builds one. Two clock-gated NAND latches sit back to back. The
**master** is open while CLK is low, and the **slave** is open while CLK is
high. So Q takes the value D had at the rising edge. PRESET and CLEAR enter
through the third inputs of the master's NAND3 gates.

The circuit has 14 gates: six inverters, six NAND2 and two NAND3. Each gate
was sized as its own cell with logical effort, to minimise the delay of the
worst path, D → Q. The RTL keeps that structure: each gate is one cell
instance, and the instance list matches the transistor schematic one to one.
The two latches are not written as `always_latch`. They stay cross-coupled
gate pairs, as drawn.

## The gate netlist

| Stage | Instance | Cell | Inputs | Output |
|---|---|---|---|---|
| U | `u_inv_u` | inverter | D | `d_n` |
| V | `u_inv_v` | inverter | `d_n` | `d_buf` |
| master clock | `u_clk_master` | inverter | CLK | CLK_NOT |
| slave clock | `u_clk_slave` | inverter | CLK_NOT | `slave_en` |
| PRESET | `u_preset` | inverter | PRESET | `preset_n` |
| CLEAR | `u_clear` | inverter | CLEAR | `clear_n` |
| W | `u_master.u_w_top` | NAND2 | `d_n`, CLK_NOT | `gate_s_n` |
| W | `u_master.u_w_bot` | NAND2 | CLK_NOT, `d_buf` | `gate_r_n` |
| X | `u_master.u_x_top` | NAND3 | `preset_n`, `gate_s_n`, MASTER_Q | MASTER_QNOT |
| X | `u_master.u_x_bot` | NAND3 | MASTER_QNOT, `gate_r_n`, `clear_n` | MASTER_Q |
| Y | `u_slave.u_y_top` | NAND2 | MASTER_QNOT, `slave_en` | `gate_s_n` |
| Y | `u_slave.u_y_bot` | NAND2 | MASTER_Q, `slave_en` | `gate_r_n` |
| Z | `u_slave.u_z_top` | NAND2 | `gate_s_n`, Q | Q_NOT |
| Z | `u_slave.u_z_bot` | NAND2 | Q_NOT, `gate_r_n` | Q |

The critical path is D → U → V → W → X → Y → Z → Q (inverter, inverter,
NAND2, NAND3, NAND2, NAND2). Data passes through two inverters so that both
polarities reach the W gates.

The slave's clock is CLK re-created from CLK_NOT by a second inverter, not
taken from CLK directly. So the slave opens one inverter delay after the
master closes.

## One clock cycle

| CLK | W gates | Master (X pair) | Y gates | Slave (Z pair) |
|---|---|---|---|---|
| low | pass ¬D and D as active-low set/reset | transparent: MASTER_Q = D | both high | holds Q |
| rising edge | both go high | closes on the current D | open | — |
| high | both high | holds | pass the master | transparent: Q = MASTER_Q |

The clock edge never opens both latches at the same time. The gate model has
no delays, so it avoids the race only because CLK and D never change in the
same time step. In the testbench, D is kept away from the rising edge.

## PRESET and CLEAR

This is the part most likely to surprise a user.

* **Polarity at the pins.** PRESET and CLEAR are active high. Each passes
  through an inverter, and the master's NAND3 gates see active-low signals.
* **What each one loads.** The inverted PRESET goes to the NAND3 that drives
  MASTER_QNOT, so **PRESET = 1 loads 0**. The inverted CLEAR goes to the NAND3
  that drives MASTER_Q, so **CLEAR = 1 loads 1**. That is the reverse of what
  the names suggest. It is how the circuit is wired, and the reference
  transistor-level simulation agrees: Q stays low while PRESET is held high.
  The RTL follows the circuit and keeps the names. The conventional truth
  table, where an active-low PRESET sets Q to 1, does not describe this
  circuit. If you need the conventional behaviour, swap the two pins at the
  instance.
* **They act on the master only.** They are not asynchronous to Q. A force
  reaches Q during the next CLK-high phase, when the slave is open. While CLK
  is low, Q holds whatever the forces do.
* **While CLK is low, the master is not fully forced.** With PRESET active,
  MASTER_QNOT is 1 but MASTER_Q still follows D. The master settles to 0 when
  the clock gates close at the rising edge.
* **Both at once** is not allowed. The gates then give
  MASTER_Q = MASTER_QNOT = 1 and, with CLK high, Q = Q_NOT = 1. If both are
  released at the same moment, or if CLK falls while the slave holds that
  (1, 1) pair, the cross-coupled gates race. Real silicon resolves the race
  unpredictably. A zero-delay simulator resolves it by evaluation order.
  Release the forces one at a time.

| PRESET | CLEAR | Q after the next CLK-high phase |
|---|---|---|
| 0 | 0 | D at the rising edge |
| 1 | 0 | 0 |
| 0 | 1 | 1 |
| 1 | 1 | Q = Q_NOT = 1 (not allowed) |

## Cell sizes and timing of the physical design

RTL does not carry the following figures. They are given here so that you can
judge the design. The process is 0.6 µm CMOS, and every device has
L = 0.6 µm. C = 3 fF is the input capacitance of a unit inverter. Each output
drives a 45C load (about 229 fF once the latch's own gate is added).

| Cell | PMOS / NMOS width | Notes |
|---|---|---|
| U, V inverters | 3 / 1.5 µm | unit inverter |
| W NAND2 | 4.2 / 4.2 µm | |
| X NAND3 | 4.05 / 6 µm per finger | folded once |
| Y NAND2 | 9.6 / 9.6 µm | |
| Z NAND2 | 11.7 / 11.7 µm per finger | folded once |
| master clock inverter | 6 / 3 µm | |
| slave clock inverter | 7.8 / 3.9 µm | |
| PRESET, CLEAR inverters | 4.2 / 2.1 µm | |

Delay of the path, using the master delay from D plus the slave delay from
the clock:

| Source | Delay |
|---|---|
| logical-effort estimate | 1.83 ns |
| transistor schematic (master 1.28 + slave 0.76) | 2.04 ns |
| extracted standard-cell layout (master 1.56 + slave 0.83) | 2.39 ns |

The gate-level alternatives of the same topology were slower: an all-NOR
version (2.15 ns estimate) and one with a NOR master and a NAND slave
(2.04 ns). They are not part of this RTL.

## What the RTL does not model

* **No delays.** Every gate is zero-delay. Q changes in the time step of the
  rising edge. Setup, hold and clock-to-Q times are not modelled.
* **No reset** other than PRESET and CLEAR. Until the flip-flop has been
  clocked or forced, its state is whatever the simulator starts with.
* **No sizes.** The five inverter cells share one module, `msdff_inv`. The
  three NAND2 stages share `msdff_nand2`. The cells differ only in transistor
  width, so one module per logic function is enough.
* **Combinational loops.** Lint and synthesis tools report the two
  cross-coupled pairs as combinational loops. This is intended. A synthesis
  flow that maps to a real library will turn each pair into gates with
  feedback. It will not infer a flip-flop.

## Files

| File | Contents |
|---|---|
| `rtl/msdff_pc.sv` | top: the complete flip-flop |
| `rtl/msdff_master_latch.sv` | stages W and X |
| `rtl/msdff_slave_latch.sv` | stages Y and Z |
| `rtl/msdff_inv.sv`, `rtl/msdff_nand2.sv`, `rtl/msdff_nand3.sv` | the cells |
| `tb/tb_msdff_pc.sv` | end-to-end test of the flip-flop |
| `tb/tb_msdff_master_latch.sv`, `tb/tb_msdff_slave_latch.sv` | latch tests |
| `tb/tb_msdff_inv.sv`, `tb/tb_msdff_nand2.sv`, `tb/tb_msdff_nand3.sv` | exhaustive cell tests |

The flip-flop has no parameters. Its ports are `clk_i`, `d_i`, `preset_i`,
`clear_i`, `q_o` and `q_n_o`. It also brings out the probe nets `clk_n_o`
(CLK_NOT), `master_q_o` and `master_q_n_o`.

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-UNOPTFLAT -Irtl -y rtl +libext+.sv \
          --top-module tb_msdff_pc tb/tb_msdff_pc.sv -o sim
./obj_dir/sim
```

`-Wno-UNOPTFLAT` acknowledges the latch loops described above. Without it,
Verilator stops on the warning. Replace `tb_msdff_pc` with any other
testbench name.

Each testbench does the following:

* **`tb_msdff_pc`** runs 3000 clock cycles in random runs of four scenarios:
  normal, PRESET, CLEAR, and PRESET+CLEAR. It checks Q, Q_NOT, MASTER_Q,
  MASTER_QNOT and CLK_NOT five times per cycle against a behavioural model:
  twice while CLK is low, once just before the edge (so Q must not change
  early), right after the edge, and after D has changed during the high
  phase. It counts every mechanism and fails if one never occurs:
  * capture of 0 and of 1
  * master following D
  * master holding against D
  * slave holding against D
  * PRESET blocking D = 1
  * CLEAR
  * both forces at once
  * release of a force
* **Latch tests** drive each latch alone. Each step changes one input, picked
  at random, and is compared with a rule-based latch model.
* **Cell tests** go through each cell's full truth table.
