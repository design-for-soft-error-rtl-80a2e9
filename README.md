# Soft-error detection for NCL circuits mapped onto FPGA look-up tables

On an SRAM-based FPGA, a particle strike that flips a configuration cell does
not cause a passing glitch. It changes the circuit, and the change lasts until
the device is configured again. This RTL models that situation for an
asynchronous circuit written in Null Convention Logic (NCL), and adds a
detector that finds every such upset that does harm.

The idea behind the detector is that a dual-rail, delay-insensitive circuit
shows its faults plainly. A corrupted threshold gate can do only a few things
wrong, and each one shows up in one of two ways:

* **an invalid code**: both rails of a dual-rail bit are high. This comes from
  a gate that fires too early or oscillates;
* **a deadlock**: the four-phase handshake stops. A gate that never fires
  stops it while requesting DATA; a gate that never returns to 0 stops it
  while requesting NULL.

Finding the invalid code takes one AND gate per bit. Finding a deadlock needs
a timing assumption, because a delay-insensitive circuit has no deadline. The
assumption used is that a handshake phase never lasts more than K = 2 times
the phase before it. Two small counter pairs check this.

The design is an NCL full-adder pipeline with upset injection and the
detector. Every threshold gate in it is built the way an FPGA tool maps it, out
of three LUTs.

## Dual-rail NCL in brief

Each bit travels on two wires, `(rail1, rail0)`:

| rail1 rail0 | meaning |
|---|---|
| 0 0 | NULL (no data yet) |
| 0 1 | DATA0 |
| 1 0 | DATA1 |
| 1 1 | invalid, never produced by correct logic |

DATA wavefronts and NULL wavefronts take turns through the pipeline. Each
register stage tells the stage before it what it wants next: `ko = 1` asks for
DATA, `ko = 0` asks for NULL. The logic is made of threshold gates with
hysteresis. A gate THmn has n inputs and threshold m. Its output rises once m
inputs are high and falls only when all n inputs are low; otherwise it holds.
In THmnWw.., the first inputs carry weights w. For example, TH34w2 fires when
`A·(B+C+D) + B·C·D`.

## How a threshold gate sits in an FPGA (`ncl_lut_gate`)

An FPGA has no hysteresis gates, so each gate becomes three LUTs:

```
         +---------+ t1
 in ---->| Set LUT |-----+      +----------+
    |    +---------+     +----->|          |
    |    +-----------+ t2       | Hold LUT |---+--> z
    +--->| Reset LUT |--------->|          |   |
         +-----------+     +--->|          |   |
                           |    +----------+   |
                           +-------------------+
```

* Set LUT: `t1 = 1` when the weighted count of high inputs reaches m.
* Reset LUT: `t2 = OR(inputs)`.
* Hold LUT: `z' = t2 & (t1 | z)`.

All three LUT contents come in on the port `cfg` (`ncl_pkg::th_cfg_t`, 40
bits). `ncl_pkg::th_cfg(n, m, w0, ...)` computes them for any gate of up to
four inputs. The LUT addresses are as follows:

* **Set and Reset LUTs**: `{in[3], in[2], in[1], in[0]}`. The first (weighted)
  input `in[0]` is the least significant bit. With this order, TH34w2 has Set
  contents `16'hEAA8` and Reset contents `16'hFFFE`, as a Cyclone II mapping
  shows them.
* **Hold LUT**: a 3-input LUT addressed `{t1, t2, z}`, with contents `8'hC8`.

`ncl_lut` is the LUT itself: a tree of 2:1 multiplexers over the
configuration cells, with input A at the first level.

### Timing model: one clock per gate

The Hold LUT's feedback is a real combinational loop on the FPGA. Here it is a
register on `clk`, so **each gate has exactly one `clk` of delay**. Because NCL
is delay-insensitive, this is one valid timing among all the timings the
circuit tolerates. Registering the loop has two benefits:

* the model simulates deterministically in a two-state, cycle-based simulator;
* a Hold LUT that oscillates after an upset toggles once per clock, where a
  zero-delay loop would hang the simulator.

`clk` therefore has two roles. It stands for the gate delay, and it is the
fast clock the deadlock detector counts with. A fault-free DATA+NULL cycle of
the pipeline takes 10 to 12 clocks, and each `kf` phase lasts 5 to 6 clocks.

If you map this RTL onto an FPGA as written, the gates become clocked logic.
To get the asynchronous circuit itself, replace the register in
`ncl_lut_gate` with the combinational feedback.

## What an upset does to one gate

Flipping one of a gate's 40 cells gives one of the following results. Set and
Reset addresses below are written in the LUT's own order `{D,C,B,A}`, with A
the weighted input.

| Flipped cell | Effect on z |
|---|---|
| Set, address 0 | none: the Reset LUT holds the gate at 0 |
| Set, a cell that was 0 | premature fire |
| Set, a cell that was 1 | no fire |
| Reset, address 0 | no return to 0 |
| Reset, below threshold | early return to 0, harmless in a pipeline |
| Reset, at or above threshold | no fire |
| Hold 000 / 111 | oscillation (inputs all low / set condition true) |
| Hold 001 | no return to 0 |
| Hold 010 | premature fire |
| Hold 011 | early return to 0 |
| Hold 100, 101 | none: states that do not occur |
| Hold 110 | no fire |

This table describes the worst case. Inside a circuit, a gate may never see the
input pattern whose cell was flipped. For example, the full adder never drives
G3 with all four inputs high, so that upset does nothing there.

## The pipeline (`ncl_seu_top`)

```
 ncl_source --din--> reg1 --q1--> ncl_full_adder --sc--> reg2 --> q_carry, q_sum
     ^                |  ^          (G1..G4, LUT cfg       |  ^
     +------ ki ------+  |           from ncl_lut_config)  |  |
                         +----------------- kf ------------+--+
                                        |
              sc --> ncl_invalid_detect --> invalid_data
              kf --> ncl_deadlock_detect --> deadlock_no_fire, deadlock_no_return0
```

* `ncl_source` answers reg1's request `ki`. It presents DATA for the values
  0, 1, ..., 7 of `{ci, x, y}` in turn, with NULL between them, and takes one
  clock to answer.
* `reg1` and `reg2` are `ncl_register` stages of 3 and 2 bits. In each, every
  rail passes through a TH22 gate together with the stage's request. A TH12b
  (NOR) per bit and a TH44 completion tree (`ncl_completion`, ceil(log4 N)
  levels) produce `ko`. reg2's completion `kf` is reg1's request and also
  reg2's own request, so the output side accepts every wavefront at once.
* `ncl_full_adder`:
  * G1 = TH23 over the rail0 inputs gives `co.rail0`;
  * G2 = TH23 over the rail1 inputs gives `co.rail1`;
  * G3 = TH34w2(`co.rail1`, rail0 inputs) gives `s.rail0`;
  * G4 = TH34w2(`co.rail0`, rail1 inputs) gives `s.rail1`.

  The sum rails are input-complete: they stay NULL until all three inputs are
  DATA.
* `ncl_lut_config` holds the 12 LUTs of G1..G4. `rst` stands for configuring
  the FPGA: it loads the fault-free contents and resets the pipeline. A pulse
  on `seu_flip` inverts one cell. Select the cell with `seu_gate` (0..3 for
  G1..G4), `seu_lut` (0 Set, 1 Reset, 2 Hold) and `seu_bit` (the LUT address).
  The cell stays flipped until the next `rst`. Only the full adder can be
  upset. The registers and completion gates use fixed contents.

## The detectors

**`ncl_invalid_detect`** sets `invalid_data` when `rail1 & rail0` is true for
any bit of the full adder's output. It is combinational.

**`ncl_deadlock_detect`** contains two `ncl_phase_watch` units on `kf`:

| flag | watched phase | compared with |
|---|---|---|
| `deadlock_no_return0` | `kf` low (NULL requested), T2 | the DATA-request phase before it, T1 |
| `deadlock_no_fire` | `kf` high (DATA requested), T3 | the NULL-request phase before it, T2 |

Each `ncl_phase_watch` works as follows:

1. While the measured phase lasts, an up-counter counts clocks.
2. A down-counter is loaded with K times that count.
3. Once the watched phase begins, the down-counter counts down.
4. When it reaches 0, the watched phase has lasted at least K·T and the flag
   rises. The counter then stays at 0, so the flag stays high for as long as
   the handshake is stuck.

Parameters: `CNT_W = 4` (width of the up-counter) and `K = 2`. The
down-counter has `CNT_W + log2(K)` bits.

`seu_alarm` latches any of the three flags until `rst`. It is the request to
reprogram the device.

### What comes from the method and what this design adds

* **From the method**: the AND/OR invalid-code detector, the two counter pairs
  watching `kf`, the ×2 factor and the 4-bit counters.
* **Added here**:
  * The up-counter saturates instead of wrapping.
  * The down-counter is `log2(K)` bits wider than the up-counter, so K times
    the largest count still fits. The method only asks that the counters be
    large enough not to overflow.
  * The down-counter stops at 0, so the flag holds while the handshake is
    stuck.
  * A watcher is armed only after one complete measured phase since reset.
    Without this, the first phase after reset would raise a false alarm.
  * `seu_alarm` is latched.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The three upset-level tests are:

* **`tb_ncl_seu_top`** runs the top at its default parameters.
  1. It runs 64 fault-free operations. Every result must match its input, and
     no detector may fire.
  2. It upsets G3 once for each class in the table above. After each upset it
     checks the expected flag and the direction in which `kf` is stuck, then
     checks that `rst` restores correct operation.
* **`tb_ncl_seu_sweep`** upsets each of the 160 cells of G1..G4 in turn. The
  testbench decides independently whether the upset did harm: a wrong result,
  a `11` code on the adder's output, or the pipeline stopping. It then checks
  three things:
  * every harmful upset raised `seu_alarm`;
  * no harmless upset raised it;
  * every flag that rose is the one the gate-level class predicts.

  Result: 66 of the 160 upsets do harm and all 66 are detected, with no false
  alarms. The other 94 cells are harmless. They are either harmless by class
  (Set address 0, early return, Hold 100/101, the unused fourth input of
  G1/G2) or never reached by the full adder's input patterns.

* **`tb_ncl_th34w2_upsets`** upsets each of the 40 cells of a single TH34w2
  gate. It drives NCL-style input sequences: for every pattern, the bits
  arrive one at a time in every order, or all at once, then leave again. It
  compares the gate with a fault-free reference and checks that the effect in
  the table above appears for every cell. Cells listed as "none" must show no
  effect at all.

Known limits:

* The deadlock bound K·T is an assumption, not a guarantee. A slow but correct
  phase longer than K times its predecessor raises a false alarm. A larger K
  means fewer false alarms and later detection.
* Only LUT contents can be upset. Routing (programmable interconnect points)
  and control bits are not modelled.
* Only the computational block can be upset. An upset in a register or
  completion gate is outside this model.

## Simulating

The sources are plain SystemVerilog. `rtl/ncl_pkg.sv` must come first. To run
one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ncl_pkg.sv \
    tb/tb_ncl_seu_sweep.sv --top-module tb_ncl_seu_sweep -o sim
./obj_dir/sim
```

Replace the testbench name to run any other one in `tb/`. Every testbench
finishes in well under a second.

## Files

| file | contents |
|---|---|
| `rtl/ncl_pkg.sv` | dual-rail type, LUT-content type, functions computing LUT contents |
| `rtl/ncl_lut.sv` | K-input SRAM LUT |
| `rtl/ncl_lut_gate.sv` | threshold gate from Set/Reset/Hold LUTs |
| `rtl/ncl_completion.sv` | TH44 completion tree |
| `rtl/ncl_register.sv` | dual-rail register stage with completion |
| `rtl/ncl_full_adder.sv` | full adder G1..G4 |
| `rtl/ncl_lut_config.sv` | LUT configuration cells with upset injection |
| `rtl/ncl_source.sv` | handshake-driven input generator |
| `rtl/ncl_invalid_detect.sv` | 11-code detector |
| `rtl/ncl_phase_watch.sv` | up/×K/down counter pair |
| `rtl/ncl_deadlock_detect.sv` | the two deadlock watchers |
| `rtl/ncl_seu_top.sv` | the whole design |
| `tb/tb_*.sv` | one testbench per module, plus `tb_ncl_seu_sweep` and `tb_ncl_th34w2_upsets` |
