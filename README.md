# Push-button 8-bit ALU with 7-segment readout

This is a small calculator for an FPGA board. You set two 8-bit operands on
eight slide switches and store each one with an **Enter** push button. Each
further press of Enter shows the next result in a fixed cycle: `A+B`, `A-B`,
`A mod 3`, then back to `A+B`. A second push button, **Sign**, switches
between unsigned (0..255) and two's-complement signed (-128..127)
arithmetic. The result appears in decimal on a four-digit 7-segment display.
The leftmost digit shows `-` for a negative result and `F` for an overflow.

The design is split the usual way into a control path and a data path:

```
 b_Enter, b_Sign ──► alu_ctrl ──FN[3:0]──────────────┐
                        │                            ▼
                        └─RegCtrl─► reg_update ─A,B─► alu ─Result[7:0], sign, overflow
 Input[7:0] (switches) ───────────────┘               │
                                                      ▼
                          |Result| ─► bin2bcd ─BCD[9:0]─► seg7_driver ─► Anode[3:0], seven_seg[6:0]
```

## Using it: the Enter sequence

| phase (controller state) | display shows        | Reg A            | Reg B            |
|--------------------------|----------------------|------------------|------------------|
| after reset: `ENTER_A`   | switches (unsigned)  | follows switches | holds            |
| 1st Enter: `ENTER_B`     | switches (unsigned)  | holds            | follows switches |
| 2nd Enter: `ADD`         | A+B                  | holds            | holds            |
| 3rd Enter: `SUB`         | A-B                  | holds            | holds            |
| 4th Enter: `MOD3`        | A mod 3              | holds            | holds            |
| 5th Enter: `ADD` again   | A+B ...              | holds            | holds            |

A register copies the switches on every clock while its phase is active.
The Enter press that ends the phase freezes it. Once both operands are
stored, moving the switches has no effect. Sign may be pressed at any time.
It flips the mode, and the mode shows in the three arithmetic phases. Reset
returns to `ENTER_A` in unsigned mode and clears both registers.

## Function codes

The controller drives the ALU with a 4-bit code `FN = {signed, op}`
(`alu_pkg::alu_fn_t`):

| FN   | result             | FN   | result           |
|------|--------------------|------|------------------|
| 0000 | A                  | 1010 | A+B, signed      |
| 0001 | B                  | 1011 | A-B, signed      |
| 0010 | A+B, unsigned      | 1100 | A mod 3, signed  |
| 0011 | A-B, unsigned      |      |                  |
| 0100 | A mod 3, unsigned  |      |                  |

All other codes give 0 with both flags clear. In the entry phases the
controller always sends the unsigned codes 0000 and 0001. Signed mode also
applies to `A mod 3`.

## What the flags mean, and what the display shows

The ALU result is the low 8 bits of the exact result. It comes with two flags:

* `sign`: the exact result is below zero.
* `overflow`: the exact result does not fit in the current mode. In unsigned
  mode that is A+B > 255. In signed mode it is a result outside -128..127.

Unsigned `A-B` with A < B counts as **negative, not overflow**. The display
shows `-` and the difference B-A. For example, 3-5 shows `-002`.

`A`, `B` and `A mod 3` never set a flag.

Before BCD conversion, `alu_top` takes the magnitude of a negative result
with a two's-complement negation. So signed -128 is shown as `-128`. The
leftmost digit shows `F` if `overflow` is set (this wins over `-`). Otherwise
it shows `-` if `sign` is set, and otherwise it is blank. On overflow, the
other three digits show the magnitude of the exact result modulo 256:

| mode     | operation  | exact result | display |
|----------|------------|--------------|---------|
| unsigned | 200 + 100  | 300          | `F044`  |
| unsigned | 3 - 5      | -2           | `-002`  |
| signed   | -56 - 100  | -156         | `F156`  |
| signed   | -56 + 100  | 44           | ` 044`  |
| signed   | -56 mod 3  | 1            | ` 001`  |

Leading zeros are shown.

## The arithmetic unit (`alu_arith`)

One 9-bit adder does both operations. Both operands are widened to 9 bits:
zero-extended in unsigned mode, sign-extended in signed mode. For
subtraction, B is inverted and a carry of 1 is fed in. Bit 8 of the sum then
gives the flags:

* unsigned add: bit 8 is the carry, which means overflow;
* unsigned subtract: bit 8 is the borrow, which means negative;
* signed: bit 8 is the true sign, and overflow is bit 8 xor bit 7.

## The mod-3 unit (`alu_mod3`)

`A mod 3` is defined as `x - 3*floor(x/3)`, so it is always 0, 1 or 2, also
for negative x (-56 mod 3 = 1). The unit uses no divider and no
subtract-and-compare loop. It relies on 4 ≡ 1 (mod 3):

1. Add the four 2-bit (base-4) digits of A. The sum is 0..12.
2. Signed mode: A = u - 256·a7, and 256 ≡ 1 (mod 3), so A ≡ u + 2·a7. The
   only extra hardware for signed operation is adding `2·a7` at this point.
   The sum is then 0..14.
3. Split that 4-bit sum into two base-4 digits and add them. The sum is 0..6.
4. A 7-entry table maps 0..6 to 0..2.

## Binary to BCD (`bin2bcd`)

This is the shift-and-add-3 ("double dabble") method, unrolled into
combinational logic. The eight bits are shifted in MSB first. Before each
shift, any BCD digit of 5 or more gets 3 added. The output is
`{hundreds[1:0], tens[3:0], ones[3:0]}`, so 249 becomes `10_0100_1001`.

## Display driver (`seg7_driver`)

The four digits share the segment lines and are lit one at a time, each for
`REFRESH_CYCLES` clocks. The default is 50,000, which is 1 ms at 50 MHz, so
all four digits refresh at 250 Hz. If the display flickers, lower it.

* Digit 3 is the leftmost: the status symbol.
* Digits 2..0 are hundreds, tens and ones.
* Both outputs are active low: `Anode[i]=0` enables digit i.
* `seven_seg = {g,f,e,d,c,b,a}`, and 0 lights a segment.

## Buttons and timing (`btn_pulse`, `alu_ctrl`)

Each button goes through `btn_pulse`:

1. a two-flop synchroniser;
2. a debouncer, which accepts a new level once it has stayed the same for
   `DEBOUNCE_CYCLES` clocks (default 1,000,000, which is 20 ms at 50 MHz);
3. a rising-edge detector.

So a press counts once however long the button is held. A bounce or glitch
shorter than the debounce time is ignored.

The controller's state changes `DEBOUNCE_CYCLES + 3` clocks after a clean
press. The ALU, the magnitude step and the BCD converter are combinational,
so the new value reaches the display on the next digit scan.

## Top-level ports (`alu_top`)

| port            | dir | width | meaning                                |
|-----------------|-----|-------|----------------------------------------|
| `Clk`           | in  | 1     | board clock, 50 MHz intended           |
| `reset`         | in  | 1     | synchronous, active high               |
| `Input`         | in  | 8     | switches SW7..SW0                      |
| `b_Enter`       | in  | 1     | Enter button, active high              |
| `b_Sign`        | in  | 1     | Sign button, active high               |
| `Anode`         | out | 4     | digit enables, active low, [3] = left  |
| `seven_seg`     | out | 7     | segments {g..a}, active low            |

| parameter         | default   | meaning                          |
|-------------------|-----------|----------------------------------|
| `DEBOUNCE_CYCLES` | 1,000,000 | button debounce time in clocks (at least 1) |
| `REFRESH_CYCLES`  | 50,000    | clocks each display digit is lit (at least 1) |

If the board's reset button is active low, or its display is common-cathode,
invert the signal at the top level. Pin constraints are not part of this
RTL.

## Files

| file                  | contents                                              |
|-----------------------|-------------------------------------------------------|
| `rtl/alu_pkg.sv`      | FN code, RegCtrl and state types                      |
| `rtl/alu_top.sv`      | top level                                             |
| `rtl/alu_ctrl.sv`     | controller FSM                                        |
| `rtl/btn_pulse.sv`    | synchroniser, debouncer and edge detector             |
| `rtl/reg_update.sv`   | operand registers A and B                             |
| `rtl/alu.sv`          | ALU: arithmetic unit, mod-3 unit, result multiplexer  |
| `rtl/alu_arith.sv`    | add/subtract with flags                               |
| `rtl/alu_mod3.sv`     | A mod 3                                               |
| `rtl/bin2bcd.sv`      | binary to BCD                                         |
| `rtl/seg7_driver.sv`  | multiplexed 7-segment driver                          |
| `tb/tb_*.sv`          | one self-checking testbench per module, plus two for the top |
| `tb/tb_seg_pkg.sv`    | testbench-side segment patterns and decoder           |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`.
Every testbench also has a watchdog that counts a failure if the run hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/alu_pkg.sv tb/tb_seg_pkg.sv tb/tb_alu_top.sv --top-module tb_alu_top
./obj_dir/Vtb_alu_top
```

Replace `tb_alu_top` with any other testbench name.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_alu_arith`     | all 2^18 combinations of A, B, add/sub and mode, checked against integer arithmetic |
| `tb_alu_mod3`      | all 256 values of A, unsigned and signed, checked against `x - 3*floor(x/3)` |
| `tb_alu`           | all 16 FN codes over all A and B pairs |
| `tb_bin2bcd`       | all 256 inputs |
| `tb_reg_update`    | 2000 random enable/switch steps and the reset value |
| `tb_seg7_driver`   | the digit order, the time each digit is held, and every character, including the `F` over `-` priority |
| `tb_alu_ctrl`      | random Enter/Sign presses, the `DEBOUNCE+3` response time, rejection of short glitches, and reset |
| `tb_alu_top`       | end to end through the board ports only (short debounce and scan), see below |
| `tb_alu_top_full`  | one full session at the default parameters (50 MHz clock, 20 ms debounce, 1 ms scan), see below |

`tb_alu_top` reads the multiplexed display back into characters and compares
it with a model over 150 rounds of random operands, presses and resets. It
also counts each mechanism: both entry phases, each operation in each mode,
the mod-3→add wrap, overflow, a negative result, the sign toggle, the
switch lock and reset. If any of them never happens, that is a failure.

`tb_alu_top_full` enters A = 200 and B = 100. It then steps through the
displays in the example table above and measures the response to Enter. It
simulates about 14 million clocks, which takes a few seconds.

## Design choices and limits

These are choices made in this implementation. They are not fixed
requirements of the calculator.

* How a negative unsigned difference is reported (`-` rather than `F`).
* What the digits show on overflow.
* `F` taking priority over `-` when both flags are set.
* The mod-3 circuit.
* The BCD algorithm.
* The button conditioning.
* The RegCtrl encoding.
* The output polarities and the scan rate.
* The reset style: synchronous, active high.

Other limits:

* The 50 MHz clock only sets the default counts. Change `DEBOUNCE_CYCLES` and
  `REFRESH_CYCLES` for another clock.
* The design has been verified in simulation only. It has not been run on a
  board, and it has no timing constraints.
