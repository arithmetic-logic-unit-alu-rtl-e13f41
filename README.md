# Push-button calculator and 16-tap FIR filter

This repository holds two small, independent pieces of FPGA hardware in
synthesizable SystemVerilog. They share a clock and a reset and nothing else:

1. **A calculator on a 7-segment display.** Two 8-bit unsigned operands are set
   on eight slide switches. A single *Enter* push button steps the machine:
   load A, load B, then show A+B and A-B alternately. The result appears in
   decimal on four time-multiplexed common-anode 7-segment digits. The leftmost
   digit shows `-` for a negative difference and `F` for a sum above 255.
2. **A 16-tap FIR filter** with 8-bit signed samples and 7-bit signed
   coefficients, in two structures. One is the plain direct form. The other has
   one pipeline register cut across the adder chain between the 7th and 8th
   taps. Both keep the full precision of every product and partial sum. A
   wrapper with input and output registers lets you compare their clock speeds.

`lab_top` puts both pieces side by side and brings out the ports of each.

---

## 1. The calculator

### What the user sees

| Enter presses since reset | ALU function | Reg A | Reg B | Display |
|---|---|---|---|---|
| 0 | pass A | follows switches | holds | switch value (A) |
| 1 | pass B | holds | follows switches | switch value (B) |
| 2, 4, 6, ... | A + B | holds | holds | sum; `F` on the left if it exceeds 255 |
| 3, 5, 7, ... | A − B | holds | holds | \|A − B\|; `-` on the left if B > A |

The display shows three decimal digits with leading zeros, for example ` 005`,
`F044` (200 + 100 = 300, shown modulo 256) or `-064` (35 − 99). A reset
returns the machine to the first row.

### Structure

```
 b_enter ──► alu_controller ──fn──────────────┐
                 │ reg_ctrl                    ▼
 input_sw ─► alu_regs (Reg A, Reg B) ──a,b──► alu ──result──► bin2bcd ──bcd[9:0]──► seg7_driver ──► anode[3:0]
              (alu_reg_next inside)            └──sign, overflow───────────────────────►        └──► seven_seg[6:0]
```

| Module | Role |
|---|---|
| `alu_controller` | Moore FSM with 4 states: A, B, ADD and SUB. Contains a 2-flip-flop synchronizer and a rising-edge detector for the button. |
| `alu_regs` | Reg A and Reg B, clocked every cycle. |
| `alu_reg_next` | Combinational next-value logic for the two registers. Its ports are RegA, RegB, In, RegCtrl → next_RegA, next_RegB. |
| `alu` | Combinational ALU with the functions pass A, pass B, A+B and A−B, and the `sign` and `overflow` flags. |
| `bin2bcd` | Combinational 8-bit binary to 3-digit BCD converter, using shift-and-add-3. |
| `seg7_driver` | Scans the four digits with a free-running counter and encodes each digit. |
| `alu_top` | Wires the above together. |

### ALU arithmetic

The operands are unsigned (0..255) and the result is always 8 bits wide. The
function code `fn` is:

| `fn` | result | flags |
|---|---|---|
| 00 | A | none |
| 01 | B | none |
| 10 | (A + B) mod 256 | `overflow` = carry out of bit 7 |
| 11 | \|A − B\| | `sign` = (B > A) |

Subtraction is in **sign-and-magnitude** form, not two's complement. 35 − 99
yields `result = 64` and `sign = 1`, so the display can print `-064` directly.
The magnitude of a difference of two 8-bit unsigned numbers always fits in 8
bits, so a subtraction never overflows. An addition is never negative. The two
flags are therefore never set together, and an assertion in `alu_top` checks
this.

### Controller and registers

A press is the rising edge of the synchronized button level. Holding the button
down therefore advances the machine only once. The controller acts on a press
three clock edges after `b_enter` rises: two synchronizer stages plus the edge
detector. In states A and B the selected register loads the switches on every
clock. The register therefore tracks the switches continuously, and the value
at the moment of the press is the one that stays. **There is no debouncer.** A
mechanical button that bounces will register several presses. On a real board,
add a debouncer (for example a ~10 ms stability counter) in front of
`b_enter`.

`reg_ctrl` uses 2 bits (see `alu_pkg`):

| Code | Meaning |
|---|---|
| `RC_LOAD_A` | Reg A loads the switches |
| `RC_LOAD_B` | Reg B loads the switches |
| `RC_HOLD` | both registers hold |

### Display driver

The four digits share their seven cathode lines, so only one digit is lit at a
time:

- A `REFRESH_W`-bit counter chooses the digit from its top two bits, in the
  order AN3 (leftmost), AN2, AN1, AN0.
- At the 50 MHz board clock and the default `REFRESH_W = 16`, each digit is lit
  for 16 384 cycles (0.33 ms).
- The whole display is refreshed at about 763 Hz per digit position, well
  beyond flicker.
- Anodes and segments are both **active low** (common-anode display).
- `seven_seg` is ordered `{g,f,e,d,c,b,a}`, so bit 0 is segment a. Check this
  against your board's pin file: if your wiring differs, permute the bits in
  `seg7_driver`.
- The outputs are registered, so they change one clock after the counter.

---

## 2. The FIR filter

The filter computes

    y[k] = Σ_{m=0}^{15} h[m] · x[k−m]
    h = [−1, 0, 1, −3, −9, −2, 30, 63, 63, 30, −2, −9, −3, 1, 0, −1]

The coefficients are symmetric, so the filter has linear phase. They are a
low-pass response whose taps sum to 158. The impulse response is `h` itself.
The unit-step response rises to 172 after ten samples and settles at 158.

### Direct form (`fir_direct`)

- A shift register holds x[k−1] … x[k−15].
- x[k] feeds tap 0 directly, with no register.
- Each tap multiplies its sample by a constant coefficient.
- A chain of adders accumulates the products from tap 0 to tap 15.

So `y` is combinational in `x`: the output for a sample appears in the same
cycle the sample is applied. The critical path is the whole chain of
multiply-by-constant and 15 additions.

### Word lengths: full precision, tap by tap

Samples are 8-bit two's complement and coefficients 7-bit two's complement. A
generic bound would use 15-bit products and a 19-bit accumulator (8 + 7 bits,
plus 4 bits of growth for 16 terms). This design instead sizes every product
and every running sum for the coefficients it actually has, so no bit is
dropped and none is wasted:

    bits needed for a quantity bounded by ±B  =  smallest n with 2^(n−1) > B
    product at tap m     :  B = 128 · |h[m]|
    running sum to tap m :  B = 128 · Σ_{i≤m} |h[i]|

The bound uses 128 rather than 127 because x = −128 is the largest sample
magnitude. `fir_pkg::sum_width()` and `fir_pkg::prod_width()` compute these
widths at elaboration, so changing the `H` parameter resizes the datapath
automatically. For the default coefficients:

| tap m | h[m] | product bits | running-sum bits |
|---|---|---|---|
| 0 | −1 | 9 | 9 |
| 1 | 0 | 1 | 9 |
| 2 | 1 | 9 | 10 |
| 3 | −3 | 10 | 11 |
| 4 | −9 | 12 | 12 |
| 5 | −2 | 10 | 13 |
| 6 | 30 | 13 | 14 |
| 7 | 63 | 14 | 15 |
| 8 | 63 | 14 | 16 |
| 9..15 | 30, −2, −9, −3, 1, 0, −1 | 13, 10, 12, 10, 9, 1, 9 | 16 |

The output is 16 bits. The largest reachable output is +27 716 (x = 127 where
h > 0 and −128 where h < 0) and the smallest is −27 874. The testbenches drive
both extremes.

### Pipelined form (`fir_pipelined`)

One register cut runs straight across the structure between tap 6 (h[6] = 30)
and tap 7 (h[7] = 63), that is, between the 7th and 8th taps counting from
one. The cut crosses two lines, and each gets a register:

- **sum line:** the partial sum of taps 0..6 is stored in `cut_sum` (14 bits);
- **sample line:** the samples used by taps 7..15 pass one extra register.
  They are then one cycle older, so they line up with `cut_sum`.

The result is exactly the direct form delayed by one clock:
`y_pipe[k] = y_direct[k−1]`. The longest adder chain drops from 15 additions
to 9 (taps 7..15 after the register), against 6 before it. In exchange, the
filter has one more cycle of latency and 22 more flip-flops (one 8-bit sample
word and the 14-bit partial sum). The throughput is unchanged: one sample per
clock.

### Timing wrapper (`fir_top`)

`fir_top` registers the input sample and the filter output, so the filter lies
between two flip-flop stages and a timing analyser can report its maximum
clock frequency. `PIPELINED` selects the structure:

| `PIPELINED` | Structure | Latency from `x_in` to `y_out` |
|---|---|---|
| 0 | direct form | 2 clocks |
| 1 | pipelined form | 3 clocks |

---

## 3. Top level (`lab_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz clock |
| `rst` | in | 1 | synchronous, active-high reset of everything |
| `b_enter` | in | 1 | Enter button (raw level) |
| `input_sw` | in | 8 | operand switches |
| `anode` | out | 4 | digit enables AN3..AN0, active low |
| `seven_seg` | out | 7 | segments `{g,f,e,d,c,b,a}`, active low |
| `fir_x` | in | 8 | signed filter sample, one per clock |
| `fir_y_direct` | out | 16 | direct-form output (2-clock latency) |
| `fir_y_pipe` | out | 16 | pipelined output (3-clock latency) |

Both filters take the same input, so `fir_y_pipe` equals `fir_y_direct` one
clock later.

Parameters:

- `REFRESH_W` (default 16): the display scan counter width.
- `W_Y`: the filter output width, derived from the coefficients.

The shared types are in `alu_pkg` and the filter constants and word-length
functions in `fir_pkg`.

---

## 4. Choices not fixed by the specification

These are this design's own decisions. Revisit them if they do not match your
board or your needs.

- All resets are synchronous and active high.
- The operand registers, the delay lines and the pipeline register reset to 0.
- The button has a synchronizer and an edge detector but no debouncer.
- The 7-segment bit order is `{g,f,e,d,c,b,a}`.
- Leading zeros are shown.
- The leftmost digit is dark when the result is a valid positive number.
- The display scan rate is set by `REFRESH_W = 16`.
- Samples and coefficients are two's complement.
- Overflow is the carry out of the 8-bit addition. A difference is given as a
  magnitude plus a sign flag.

Not covered by the RTL:

- The physical display and the FPGA pin assignment.
- Reading and writing the filter's test-vector files. The testbenches generate
  their own stimuli and compute the expected output themselves.

---

## 5. Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | Checks |
|---|---|
| `tb_alu` | All 65 536 operand pairs under all four functions, plus reference vectors such as 148+249 → 141 with overflow and 35−99 → 64 with sign. |
| `tb_bin2bcd` | All 256 inputs. |
| `tb_alu_reg_next`, `tb_alu_regs` | Random register and switch values under each control code, including reset. |
| `tb_alu_controller` | The state sequence; one step per press however long the button is held; the 3-clock reaction; reset. |
| `tb_seg7_driver` | Scan order, dwell time, one digit lit at a time, and every digit's character. Characters are decoded from the segment letters, independently of the driver. |
| `tb_alu_top` | Whole user sessions read back from the multiplexed display. |
| `tb_fir_direct`, `tb_fir_pipelined` | Impulse, step, both full-scale extremes and 3000 random samples against an integer convolution. The pipelined output is checked to be delayed by one clock. |
| `tb_fir_top` | Both wrappers, with 2- and 3-clock latencies. |
| `tb_lab_top` | The whole top at default parameters, described below. |

`tb_lab_top` uses the full 16-bit display counter and runs two calculator
sessions and the filter tests concurrently. It counts each mechanism:

- load A and load B;
- add, subtract, and toggling back to add;
- the `F` and `-` symbols;
- reset;
- all four digits scanned;
- the filter's impulse and step responses, full-scale output, and the extra
  pipeline cycle.

It fails if any mechanism never occurs. It takes about 1.5 million clocks, under half a
minute of simulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/alu_pkg.sv rtl/fir_pkg.sv tb/tb_seg_pkg.sv tb/tb_lab_top.sv \
    --top-module tb_lab_top -o sim
./obj_dir/sim
```

Replace `tb_lab_top` with any other testbench name. `tb/tb_seg_pkg.sv` is a
helper package that decodes a segment pattern into a character. Only the
display testbenches need it, but listing it always is harmless.

The whole design synthesizes to about 160 word-level cells and 232 flip-flop
bits. The scanned-digit segment table is inferred as a small ROM. The files
contain no latches and no combinational loops.
