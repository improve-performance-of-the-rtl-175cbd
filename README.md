# Quarter-wave lookup-table sine generator

A digital sine wave generator for an FPGA with a fixed 100 MHz sampling
clock. The output frequency is set in 1 kHz steps from 1 kHz to 10 MHz by a
single integer, `step`, which is the frequency in kHz. Samples come from a
ROM that holds only the **first quarter** of a sine period, 25000 words of
13 bits (325000 bits). The other three quarters are produced by running
through the same words backwards and by negating them. A full period
therefore spans about 100000 samples. At 100 MHz that is 1 ms: stepping
through it `step` samples at a time gives `step` kHz.

There is no digital-to-analog converter; `data_out` is a 16-bit signed
digital sample stream.

```
             +--------------------- sine_gen_top ---------------------+
 sys_clk --> | (PLL, outside)  clk_100MHz                              |
             |        +----------------- address_counter ---+          |
 step[14:0] -------->| step_update_fsm --step--> region_fsm  |--address--> sine_table --> data_out[15:0]
 sys_reset  -------->|  COUNT/UPDATE/RESET  clear  ONE..FOUR |--negative->  (25000 x 13 ROM,
             |        +--------------------------------------+          |   sign restore)
             +--------------------------------------------------------+
```

## How a period is folded into a quarter table

Let M = 24999 be the highest ROM address. Think of an unbounded phase
accumulator `p` that grows by `step` every clock, modulo 4·M. The four
quarters of the period are four *regions*:

| region (code) | phase range      | ROM address | sample sign | counter moves |
|---------------|------------------|-------------|-------------|---------------|
| ONE (0)       | 0 ≤ p < M        | p           | +           | up            |
| TWO (1)       | M ≤ p < 2M       | 2M − p      | +           | down          |
| THREE (2)     | 2M ≤ p < 3M      | p − 2M      | −           | up            |
| FOUR (3)      | 3M ≤ p < 4M      | 4M − p      | −           | down          |

The hardware never stores `p`. It keeps only the folded address and the
region, and moves the address up or down by `step`:

* In ONE and THREE, if `address + step >= M` the region advances and the
  overshoot is folded back: the new address is `2M − (address + step)`.
  Otherwise the address becomes `address + step`.
* In TWO and FOUR, if `address − step <= 0` the region advances (FOUR wraps
  to ONE) and the new address is `step − address`. Otherwise it becomes
  `address − step`.

The turning tests are the ones the state diagram of the generator gives. The
fold on the turning cycle is this implementation's choice. The reference
design only says the counter runs up "until it reaches or almost reaches" the
end. Folding keeps the address inside 0..M at all times. It also makes the
sequence exactly that of the phase accumulator above. So the period is exactly
4·M/step = 99996/step clock cycles and the frequency error is 0.004 %,
whatever the step. The fold is valid for `step ≤ M`. The step is limited to
10000 anyway.

The turning points are shared between neighbouring regions. The peak word
(address M) and zero (address 0) are each visited once per pass, not twice.
This is why the period is 4·M rather than 4·(M+1) samples.

## The ROM contents

Word `a` holds `round(3276 · sin(π/2 · a / 24999))`. Word 0 is 0, word 24999
is the peak 3276, and the words rise monotonically. A ±3276 peak leaves room
to scale the amplitude by up to 10 within 16 signed bits; no amplitude control
is built. The table is computed at elaboration with `$sin` in an `initial`
loop instead of being loaded from a memory initialization file. FPGA synthesis
tools evaluate such loops into the block-RAM contents. The top bit of every
word is 0 (3276 < 4096), and a synthesizer may trim it. The exact rounding of
the original table is not known. Only the peak value and the quarter-wave
shape are fixed.

## Changing the frequency: the step-update controller

Changing `step` on the fly would leave the address and region part-way
through a period at the old rate. Instead every change restarts the waveform
from phase zero:

| state  | cycles | what happens                                               |
|--------|--------|------------------------------------------------------------|
| COUNT  | —      | normal operation with the step in use                      |
| UPDATE | 1      | entered when the step input differs from the step in use; loads the new step; address cleared |
| RESET  | 5      | 50 ns at 100 MHz; address held at 0 in region ONE          |

On the first COUNT cycle after RESET the address is still 0. From then on it
advances with the new step. The step input may change at any time. A change
during UPDATE or RESET is picked up on the next COUNT cycle and causes another
restart. Step values above 10000 are replaced by 10000 before the comparison,
so 12000 after 10000 causes no restart. Step 0 freezes the address.

## Timing

* `address` and `negative` are registers updated on every `clk_100MHz` edge.
* The sine table reads the ROM into a register on the next edge (a
  synchronous block-RAM read). It negates the word on the edge after that, so
  `data_out` lags the address by **two clock cycles**. The sign flag is
  delayed with the read, so address and sign stay paired.
* A step change seen on edge *n* gives UPDATE during cycle *n*+1 and RESET for
  5 cycles. The first new sample that is not zero appears about 9 cycles after
  the change.
* Reset (`sys_reset`) is asynchronous and active high. It gives address 0,
  region ONE, state COUNT and a step of 0 in use. The first nonzero `step`
  therefore passes through UPDATE and RESET like any other change.

## Measured behaviour

The end-to-end testbench measures the period from rising zero crossings over
many periods, the way a logic analyser is read:

| step (kHz) | measured period | measured frequency |
|------------|-----------------|--------------------|
| 1          | 999960 ns       | 1.0 kHz            |
| 125        | 8000.00 ns      | 125.0 kHz          |
| 667        | 1499.50 ns      | 666.9 kHz          |
| 2000       | 500.00 ns       | 2000.0 kHz         |
| 7500       | 133.27 ns       | 7503.7 kHz         |
| 10000      | 100.00 ns       | 10000.0 kHz        |

At 7.5 MHz a period is 13.33 samples. A single period measured between two
crossings is 130 or 140 ns. Only the average over many periods gives 133 ns.

## Modules

| file                     | role |
|--------------------------|------|
| `rtl/sine_gen_pkg.sv`    | sizes (depth 25000, 13-bit words, 15-bit address/step, 16-bit output, peak 3276, step limit 10000, 5 RESET cycles) and the `region_t`, `upd_state_t` enums |
| `rtl/region_fsm.sv`      | ONE..FOUR region machine with the folding up/down counter |
| `rtl/step_update_fsm.sv` | COUNT/UPDATE/RESET controller, step register and limit |
| `rtl/address_counter.sv` | the two machines together |
| `rtl/sine_table.sv`      | quarter-wave ROM, two-stage read with sign restore |
| `rtl/sine_gen_top.sv`    | the generator; ports `clk_100MHz`, `sys_reset`, `step[14:0]`, `data_out[15:0]` and observation outputs `address`, `region`, `upd_state`, `step_used` |
| `tb/pll_model.sv`        | simulation-only 50 → 100 MHz clock doubler |

All sizes are module parameters whose defaults are the values above. The
region machine and the tables also work with other depths (the region-FSM
test runs one instance with M = 7).

## Where this departs from, or adds to, the reference design

* **PLL.** The board's 50 MHz clock is doubled by the FPGA's vendor PLL. That
  block is not RTL, so `sine_gen_top` takes `clk_100MHz` as an input. The
  testbench models the PLL behaviourally.
* **Output width.** The reference block diagram labels the output 12 bits
  (`data_out[11:0]`). Its text asks for 13-bit table words and a 16-bit output.
  Twelve bits cannot carry ±3276 signed, so the output is 16-bit signed.
* **Quarter vs. half table.** One printed excerpt of the original table peaks
  in the middle of the address range, as a half-period table would. This
  design follows the quarter-wave description and the up/down counter, which
  only work with a quarter table: the peak is at the last address.
* **Sign path.** The sign comes from the region machine. It travels to the
  table as an extra `negative` signal, which the block diagram does not show.
* **Turning-point fold, step limit, change detection, two-cycle read
  latency, reset polarity** are choices of this implementation, described
  above.
* **Resources.** The reference reports about 190 logic elements and 23
  registers. This RTL has 67 flip-flops, mostly the observation outputs, the
  registered 16-bit output and the step register. Nothing was done to match
  the count.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_region_fsm` runs 200000 cycles of random steps, enables and clears on a
  full-size instance and an M = 7 instance. It compares the address, region and
  sign every cycle against a phase-accumulator model.
* `tb_step_update_fsm` applies random step changes, including out-of-range
  ones and changes during a restart. It checks state, step, enable and clear
  every cycle, and that every RESET lasts exactly 5 cycles.
* `tb_sine_table` reads all 25000 words with both signs. It compares them with
  a cosine-based computation of the same curve, and checks the end points,
  monotonicity and the two-cycle latency.
* `tb_address_counter` holds the four test frequencies, the range ends and
  random steps for random times. It checks the complete address/region/state
  sequence, restarts included, against a model.
* `tb_sine_gen_top` runs the whole generator at its default size behind the
  PLL model, for the frequencies in the table above and a step of 20000, which
  must be limited. Every output sample is checked against
  `round(3276·sin(2π·p/99996))` within one LSB. It also checks the measured
  periods and the 5-cycle RESET, and that every region transition, the
  restart, the step limit and negative samples each occurred.

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_sine_gen_top \
    -y rtl -y tb +libext+.sv rtl/sine_gen_pkg.sv tb/tb_sine_gen_top.sv
./obj_dir/Vtb_sine_gen_top
```

Replace `tb_sine_gen_top` with any other testbench name. The full-size run
takes well under a second.
