# Spread-spectrum buck-converter controller with first-order on-time compensation

A buck converter that spreads its switching frequency over a band spreads its
electromagnetic emissions with it and lowers their peaks. The catch is the duty
cycle. The converter's output voltage is set by D = t_ON · f_SW. When the
frequency moves and the on-time stays fixed, D moves too and the output ripples.
If the on-time were changed in one step, together with the frequency request,
that would not help either: the switching clock comes from a PLL, and a PLL
reaches its new frequency only after a damped, overshooting second-order
transient.

This controller makes the on-time glide to its new value along an exponential,
computed by a small fixed-point filter, so that t_ON roughly tracks 1/f_SW while
the PLL settles. An SPI register interface sets it up. In the scenario it was
tested with, the peak duty-cycle error of a frequency step falls to about half.

```
            +-----------+   +---------+  RUN,dTD,dTC   +-------------+ DIV'  +-----------------+
 SCLK,MOSI->|           |-->|         |--------------->|             |------>| 1/N divider     |--> f_div (to PLL)
 CSn      ->| spi_slave |   | reg_map |  DIV,DLY,K1,K2 | time_offset |       +-----------------+
 MISO     <-|           |<--|         |--------------->|    _ctrl    | K1',K2'  +------------+        ^ f_pll
            +-----------+   +---------+                |             |--------->| first_order| DLYC   |
                                 | MODE                |             | DLY'     |   _comp    |---+    |
                                 |                     +-------------+--------+ +------------+   |    |
                                 |                                            v                  v    |
                                 +----------------------------------------> on_time_mux --> duty_cycle_ctrl --> pwm
                                                                                            (delay line, 2 ns/cell)
```

The PLL oscillator and the power stage are outside this RTL. `f_pll` and
`f_div` are top-level ports that connect to the PLL; `pwm` drives the power
stage.

## The first-order compensator (`first_order_comp`)

The compensator moves the on-time exponentially towards its target:

    tON[n] = tON[n-1] + (T/τ)·(tON,target − tON[n-1])

Rearranged, this needs one multiplication and one addition per step:

    tON[n] = K1·tON[n-1] + K2,   K1 = 1 − T/τ,   K2 = (T/τ)·tON,target

Here T is the step period, τ is the time constant, and tON,target = D/f_SW. All
on-times are counted in delay-cell units of 2 ns. The output settles at
K2 / (1 − K1).

**Number formats.** K1 and K2 are unsigned Q0.16. The state is Q10.16: 10
integer bits, which are the on-time control word, and 16 fraction bits. The
fraction bits are needed because each step moves the state by only T/τ of the
remaining distance. K1 is always close to 1, so its upper 6 bits are fixed at
`111111`. Only `k1[9:0]` is used, so K1 lies between 0xFC00 and 0xFFFF. The
fixed bits also make the multiplier smaller.

**Pipeline.**

    Stage1 <= (K1 · Stage2) >> 16      Q10.16 × Q0.16 = Q10.32, truncated to Q10.16
    Stage2 <= Stage1 + K2              Q10.16
    DLYC    = Stage2 >> 16             10-bit on-time word, truncated

Each stage holds one 26-bit register, so the compensator has 52 flip-flops in
total. The multiplier takes its input from Stage 2. Both registers lie inside
the recurrence loop, which has two consequences:

- **One iteration takes two clock cycles.** Two independent sequences
  interleave, one on even cycles and one on odd cycles. Both converge to the
  same value.
- **The real time constant is 2τ** if K1 and K2 are computed with T equal to
  the clock period.

A change of K2 reaches `DLYC` one clock later.

**Choosing constants.** With a 1 MHz controller clock (T = 1 µs) and
τ = 1.25 ms:

- K1 = 1 − 0.0008, which is 0xFFCB in Q0.16.
- K2 = 0.0008 · DLY_target:

| f_SW [MHz] | t_ON target [ns] | DLY | K2 (Q0.16) | settled DLYC |
|-----------:|-----------------:|----:|-----------:|-------------:|
| 0.873 | 572 | 286 | 0x3A92 | 282 |
| 1.0   | 500 | 250 | 0x3333 | 247 |
| 1.128 | 444 | 222 | 0x2D77 | 219 |

The last column is slightly low for a reason that lies in the constants, not in
the hardware. Rounding K1 to 0xFFCB makes 1 − K1 equal to 53/65536 instead of
0.0008, so the settled word is K2_int/53. For an exact settled value, compute K2
from the quantised K1: K2 = (65536 − K1_int) · DLY_target.

**No overflow protection.** The Q10.16 sum wraps, so K2/(1 − K1) must stay
below 1024.

## Applying a new operating point (`reg_map`, `time_offset_ctrl`)

A spread-spectrum step needs a new divider value (the new frequency) and a new
on-time target. These two must not act at the same instant. The sequence is:

1. Write DIV, DLY, K1 and K2 over SPI. Nothing changes yet.
2. Write RUN = 1. The write loads two timers: one with dTD, one with dTC.
3. dTD + 2 controller clock edges after the edge that wrote RUN, `DIV'` takes
   the DIV value. This is the start of the PLL transient.
4. dTC + 2 edges after that edge, `DLY'`, `K1'` and `K2'` take their values.
   This is the start of the on-time glide.

The offset between the two times (dTC − dTD) tunes the start of the glide
against the start of the PLL transient. Values are copied from the registers
when a timer expires. If RUN is written again while a timer runs, the timer
starts over.

| addr | name | meaning |
|-----:|------|---------|
| 0x00 | RUN  | bit 0: 1 = PWM running. Every write of 1 also starts the timers. |
| 0x01 | MODE | bit 0: 0 = constant on-time DLY', 1 = compensated DLYC |
| 0x02 | DIV  | PLL feedback divider N (values below 2 act as 2) |
| 0x03/0x04 | DLY_L/H | constant on-time in 2 ns cells (bits 9:0 used) |
| 0x05/0x06 | K1_L/H  | K1, Q0.16 (bits 9:0 used, upper 6 bits fixed at 1) |
| 0x07/0x08 | K2_L/H  | K2, Q0.16 |
| 0x09/0x0A | dTD_L/H | divider time offset, controller clock cycles |
| 0x0B/0x0C | dTC_L/H | compensator time offset, controller clock cycles |

MODE acts immediately, without going through the timers. All registers reset
to 0.

**SPI.** Mode 0 (SCLK idle low), MSB first. Each transfer is framed by CSn and
carries two bytes, ADDR then DATA:

- **Write:** ADDR[7] = 0. The write happens after the 16th bit.
- **Read:** ADDR[7] = 1. The register is shifted out on MISO during the data
  byte.

CSn raised early aborts the transfer. The slave samples the SPI pins with the
controller clock, so SCLK must be at most f_clk/8. MISO is driven low when it
is not sending; a pad would normally tristate it.

## Making the PWM pulse (`duty_cycle_ctrl`, `delay_line`)

Every rising edge of `f_pll` starts a pulse. The pulse ends when the same edge
comes out of a tapped delay line of `on_time` cells of 2 ns each. So
t_ON = on_time · 2 ns and D = on_time · 2 ns · f_pll.

Two flip-flops build the pulse:

- `t_set` toggles on `f_pll`.
- `t_clr` copies `t_set` on the delayed clock.
- `pwm = t_set ^ t_clr`.

This works for any on-time shorter than one period, including duty cycles above
50 %. The 286-cell setting at 0.873 MHz needs that.

`delay_line` is a **behavioural model, not synthesizable**. It stands for about
1023 delay standard cells with a tap multiplexer, which must come from the
target library and be placed by hand. The model passes each edge with a
transport delay of tap · 2 ns, and it keeps edges in order as long as the tap
does not fall by more than a pulse width between two edges.

## Clocks, reset and crossings

There are two clock domains:

- **Controller clock `clk`:** SPI, registers, timers, compensator and MUX. Its
  period is the compensator step T.
- **`f_pll`:** divider and duty-cycle controller.

Words that cross to `f_pll` pass through `bus_sync`: two flip-flops, then an
output register that takes a value only when two samples agree. These words are
DIV', the on-time word and RUN. A new value is passed on once it has been
stable for two `f_pll` periods. During a glide the compensator word changes
about once every 70 controller cycles, and the two interleaved sequences can
differ by one count. A word that flickers faster than the synchroniser can
follow is simply not taken: the previous stable word stays in use, so the
on-time lags by a few cycles but is never a mixture of two words.

`rst_n` is asynchronous and active low. In the `f_pll` domain, its release is
synchronised by `reset_sync`. The on-time MUX output is registered, so the word
that crosses domains comes straight from a flip-flop.

The divider takes a new N only at the end of a period. `f_div` is high for
floor(N/2) of the N cycles.

## How far to trust it, and where it departs from the reference design

Taken from the reference design:

- the block structure and signal names;
- the register table;
- the Q0.16, Q10.16 and Q10.32 formats;
- the fixed upper K1 bits;
- the two-register compensator pipeline;
- the 2 ns delay-cell resolution;
- the constants in the table above.

This implementation's own choices, which the reference does not describe:

- **SPI:** the read flag in ADDR[7], SPI mode 0 and oversampling by the
  controller clock.
- **RUN:** RUN both enables the PWM and restarts the timers. The reference
  names both roles.
- **Timers:** the copy-on-expiry rule and the dT + 2 edge convention.
- **Which timer delays DLY:** the reference leaves this open; here DLY goes
  with dTC.
- **Fixed-point arithmetic:** truncation rather than rounding, and wrapping
  rather than saturation.
- **Clock domains:** the synchronisers and the reset scheme.
- **Pulse circuit:** the toggle-pair pulse generator.
- **Divider:** the duty cycle of `f_div`.
- **Reset values:** all zero.

Numbers that differ from the reference:

- **Register count:** the reference text says the register map has 12 addresses, but its register
  table lists 13. This RTL follows the table.
- **Clock period:** the reference gives T = 1 ns, but its K1 = 0.9992 requires
  T/τ = 0.0008, which means T = 1 µs. All tests use a 1 MHz controller clock.
- **Flip-flop count:** the whole controller has about 380 flip-flops here,
  against 290 in the reference implementation. Most of the difference is the
  synchronisers. The compensator alone has 52 flip-flops in both.

Not modelled: the PLL and the power stage. A behavioural PLL, used only in
the testbench, closes the loop through `f_div`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_spi_slave` | random writes and reads, aborted transfers, SCLK = f_clk/8 |
| `tb_reg_map` | decoding of all 13 registers, read-back, out-of-range addresses, run_start pulse |
| `tb_time_offset_ctrl` | exact apply cycle for random dTD/dTC, restart, values |
| `tb_first_order_comp` | cycle-by-cycle comparison with an integer model of the recurrence; settled values for the three table points (247/282/219) and random constants; time constant of a step (2 cycles per iteration); K2 latency |
| `tb_on_time_mux` | selection and one-cycle register delay |
| `tb_freq_divider` | period N and high time N/2 for N = 48, 55, 62, 2, 255, random values, 0 and 1; no cut periods when N changes |
| `tb_delay_line` | both edges delayed by tap · 2 ns, several edges in flight |
| `tb_duty_cycle_ctrl` | pulse starts on f_pll, on-time = word · 2 ns up to 95 % duty, enable, D at 0.873 MHz |
| `tb_ssc_top` | the whole controller at its default parameters (see below) |

`tb_ssc_top` runs the controller with:

- `pll_model`, a second-order PLL: damping 0.5, 165 Hz natural frequency,
  reference 1 MHz/55;
- `spi_master_bfm`;
- a 1 MHz controller clock.

The scenario locks at 1 MHz (DIV = 55, DLY = 250), then steps to 0.873 MHz
(DIV = 48, DLY = 286), to 1.127 MHz (DIV = 62, DLY = 222) and back. It runs
the steps once with MODE = 0 and once with MODE = 1, with dTD = 0 and
dTC = 300 cycles. It checks:

- the SPI read-back;
- the exact timer offsets;
- the locked frequency, on-time and duty cycle after each step;
- the settled compensator word, and the time constant of its glide (2.47 ms: two clock cycles per iteration);
- RUN = 0 stopping the PWM;
- that every step has a smaller peak duty error with compensation than
  without.

It simulates 320 ms in about a second. Peak duty-cycle error per step, with
this PLL model:

| step | MODE = 0 (constant DLY) | MODE = 1 (compensated) |
|------|------:|------:|
| 1.0 → 0.873 MHz  | 6.9 % | 4.2 % |
| 0.873 → 1.127 MHz | 10.9 % | 5.3 % |
| 1.127 → 1.0 MHz  | 6.1 % | 3.4 % |

The compensated column includes a constant offset of about 0.6 %. It comes from
the quantised K1 described above. The reference reports roughly ±6 % without
compensation and ±2.5 % with it. Its PLL is a different one, so these figures
can be compared only roughly.

Running a testbench with plain Verilator (5.x) from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/ssc_pkg.sv tb/tb_ssc_top.sv \
  --top-module tb_ssc_top -o sim && ./obj_dir/sim
```

Replace `tb_ssc_top` with any other testbench name. Verilator warns that the
delay line's variable delay might be zero; that is expected.

## Files

- `rtl/ssc_pkg.sv`: widths, register addresses, parameter-set struct
- `rtl/ssc_top.sv`: top level
- `rtl/spi_slave.sv`: SPI slave
- `rtl/reg_map.sv`: register map
- `rtl/time_offset_ctrl.sv`: time offset controller
- `rtl/first_order_comp.sv`: first-order compensator
- `rtl/on_time_mux.sv`: on-time MUX
- `rtl/freq_divider.sv`: PLL feedback divider
- `rtl/duty_cycle_ctrl.sv`: PWM generator
- `rtl/delay_line.sv`: delay line (behavioural model)
- `rtl/bus_sync.sv`, `rtl/reset_sync.sv`: clock-domain helpers
- `tb/`: the testbenches above, plus `pll_model.sv` and `spi_master_bfm.sv`
