# Multi-inverter PWM peripheral for three-level T-type inverters

This is a programmable-logic peripheral that lets a processor drive many
multi-level power converters at once. The processor writes a few registers
over AXI4-Lite. From then on the fabric produces all gate signals on its own,
with no software in the switching loop. In its default size the peripheral
controls ten three-phase, three-level T-type inverters. That is 120 gate
outputs, twelve switches per inverter.

Each inverter gets the following:

* a sine reference generator, a numerically controlled oscillator with three
  outputs 120 degrees apart;
* per phase, one carrier counter and two compare-based PWM blocks ("ePWM"
  blocks, after the DSP peripheral they imitate);
* three 32-bit configuration registers: PWM, carrier and sine.

The architecture follows a published design for the Zynq UltraScale+ MPSoC.
That design runs the carriers at 300 MHz, the references at 150 MHz and the
bus at 100 MHz, with a 50 Hz reference and 15 kHz carriers. The register
file, the clock-domain crossing, the exact register field layout and several
arithmetic details are this implementation's own. They are marked as such
below and in the first comment of each source file.

## How one leg makes three voltage levels

A T-type leg has four switches. In a phase-A leg they are T1 (top), T4
(bottom) and the bidirectional middle pair T2/T3 to the DC midpoint. The leg
output is:

| switches on | leg voltage |
|-------------|-------------|
| T1, T2      | +Vc         |
| T2, T3      | 0           |
| T3, T4      | -Vc         |

T1/T3 and T2/T4 are complementary pairs. Phases B and C use T5..T8 and
T9..T12 in the same roles.

The modulation is level-shifted carrier PWM, built from one counter with no
adder:

* The carrier counter `cnt` is 15 bits wide.
* The **upper carrier** is `{1, cnt}` and spans 0x8000..0xFFFF.
* The **lower carrier** is `{0, cnt}` and spans 0x0000..0x7FFF.

Only the most significant bit differs, so one counter serves both levels.
The sine reference is a 16-bit unsigned (offset-binary) value centred on
0x8000, and both PWM blocks of the leg compare it:

* **Level 2 block (upper carrier):** drives T1 (channel A) and T3 (channel B).
* **Level 1 block (lower carrier):** drives T2 (channel A) and T4 (channel B).

When the reference is above mid-scale, it is always above the lower carrier.
T2 stays on, T4 stays off, and T1/T3 modulate between +Vc and 0. Below
mid-scale, T1 stays off, T3 stays on, and T2/T4 modulate between 0 and -Vc.
Over a fundamental period, a leg with modulation ratio m spends about m/π of
the time at +Vc and at -Vc. The tests check this figure.

The two level carriers tile the reference range exactly only when the
carrier period is (close to) 0x7FFF. For that reason carrier frequency is set
with a prescaler and a step size, not by shortening the period.

## The ePWM block and the dead band

Each ePWM block (`epwm`) takes a 16-bit carrier, a 16-bit duty value and the
PWM configuration word:

* Channel A is raw-high while `duty > carrier`.
* Channel B is raw-high while `duty + deadband > carrier`. The sum is 17
  bits wide, so it never wraps.
* Each raw signal passes through a 2-bit action select: `00` forced low, `01`
  follow, `10` inverted, `11` forced high.
* It then passes an enable gate and an output register.

With A set to follow and B inverted, A is on for `carrier < duty` and B for
`carrier >= duty + deadband`. Between the two, both are off. On a carrier
moving `step` counts every `prescale` clocks, that gap lasts
`deadband / step * prescale` clocks on both slopes. With the example settings
below this is 144 / 36 × 11 = 44 clocks, about 147 ns.

**Limitation.** The dead band is a comparator offset, not a delay. It holds
only while the reference moves by less than the dead band between two carrier
steps. The 1024-entry sine table moves the reference in jumps of up to
~200 counts (at full modulation). If such a jump lands while the carrier is
between the two thresholds, one switch can turn off and its partner turn on
in the same clock. Use a dead band larger than the largest reference jump
(about 2π·32768·m/1024 counts), or add a delay-based dead-band stage behind
`epwm`, if the gate drivers do not insert their own dead time.

## Carrier generator

`carrier_gen` moves a 15-bit counter by `step` on every prescaler tick.

* **Triangle mode:** the counter goes up to `period` and back down to 0, so
  f = f_clk / (prescale · 2 · period / step).
* **Sawtooth mode:** the counter goes up and wraps to 0 once the next step
  would pass `period`, so f = f_clk / (prescale · (period/step + 1)).

In both modes the ends are clamped, a step of 0 freezes the counter, and a
prescale of 0 acts as 1.

## Sine reference generator

`sine_ref_gen` works as follows:

1. A prescaler produces a tick every `prescale` clocks.
2. On each tick a 16-bit phase accumulator adds `step`, so
   f_sine = f_clk · step / (prescale · 2^16).
3. The accumulator plus 0, 21845 and 43691 (0, 120 and 240 degrees) gives
   the phase of outputs A, B and C.
4. The top 10 bits of each phase address a table of
   f(k) = 2^15 · sin(2πk/1024) + 2^15, rounded and limited to 0xFFFF. The
   table is computed at elaboration time, so no data file is needed.
5. The modulation ratio M (0x0000..0xFFFF ≈ 0..1) scales the table value
   about mid-scale: `ref = 2^15 + floor((lut − 2^15) · M / 2^16)`.

The output lags the accumulator by two clocks. Output B is the sine at +120
degrees and C at +240 degrees. With `ref(t) = sin(ωt + offset)`, B therefore
reaches its peak a third of a period before A, and C a third after.

## Register map

Inverter *i* (0..N_INV−1) owns three words at byte offset `12*i`:

| offset   | register | fields |
|----------|----------|--------|
| 12i + 0  | PWM      | `[7:0]` dead band (counts), `[9:8]` action A, `[11:10]` action B, `[12]` enable |
| 12i + 4  | carrier  | `[14:0]` period, `[15]` mode (0 triangle, 1 sawtooth), `[23:16]` prescale, `[31:24]` step |
| 12i + 8  | sine     | `[7:0]` prescale, `[15:8]` step, `[31:16]` modulation ratio |

All registers reset to 0, so every output starts disabled. The three legs of
an inverter share its carrier and PWM words. Reads return the stored word.
Offsets past the last register answer SLVERR and change nothing. The
register order per inverter and the 12-byte stride follow the published
memory map, which has base 0x43C00000. The slave decodes only the offset
(`AXI_ADDR_W` = 8 bits); the interconnect matches the base.

Example settings (300 MHz carrier clock, 150 MHz reference clock):

| goal | word |
|------|------|
| 15 kHz triangle (14985 Hz): period 32760, step 36, prescale 11 | carrier `0x240B7FF8` |
| 7.5 kHz: same with step 18 / 30 kHz: step 72 | `0x120B7FF8` / `0x480B7FF8` |
| 50 Hz reference (49.97 Hz), M ≈ 1: prescale 229, step 5 | sine `0xFFFF05E5` |
| complementary pairs, 144-count dead band, enabled | PWM `0x00001990` |

Write the carrier and sine words before the PWM word, so the outputs start
with a valid configuration.

## Clocks, resets and register transfer

There are three clock inputs:

| clock         | rate    | drives |
|---------------|---------|--------|
| `s_axi_aclk`  | 100 MHz | register file |
| `clk_carrier` | 300 MHz | carriers and ePWM blocks |
| `clk_ref`     | 150 MHz | sine generators |

`s_axi_aresetn` resets everything. Each PWM domain has its own reset
synchronizer, so the reset is released in step with that clock.

Each register reaches the domain that uses it through `cfg_sync`, a
request/acknowledge handshake. The source copies the word into a holding
register and flips a request bit. The destination sees the request through
two flip-flops and loads the holding register, which is stable by then, and
acknowledges. A write that arrives during a transfer triggers another
transfer of the newest value, so the last write always wins. A written value
reaches the gates a few destination clocks after the AXI write response.

The sine references cross from `clk_ref` to `clk_carrier` through a single
register. This is correct only if both clocks come from the same PLL with
aligned edges, as on the intended platform. For unrelated clocks, replace
that register in `inverter_3l3p` with a proper multi-bit synchronizer.

## Hierarchy

```
epwm_soc_top            top: AXI4-Lite port, clocks, pwm_out[12*N_INV]
├─ rst_sync ×2          reset release per PWM clock domain
├─ axi_regs             3*N_INV configuration words, write strobes
└─ per inverter (g_inv)
   ├─ cfg_sync ×3       PWM/carrier words -> clk_carrier, sine word -> clk_ref
   └─ inverter_3l3p
      ├─ sine_ref_gen   clk_prescaler, phase accumulator, 3 × sine_lut
      └─ phase_3l ×3    carrier_gen (with clk_prescaler), epwm ×2
epwm_pkg                shared types: configuration structs, action codes
```

Gate output bit `12*i + k` is switch T(k+1) of inverter *i*. Within a phase
the bit order is {T4, T3, T2, T1}.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each one also has a watchdog. To run one
with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/epwm_pkg.sv \
  tb/tb_epwm_soc_top.sv --top-module tb_epwm_soc_top -Mdir obj
./obj/Vtb_epwm_soc_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_clk_prescaler` | tick spacing for prescale 0..255 |
| `tb_carrier_gen` | every counter step against a model; step spacing; triangle and sawtooth period in clocks; clamped ends; MSB split |
| `tb_epwm` | 5000 random cases against a model; measured dead time on a triangle; reset |
| `tb_sine_lut` | all 1024 entries against a floating-point sine; read latency |
| `tb_sine_ref_gen` | accumulator steps and spacing; all three outputs against a model with two clocks of latency; output period |
| `tb_phase_3l` | gates against the comparison every clock; no shoot-through; on-time per carrier period against the duty; all three levels and the dead state; enable |
| `tb_inverter_3l3p` | +Vc and −Vc share ≈ m/π; B at −120° and C at +120° from A; each leg fed by its own reference |
| `tb_cfg_sync` | clock-domain handshake: bursts of back-to-back writes into faster and slower clocks; no mixed words, last write wins |
| `tb_axi_regs` | all address/data orders, byte strobes, write strobes, read-back, SLVERR, response holding |
| `tb_epwm_soc_top` | full default size over one 50 Hz period (see below) |

`tb_epwm_soc_top` instantiates the top with its default parameters: ten
inverters at 300/150/100 MHz. It configures them over AXI4-Lite for 7.5, 15
and 30 kHz triangle carriers, a sawtooth carrier, half modulation, one
inverter enabled only mid-run and one with forced action codes. It then runs
one whole 50 Hz period, about 6 million carrier clocks, in roughly 15
seconds. It checks that:

* no complementary pair ever conducts together;
* each phase spends m/π of the period at +Vc and at −Vc;
* the number of T1 pulses matches f_carrier / (2 f_ref);
* the dead time is 44 clocks (measured where the reference was steady);
* the phases sit 120 degrees apart;
* the disabled inverter is silent and starts when enabled.

It also counts each of these mechanisms and fails if one never occurs.

## Scope and departures from the original design

* **Register width.** The published block diagrams give the carrier
  configuration as 43 bits and each PWM block's configuration as 45 bits.
  The published memory map gives one 32-bit register each. This design
  follows the memory map: the fields are packed into 32 bits, and both PWM
  blocks of a leg share one PWM word.
* **Dead band on one channel.** The original PWM block draws a dead-band
  adder on both channels. Here the dead band is added on channel B only,
  which gives a symmetric gap with the complementary setting.
* **Modulation ratio.** How it is applied is this design's choice: scaling
  about mid-scale.
* **Table size.** The sine table depth of 1024 entries per phase is chosen to
  match a budget of 1.5 block RAMs per inverter.
* **Not included.** The processor system, the AXI interconnect, the PLL and
  the I/O buffers. The analog-to-digital converter, dq/αβ transform and PI
  controller that the original architecture shows as optional additions are
  not included either. The top exposes a plain AXI4-Lite slave and the three
  clocks instead.
* **DSP ePWM features not included.** The PWM block imitates a DSP ePWM
  peripheral, but it does not copy all of it. There is no PWM chopper, no
  trip-zone input, no shadowed compare or period registers, and no sync
  in/out chain. A register write takes effect as soon as it crosses the
  clock domain.
* **Carrier alignment.** The three legs of an inverter share their reset
  and configuration, so their carriers run in lock-step. Different
  inverters start their carriers when their own configuration arrives and
  are not phase-aligned to each other.
* **Output count.** The original platform budgets up to 176 PWM pins. This
  top uses 12·N_INV, so N_INV = 14 gives 168. Raise `N_INV` (and
  `AXI_ADDR_W` beyond 21 inverters) to scale. Converters with more than
  three levels would need more level carriers per leg, which this leg unit
  does not provide.
