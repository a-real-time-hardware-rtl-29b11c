# ANFIS linearizer for an NTC thermistor

An NTC thermistor in series with a 1 kΩ resistor across +5 V gives a
voltage V<sub>1K</sub> = 5·1k/(1k + R<sub>T</sub>) that rises with
temperature, but not linearly. R<sub>T</sub> = R<sub>0</sub>·exp(β(1/T − 1/T<sub>0</sub>)),
with R<sub>0</sub> = 10 kΩ, T<sub>0</sub> = 298 K and β = 3950. From 0 °C to
105 °C the voltage runs from about 0.15 V to about 3.2 V along an S-shaped
curve. This design undoes the curve in an FPGA. A 12-bit SPI ADC (MCP3202)
digitizes the voltage. A small adaptive neuro-fuzzy inference system (ANFIS)
maps it to a value that is linear in temperature. The result goes to a 12-bit
SPI DAC (MCP4921) and to a PC over RS-232, and a 16×2 character LCD shows the
system's title.

The network is trained offline. The hardware evaluates it with fixed
coefficients and does no learning.

## The network

The network has one input and two rules. It is a first-order
Takagi–Sugeno–Kang system:

```
            w1·(q1·x + r1) + w2·(q2·x + r2)
  Vout  =  ---------------------------------        w_i = Tri_i(x)
                       w1 + w2
```

Each membership function `Tri_i` is a triangle with feet `a`, `c` and peak `b`:

```
  Tri(x) = 0                   x <= a   or   x >= c
         = (x - a)/(b - a)     a <= x <= b
         = (c - x)/(c - b)     b <= x <= c
```

The trained coefficients are the defaults of `anfis_linearizer`:

| rule | a     | b     | c     | q     | r     |
|------|-------|-------|-------|-------|-------|
| 1    | −3.13 | −0.35 | 5.169 | 4.5   | −0.03 |
| 2    | 0.21  | 3.0   | 6.305 | 1.225 | 0.5   |

The general rule form `p·x + q·y + r` has a second input `y`. With one input
the `p` terms are zero and are left out.

The table splits the input axis into four regions, and each behaves
differently:

* **x ≤ 0.21 V:** only rule 1 fires. The output is simply `q1·x + r1`, so
  the normalization yields exactly 1 for rule 1.
* **0.21 V < x < 5.169 V:** both rules fire. This covers most of the
  thermistor's range, and here the normalization matters.
* **5.169 V ≤ x < 6.305 V:** only rule 2 fires.
* **x ≤ −3.13 V or x ≥ 6.305 V:** no rule fires. The ratio is 0/0, so the
  block outputs 0 and raises `no_rule`. A 5 V ADC never reaches this region;
  only a direct user of the linearizer can.

The peak of rule 1 is set to b = −0.35. A triangle needs a ≤ b ≤ c, and this
value places the peak between rule 1's feet. The peak is a parameter, so it is
easy to change.

The published output curve does not match these coefficients. It reaches
about 4.9 V for an input of about 3.45 V, whereas the coefficients above give
about 7.6 V there. The design follows the coefficients, with two
consequences:

* The output exceeds the DAC's 5 V range above roughly 60 °C (see *DAC*
  below).
* Over 0–105 °C the output departs from its best straight-line fit by up to
  about 0.54 V, against a span of about 6.4 V.

Other plausible values for rule 1's peak do not change this much. To
calibrate a real sensor, retrain the network and pass the new coefficients as
parameters.

## Datapath and timing of the linearizer

`anfis_linearizer` has one module per network layer.

| layer | module | what it does | clocks |
|-------|--------|--------------|--------|
| 1 | `tri_mf` ×2 | membership grade, as one multiply-add `slope·x + intercept` per side; slope and intercept come from a, b, c at elaboration, so no divider is needed; the grade is clamped to [0, 1] | 1 (registered) |
| 2 | — | with a single input, the rule strength is the membership grade itself | — |
| 3 | `anfis_normalize` | `w̄_i = w_i/(w1+w2)`: two restoring long divisions that share one divisor and counter, one quotient bit per clock | 17 |
| 4 | `anfis_consequent` ×2 | `w̄_i·(q_i·x + r_i)` | 1 (registered) |
| 5 | saturating adder | sum of the two rule outputs | 1 (registered) |

The handshake works as follows:

* The block takes a sample on a clock edge where `in_valid && in_ready`.
* `out_valid` pulses 20 clocks later with `vout` and `no_rule`.
* `in_ready` stays low for that whole time. The block works on one sample at
  a time, which is ample, because a sample arrives at most every 1750 clocks.

The serial divider is a choice of this design. The original gives only the
equation. A combinational divider would cost much more area for a rate the
ADC could never use.

### Number formats (`anfis_pkg`)

* **Voltages and coefficients** are signed Q16.16 (`fx_t`, 32 bits).
  Coefficients are rounded to the nearest LSB when the design is elaborated.
* **Rule strengths and normalized weights** are unsigned Q1.16 (`w_t`,
  17 bits, range 0 to 1.0).
* **Products** are truncated toward −∞ and saturated to the Q16.16 range.

The tests compare the result with the network equations evaluated in double
precision. The error stays below 4·10⁻³ V. It is largest near x = 5.17 V,
where rule 1's weight is tiny and its consequent is large.

The 32-bit word size is an assumption. A 32-bit input, a 32-bit output and a
clock account for the 65 I/O pins reported for the original linearizer.

## Around the network (`ntc_linearizer_top`)

A sample timer starts an ADC conversion every `SAMPLE_PERIOD` clocks. The
default is 100 000 clocks at 100 MHz, so 1 kS/s. The sample then passes
through the chain below.

* **ADC (`adc_ctrl`).** This is the MCP3202 protocol.
  * The transfer is 17 SCLK periods with CS_n low.
  * The master sends start, SGL/DIFF, ODD/SIGN and MSBF on the first four
    rising edges.
  * It samples B11…B0 on rising edges 6–17. DOUT is double-synchronized.
  * SCLK runs at clk/(2·`ADC_CLK_DIV`), which is 1 MHz.
  * A conversion takes 35·`ADC_CLK_DIV` clocks.
  * The code becomes a voltage as `Vin = code·ADC_VREF/4096`, with
    `ADC_VREF` = 5 V.
* **Linearizer.** This is the network described above.
* **DAC (`dac_ctrl`).** This is the MCP4921 protocol.
  * The code is computed as `Vout·4096/DAC_VREF` and clipped to 0…4095.
    `dac_clip` pulses when clipping happens.
  * The write is one 16-bit word: `0, BUF, GA_n=1, SHDN_n=1, D11…D0`. SDI is
    stable across each rising SCK.
  * CS_n then rises. One half-period later LDAC_n pulses low to update the
    output.
  * A write takes 35·`DAC_CLK_DIV` clocks. SCK runs at 10 MHz.
* **UART (`uart_ctrl`).** Each result is sent as a 5-character report.
  * The report is the marker `0xA5`, then the 32-bit Q16.16 result, most
    significant byte first.
  * Each character is 8N1 at `BAUD` (115 200 by default).
  * A report takes 50 bit times, or 43 400 clocks.
  * If a result arrives while the UART is still busy, that report is dropped
    and `uart_skip` pulses. At the default rates this never happens.
* **LCD (`lcd_ctrl`).** The controller is HD44780-compatible and uses an
  8-bit bus.
  * RW is held low. The controller never polls the busy flag and waits fixed
    times instead: 40 µs per command, 1.64 ms after clear, and 4.1 ms and
    100 µs after the first two function-set writes.
  * After a 40 ms power-up wait it initializes the display and writes
    “Linearisation of” / “Nonlinear Sensor”, then raises `lcd_ready`.
  * It does not display the measurement. Nothing specifies what the
    original display showed beyond this title. The result is available on
    `result_valid`/`result_vout`/`result_no_rule` for any other display.

Only the sequence of blocks comes from the original system. All numbers in
this section are this design's own choices. That covers rates, scaling,
report format, clipping and skipping. The chip protocols follow the public
behaviour of the named parts.

## What is not here

* **Not built:**
  * The thermistor and divider are analog. A testbench models them.
  * The ADC and DAC chips are external. Behavioural models of them are in
    `tb/`.
  * The original also ran the network as a black box inside a vendor
    co-simulation environment over JTAG. That vendor link is not part of
    this RTL, but `anfis_linearizer`'s `vin`/`vout` ports are the same
    boundary.
* **Not supported:** Only the selected network (two triangles, two linear
  rules) is implemented. The design cannot hold networks with three or four
  memberships, other membership shapes or constant rule outputs. Such
  networks were also trained for comparison.

## Files

```
rtl/anfis_pkg.sv          number formats, conversion and saturation helpers
rtl/tri_mf.sv             Layer 1: triangular membership
rtl/anfis_normalize.sv    Layer 3: serial divider for both weights
rtl/anfis_consequent.sv   Layer 4: w̄·(q·x + r)
rtl/anfis_linearizer.sv   the network, Layers 1–5, with handshake
rtl/adc_ctrl.sv           MCP3202 SPI master
rtl/dac_ctrl.sv           MCP4921 SPI master
rtl/uart_ctrl.sv          RS-232 report transmitter
rtl/lcd_ctrl.sv           character LCD initialization and title
rtl/ntc_linearizer_top.sv the whole FPGA design
tb/anfis_ref_pkg.sv       real-valued network and thermistor models
tb/mcp3202_model.sv, tb/mcp4921_model.sv, tb/hd44780_model.sv, tb/uart_rx_model.sv
                          behavioural models of the parts on the board
tb/tb_*.sv                self-checking testbenches
```

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes by
itself. It also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/anfis_pkg.sv tb/anfis_ref_pkg.sv \
  tb/tb_ntc_linearizer_top.sv --top-module tb_ntc_linearizer_top -o sim
./obj_dir/sim
```

For any other testbench, change the file and the top module. The packages go
first on the command line.

| testbench | what it checks |
|-----------|----------------|
| `tb_tri_mf` | grades over a fine sweep, the corners and random points, for both triangles, to 4 LSB |
| `tb_anfis_normalize` | exact quotients for ~500 weight pairs, the zero-sum case, 17-clock latency, `busy` |
| `tb_anfis_consequent` | both rules against real arithmetic |
| `tb_anfis_linearizer` | all four input regions against the equations, 20-clock latency, the handshake, `no_rule` |
| `tb_adc_ctrl`, `tb_dac_ctrl`, `tb_uart_ctrl`, `tb_lcd_ctrl` | each against its part model: data, command bits, timing, transfer length |
| `tb_anfis_adc_sweep` | every one of the 4096 ADC codes, then the thermistor from 0 °C to 105 °C in 1 °C steps; prints the error (at most 1.8 mV) and how far the output departs from a straight line (0.54 V) |
| `tb_ntc_linearizer_top` | the whole system at a 1 MHz clock and short periods, see below |
| `tb_ntc_linearizer_full` | the whole system with every parameter at its default |

The `tb_ntc_linearizer_top` run covers the following:

* The thermistor model runs from 0 °C to 105 °C, and codes 0, 1, 4094 and
  4095 are added.
* Each result, DAC code and UART report is checked.
* The run counts that each mechanism occurred at least once: rule-1-only
  samples, two-rule samples, clipping high and low, UART reports and skipped
  reports.

The `tb_ntc_linearizer_full` run covers the following:

* It samples 0, 25, 50, 75 and 100 °C.
* It runs 47 ms of simulated time, including the LCD title, in about
  3 seconds.

The testbenches also rely on assertions in the RTL. These check that the
divider is idle when a sample starts, that a conversion never ends while the
linearizer is busy, and that a DAC write never overlaps the next result.
Run with `--assert` so these assertions take effect.
