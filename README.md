# Carrier-based PWM generator for a three-phase nine-level inverter

A multilevel inverter builds its output voltage from many small steps, and
every step needs its own power switch and its own gate signal. A nine-level
leg needs eight independently timed switching signals, so a three-phase
inverter needs 24: more PWM channels than a motor-control processor
usually has. This design moves the PWM generation into an FPGA. The
processor only computes the three phase references and writes them over a
16-bit parallel bus; the FPGA turns them into the 24 switching signals with
level-shifted triangular carriers.

The RTL is written in SystemVerilog (IEEE 1800-2017), is synthesizable, and
defaults to the reference build: nine levels, 14-bit references, a 5 kHz
carrier from a 10.24 MHz clock.

## How the switching signals are formed

For an m-level inverter with n-bit references, the reference range
0 .. 2^n is cut into m-1 equal bands of width

    K = 2^n / (m-1)            (n = 14, m = 9  ->  K = 2048)

Each band has its own triangular carrier. Carrier i sweeps i*K .. (i+1)*K.
All carriers are copies of one of two base triangles that run between 0
and K:

* the **M-based** carrier starts at 0 and rises (peaks upward, /\/\);
* the **W-based** carrier starts at K and falls (\/\/), always equal to
  K minus the M-based one.

Carrier i is the chosen base carrier plus i*K ("level shifting"). Which
base each carrier uses is the **PWM strategy**:

| strategy (bit i = carrier i, 0 = M, 1 = W) | name |
|---|---|
| `8'b0000_0000` (`pwm_pkg::STRATEGY_PD`) | phase disposition: all carriers in phase ("MMMM") |
| `8'b1010_1010` (`pwm_pkg::STRATEGY_MWMW`) | alternate carriers in phase opposition, lowest carrier M |

Any other 8-bit pattern is accepted too.

Each phase reference is compared with all eight carriers. Bit i of that
phase's output is 1 while the reference is above carrier i. Because the
carriers are stacked in disjoint bands, the eight bits always form a
thermometer code: with the reference inside band j, bits 0 .. j-1 are
steadily high, bits j+1 .. 7 are steadily low, and only bit j switches.
The number of high bits is the instantaneous level of that phase (0 .. 8,
or -4 .. +4 around the midpoint). A reference exactly in the middle of a
band gives 50 % duty on that band's bit. For example 3072, 5120 and 7168
put 50 % duty on bit 1, 2 and 3.

How the bits map onto the switches of a particular topology is left to the
gate-drive stage. No complementary signals and no dead time are generated
here.

## Blocks

```
 bus_in[15:0] --> ref_input --refs a,b,c--------------------+
                                                            v
 clk --> carrier_counter (M, from 0 up)  --m_base--> level_shift --carriers[8]--> pwm_comparator --> pwm_a/b/c[7:0]
     --> carrier_counter (W, from K down) --w_base-->     ^
                                  strategy[7:0] ----------+
```

| file | role |
|---|---|
| `rtl/pwm_pkg.sv` | sizes (`N_BITS`, `LEVELS`, `CNT_W`, `CARRIER_STEP`, `SYNC_STAGES`), `k_offset()`, the address enum, the two named strategies |
| `rtl/ref_input.sv` | synchronises the bus, decodes the phase address and holds the three references |
| `rtl/carrier_counter.sv` | 16-bit up-down counter: one triangular base carrier; `START_DOWN` selects M or W |
| `rtl/level_shift.sv` | picks M or W for each carrier and adds i*K (combinational) |
| `rtl/pwm_comparator.sv` | 3 x 8 comparators `ref > carrier`, registered outputs |
| `rtl/pwm_generator.sv` | top level: wires the above together |

### Reference bus (`ref_input`)

The processor writes one 16-bit word at a time:

| bits | meaning |
|---|---|
| 15:14 | phase address: `00` Vsa, `01` Vsb, `10` Vsc, `11` idle (ignored) |
| 13:0 | reference value, unsigned, 0 .. 16383 |

There is no strobe. The bus goes through a two-flop synchroniser and is
decoded on every clock. Whenever the address is 00, 01 or 10, the value is
stored in that phase's register. The writer should therefore hold each
word for at least two FPGA clocks. It should also avoid passing through a
wrong address while the bus changes. The safe pattern is to park the bus
at address `11`, set the value, then set the address, then go back to
`11`. A new value reaches the PWM outputs 4 clocks after it appears on the
bus (2 synchroniser stages, the reference register, the output register).
References are used as soon as they are written. They are not held back
to a carrier turning point. A writer that wants regular sampling can write
right after the `carrier_sync` pulse, which marks the valley of the
M-based carrier once per period.

### Carrier timing (`carrier_counter`)

The counter moves by `CARRIER_STEP` = 2 per clock between 0 and K = 2048.
One period (0 -> 2048 -> 0) therefore takes 2048 clocks. At 10.24 MHz that
is exactly 200 us, a 5 kHz carrier. The counter is 16 bits wide because
the top carrier reaches 8*K = 16384, one more than a 14-bit value can
hold. The M and W instances share the reset and stay locked in phase
opposition (`m + w == K`). An assertion in the top checks this. If K is
not a multiple of the step, the count is clamped at K.

### Comparators and outputs

`pwm_comparator` uses a strict `>`: a reference equal to the carrier gives
0. A reference of 0 therefore keeps every bit low. The largest reference,
16383, still drops the top bit for one clock at each peak of the top
carrier (16384). All 24 outputs are registered, so they cannot glitch.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `N_BITS` | 14 | reference width n; the bus is `N_BITS+2` bits wide |
| `LEVELS` | 9 | inverter levels m; there are m-1 carriers and m-1 output bits per phase |
| `CNT_W` | 16 | carrier width; must hold (m-1)*K |
| `CARRIER_STEP` | 2 | counts per clock; carrier period = 2K/step clocks |
| `SYNC_STAGES` | 2 | synchroniser depth on the bus |

K is derived: `pwm_pkg::k_offset(N_BITS, LEVELS)` = 2^n/(m-1), with integer
division if m-1 is not a power of two. For another clock frequency, keep
the carrier frequency by changing `CARRIER_STEP`. Alternatively, accept a
different carrier frequency: f_carrier = f_clk * step / (2K).

## What is taken as given and what is this design's choice

These points come straight from the published scheme:

* the 16-bit word: a 2-bit address in bits 15-14 (00/01/10 for phases a, b
  and c) over a 14-bit value;
* a 16-bit up-down counter for the carriers, with M-based and W-based
  base carriers;
* carriers shifted by K = 2^n/(m-1), with m-1 carriers;
* every reference compared with every carrier;
* nine levels, 14 bits, K = 2048, a 5 kHz carrier, a 10.24 MHz clock;
* the test case 3072 / 5120 / 7168 with 50 % duty on A[1], B[2], C[3].

These were not specified and are choices made here:

* the carrier step of 2. It is the step that makes 10.24 MHz give exactly
  200 us per triangle period of amplitude 2048.
* the reading of "M-based" as rising from 0 and "W-based" as falling from
  K;
* one strategy bit per carrier, with carrier 0 the lowest;
* address `11` as idle, no write strobe, and the two-flop synchroniser;
* the asynchronous active-low reset, which sets the references to 0 and
  all outputs low;
* strict `>` in the comparators, and the output register;
* the `carrier_sync` output.

Not covered: dead time, complementary gate signals, fault or enable
inputs. None of these are part of the scheme. A writer that does not
follow the bus protocol above can produce a torn word. Nothing here
detects that.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ref_input` | 200+ random words: addressed register only, address 11 ignored, `wr` pulse, latency exactly SYNC_STAGES+1, reset value |
| `tb_carrier_counter` | M and W counts against the closed-form triangle every clock for 5 periods; direction; `period_start` once per 2048 clocks; clamping with PEAK 10, step 3 |
| `tb_level_shift` | 2000 random base and strategy pairs against `(s ? w : m) + i*K`; PD and MWMW at the valley and the peak |
| `tb_pwm_comparator` | 3000 random vectors, including ties, one clock after they are applied; the 3072 / 5120 / 7168 case |
| `tb_pwm_generator` | whole design at default parameters, with the testbench acting as the processor (see below) |

`tb_pwm_generator` plays the processor on the 16-bit bus. It checks:

* all outputs stay low after reset;
* the 3072 / 5120 / 7168 case under PD and then MWMW;
* random references under random strategies;
* one full 16 ms period of three full-scale sines 120 degrees apart,
  under MWMW.

For every measured 2048-clock window, it compares the high time of each of
the 24 bits with the count worked out from the reference alone,
`2*ceil(x/2) - 1` clocks with `x = ref - i*K`, clamped to 0 .. 2048. It
also checks the thermometer code on every clock. It requires every phase
to pass through all nine levels. It counts writes, idle words, strategy
switches and 50 % windows, and fails if any of them never happened. It
simulates about 20 ms of device time in under a second.

To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_pwm_generator rtl/pwm_pkg.sv tb/tb_pwm_generator.sv
./obj_dir/Vtb_pwm_generator
```

Replace the top module name to run any other testbench. `pwm_pkg.sv` must
always come first.
