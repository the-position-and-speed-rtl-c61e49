# Quadrature encoder position and speed measurement for FPGA servo drives

A servo drive for a DC or permanent-magnet synchronous motor needs the shaft
position and speed from an incremental encoder. The encoder has two square-wave
channels, A and B, a quarter period apart (90 electrical degrees), and an
index channel C with one pulse per revolution. This RTL turns those three lines
into a 32-bit position (four counts per encoder line) and a 16-bit velocity.
It is meant to be one module of an FPGA motion processor.

The hard part is not the counting. It is not being fooled by the signal:

- electrical noise on a long encoder cable;
- a shaft that oscillates by a fraction of a line, so that one channel toggles
  back and forth while the other stays still.

A plain decoder either counts such pulses or loses steps in these cases. The
design puts two filters in front of the decoder to deal with them.

```
 ch_a --> pulse_filter --+
                         +--> single_channel_filter --> cha_filtr, chb_filtr
 ch_b --> pulse_filter --+                                     |
                                                               v
                                                      direction_decoder
                                                        |cnt    |direction
                                                        v       v
 ch_c --> pulse_filter --> index ------------------> position_counter --> position[31:0]
          (digital_filters = the three pulse filters    (zero_cnt, index_en)
           and the single-channel filter)            speed_counter ------> velocity[15:0], vel_valid
                                                               |
                                    position, velocity, vel_valid
                                                               v
                                                       rs232_reporter --> txd
```

Everything runs on one clock. The defaults assume 50 MHz.

## Stage 1: short-pulse filter (`pulse_filter`)

Each line is shifted into a LEN-bit serial-in, parallel-out register on every
clock. An XNOR over all taps shows whether the last LEN samples agree. When
they do, the oldest tap is loaded into the output flip-flop. Otherwise the
output keeps its value.

Two rules follow from this:

- A high or low pulse shorter than LEN clocks never reaches the output.
- A pulse of LEN clocks or longer comes through delayed. The output changes on
  the (LEN+1)-th clock edge after the input changed.

LEN is sized from the fastest genuine signal:

    f_max = V_max * cp              (channel frequency at top speed)
    T_min = 1 / (2 * f_max)         (shortest genuine high or low pulse)
    LEN   = T_min * f_clk = f_clk / (2 * V_max * cp)

Here V_max is in revolutions per second and cp is lines per revolution. With
3000 rpm (50 rev/s), 5000 lines and 50 MHz, LEN = 100. These inputs are
`qep_pkg::ENC_CP`, `V_MAX_RPS` and `CLK_HZ`, and `qep_pkg::T_MIN_CYC` is the
result.

**Noise margin at top speed.** At exactly V_max a channel pulse is exactly LEN
clocks long, so the filter has no margin left:

- A glitch inside such a pulse splits it into two pieces. Both pieces are
  shorter than LEN, so both are dropped, and the count is lost.
- At lower speeds a glitch of width w can delay an edge by up to LEN + w
  clocks. That is harmless only while it is less than the time between an A
  edge and the next B edge.

If the cable is noisy at full speed, raise `V_MAX_RPS` above the real top
speed. That shortens LEN and leaves margin.

## Stage 2: single-channel pulse filter (`single_channel_filter`)

A pulse on A with no change on B between its edges is not motion. It is the
shaft dithering on one edge, or noise that survived stage 1. The filter keeps
an output state {A,B} and moves it one quadrature step at a time. It uses
three states:

| state  | meaning | next |
|--------|---------|------|
| IDLE   | input equals output | one channel differs → PEND_A / PEND_B; both differ → hold, flag `illegal` |
| PEND_A | A differs, B agrees | A returns → IDLE, pulse dropped; B changes too → the A step goes to the output, now PEND_B |
| PEND_B | B differs, A agrees | B returns → IDLE, pulse dropped; A changes too → the B step goes to the output, now PEND_A |

A step reaches the output only once the next step, on the other channel,
confirms it. As a result:

- The output lags the encoder by at most one count.
- When motion stops, the last step stays pending, so the measured position can
  be one count behind the true one. This offset never grows, however long or
  however jittery the motion.
- Dithering by one count about an edge is never counted.
- A move of two or more counts is counted, and the one-count lag changes to
  the new direction.

A change of both channels in one clock is not a legal quadrature step. The
output holds, and `illegal` is high (one clock late) while the input differs
from the idle output in both bits. Normal stepping clears the condition.

## Direction and CNT (`direction_decoder`)

Moving right, the states {A,B} go 00 → 01 → 11 → 10 → 00, with B leading.
Moving left they go 00 → 10 → 11 → 01, with A leading. When exactly one channel
changes, the direction is computed:

- Right means A changed and now A == B, or B changed and now A != B.
- In one expression: `right = a_changed ^ A ^ B`.

The count signal CNT is set by a rising edge and cleared by a falling edge of
the pulses that come alternately from A and B. In other words CNT = A xor B.
It toggles once per quadrature edge. Both edges of CNT are counted, so a
5000-line encoder gives 20000 counts per revolution.

CNT and the direction are registered in the same clock, so a counter always
sees a CNT edge together with the direction of that step. Right counts up; this
sign convention is this design's own.

## Counters

**`position_counter`.** A 32-bit two's-complement counter that wraps. It steps
once for each CNT edge, one clock after the edge. It is cleared by:

- `rst`;
- `zero_cnt`;
- the rising edge of the filtered index, if `index_en` is set.

A clear wins over a count in the same clock. The index is taken from channel C
through its own pulse filter. It is active low at the pin by default
(`INDEX_ACTIVE_LOW`), and it must be at least LEN clocks wide.

**`speed_counter`.** A free-running timer cuts time into gates of PERIOD clocks
(default 50000, i.e. 1 ms). During a gate, each CNT edge adds or subtracts one
in a signed 16-bit accumulator, which saturates at its limits. On the last
clock of the gate:

- the total goes to `velocity`, including a step in that clock;
- `vel_valid` pulses;
- the accumulator restarts.

No step is lost between gates, so the velocities add up exactly to the change
of position. To convert:

    speed [rev/s] = velocity * CLK_HZ / (PERIOD * 4 * cp)

With the defaults, one unit is 0.05 rev/s, and 3000 rpm reads 1000.

## RS-232 reporting (`rs232_reporter`)

Each `vel_valid` starts a frame on `txd`, unless the previous frame is still
being sent; in that case it is skipped. The UART is 8N1 at CLK_DIV clocks per
bit (default 434, i.e. 115200 baud at 50 MHz), least significant bit first,
idle high. A frame is 7 bytes:

| byte | 0 | 1..4 | 5..6 |
|------|---|------|------|
| data | 0xA5 | position, MSB first | velocity, MSB first |

A frame takes 70 bit times, which is 30380 clocks. This fits inside the 1 ms
gate. `tx_busy` is high while a frame is being sent.

## Top level (`qep_fpga_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | 50 MHz |
| rst | in | 1 | synchronous reset, hold ≥ 4 clocks |
| zero_cnt | in | 1 | clear the position |
| index_en | in | 1 | let the index pulse clear the position |
| ch_a, ch_b, ch_c | in | 1 | encoder lines (after isolation) |
| position | out | 32 | four counts per line, two's complement |
| velocity | out | 16 | signed counts per gate |
| vel_valid | out | 1 | one-clock strobe per gate |
| direction | out | 1 | 1 = right (counting up) |
| illegal | out | 1 | both channels changed at once |
| txd | out | 1 | UART output |
| tx_busy | out | 1 | frame in progress |

`measurement_module` is the same chain without the UART. Use it to embed the
measurement in a larger motion processor.

**Reset.** During reset every stage loads the state of the stage before it.
The pulse filters load the present line levels, so the design starts out
agreeing with a stationary encoder in any of its four states. Hold reset for at
least four clocks so that every stage settles.

**Latency.** From an encoder edge to the position is LEN+4 clocks:

| stage | clocks |
|-------|--------|
| pulse filter | LEN+1 |
| single-channel filter | 1 |
| decoder | 1 |
| counter | 1 |

This applies to a step that is confirmed; a step left pending stays pending.

## Parameters

| parameter | default | where | origin |
|-----------|---------|-------|--------|
| position width | 32 | `position_counter.POS_W` | original design |
| velocity width | 16 | `speed_counter.VEL_W` | original design |
| sampling clock | 50 MHz | `qep_pkg::CLK_HZ` | original design |
| filter length LEN | 100 | `pulse_filter.LEN` | from the original sizing rule, with 3000 rpm and 5000 lines |
| speed gate PERIOD | 50000 (1 ms) | `speed_counter.PERIOD` | chosen here |
| index polarity | active low | `digital_filters.INDEX_ACTIVE_LOW` | chosen here |
| UART divider | 434 | `rs232_reporter.CLK_DIV` | chosen here |

## What follows the original module and what is added

These parts follow the original module:

- the block structure;
- the cascade of a shift-register/XNOR/latch short-pulse filter and a state
  machine that removes single-channel pulses;
- direction from the AB state sequence;
- CNT as the xor of the channels, counted on both edges;
- a 32-bit position counter and a 16-bit speed counter over a fixed period;
- a clear input and use of the C channel;
- an RS-232 link to read the values out.

These parts are this implementation's own:

- the internals of the single-channel filter (the state table above) and its
  `illegal` output;
- the output "latch" is written as an enabled flip-flop;
- a reset that preloads the filters;
- what the index does (clear on its rising edge when enabled);
- the gate length, the saturation and the sign convention;
- the whole RS-232 frame format and baud rate.

The speed counter also has a time-base input in the original block diagram
that is not described. Here the time base is internal.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package. Read `qep_pkg.sv`
first. Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example:

    verilator --binary --timing --assert -Irtl rtl/qep_pkg.sv \
        rtl/pulse_filter.sv rtl/single_channel_filter.sv rtl/digital_filters.sv \
        rtl/direction_decoder.sv rtl/position_counter.sv rtl/speed_counter.sv \
        rtl/measurement_module.sv rtl/rs232_reporter.sv rtl/qep_fpga_top.sv \
        tb/tb_qep_fpga_top_full.sv --top-module tb_qep_fpga_top_full
    ./obj_dir/Vtb_qep_fpga_top_full

| testbench | what it shows |
|-----------|---------------|
| `tb_pulse_filter` | LEN-1 pulse rejected, LEN pulse passed, latency LEN+1, random runs against a run-length model |
| `tb_single_channel_filter` | one-count lag, dithering dropped, 3000-step random walk against the step-level rule, illegal double change |
| `tb_direction_decoder` | CNT = A xor B, direction per step, illegal step ignored |
| `tb_position_counter` | both CNT edges counted, wrap, zero counter, index only when enabled and only on its rising edge |
| `tb_speed_counter` | velocity equals the signed steps of each gate, gate length, saturation |
| `tb_digital_filters` | cascade with glitches on all lines, index polarity and minimum width |
| `tb_measurement_module` | whole chain with glitches and dither; latency LEN+4; sum of velocities equals position |
| `tb_rs232_reporter` | frame bytes, start/stop bits, busy time, send ignored while busy |
| `tb_qep_fpga_top` | reduced sizes; motion programme exercising every mechanism (short pulses, dither, reversals, illegal step, zero, index, reset in state 11); decoded frames match the strobed values |
| `tb_qep_fpga_top_full` | default sizes; 3000 rpm reads 1000 per gate, half speed left reads -500; frames decoded |
| `tb_station_oscillation` | default sizes; oscillations from 1 to 600 counts up to 3000 rpm, line noise on the slower segments and pauses; position never more than one count off beyond the filter delay, exact after stopping |

## Fit to the intended use

With a 5000-line encoder at up to 3000 rpm:

- The channel frequency is 250 kHz, and the shortest pulse (100 clocks) just
  passes the default filter.
- The velocity reaches 1000 counts per gate, far from the 16-bit limit.
- The position wraps only after about 107,000 revolutions in one direction.

Encoders with output frequencies up to 1 MHz need LEN ≤ 25. Set `V_MAX_RPS`
and `ENC_CP` to match, or override LEN.

## Limits

- There is no metastability synchronizer in front of the shift register. The
  first register stages serve as one.
- Nothing in the RTL is vendor specific.
- Velocity resolution is one count per gate. There is no period (1/T)
  measurement for low speeds.
- The index pulse must be at least LEN clocks wide. The rising edge of the
  filtered index clears the position; there is no index latch or capture
  register.
