# An asynchronous state machine with a guaranteed output width

An asynchronous sequential machine reacts to its inputs within a few gate
delays, with no clock. That speed has a cost: an output state may last only
as long as the machine takes to leave it, which can be a gate delay or two,
far too short for a synchronous circuit that has to see it. Worse, a static
hazard in the next-state logic can make the machine skip an output state
altogether, so adding a pulse stretcher on the output does not help.

This design fixes the output width with one extra input, **S**, a free-running
square wave of 50% duty cycle whose period is at least ten times the time the
machine needs for one transition. Wherever the output must be produced by a
short visit, the machine waits for S instead of racing through: it waits for
S to go low, then for S to go high, holds the output **Z = 1** for the whole
high phase of S and leaves when S falls. The output is then exactly one high
phase of S long, whatever the gate delays, and a glitch on the ordinary
inputs cannot shorten or remove it.

The whole machine is a 64 x 4 PROM (a read-only table) in a loop. The present
state, the two inputs x1 x0 and S form the 6-bit address. The 4-bit word read
there holds the next state and the output of the present state. The
next-state bits go back to the address lines through a delay.

## The state graph

Five states are used. Three more codes exist and lead straight back to Q0.
"Z" is the output in each state. Inputs are written x1 x0 S and `-` means
"any value".

| state | code y2y1y0 | Z | leaves on                                                     |
|-------|-------------|---|---------------------------------------------------------------|
| Q0    | 000         | 0 | `01-` to Q1, `11-` to Q2; stays on `-0-`                      |
| Q1    | 001         | 0 | `10-` to Q0, `11-` to Q2, `000` to Q3; stays on `01-`, `001`  |
| Q2    | 010         | 1 | `10-` or `01-` to Q0; on `00-` see the two maps below; stays on `11-` |
| Q3    | 011         | 0 | `--1` to Q4; stays on `--0`                                   |
| Q4    | 100         | 1 | `--0` to Q0; stays on `--1`                                   |
| Q5-Q7 | 101-111     | 0 | `---` to Q0 (unused codes)                                    |

The two paths to an output work differently:

* **Q2** is entered on x1x0 = 11 and Z stays 1 for as long as the inputs stay
  at 11. Here the environment controls the width, which is acceptable as long
  as the inputs change slowly compared with a gate delay.
* **Q1 -> Q3 -> Q4 -> Q0** is the S-timed path. When x1x0 drops from 01 to 00
  in Q1, the machine stays in Q1 while S is high, moves to Q3 when S falls,
  to Q4 when S rises, and back to Q0 when S falls again. Z is high exactly
  during one full high phase of S.

This input change is the one that breaks a gate-level version of the same
machine without S. In that version, the change should move the machine from
Q1 to an output state. Instead, one state bit falls before the other has
risen, and the machine lands in Q0 with no output at all. In the PROM
machine, each move on this path waits in a stable state for an edge of S.
The whole next-state word comes from one table read and then passes the
loop delay, so a half-decoded state never reaches the address lines, and
the pulse in Q4 cannot be skipped.

Leaving Q2 on x1x0 = 00 is programmed in one of two ways, selected by the
`CONTENT` parameter:

* `PROM_CASE1` (default): with S low, Q2 goes to Q3. With S high, it waits in
  Q2 until S falls. Z then drops to 0 in Q3 for one low phase of S before the
  S-timed pulse in Q4, so there is a gap between the two output pulses.
* `PROM_CASE2`: Q2 waits with S low and goes straight to Q4 when S is high,
  so Z stays 1 from Q2 through Q4 with no gap. Q4 then ends at the next
  falling edge of S.

## The PROM map

Address and data bits:

| A5 A4 A3 | A2 A1 | A0 | | D3 D2 D1           | D0            |
|----------|-------|----|-|--------------------|---------------|
| y2 y1 y0 | x1 x0 | S  | | next y2 y1 y0      | Z of present state |

Words in hexadecimal address order (data as D3..D0):

| address        | present state, x1x0, S | data `PROM_CASE1` | data `PROM_CASE2` |
|----------------|------------------------|-------------------|-------------------|
| 00-01          | Q0, 00, -              | 0000              | 0000              |
| 02-03          | Q0, 01, -              | 0010              | 0010              |
| 04-05          | Q0, 10, -              | 0000              | 0000              |
| 06-07          | Q0, 11, -              | 0100              | 0100              |
| 08             | Q1, 00, 0              | 0110              | 0110              |
| 09             | Q1, 00, 1              | 0010              | 0010              |
| 0A-0B          | Q1, 01, -              | 0010              | 0010              |
| 0C-0D          | Q1, 10, -              | 0000              | 0000              |
| 0E-0F          | Q1, 11, -              | 0100              | 0100              |
| 10             | Q2, 00, 0              | **0111**          | **0101**          |
| 11             | Q2, 00, 1              | **0101**          | **1001**          |
| 12-13          | Q2, 01, -              | 0001              | 0001              |
| 14-15          | Q2, 10, -              | 0001              | 0001              |
| 16-17          | Q2, 11, -              | 0101              | 0101              |
| 18,1A,1C,1E    | Q3, --, 0              | 0110              | 0110              |
| 19,1B,1D,1F    | Q3, --, 1              | 1000              | 1000              |
| 20,22,24,26    | Q4, --, 0              | 0001              | 0001              |
| 21,23,25,27    | Q4, --, 1              | 1001              | 1001              |
| 28-3F          | Q5-Q7                  | 0000              | 0000              |

`fsm_prom` builds this table at elaboration from a function that lists it
row by row, so it synthesizes to a constant 64 x 4 table. A PROM chip
floats its outputs when its active-low output enable is high. This two-state
model drives 0000 instead, which reads as "go to Q0, Z = 0". The machine ties
the enable active.

## How the asynchronous loop is modelled

In the circuit this design follows, the loop has no clock. The next state
leaves the PROM and comes back to its address lines after the PROM access
time plus an added delay, built from buffers. Without the added delay, the
loop would be as short as the PROM's own access time, and a new state could
reach the address lines before the old one had been fully decoded.

Synthesizable RTL cannot express a timed analog delay. So `state_delay`
builds the delay as a transport delay line of `DELAY_STAGES` flip-flops,
driven by a fast time-base clock `clk`. One clock period stands for one step
of loop delay. This makes the machine sample x1x0 and S at every `clk` edge,
and a change of state reaches `y` exactly `DELAY_STAGES` clocks after the
input change that caused it. The clock is this implementation's own device,
not part of the machine's logic. The published design puts only buffers in
the loop and recommends against RC delays.

Two rules follow from running an asynchronous machine, and the time-base
model makes both visible:

* **Fundamental mode.** After an input changes, no other input may change
  until the loop has settled: more than `DELAY_STAGES` clocks later. A delay
  line of several stages holds several states in flight. If inputs change
  faster than that, the stages can settle on different states and keep
  swapping between them. This is the essential hazard of a real asynchronous
  loop. The testbenches never change x1x0 within `DELAY_STAGES + 1` clocks of
  an S edge.
* **S is slow.** The time between rising edges of S must be at least ten
  times the loop delay, with 50% duty. The testbenches use a period of 40
  clocks against a loop of 2 or 3.

The inputs go to the PROM address lines without synchronizer flip-flops, as
in the original machine, where the inputs change at any time. In silicon
with a real `clk`, an input edge close to a `clk` edge can make the first
delay stage metastable. If that matters, add a synchronizer in front and
count its latency.

## Interface and timing of `cert_fsm_top`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1 | time base of the loop delay |
| `rst_n` | in  | 1 | asynchronous, active low; loads Q0 into every delay stage |
| `x`     | in  | 2 | input vector x1 x0 |
| `s`     | in  | 1 | synchronizing input S |
| `y`     | out | 3 | present state y2 y1 y0 |
| `z`     | out | 1 | output Z |

| parameter      | default      | meaning |
|----------------|--------------|---------|
| `CONTENT`      | `PROM_CASE1` | which PROM map is programmed (`cert_fsm_pkg::prom_case_e`) |
| `DELAY_STAGES` | 2            | loop delay in `clk` periods, at least 1 |

* A state change reaches `y` `DELAY_STAGES` clocks after the input change
  that causes it. `z` follows `y` through the PROM with no register.
* On the S-timed path, `z` is high for exactly one high phase of S. It rises
  `DELAY_STAGES` clocks after S rises and falls `DELAY_STAGES` clocks after S
  falls.
* In Q2, `z` is high for exactly as long as x1x0 = 11. It is shifted by
  `DELAY_STAGES` clocks at both ends.

The top carries three assertions. After reset, no unused state code appears.
`z` is 1 exactly in Q2 and Q4. Q4 is entered only from Q2 or Q3 with S high.

## Files

| file | contents |
|------|----------|
| `rtl/cert_fsm_pkg.sv` | state codes, PROM map selector, address and data word structs |
| `rtl/fsm_prom.sv` | the 64 x 4 PROM with both maps |
| `rtl/state_delay.sv` | the loop delay line |
| `rtl/cert_fsm_top.sv` | the machine: PROM, delay and feedback |
| `tb/cert_fsm_ref_pkg.sv` | reference model written edge by edge from the state graph |
| `tb/tb_fsm_prom.sv` | all 64 addresses of both maps against the graph; output enable |
| `tb/tb_state_delay.sv` | delay line at depths 1, 2 and 5 against a record of past inputs; reset |
| `tb/tb_cert_fsm_top.sv` | whole machine, default parameters |
| `tb/tb_cert_fsm_case2.sv` | whole machine, `PROM_CASE2`, three-stage delay |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For
example, run the end-to-end test like this:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cert_fsm_pkg.sv tb/cert_fsm_ref_pkg.sv tb/tb_cert_fsm_top.sv \
    --top-module tb_cert_fsm_top
./obj_dir/Vtb_cert_fsm_top
```

The same pattern works for the other testbenches. The unit testbenches need
only the packages they import plus their own file.

The two end-to-end testbenches first run directed sequences:

* the loop latency;
* the Q1 01 -> 00 change, which must give one pulse of exactly one S high
  phase;
* the Q2 output held by x1x0 = 11;
* the Q2 exit on 00, through the Q3 gap for map 1 and straight to Q4 for
  map 2.

They then apply 3000 random input changes while S runs, and compare `y` and
`z` at every clock with the graph model, which has the same loop delay. They
count each of these behaviours and the visits to every state, and fail if
one never happened. Every pulse that goes Q3 -> Q4 -> Q0 is checked to be
exactly one S high phase long. Each run takes well under a second.

## Limits and departures

* The loop delay is a clocked delay line, not a timed buffer chain. The
  design therefore has a clock where the circuit it models has none.
* The inputs have no synchronizers.
* With the output enable inactive, the PROM drives 0000 instead of floating
  its outputs.
* The reset, and the default delay of two stages, are this design's own
  choices.
* Not included are two output-stretching structures that the S input
  replaces: a pulse generator triggered by the output, and a second pulse
  generator that blocks re-triggering. Also not included is a gate-level
  implementation of the four-state machine without S. These are alternatives
  that the S-based method is meant to replace, not parts of it.
