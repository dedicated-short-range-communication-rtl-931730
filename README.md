# FM0 / Manchester line encoder for DSRC

Dedicated Short Range Communication (DSRC, IEEE 802.11p at 5.9 GHz) links
between vehicles and roadside units send their bits with a line code instead
of raw levels. The code keeps the signal DC-balanced and gives the receiver
enough transitions to recover the clock. DSRC uses two such codes: **FM0**
(bi-phase space) and **Manchester**. This RTL holds one encoder that produces
either code from the same logic. It comes from the *similarity-oriented logic
simplification* (SOLS) idea: the two codes share a clock-selected output
multiplexer, one inverter and one XOR. FM0's memory fits in a single
flip-flop. The stand-alone FM0 and Manchester encoders and the flip-flops
the design is built from are included as separate modules.

## The two codes

Every data bit takes one bit-clock period, split into two half-bits. The
encoders send the first half-bit while `clk` is high and the second while
`clk` is low.

**Manchester** sends every bit as two opposite half-bits, so each bit has a
transition in its middle and no DC content. Here a 1 is sent low-then-high
and a 0 high-then-low: `y = x ^ clk`.

**FM0** follows three rules:

1. a 0 has a transition between its two halves;
2. a 1 has none;
3. there is always a transition at the boundary between two bits.

Call the two half-bits of bit *t* `A(t)` and `B(t)`. Rule 3 gives
`A(t) = ~B(t-1)`. Rules 1 and 2 give `B(t) = A(t)` for a 1 and `~A(t)` for
a 0, which reduces to

    A(t) = ~B(t-1)
    B(t) =  x(t) ^ B(t-1)

Both half-bits depend only on `B(t-1)`. So the encoder needs one flip-flop,
not one for each half. Its next-state function, `B <= x ^ B`, is a toggle
flip-flop with `T = x`. That is why the FM0 state is built from the `t_ff`
module.

Example: after reset (`B = 0`), sending the bits 1 0 0 1 1:

| bit              | 1  | 0  | 0  | 1  | 1  |
|------------------|----|----|----|----|----|
| FM0 (A B)        | 11 | 01 | 01 | 00 | 11 |
| Manchester       | 01 | 10 | 10 | 01 | 01 |

FM0 is not balanced bit by bit, but consecutive 1s alternate between all-high
and all-low. The running disparity therefore stays within ±2 half-bits.

## One encoder for both codes (`balance_logic`)

Written as "first half / second half", the two codes are:

| code       | first half (clk = 1) | second half (clk = 0) |
|------------|----------------------|-----------------------|
| FM0        | `~B(t-1)`            | `x ^ B(t-1)`          |
| Manchester | `~x`                 | `x ^ 0`               |

The shape is the same, so the combined encoder uses:

- a source multiplexer that feeds the inverter with `B(t-1)` in FM0 mode and
  `x` in Manchester mode;
- an XOR whose second operand is `B(t-1)` gated by the mode;
- the output multiplexer `y = clk ? first_half : second_half`.

Both codes pass through the same gates on their way to the output, so the two
paths are balanced. The state flip-flop's toggle input is `x & (mode == FM0)`.
In Manchester mode the FM0 state therefore holds its value, and the flip-flop
does not switch. When FM0 is selected again, it continues from the stored
state. `mode` is `0` for FM0 and `1` for Manchester; the package `sols_pkg`
names these values `CODE_FM0` and `CODE_MANCHESTER`.

## Timing: the clock is part of the data path

The output is a multiplexer selected by the bit clock. The encoded signal
therefore runs at twice the bit rate and follows `clk` combinationally, with
no latency: bit *t* appears during clock period *t*. The rules for driving
the encoders:

- Change `x` and `mode` only just after a rising edge of `clk`, and hold them
  until the next rising edge.
- The rising edge that ends bit *t* stores `B(t)` in the flip-flop. That same
  edge starts bit *t+1*.
- The flip-flop takes `B(t)` from the XOR, not from the output multiplexer.
  It is the same value, and this way the flip-flop never samples a net that
  its own clock edge is switching.
- `reset_n` is an active-low asynchronous clear. Pulse it (give it a falling
  edge) once after power-up.
- After reset, the first rising edge loads the state with the `x` of the
  period before it. So keep `x` at 0 while the line is idle. The first bit
  after reset then starts with a high half-bit.

Using a clock as data is unusual. On a real chip, the output multiplexer
should be a glitch-free cell, and the clock tree has to tolerate the extra
load. In an FPGA, a common choice is a 2x clock plus a half-bit select; this
RTL does not do that.

## Modules

| module               | what it is |
|----------------------|------------|
| `dsrc_encoder_top`   | Top level. One bit stream and one bit clock feed the combined encoder (`y_sols`), a stand-alone FM0 encoder (`y_fm0`) and a stand-alone Manchester encoder (`y_manchester`). |
| `balance_logic`      | Combined FM0/Manchester encoder described above. |
| `area_compact_fm0`   | FM0 only. One state flip-flop (`dff_b`), the XOR `xor_fm0` and the clock-selected output multiplexer. |
| `manchester_encoder` | `y = x ^ clk`. |
| `t_ff`               | Toggle flip-flop. A D flip-flop with `D = T ^ Q`, and an asynchronous clear. |
| `d_flip_flop`        | Rising-edge D flip-flop with active-low asynchronous preset `pr_n` and clear `clr_n`, outputs `q` and `q_n`. |
| `sols_pkg`           | The `code_mode_e` type. |

The top's ports: `clk`, `reset_n`, `x`, `mode` (in) and `y_sols`, `y_fm0`,
`y_manchester` (out), all one bit wide. With `mode = 1`, `y_sols` equals
`y_manchester`. With `mode = 0`, `y_sols` equals `y_fm0` until the first
Manchester bit that is a 1. From that bit on, the two FM0 states differ,
because only the stand-alone encoder toggled.

Details of the flip-flops:

- `d_flip_flop` with both `pr_n` and `clr_n` low: the classic truth table
  leaves this case undefined. This design drives both `q` and `q_n` high and
  clears the stored bit.
- The preset and clear act on their falling edges and at clock edges.
  Releasing `clr_n` while `pr_n` is still low leaves `q` at 0 until the next
  clock edge.
- The FM0 encoders never assert the preset.

## Throughput

The encoders take one bit per clock period, so the bit clock is the data
rate. That is 3 to 27 MHz for the DSRC rates of 3 to 27 Mbit/s; no frequency
is fixed in the RTL. The logic between the state flip-flop and the output is
one inverter or XOR and two 2:1 multiplexers.

A Basic Safety Message (about 320 bytes, sent 10 times a second) passes in
2560 clock periods. The encoder streams bits and stores none of the message,
so message length is not limited.

## Simulating

Each testbench checks its own results. It prints one line,
`TB_RESULT checks=N failures=M`, and ends with `$finish`; a watchdog stops it
if it hangs. To build and run one with Verilator 5 (put the package first;
`-y rtl` finds the other modules):

    verilator --binary --timing -y rtl rtl/sols_pkg.sv tb/tb_dsrc_bsm.sv --top-module tb_dsrc_bsm
    ./obj_dir/Vtb_dsrc_bsm

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_d_flip_flop`        | Each truth-table row, then 400 random cycles of `d`, `pr_n` and `clr_n` against a reference model. |
| `tb_t_ff`               | The toggle truth table, the asynchronous clear, and 500 random cycles. |
| `tb_manchester_encoder` | Each bit's two halves, and a total disparity of zero. |
| `tb_area_compact_fm0`   | The three FM0 rules on every bit, with no model of the state. Also the high first half-bit after reset (including a reset in mid-stream) and the ±2 disparity bound. |
| `tb_balance_logic`      | Random bits with random mode switches. Checks the code rules and a reference FM0 state that holds during Manchester. Counts each mode and each switch direction. |
| `tb_dsrc_encoder_top`   | End to end: decodes all three outputs and compares them with the sent bits, checks that the outputs agree where they should, and checks one bit per clock. Counts FM0 and Manchester 0s and 1s, switches in both directions, FM0 resuming after Manchester, and resets. It fails if any of these never happened. |
| `tb_dsrc_bsm`           | Three 320-byte messages from an LFSR, sent through the top with its default configuration: FM0, then Manchester, then FM0. Each is decoded byte by byte and must take exactly 2560 clock periods. Checks the running disparity: 0 after every Manchester bit, within ±2 for FM0. |

Data change just after the rising edge, and each half-bit is sampled in its
middle. Because of this, the testbenches check the logic function, not
glitches at the half-bit edges.

## Design choices and limits

These points are this design's own choices, where its source gives no answer
or only a drawing:

- The Manchester polarity (1 = low-then-high).
- The 0/1 encoding of `mode`.
- Holding the FM0 state while in Manchester mode.
- The active-low reset, and the rule to keep `x` at 0 while idle.
- Feeding the state flip-flop from the XOR rather than from the output
  multiplexer.
- Building the T flip-flop as an edge-triggered D flip-flop plus XOR, rather
  than a gated latch.
- The outputs of `d_flip_flop` when preset and clear are both asserted.

The combined encoder has one state flip-flop; the drawing this design
follows shows a second flip-flop whose role cannot be read from it. Nothing
here models the electrical properties of these circuits: delay, power,
setup and hold, or transistor-level versions in TTL, CMOS, resistor-transistor
or domino logic, or transmission gates.

Yosys can parse every file. Its coarse synthesis, however, rejects
`d_flip_flop`: it does not accept a flip-flop with both an asynchronous set
and an asynchronous reset written as one process. So the modules that use
`d_flip_flop` get no gate count from it. For such a flow, tie off the preset
or use the target library's set/reset flip-flop.
