# A shared-datapath FM0 / Manchester encoder for DSRC

Dedicated short-range communication (DSRC), the radio link used by
electronic toll collection and vehicle-to-vehicle safety messages, sends its
downlink data with one of two two-level line codes, FM0 or Manchester. Both
codes split every bit period into two half-bits so the transmitted signal has
no DC component, whatever the data. A transceiver that must support both is
usually given two separate encoders, and then half of the encoder logic sits
idle whichever code is in use.

This design encodes both codes with **one five-component datapath**: a
flip-flop, an XOR gate, an inverter and two 2:1 multiplexers. Every component
carries signal in both modes, and a one-bit `mode` input selects the code.
The encoder takes one data bit per clock period and sends that bit's two
half-bits in the same period, with no latency. It is fast enough for the
500 kb/s, 4 Mb/s and 27 Mb/s DSRC rates with a large margin.

## The two codes

Each bit period is split into a first half (while `clk` is high) and a second
half (while `clk` is low).

**FM0** follows three rules:

1. a `0` has a level change in the middle of the bit,
2. a `1` has no level change in the middle of the bit,
3. the level always changes at the boundary between two bits.

So the level of a half-bit depends on the previous bit as well as on the
data. For the data `0 1 1 0 1`, starting after a clear, the line is

| bit  | 0    | 1    | 1    | 0    | 1    |
|------|------|------|------|------|------|
| line | 1 0  | 1 1  | 0 0  | 1 0  | 1 1  |

**Manchester** has a change in the middle of every bit. This design sends
`~x` in the first half and `x` in the second, so `code_out = x ^ clk`, and a
`1` is sent as low then high.

## One datapath for both codes

Let `b_q` be the level of the second half-bit of the previous FM0 bit. FM0
then reduces to

```
first half  A = ~b_q           (rule 3)
second half B = b_q ^ x        (x = 1: B = A; x = 0: B = ~A; rules 1 and 2)
b_q <= B at the end of the bit
```

In Manchester mode `b_q` is held at 0, so the same XOR gives `b_q ^ x = x`,
which is already the Manchester second half. Its inverse is the first half.
The only thing that differs between the modes is the signal that is inverted
to form the first half: `b_q` for FM0, the XOR output for Manchester.

```
   x ---------+
              v
   b_q ---->(XOR)--> b_next --+----------------------------> MUX(clk) in 0 --+
    ^   |                     |                                              |
    |   +------------------> MUX(mode) in 0  (mode = FM0)                    +--> code_out
    |                         | in 1 <- b_next (mode = Manchester)            |
    |                         +--> NOT ------------------> MUX(clk) in 1 ----+
    |
   DFF <-- b_next, rising edge of clk; asynchronous clear by clr
```

| component | FM0 mode                       | Manchester mode                |
|-----------|--------------------------------|--------------------------------|
| DFF `b_q` | holds the previous second half | held at 0 by `clr`, feeds the XOR |
| XOR       | second half and next state     | passes `x` (second half)       |
| MUX(mode) | picks `b_q`                    | picks the XOR output           |
| NOT       | forms the first half `~b_q`    | forms the first half `~x`      |
| MUX(clk)  | first / second half            | first / second half            |

Synthesis gives exactly these five cells: one `$adff`, one `$xor`, one `$not`
and two `$mux`.

## Mode and CLR

The encoder has two control inputs, `mode` and `clr`. They are kept separate,
not derived from each other, because `clr` does two jobs:

* **Initialisation.** `clr` is an active-high asynchronous clear of `b_q`.
  When it is released in FM0 mode, FM0 starts from `b_q = 0`, so the first
  bit begins with a high half.
* **Manchester operation.** `clr` must be held high for as long as
  `mode = MODE_MANCHESTER`. This keeps `b_q` at 0, which the Manchester path
  relies on.

If `clr` were simply the inverse of `mode`, the encoder could not be cleared
while in FM0 mode. A deferred assertion in the RTL flags Manchester mode with
`clr` low. To switch modes, raise `clr`, change `mode`, and (for FM0) release
`clr`. `mode` uses the enum `sols_pkg::code_mode_e`: `MODE_FM0 = 0` and
`MODE_MANCHESTER = 1`.

## Timing

* `x` must be stable from just after one rising edge of `clk` to the next.
  Its code appears in the same period: the first half while `clk` is high,
  the second while `clk` is low.
* `clk` is used as data: it drives the select of the output multiplexer. So
  `code_out` is combinational in `clk`, `x`, `mode` and `b_q`, and it can
  glitch briefly at clock edges. Sample it away from the edges, as the
  testbenches do at a quarter and three quarters of the period.
* Data rate = clock frequency. The logic between the inputs and `code_out`
  is at most one XOR, one multiplexer, one inverter and one multiplexer.

## Files

| file                 | contents |
|----------------------|----------|
| `rtl/sols_pkg.sv`    | `code_mode_e`, the mode type |
| `rtl/sols_encoder.sv`| the encoder; it is also the top level |
| `tb/tb_sols_encoder.sv` | end-to-end self-checking test at the default (and only) configuration |
| `tb/tb_dsrc_rates.sv`   | DSRC-rate workloads: 500 kb/s, 4 Mb/s, 27 Mb/s, both modes |

The encoder has no parameters. The control unit that drives `mode` and
`clr`, and the RF front end that receives `code_out`, are outside this
design. Their signals are the top-level ports.

## Verification

`tb_sols_encoder` compares both half-bits of every bit with a reference
written from the code rules above, not from the netlist. In order, it runs:

* a clear;
* the five-bit FM0 example `0 1 1 0 1`;
* 200 random FM0 bits;
* a switch to Manchester and 200 random Manchester bits;
* a switch back to FM0 and 200 more bits;
* a clear in the middle of an FM0 stream and 50 more bits.

It also checks that a frame takes exactly one clock period per bit. It counts
every mechanism and fails if one never happened: the FM0 mid-bit change for a
0, no mid-bit change for a 1, the change at bit boundaries, a Manchester bit,
a switch in each direction, and a clear. About 1,770 checks run.

`tb_dsrc_rates` sets the bit clock to 2000 ns, 250 ns and 37.037 ns. These
periods give the three DSRC rates. At each rate it sends a random 256-bit
frame in each mode. It decodes the line as a receiver would, with FM0 equal
halves meaning 1 and Manchester's second half being the bit, and checks:

* the decoded bits match the sent frame;
* every FM0 bit boundary has a level change;
* the line stays balanced: the running sum of half-bit levels stays within
  ±2 half-bits for FM0 and returns to 0 after every Manchester bit;
* the frame takes exactly 256 periods.

To run either test with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/sols_pkg.sv rtl/sols_encoder.sv \
          tb/tb_sols_encoder.sv --top-module tb_sols_encoder -o sim
./obj_dir/sim
```

Each test prints `TB_RESULT checks=N failures=0` when it passes.

## What is this design's own, and what it leaves out

The three FM0 rules, the Manchester code being a single XOR with the clock,
and the idea of one fully shared datapath come from the published
architecture. So do a five-component count and separate Mode and CLR
controls. The following are choices made here:

* the gate-level netlist (which signal each multiplexer selects, and where
  the inverter sits);
* the Manchester polarity (`x ^ clk`);
* the mode encoding;
* `clr` being active-high and asynchronous;
* the FM0 start level after a clear.

In Manchester mode the flip-flop does no state-keeping: it serves as the
constant 0 input of the shared XOR. "Every component is used in both modes"
holds in that sense.

The published work also reports results that RTL cannot reproduce or check:

* a transistor-level optimisation, a retiming that saves 22 transistors;
* a transmission-gate Manchester path;
* post-layout figures in a 0.18 µm CMOS process: up to 2 GHz (Manchester) and
  900 MHz (FM0), 1.58 mW and 1.14 mW, and a 65.98 × 30.43 µm² core.

Whether a synthesised version of this RTL meets those frequencies depends on
the target library and layout.
