# NRZI line encoder and decoder

NRZI (non-return-to-zero, inverted) sends a serial bit stream as a two-level
line signal. The bit is not carried by the level itself but by whether the
level changes at a clock boundary. A receiver that only looks at changes does
not care which level is "high", and a run of the bit that causes a change
keeps the line toggling, which gives a clock-recovery circuit edges to lock
onto.

This RTL is a minimal, fully synchronous NRZI codec: an encoder and a decoder,
each one XOR gate and one register, with the encoder's line output wired
straight into the decoder. The loop-back top (`nrzi_top`) has four ports,
`clk`, `reset_l`, `enc_di` and `dec_do`. It returns the input bit stream
unchanged, two bit periods late. It was sized for a small FPGA test setup: a
switch drives `enc_di` and an LED shows `dec_do`.

## The code: which bit toggles the line

The two halves compute:

    encoder:  line_next = NOT (enc_di XOR line)          (register: enc_do)
    decoder:  data_next = NOT (line XOR line_delayed)    (register: dec_do)

So in the default configuration a **0 toggles the line and a 1 holds it**.
This is the convention USB uses. Many textbooks state NRZI the other way
round (a 1 toggles). The package type `nrzi_pkg::nrzi_conv_e` and the
`CONV` parameter on every module choose between the two:

| `CONV`                | encoder            | decoder                  | line on a 0 | line on a 1 |
|-----------------------|--------------------|--------------------------|-------------|-------------|
| `NRZI_TOGGLE_ON_ZERO` (default) | `~(d ^ line)` | `~(line ^ line_1d)` | toggles | holds |
| `NRZI_TOGGLE_ON_ONE`  | `d ^ line`         | `line ^ line_1d`         | holds       | toggles     |

The default follows the gate-level circuit the design is based on, which puts
an inverter after each XOR. `NRZI_TOGGLE_ON_ONE` is an addition of this RTL.
The encoder and the decoder must use the same setting. In `nrzi_top` one
parameter drives both, so they cannot disagree.

A long run of the non-toggling bit leaves the line constant. NRZI alone does
not bound run lengths. If a receiver must recover a clock from the line, the
stream has to be bit-stuffed or run-length-limited before the encoder. This
codec does neither: it runs off one shared clock and needs no recovered clock.

## Encoder (`rtl/nrzi_encoder.sv`)

The line level is held in one flip-flop, and its output is fed back into the
XOR. Each rising edge loads `nrzi_step(CONV, enc_di, enc_do)`. Apart from the
inverter, the circuit is a toggle flip-flop: the data bit is its enable.

## Decoder (`rtl/nrzi_decoder.sv`)

A plain D flip-flop with no reset keeps the line level from one clock
earlier (`dec_di_1d`). The XOR of the current and previous levels asks "did
the line change?". It is inverted for the default convention and registered
in the output flip-flop. The decoder only compares two successive levels, so
an inverted line decodes to exactly the same data. Only the first bit after
reset depends on the absolute level.

## Timing and latency

Everything is clocked on the rising edge of `clk`, one bit per clock period.
There is one register on the encoder path and one on the decoder path, so:

    period        j       j+1        j+2
    enc_di        b
    enc_do (line)         level(b)
    dec_do                           b

A bit that is on `enc_di` during period *j* shows on `dec_do` during period
*j+2* (`nrzi_pkg::CODEC_LATENCY = 2`). The encoder alone has a latency of one
period. So does the decoder, measured from the line level that carries the
bit. Between flip-flops there is one two-input function, so the critical path
is register → XOR/XNOR → register. On a Spartan-3-class device (xc3s400-4),
a path of this shape is reported at about 2.6 ns, roughly 380 MHz.

## Reset

`reset_l` is asynchronous and active low. It goes to the set pin of both
output flip-flops, so while it is low the line (`enc_do`) and `dec_do` both
read 1 at once, without a clock edge. The decoder's delay flip-flop has no
reset. It picks up the idle line at the first clock edge during reset, so
**hold `reset_l` low across at least one rising edge of `clk`**. After
release, and until the first real bit arrives, `dec_do` shows the bit that
leaves the line unchanged. That is 1 by default and 0 with
`NRZI_TOGGLE_ON_ONE`. Deassertion is
not synchronised to `clk`: release reset away from the rising edge, or add a
reset synchroniser in front if that cannot be guaranteed.

## Files

| file | contents |
|------|----------|
| `rtl/nrzi_pkg.sv` | `nrzi_conv_e` convention type, `nrzi_step` / `nrzi_unstep` functions, reset level, `CODEC_LATENCY` |
| `rtl/nrzi_set_ff.sv` | 1-bit register with asynchronous active-low set (the FPGA "FDP" cell) |
| `rtl/nrzi_encoder.sv` | encoder: XOR/XNOR with feedback + set register |
| `rtl/nrzi_decoder.sv` | decoder: delay register + XOR/XNOR + set register |
| `rtl/nrzi_top.sv` | encoder looped into decoder; the four-pin top |
| `tb/tb_*.sv` | one self-checking testbench per module |

After synthesis the top is 3 flip-flops, 2 XORs and 2 inverters: two
asynchronously set registers and one plain register. That matches the
3-flip-flop, 2-LUT, 4-I/O result of the original FPGA implementation.

For the reference FPGA setup (Spartan-3, xc3s400-4tq144), the pins were:
`clk` P84, `enc_di` P86, `reset_l` P89, `dec_do` P74. Keep these in the board
constraint file. They are not part of the RTL.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and ends with `$finish`, and a watchdog stops it if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl \
      rtl/nrzi_pkg.sv rtl/nrzi_set_ff.sv rtl/nrzi_encoder.sv \
      rtl/nrzi_decoder.sv rtl/nrzi_top.sv tb/tb_nrzi_top.sv \
      --top-module tb_nrzi_top -o sim
    ./obj_dir/sim

Use `tb_nrzi_set_ff`, `tb_nrzi_encoder` or `tb_nrzi_decoder` in place of
`tb_nrzi_top` to test a single module. Each testbench runs in well under a
second.

What is checked:

- **`tb_nrzi_set_ff`**: the register captures on rising edges only. It holds
  across falling edges and mid-cycle data changes. The set takes effect
  without a clock and overrides the data.
- **`tb_nrzi_encoder`**: two encoders, one per convention, run on random bits
  and on long runs of 0s and 1s. Each is compared with the testbench's own
  line model after every edge. An asynchronous reset is applied mid-stream.
- **`tb_nrzi_decoder`**: the testbench generates line streams for both
  conventions and checks that each decoded bit appears one period after its
  line level. Two resets are applied.
- **`tb_nrzi_top_toggle_on_one`**: the same end-to-end test with
  `CONV = NRZI_TOGGLE_ON_ONE`.
- **`tb_nrzi_top`**: the complete codec at its default parameters, over
  more than 1000 bits. After every edge it checks that `dec_do` equals the
  bit from two periods earlier. It follows the internal line against a model
  and measures the latency of an isolated 0 (it must be 2). It also applies
  an asynchronous reset mid-stream. It counts line toggles, line holds, runs
  of 16 or more 0s and 1s, resets and latency measurements, and fails if any
  of them never happens.

## Design choices not fixed by the original circuit

- The convention parameter `CONV` and its alternative setting (see above).
- The set value of the output registers is 1, taken from their S (set) pin.
  The resulting idle line level is 1.
- The original drawing labels the output registers "SR flip-flops". They are
  implemented as D flip-flops with an asynchronous set, because that is how
  they are wired: data into D, reset into S. There is no R pin, so an SR
  latch's forbidden S=R=1 state cannot occur.
- The original text says the decoder works "at both the high and low
  signals". This is read as "decodes both line levels". Both halves are
  single-edge (rising) designs.
