# Feed-forward convolutional encoder, rate 1/2, constraint length 3

A convolutional encoder adds controlled redundancy to a serial bit stream so
that a receiver (typically a Viterbi decoder) can correct channel errors
without asking for a retransmission. This design is the smallest useful
member of the family: for every data bit it emits two code bits, each the
modulo-2 sum of the current bit and some of the two bits before it. It is
the well-known (7,5) code, with generator polynomials 111 and 101.

The whole circuit is three flip-flops and three two-input XOR gates.

## The code

The encoder is a four-state machine. Its state (S1,S0) holds the last two
input bits, S1 the newer one. For an input bit u:

| u | state (S1,S0) | next state | q0 (V1) | q1 (V2) |
|---|---------------|------------|---------|---------|
| 0 | 00 | 00 | 0 | 0 |
| 1 | 00 | 10 | 1 | 1 |
| 0 | 01 | 00 | 1 | 1 |
| 1 | 01 | 10 | 0 | 0 |
| 0 | 10 | 01 | 1 | 0 |
| 1 | 10 | 11 | 0 | 1 |
| 0 | 11 | 01 | 0 | 1 |
| 1 | 11 | 11 | 1 | 0 |

which is the same as

    next state = (u, S1)
    q0 = u ^ S1 ^ S0     generator 111
    q1 = u ^ S0          generator 101

In trellis form, every state has two branches, labelled `u/q0q1`; from
state 00 they are `0/00` (staying in 00) and `1/11` (to 10).

## Structure

    d ──► [FF0] ──► [FF1] ──► [FF2]         conv_shift_reg
            │ u       │ S1      │ S0
            ├─────────┼─────────┤
            ▼         ▼         ▼
          XOR(u,S1,S0) ─► q0    XOR(u,S0) ─► q1     two conv_mod2_adder
          ffout = {FF1, FF0}

| file | contents |
|------|----------|
| `rtl/conv_pkg.sv` | constraint length and the two generators, state struct |
| `rtl/conv_shift_reg.sv` | K-stage shift register with asynchronous clear |
| `rtl/conv_mod2_adder.sv` | one code bit: XOR of the taps a generator selects |
| `rtl/conv_encoder.sv` | the top: register plus two adders |

Tap i of the register is the bit sampled i+1 clock edges ago; bit i of a
generator selects tap i. `K`, `G0` and `G1` are parameters of
`conv_encoder`, so other feed-forward codes of rate 1/2 can be built by
changing them, but only K = 3 with 111/101 has been checked against the
table above.

## Ports and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one data bit per rising edge |
| `rst` | in | 1 | asynchronous, active high; clears the register (state 00) |
| `d` | in | 1 | serial data |
| `q0` | out | 1 | first code bit of the last sampled data bit |
| `q1` | out | 1 | second code bit of the last sampled data bit |
| `ffout` | out | 2 | `{previous bit, newest bit}`: the state the next bit meets, S1 in bit 0 |

The input is registered: the bit on `d` at a rising edge is shifted into the
first flip-flop, and its code bits appear on `q0`/`q1` right after that edge
and hold for the whole next cycle. So the latency is one clock and the
throughput one data bit (two code bits) per clock. All outputs come from
flip-flops through at most two XOR levels, so the encoder adds almost
nothing to the timing path of whatever follows it.

Example, starting from reset, data `1 0 1 1 0 1`:

| clock | 1 | 2 | 3 | 4 | 5 | 6 |
|-------|---|---|---|---|---|---|
| d     | 1 | 0 | 1 | 1 | 0 | 1 |
| q0    | 1 | 1 | 0 | 0 | 0 | 0 |
| q1    | 1 | 0 | 0 | 1 | 1 | 0 |
| ffout | 1 | 2 | 1 | 3 | 2 | 1 |

Serialising the two code bits onto one line, or flushing the register with
two zero bits to end a frame in state 00, is left to the surrounding system.

## Where this RTL makes its own choices

The state table, the generators, three flip-flops, three XOR gates and the
port set (`clk`, `rst`, `d`, `q0`, `q1` and a state bus, seven pins in all)
are those of the reference design, which was implemented in a Cyclone II
FPGA using 3 registers and 7 pins, and as a full-custom CMOS layout. The
following are this implementation's choices:

- Reset is asynchronous and active high.
- The data bit is registered in the first flip-flop, which gives the one
  clock of latency described above.
- `ffout` is two bits wide with the newest bit in bit 0; this ordering gives
  the state sequence 1, 2, 1, 3 for the data 1, 0, 1, 1.
- A published waveform of the reference design lists q0 for the data
  `101101` as `110001`. The state table gives `110000`, and this RTL
  follows the state table; q1 (`100110`) agrees with both.

Not included: the transistor-level cells (XOR, transmission-gate
flip-flop), the bonding pads and the layout of the fabricated chip, and a
Viterbi decoder for this code, for which no architecture is specified.

## Verification

Each module has a self-checking testbench in `tb/`; each prints one line
`TB_RESULT checks=N failures=M`.

- `tb_conv_mod2_adder`: all eight tap patterns for generators 111 and 101
  against the state table, plus generator 011 to prove the generator is a
  real parameter.
- `tb_conv_shift_reg`: random bits into K = 3 and K = 5 registers against
  a history kept by the testbench; reset asserted between clock edges
  must clear the register at once.
- `tb_conv_encoder`: the top at its default parameters. It runs the
  example above, then 4000 random bits with random resets, checking `q0`,
  `q1` and `ffout` after every edge against the state table (kept in
  `tb/conv_ref_pkg.sv` as a lookup table, not as XOR equations). It counts
  how often each of the eight transitions was taken and fails if one never
  was, and checks that exactly one code-bit pair is produced per clock.

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      --top-module tb_conv_encoder rtl/conv_pkg.sv tb/conv_ref_pkg.sv \
      tb/tb_conv_encoder.sv
    ./obj_dir/Vtb_conv_encoder

Each testbench finishes in well under a second.
