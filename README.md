# LFSR stream cipher (8-bit)

A linear-feedback shift register (LFSR) produces a byte sequence that looks random but is
fully determined by its starting value, the seed. XOR a message byte with the current
register value and you get a cipher byte. XOR that cipher byte with the same register value
and you get the message back. Two parties that share the seed and step their registers in
lockstep therefore have a stream cipher that costs eight flip-flops and a handful of XOR
gates per end. That is the whole idea of this design. It is a teaching circuit, not a secure
cipher: the register has only 255 states, and the key stream is linear.

The RTL contains two independent designs on one clock:

* `encryptor`: a sender and a receiver LFSR wired back to back through a "channel", so you
  can watch a message go out encrypted and come back in clear.
* `lfsr_fwd3`: the same LFSR with next-state logic that jumps three states per clock.

## The key stream

The state `q[7:0]` shifts right by one place per step. The bit that leaves position 0 goes
back in at position 7. On the way it is XNORed into positions 3, 4 and 5:

```
d[7] = q[0]
d[6] = q[7]
d[5] = q[0] XNOR q[6]
d[4] = q[0] XNOR q[5]
d[3] = q[0] XNOR q[4]
d[2] = q[3]
d[1] = q[2]
d[0] = q[1]
```

Another way to say the same thing: rotate right by one, then, if the bit that rotated out was
0, XOR in `8'h38`. The testbenches use that second form as their reference model, so the
model does not share code with the RTL.

Because the taps use XNOR, the all-ones state `8'hFF` maps to itself. Every other state lies
on one cycle of 255 states. From the default seed `8'h34` the sequence starts

```
34 22 29 94 72 01 80 78 04 3A ...
```

Worked example. After loading `8'h34`, the message bytes `67 6A D1` encrypt to `53 48 F8`.
Thirty-six steps after `8'h34` the register holds `8'h1C`. From there, the text "Goodbye"
encrypts to `5B 59 4C F5 AA 25 73`. Both examples are checked in the testbenches.

Do not use `8'hFF` as a seed. The register would stay at `FF` and every byte would simply be
inverted.

## Blocks

### `lfsr`: one end of the link

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `clk`  | in  | 1 | clock |
| `en`   | in  | 1 | clock enable. The state changes only on rising edges where `en = 1` |
| `load` | in  | 1 | `1`: the next enabled edge loads `seed`. `0`: it advances one state |
| `seed` | in  | 8 | shared secret |
| `min`  | in  | 8 | data in: plain text on the sending side, cipher text on the receiving side |
| `mout` | out | 8 | `min ^ q`. This is combinational |

Parameters: `WIDTH = 8` and `INIT = 8'h34`. The tap positions are fixed for 8 bits. An
elaboration-time assertion rejects any other `WIDTH`.

Timing:

* The key for a byte is the state during that clock cycle.
* `mout` follows `min` within the same cycle, with no register on the data path.
* The enabled rising edge at the end of the cycle moves to the next key.
* After a load edge, the first key used is the seed itself.
* The register powers up at `INIT`. There is no reset port: use `load` to start or restart
  the sequence.

### `encryptor`: sender and receiver back to back

Two `lfsr` instances share `clk`, `en`, `load` and `seed`:

* The sender `u_tx` turns the message `min` into the cipher byte `crypt`.
* The receiver `u_rx` takes `crypt` as its data input and returns `mout`.

Both registers always hold the same state, so `mout == min` in every cycle, and `crypt` shows
the bytes an eavesdropper on the link would see.

To send a message:

1. Hold `load = 1` and `en = 1` for one clock.
2. Drop `load`.
3. Present one message byte per enabled clock.

A byte takes one enabled clock and zero cycles of latency. Setting `en = 0` pauses both ends
together.

In a real link the two `lfsr`s sit at different places. Their `en` must then mark the same
bytes on both sides. Nothing in this design re-synchronises them.

### `lfsr_fwd3`: three states per clock

This block has the same ports and timing as `lfsr`. The difference is that each enabled edge
jumps three states ahead, so from the same seed it outputs every third byte of the `lfsr`
sequence. The jump is written as flat equations. They come from applying the single-step
rule three times:

```
d[7] = q[2]                     d[3] = ~(q[6] ^ q[0] ^ q[1] ^ q[2])
d[6] = q[1]                     d[2] =   q[5] ^ q[0] ^ q[1]
d[5] = ~(q[2] ^ q[0])           d[1] = ~(q[4] ^ q[0])
d[4] =   q[7] ^ q[1] ^ q[2]     d[0] = q[3]
```

Each output bit depends on at most four state bits, so the jump costs one level of logic.
The testbench checks all 256 states against three applications of the reference step.

### `lfsr_lab_top`

The top-level module places `encryptor` and `lfsr_fwd3` side by side, sharing only `clk`:

* The encryptor's ports keep their names.
* The three-step register's ports have a `fwd3_` prefix.

| module | flip-flops | other logic, after coarse synthesis |
|--------|-----------:|-------------------------------------|
| `lfsr` | 8 | one 8-bit mux, 3 XNOR, one 8-bit XOR |
| `encryptor` | 16 | two `lfsr` |
| `lfsr_fwd3` | 8 | 15 word-level cells |

## Choices made here

These are the points where this RTL departs from the original lab circuit, or fills in what
the lab left open:

* **Clock enable, not a gated clock.** The original circuit ANDs `en` into the clock. Here
  `en` is a synchronous enable on one clock. The two behave the same as long as `en` changes
  only while `clk` is low. If `en` rose while `clk` was high, the gated version would take an
  extra edge.
* **Combinational next state.** The next-state logic depends on `q`, `seed` and `load`, as
  synthesis of the original description would build it. The original description lists
  only `load` and `min` as triggers for that logic. A simulator honouring that list would
  stop updating the next state while `min` and `load` stay constant. This design does not
  reproduce that quirk.
* **Power-up value instead of reset.** The state register has a declaration initialiser
  (`INIT`). It works on FPGAs and in simulation. An ASIC flow would need a reset added.
  Verilator notes the initialiser with a PROCASSINIT warning, which is expected.
* **Three-step equations.** The purpose of `lfsr_fwd3` (advance three states at once) and
  its equations for bits 7, 6, 3 and 2 follow the original exercise. The equations for bits
  5, 4, 1 and 0 are derived from the single-step rule. The original exercise lists
  `d[5] = 0` and different terms for bits 4 and 1. Those equations do not reproduce the
  sequence, and a constant bit cannot belong to this LFSR.
* **Where `lfsr_fwd3` goes.** It stands beside the cipher, with its own ports, because it is
  an exercise result with no stated place in the link.
* **Pin assignment.** No pin assignment for a development board is included.

## Verifying and simulating

`tb/` holds one self-checking testbench per module, plus `lfsr_ref_pkg`, the reference
model. Each testbench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it
hangs.

| testbench | what it covers |
|-----------|----------------|
| `lfsr_tb` | Power-up state, load ignored while disabled, the `67 6A D1` example, the 255-state period, "Goodbye", 1000 random cycles of enable, load and data |
| `lfsr_fwd3_tb` | Every state's jump, every third key from `8'h34`, the "Goodbye" bytes that fall on multiples of three, random cycles |
| `encryptor_tb` | Replays the original 10 ns stimulus (seed `FF` while disabled, then seed `34`, then `67 6A D1`, then hold). Then sends "Hello from the ECE department." with random idle cycles and checks one enabled clock per byte. Then "Goodbye" |
| `lfsr_lab_top_tb` | Full design at default parameters. Sends both messages through the cipher while the three-step register, enabled every third cipher step, must match the cipher's key. It counts loads, steps, holds, decryptions, jumps and three-step holds, and fails if any count is zero |

Run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module lfsr_lab_top_tb -Irtl -Itb \
    rtl/lfsr_pkg.sv tb/lfsr_ref_pkg.sv rtl/lfsr.sv rtl/lfsr_fwd3.sv \
    rtl/encryptor.sv rtl/lfsr_lab_top.sv tb/lfsr_lab_top_tb.sv
./obj_dir/Vlfsr_lab_top_tb
```

For another testbench, swap in its top module and files. Each run takes well under a second.

To change the sequence:

* For a new seed, drive a different `seed`, or change `INIT` for the power-up value.
* New taps go in `lfsr_step` in `rtl/lfsr_pkg.sv`. The three-step equations in
  `rtl/lfsr_fwd3.sv` and `TAP_MASK` in `tb/lfsr_ref_pkg.sv` must then be derived again.
