# PWM all-digital transmitter

This transmitter sends an I/Q signal on a single digital output pin. No DAC
and no analog mixer sit between the data and the pin. Two steps replace the
analog chain:

1. **Pulse-width modulation** turns each M-bit sample into a two-level
   pulse whose width carries the value.
2. **Up-conversion by bit reordering**: bits are reordered and some are
   inverted, so that the stream carries the samples on a carrier at f_C.

The output is a unipolar return-to-zero (RZ) square wave at f_C whose pulses
are cut short or stretched by the PWM. A reconstruction filter after the pin,
which is outside this RTL, would keep the wanted band. The spectrum at the
pin holds two sets of lines:

- PWM harmonics, spaced by the baseband rate f_BB;
- RZ carrier harmonics at the odd multiples of f_C.

A higher resolution M pushes the PWM harmonics down toward the noise floor.
At M = 9 they are hard to see. The energy they lose moves into the RZ
harmonics. This RTL builds the transmitter at M = 9 and can be rebuilt at any
M ≥ 1.

## Data path

```
 comm_source (I) ─ sample_i ─ pwm_mapper ─ pwm_i ─┐
                                                   ├─ select_combine ─ frame ─ serializer ─ tx_out
 comm_source (Q) ─ sample_q ─ pwm_mapper ─ pwm_q ─┘                            │
        ▲                                                                      │
        └────────────────────────── bb_step (load) ────────────────────────────┘
```

| stage | module | word in | word out |
|---|---|---|---|
| source | `comm_source` | – | M-bit random sample |
| PWM | `pwm_mapper` | M bits | 2^M bits |
| up-conversion | `select_combine` | 2 × 2^M bits | 2^(M+1)-bit frame |
| serializer | `serializer` | 2^(M+1) bits | 1 bit per clock |

`rtl/adt_pkg.sv` holds the defaults and helper functions. `rtl/adt_top.sv`
connects the stages.

## Clock and the baseband rate

There is one clock, `clk_tx`, which runs at the output bit rate 4·f_C. Each
carrier period is four output bits. The serializer counts frame bits. In the
last bit slot of each frame it asserts `load` (brought out as `bb_step`). At
that edge it captures the next frame, and both sources step to their next
sample. A frame has 2^(M+1) bits, so

    f_BB = 4·f_C / 2^(M+1)

| M | f_C | clk_tx | frame | f_BB |
|---|---|---|---|---|
| 4 | 500 kHz | 2 MHz | 32 bits | 62.5 kHz |
| 9 | 500 kHz | 2 MHz | 1024 bits | 1.953 kHz |
| 6 | 2.5 GHz | 10 GHz | 128 bits | 78.125 MHz |

The clock must come from a PLL. For example, 50 MHz / 25 gives 2 MHz for
f_C = 500 kHz. The PLL is not part of this RTL.

Published descriptions of this kind of transmitter clock the baseband stages
from their own PLL outputs. This design uses one clock with an enable instead.
The behaviour is the same, and there is no clock-domain crossing.

**Pipeline.** The frame sent during baseband step p holds the samples read at
step p−1. After reset (`rst_n` low, synchronous), both sources hold 0. So the
first frame is two all-zero PWM words, which is the pattern `0011` repeated.
`tx_out` is registered, and each bit lasts exactly one clock.

## PWM mapping

Sample w maps to a word of 2^M bits. The first w bits are 1 and the rest are
0, so the duty cycle is w/2^M. For M = 3:

| w | bits in time order |
|---|---|
| 0 | 0000 0000 |
| 1 | 1000 0000 |
| 5 | 1111 1000 |
| 7 | 1111 1110 |

The largest sample never gives a fully high word. In the RTL, bit 0 is the bit
sent first.

## Up-conversion: Select and Combine

Sampled at 4·f_C, one output bit per sample, the cosine carrier is
+1, 0, −1, 0 and the sine carrier is 0, +1, 0, −1. So I·cos + Q·sin is I, Q,
−I, −Q in turn. For two-level signals, negation becomes inversion, and each
carrier period sends

    X_I, X_Q, ~X_I, ~X_Q

When both PWM signals are high, this is `1100` every period: a 50 % RZ square
wave at f_C. When both are low, it is `0011`, the same wave shifted by half a
period. Where an I or Q pulse ends inside a period, that period becomes `1001`
or `0110`. These are the "discontinuities" that carry the modulation.

Each carrier period uses **two** bits of each PWM word. Bit 2k is passed
through and bit 2k+1 is inverted:

    frame[4k+0] =  pwm_i[2k]      frame[4k+1] =  pwm_q[2k]
    frame[4k+2] = ~pwm_i[2k+1]    frame[4k+3] = ~pwm_q[2k+1]

This pairing is what makes a frame 2^(M+1) bits long, and so it matches the
f_BB formula above. The other obvious reading uses one bit of each channel per
period. It would double the frame to 2^(M+2) bits and halve f_BB. If your
reference system uses that reading, change the index expressions in
`select_combine` and the frame width in `adt_top`.

## Communication source

Each channel has a ROM of `DEPTH` (default 1024) M-bit words, read in address
order, one word per baseband step, wrapping at the end. The words stand in for
uniformly distributed random data. They are computed when the memory is
initialised, with a 32-bit maximal-length Galois LFSR (polynomial
x^32+x^22+x^2+x+1, feedback mask `32'h80200003`). The LFSR advances 32 steps
per word, and each word takes the low M bits of the state. The I and Q ROMs
use different seeds (`SEED_I`, `SEED_Q`). To send your own data, replace the
`initial` block in `comm_source` with a `$readmemh`.

## Serializer

The serializer is a frame register plus a bit counter driving a multiplexer.
This suits an FPGA at MHz bit rates. At GHz carriers, it would be replaced by
a multi-gigabit transceiver, with the frame as the transceiver's parallel
word. That is not included here.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `M` | 9 | lowest resolution at which the PWM harmonics reach the noise floor |
| `DEPTH` | 1024 | own choice |
| `SEED_I`, `SEED_Q` | `32'h1D872B41`, `32'h6A09E667` | own choice |

With M = 9, each `pwm_mapper` is 512 comparators. The frame register is 1024
flip-flops. The ROMs hold 2 × 9 × 1024 bits.

## What to trust, and what differs from the original transmitter

- The PWM table, the four-bit carrier pattern, the frame length and the f_BB
  relation follow the published transmitter.
- Own choices:
  - the pairing of PWM bits within a carrier period (see above);
  - the single clock with an enable;
  - the reset behaviour;
  - the one-frame pipeline delay;
  - the memory depth and the LFSR contents.
- Not built:
  - the PLL;
  - the multi-gigabit transceiver;
  - the polar-RZ output variant, which needs a level shifter;
  - the analog reconstruction filter.
- Resolution is fixed at build time. The M = 4 and M = 9 settings are two
  builds of the same RTL.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=F` and stops by itself.
Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pwm_mapper` | M = 3 table; all 512 words at M = 9 |
| `tb_select_combine` | hand-worked M = 2 case; constant patterns; random words at M = 9 |
| `tb_serializer` | bit order, one bit per cycle, load period exactly W (W = 8 and 1024) |
| `tb_comm_source` | reference LFSR, advance-only stepping, wrap, uniformity at M = 4 |
| `tb_adt_top` | default build (M = 9) end to end, 1030 frames, about 1 M cycles |
| `tb_adt_top_m4` | M = 4 build, 300 frames |

The two end-to-end tests use `tb/adt_tx_checker.sv`. It rebuilds the ROMs
with its own LFSR and predicts every output bit, and it checks that baseband
steps are exactly 2^(M+1) clocks apart. It also fails the run if any of the
following never happened:

- a baseband step;
- a memory wrap;
- each of the four carrier patterns `1100`, `0011`, `1001` and `0110`.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_adt_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/adt_pkg.sv tb/tb_adt_top.sv
./obj_dir/Vtb_adt_top
```

The full-size run takes a few seconds.
