# Keccak-f[1600] hash core for a RISC-V post-quantum SoC

The signature scheme CRYSTALS-Dilithium spends most of its software run time
in one function, the Keccak-f[1600] permutation. It calls it more than a
million times in a typical profiling run, for hashing, for expanding the
public matrix and for sampling. This RTL is the hardware block meant to take
that permutation off a small RV32IM microcontroller core. It is a complete
Keccak sponge hash core. Message words go in, the core pads the message,
absorbs it block by block and runs 24 rounds per block, one round per clock.
The first r bits of the final state come out.

The default configuration is the one the design description settles on:
rate r = 576 bits, capacity c = 1024 bits and a 1600-bit state, with the
original Keccak padding. The default is therefore **Keccak-512**: the 512-bit
digest is the top 512 bits of `data_out`. Three parameters change the
sponge, and the same RTL then computes SHA3-512, or the first output block
of SHAKE128 or SHAKE256.

## Organisation

```
            data_in (64) / valid / done / byte_num
                     |
              +--------------+   raw words, end position   +---------+
              | input buffer |---------------------------->| padder  |
              +--------------+                             +---------+
        blk_valid |   ^ blk_ack                                 | padded block
                  v   |                                         v
              +------------+  run/absorb/init/round   +------------------------+
              | controller |------------------------->| Keccak round           |
              +------------+                          |  2:1 input mux         |
                  ^   | capture                       |  theta-rho-pi-chi-iota |
         out_full |   v                               |  1600-bit state reg <--+ feedback
              +---------------+        state          +------------------------+
              | output buffer |<-----------------------------------'
              +---------------+
                     |
              data_out / valid / ack
```

| module | role |
|---|---|
| `keccak_top` | wires the five units together; the design's top |
| `keccak_input_buffer` | gathers 64-bit words into one r-bit block, holds it until absorbed |
| `keccak_padder` | byte inversion of each word into lane order, pad10*1 on the last block |
| `keccak_controller` | three-state FSM: wait for a block, run rounds, hand over the result |
| `keccak_round` | state register, round-input multiplexer, one round of Keccak-f |
| `keccak_theta`, `keccak_rho`, `keccak_pi`, `keccak_chi`, `keccak_iota` | the five step mappings |
| `keccak_output_buffer` | registers the first `OUT_BITS` of the state as a byte string |
| `keccak_pkg` | lane/state types, round constants and rho offsets (computed), FSM encoding |

The division into units follows the published architecture: input buffer,
padder, controller, one iterated round and output buffer. The word width,
all handshakes, the FSM and the exact placement of the multiplexer are
choices made for this RTL, because the architecture does not specify them.

## The state and the round

The state is 25 lanes of 64 bits. Lane (x, y) is element `x + 5*y` of
`keccak_pkg::state_t`, a packed `[24:0][63:0]` array. Lane 0 is therefore
the least significant 64 bits of the flat 1600-bit vector, which is the
standard Keccak bit numbering. A rate block of r bits covers lanes 0 to
r/64 - 1.

One round maps the state A through five steps. Indices are taken modulo 5.

| step | operation |
|---|---|
| theta | `C[x] = XOR_y A[x,y]`; `A[x,y] ^= C[x-1] ^ rotl(C[x+1],1)` |
| rho | `A[x,y] = rotl(A[x,y], r[x,y])`, with a fixed offset per lane |
| pi | lane (x,y) moves to (y, 2x+3y) |
| chi | `A[x,y] ^= ~A[x+1,y] & A[x+2,y]`, the only nonlinear step |
| iota | `A[0,0] ^= RC[i]` for round i |

There are no typed-in tables in the RTL. `keccak_pkg` computes both sets of
constants when the design is elaborated:

* RC[i]: bit 2^j - 1 of the constant is `rc(j + 7i)`, for j = 0..6. `rc(t)`
  is the output of the LFSR with polynomial x^8+x^6+x^5+x^4+1 after t steps.
* r[x,y]: start at (1,0) and repeatedly step (x,y) -> (y, 2x+3y). The lane
  reached at step t (t = 0..23) gets offset (t+1)(t+2)/2 mod 64. Lane (0,0)
  gets offset 0.

rho and pi are pure wiring. theta, chi and iota are one level of XOR/AND
logic each, so a round is a few gate levels deep on each of the 1600 bits.

`keccak_round` holds the state register and a 2:1 multiplexer in front of
theta. In an *absorb* cycle the multiplexer passes the state XORed with the
padded block. In the other cycles it passes the state itself, which is
iota's output from the previous cycle fed back. With `init` set, the state
is read as zero, so the first block of a message needs no extra clearing
cycle. Absorbing a block and running round 0 happen in the same clock.

## Feeding a message

Messages are sent as 64-bit words:

* The first message byte of a word is in `data_in[63:56]`, the next in
  `[55:48]`, and so on (big-endian).
* A word is taken on a clock edge where `data_in_valid && data_in_ready`.
* The **last** word of a message carries `done = 1`, and `byte_num`
  (0..7) gives how many of its bytes belong to the message. Its other bytes
  are ignored.
* A message whose length is a multiple of 8 bytes therefore ends with an
  extra `done` word with `byte_num = 0`. So does the empty message.

Keccak numbers the bytes within a lane little-endian. The padder reverses
the eight bytes of every word, so that message byte 0 lands in bits 7:0 of
lane 0. In the last block it then clears everything after the message end
and applies pad10*1 at byte granularity:

* `PAD_BYTE` is XORed into the first free byte.
* `8'h80` is XORed into the last byte of the block (byte r/8 - 1).

When the message ends one byte before the block boundary, both land on the
same byte, giving `8'h81`. When the message fills a block exactly, that
block is absorbed unpadded, and the final `done` word with no bytes
produces a block that holds nothing but padding.

## Timing and flow control

| event | cycles |
|---|---|
| one block permutation (absorb + rounds 0..23) | 24 |
| word that completes a block -> block offered to controller | 1 |
| round 23 of the last block -> result captured (output buffer free) | 1 |
| single-block message on an idle core, `done` word taken -> `data_out_valid` | 26 |

The input buffer has one block of storage. When the controller acknowledges
a block (together with its round 0), the buffer is free again. At one word
per clock it gathers the next block (9 words at r = 576) while the remaining
23 rounds run. With the input kept busy, blocks are therefore absorbed every
24 cycles. `data_in_ready` is low only while a complete block waits for the
controller.

The output buffer holds a result, with `data_out_valid` high, until
`data_out_ack`. If the next message finishes while an unread result is
still held, the controller waits in its output state. It does not overwrite
the result and accepts no new block until the result is acknowledged.
`busy` is high whenever the controller is not waiting for a block.

At r = 576 and 24 cycles per block, the throughput is 24 bits per clock:
6.2 Gbit/s at 258.6 MHz.

## Parameters and configurations

`keccak_top` has three parameters. The defaults are those of Keccak-512.

| parameter | default | meaning |
|---|---|---|
| `RATE` | 576 | rate r in bits; a multiple of 64, at most 1536 |
| `OUT_BITS` | 576 | bits of the state given out; a multiple of 64, at most `RATE` |
| `PAD_BYTE` | `8'h01` | first padding byte (domain bits plus the first 1 of pad10*1) |

| function | `RATE` | `PAD_BYTE` | result |
|---|---|---|---|
| Keccak-512 (default) | 576 | `8'h01` | `data_out[575:64]` |
| SHA3-512 | 576 | `8'h06` | `data_out[575:64]` |
| SHAKE256 | 1088 | `8'h1F` | first 136 output bytes |
| SHAKE128 | 1344 | `8'h1F` | first 168 output bytes |

## Departures and limits

* **One round per clock.** The architecture is described as pipelined. Its
  block diagram, however, shows a single round whose output loops back to
  its input, and that is what is built. The published FPGA figure of
  10.77 Gbit/s at 258.6 MHz would need about 14 cycles per 576-bit block;
  this core takes 24.
* **No squeeze.** Only the first r bits of output are produced. That
  suffices for Keccak-512 and SHA3-512. SHAKE outputs longer than one block,
  which Dilithium uses to expand its matrix, would need further permutations
  between output blocks. They are not implemented.
* **No processor interface.** Attaching the core to the RISC-V core (for
  example through memory-mapped registers on its Wishbone bus) is not
  specified and is not provided. The host core and its memories, UART,
  timer and debug peripherals are existing designs and are not part of this
  RTL.
* **Padding default.** The original Keccak padding (`8'h01`) was chosen to
  match the Keccak-512 parameters. It is a parameter because Dilithium's
  SHAKE functions need `8'h1F`.
* **Block path.** Every block reaches the round through the padder. For
  blocks other than the last, the padder only reverses the bytes of each
  word. The published block diagram also draws a direct path from the input
  buffer to the round.
* **Reset** is synchronous and active low (`rst_n`), and clears every
  register.

## Fault propagation

The core has one module per step, so a fault injected at the round input
can be followed step by step. `tb_keccak_fault_injection` runs two step
chains side by side. It flips each of the 1600 input bits in turn and
counts how many output bits differ after each step.

* **theta:** one flipped bit changes two column parities, which changes
  five bits in each of two neighbouring columns. Every single-bit fault
  therefore gives exactly 11 faulty bits after theta.
* **rho and pi:** these steps only move bits, so the count stays at 11.
* **chi:** the count grows, depending on the data, to between 15 and 30.
* **iota:** it adds a constant and leaves the count as chi left it.

The published fault analysis of this architecture reports 11-bit errors
for 99.36 % of its injected faults and 10-bit errors for the remaining
0.64 %. The 11-bit case matches. A 10-bit result cannot arise from a single
flipped input bit in theta, so it is not reproduced. The testbench also
prints the size distribution for random 2- to 8-bit faults.

## Verification

Each unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. The expected
values come from `tb/keccak_ref_pkg.sv`, a software sponge written
separately from the RTL. It uses the published round-constant and rho
tables typed in, and indexes the state as a `[x][y]` array. The model
reproduces Keccak-512(""), SHA3-512(""), SHAKE128("") and SHAKE256(""),
and the first lane of Keccak-f applied to the zero state
(`F1258F7940E1DDE7`).

| testbench | what it checks |
|---|---|
| `tb_keccak_theta` .. `tb_keccak_iota` | each step on single-bit and random states, iota for all 24 rounds |
| `tb_keccak_padder` | every end position in a block, `8'h81`, padding-only block, unpadded blocks |
| `tb_keccak_input_buffer` | block contents, last flag, end position, backpressure, random gaps and acks |
| `tb_keccak_controller` | cycle-exact sequence of ack, absorb, init, round index, capture; output stall |
| `tb_keccak_round` | every round of several permutations, multi-block absorb, hold, zero-state answer |
| `tb_keccak_output_buffer` | byte order, hold until ack, full flag |
| `tb_keccak_top` | 42 messages of 0 to 400 bytes at default size; Keccak-512("") answer; 26-cycle latency; 24 round cycles per block; counts backpressure, output stalls, overlap of input with rounds, multi-block messages, `8'h81` and padding-only blocks |
| `tb_keccak_fault_injection` | fault propagation through one round (see below) |
| `tb_keccak_workloads` | SHAKE256, SHAKE128 and SHA3-512 configurations against the model and the published empty-message answers |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -yrtl -ytb \
    rtl/keccak_pkg.sv tb/keccak_ref_pkg.sv tb/tb_keccak_top.sv \
    --top-module tb_keccak_top
./obj_dir/Vtb_keccak_top
```

Use the same command for the other testbenches, changing the file and
the top module. Every testbench finishes in well under a second.

The design contains a few concurrent assertions:

* an acknowledge is only given for a waiting block;
* the input buffer's word counter stays in range;
* no result is captured over an unread one.
