# CMAC associative memory in SystemVerilog

A CMAC (Cerebellar Model Articulation Controller) network is a learning
look-up table. An input vector excites exactly C cells, one in each of C
overlapping, displaced tilings ("receptive fields") of the input space. The
output is the sum of the weights of those C cells. Nearby inputs share most of
their cells, so the table generalises. Training is linear: add a correction to
each excited weight. Because only C weights out of a huge virtual table are
touched per input, the whole network is an address generator, a RAM and an
accumulator.

This RTL implements that machine in the form used by a 1990-era VME
associative-memory card built by Miller, Box, Whitney and Glynn (University of
New Hampshire and Shenandoah Systems). The card has two logic cell arrays. One
maps an input vector to RAM addresses. The other accumulates the responses and
adjusts the weights. Around them sit one million 8-bit weights of static RAM
and a microcontroller that talks to the host. Its published capabilities set
the default sizes here:

| quantity | value |
|---|---|
| virtual networks per card | 1 to 8 |
| inputs per network | 1 to 512, 16 bits each |
| outputs per network | 1 to 8, 16 bits each, computed in parallel |
| overlapping receptive fields | 2 to 256 |
| weights | 1,048,576 of 8 bits |
| RAM address per field | 18 bits |

The original card's address mapping, memory layout, timing and host protocol
were not published in detail. Everything at that level in this RTL is a
choice made here. The section "What follows the original card" says which
parts are which.

## Data flow

```
 host ──cfg──► config table (8 × net_cfg_t)
 host ──in───► input_fifo ──x_i, one per clock──► assoc_map ──addr──┐
                    ▲ rewind per field               ▲ start(k)     │
                    └──────────── sequencer (cmac_top) ─────────────┤
                                                                   ▼
 host ◄─result── resp_accum (8 sums) ◄──rdata── weight_ram (2^18 × 32)
                          └──────wdata (training)──────►┘
```

A command runs the receptive fields one after another through a single
mapper. This is how the card used one mapping chip for every field. For field
k the sequencer rewinds the input FIFO and clocks all N components into the
mapper. It then waits for the field's address and does one or two RAM words
of work.

## The address mapping (`assoc_map`)

This is the core idea, and the part that needs the most care to understand.

1. **Quantize with a per-field offset.** For field k of C, each component x
   becomes q = floor((x + k) / C). Field k is therefore a grid of C-wide cells
   shifted by k units. Two inputs that differ by d < C in one component fall
   into the same cell in C − d of the C fields. Components are unsigned.
   Add 32768 to signed data first, so that −1 and 0 stay neighbours. This is the CMAC
   generalisation property. `assoc_map_tb` checks it: a change of 3 with C = 16
   keeps 13 of 16 addresses.
2. **Hash while the address is formed.** The tuple (network, k, q_1 … q_N) is
   far too wide for a RAM. Each 17-bit q is therefore folded, most
   significant bit first, into an 18-bit CRC register with generator
   x^18 + x^7 + 1. The register starts from {network, k}. One component goes
   in per clock, so the hash is ready two cycles after the last component:
   one pipeline stage registers q, the next updates the CRC.
3. Because the network number is in the seed, the eight virtual networks
   share the whole memory and need no partitioning. Hash collisions between
   cells behave as in any hashed CMAC: they add a small amount of noise.

The divider is combinational (17 bits by 9 bits). If you change the
quantization, for example to per-dimension displacements, change the
reference function in `tb/assoc_map_tb.sv` and `tb/cmac_top_tb.sv` to match.

## Weight memory layout

One million 8-bit weights behind an 18-bit address means four weights per
address. `weight_ram` is therefore 2^18 words of 32 bits: four lanes of
8 bits.

* Networks with **1 to 4 outputs** use one word per field, at the mapped
  address. Lane c is output c.
* Networks with **5 to 8 outputs** use two words per field:
  `{addr[17:1], 0}` holds outputs 0 to 3 and `{addr[17:1], 1}` holds outputs
  4 to 7. Such networks therefore hash into 2^17 cell slots.

The RAM is synchronous, with one access per clock and data on the next
cycle. It is not reset. Run `OP_CLEAR` once after power-up.

## Accumulation and training (`resp_accum`)

There are eight signed 16-bit sums. Each RAM word adds its four weights,
sign-extended, to the sums of its channel group. Channels above the
network's output count are masked. 256 fields of weights in −128…127 give at
most −32768…32512, so the sums cannot overflow.

For training, each active lane's weight plus that channel's signed 8-bit
adjustment is clipped to −128…127 and written back. The `sat` output flags
each clipped lane. The host computes the adjustment, typically
β·(target − output)/C from a preceding response. The accumulator does not
compute it. A training command also returns the sums of the weights as they
were before the adjustment.

## Host interface and commands (`cmac_top`)

On the card, a microcontroller sat between the VME bus and the logic. Here
that side is a set of plain ports:

* `cfg_we`, `cfg_net`, `cfg_data`: write one network's `net_cfg_t`, which
  holds inputs−1, outputs−1 and fields−1. The write is accepted only while
  idle.
* `in_flush`, `in_we`, `in_data`: empty the input FIFO, then push the
  components. The FIFO keeps its contents across commands, so a training
  command can reuse the vector of the preceding response. `in_count` shows
  the fill level.
* `cmd_valid`/`cmd_ready`: a command is accepted on a cycle where both are
  high. `cmd_op`, `cmd_net` and `cmd_adjust` are sampled then. `cmd_ready` is
  high only while idle.
* `done`: a one-cycle pulse at the end of the command. `result` then holds
  the eight sums until the next command starts.

| `cmd_op` | action |
|---|---|
| `OP_RESPOND` | sum the C excited weights of each output |
| `OP_TRAIN` | add `cmd_adjust[ch]` to every excited weight of each active output, clipped |
| `OP_CLEAR` | write zero to all 2^18 words |

Assertions check two rules. The FIFO must hold the whole vector when a
mapping command is accepted. A command waiting for `cmd_ready` must hold its
operands.

### Timing

Per field: 1 cycle to start, N cycles to clock the inputs, 3 cycles of FIFO
and mapper latency, then 2 cycles per RAM word (read, then accumulate or
write back). A command therefore takes `C·(N + 4 + 2W) + 1` cycles from
acceptance to `done`, where W is 1 for up to four outputs and 2 otherwise.
`OP_CLEAR` takes 2^18 + 1 cycles. The end-to-end testbench checks both
formulas exactly.

The card's typical case is 32 inputs, 8 outputs and 8 to 256 fields. That is
321 cycles at C = 8 and 10,241 cycles at C = 256. The card's design target
was well under a millisecond per command. This design meets it at C = 256 for
clock rates of 10.25 MHz or more. Every access is a single clock, so the clock
period must cover one RAM access.

## What follows the original card, and what does not

These follow the card:

* One mapping circuit that takes the fields in sequence.
* Input components clocked one by one from a buffer FIFO.
* A recursively formed, pipelined, hashed 18-bit RAM address.
* One accumulator with eight parallel output channels.
* Response by summing the excited weights, and training by adding an
  adjustment to each excited weight and writing it back.
* One million 8-bit weights.
* Up to eight virtual networks with the ranges listed above.

These are choices made in this design:

* The quantization formula, the CRC hash and its seed. The card used an
  unpublished "bit recursive" scheme in the spirit of Albus' mapping.
* The four-weights-per-word memory layout and the two-word fields.
* Signed weights with clipping.
* The command set. `OP_CLEAR` in particular is an addition.
* The configuration encoding, the handshake and the cycle schedule.
* Synchronous RAM in place of 85 ns asynchronous SRAM.

These are not modelled:

* The microcontroller and its firmware.
* The VME bus interface.
* The configuration PROMs of the logic cell arrays.
* The parallel multi-field address generators that the designers mention as
  an option.
* The 16-bit-weight variant of a later commercial PC-AT card.

## Files

| file | content |
|---|---|
| `rtl/cmac_pkg.sv` | sizes, `net_cfg_t`, `op_e` |
| `rtl/input_fifo.sv` | rewindable 512 × 16 input buffer |
| `rtl/assoc_map.sv` | quantize-and-hash mapper |
| `rtl/resp_accum.sv` | 8-channel accumulator and weight adjuster |
| `rtl/weight_ram.sv` | 2^18 × 32 weight memory |
| `rtl/cmac_top.sv` | configuration table, sequencer, top level |
| `tb/*_tb.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M`. `cmac_top_tb` runs
the whole design at full size: a full memory clear, and networks of
32×8×256, 512×1×2, 5×3×8 and 3×6×2. It compares every result with an
independent model that keeps its own copy of the weights. It also counts how
often each mechanism occurred and fails if any count is zero. The mechanisms
are clear, response, training, one-word and two-word fields, clipping,
vector reuse, busy hold-off with a back-to-back command on another network,
and several configured networks.

`cmac_timing_tb` runs the card's reference workload: 32 inputs, 8 outputs
and 8, 16, 32, 64, 128 or 256 fields. Each run does a response, a training
step and a response, with results checked. The test prints the cycle count
of each command and the clock rate at which the command takes 1 ms:

| fields | cycles per command | clock for 1 ms |
|---|---|---|
| 8 | 321 | 0.321 MHz |
| 16 | 641 | 0.641 MHz |
| 32 | 1,281 | 1.281 MHz |
| 64 | 2,561 | 2.561 MHz |
| 128 | 5,121 | 5.121 MHz |
| 256 | 10,241 | 10.241 MHz |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cmac_pkg.sv rtl/*.sv \
    tb/cmac_top_tb.sv --top-module cmac_top_tb
./obj_dir/Vcmac_top_tb
```

For a single block, use its module file and testbench, for example
`rtl/cmac_pkg.sv rtl/assoc_map.sv tb/assoc_map_tb.sv --top-module assoc_map_tb`.
The full-size end-to-end run takes about ten seconds. The sizes live in
`cmac_pkg`. The submodules take them as parameters: `input_fifo` uses DEPTH
and WIDTH, `weight_ram` uses ADDR_W and WORD_W, and `assoc_map` uses its
polynomial.
