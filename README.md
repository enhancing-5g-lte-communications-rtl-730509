# Layered min-sum QC-LDPC decoder

This repository holds synthesizable SystemVerilog for an iterative LDPC decoder.
It corrects a block of 672 code bits. Two code rates are selectable at run time:
rate 1/2 (336 information bits) and rate 13/16 (546 information bits).

The channel delivers one soft value (log-likelihood ratio, LLR) per code bit.
The decoder refines these values by passing messages between bit nodes and parity
checks until every parity check holds or an iteration limit is reached. It then
streams out the corrected information bits.

The architecture is a *layered, offset min-sum* decoder for a
*quasi-cyclic* (QC) code:

- **QC code.** The parity-check matrix is a 8 x 16 (rate 1/2) or 3 x 16 (rate 13/16)
  grid of 42 x 42 blocks. Each block is either zero or a cyclically shifted
  identity matrix. All 42 rows of a block row ("layer") are therefore processed
  in parallel by 42 identical lanes. A block column's 42 values move as one word.
- **Layered schedule.** Layers are processed one after another. Each layer uses
  the bit estimates (APP values) already updated by the layers before it. This
  roughly halves the iteration count compared with flooding.
- **Offset min-sum.** A check node sends each attached bit the product of the
  other bits' signs and the smallest of their magnitudes, reduced by an offset of 1.
  Only the two smallest magnitudes, their positions and the signs are needed.
  The check-to-variable (CTV) messages are therefore stored *compressed*.

## The built-in code

The source architecture targets 5G-style base graphs but does not specify a
parity-check matrix. This design defines its own code by formula in
`rtl/ldpc_pkg.sv`:

- There are 16 block columns of 42 bits, so N = 672.
- The last L block columns are parity columns in a staircase. Layer r holds parity
  columns r and r-1 with shift 0, as in the 802.11n/5G dual-diagonal family.
- The first KB = 16 - L columns carry information. Column c in layer r uses shift
  `(5*c*(r+1) + 3*r) mod 42`. This choice leaves no length-4 cycles between
  information columns.
- **Rate 1/2:** L = 8 layers, KB = 8. Column c belongs to layer r when c + r is
  even, so every layer has degree 6.
- **Rate 13/16:** L = 3 layers, KB = 13. Column c belongs to layer r when
  c mod 3 != r, giving degree 10 or 11.

The tables are computed by constant functions at elaboration time. There are no
ROM files.

## Datapath

```
 llr_in ─► LBS_init ─► APP memories (16 columns x 42 x 8 bit)
                         │  ▲
               read net  ▼  │ write net
        12 x LBS ─► 12 x VNU ─► CNU (CNU_1 | CNU_2 ─► Compare & Select)
                      │              │
                      ▼              ▼
                 VTC buffer    CTV memory 1 / 2 ─► decompressor (old/new)
                      │                                  │
                      └──────── APP = VTC + CTV_new ◄─────┘
 APP signs ─► syndrome check ;  APP signs ─► LBS_Out ─► decoded_data
```

| Unit | File | Function |
|---|---|---|
| APP memory | `app_memory.sv` | Registers holding the 8-bit APP value of every bit. Three banks of 6/5/5 columns. |
| Read network | `read_network.sv` | Picks up to 12 block columns (slots) for the current step. |
| LBS | `barrel_shifter.sv` | Left cyclic rotation of a 42-element word. Used per slot, and as LBS_init and LBS_Out. |
| VNU | `vnu.sv` | VTC = APP − old CTV, saturated to 6 bits. |
| CNU | `cnu.sv`, `cnu_half.sv` | Per row: sign product, min1/min2 and their indices, in two halves of 6 slots. Compare & Select combines the halves. |
| CTV memories | `ctv_memory.sv` | Dual-port RAM for compressed CTV records. |
| Decompressor | `ctv_decompressor.sv` | Expands a record into 12 CTV messages, with the offset applied. |
| VTC buffer | `vtc_buffer.sv` | Holds the VTC values for one step. It computes the new APP = VTC + new CTV, saturated to 8 bits. |
| Write network | `write_network.sv` | Routes new APPs back to their block columns. |
| Syndrome check | `syndrome_check.sv` | Parity of the hard decisions of each row, per step. |
| Loader / serializer | `llr_loader.sv`, `output_serializer.sv` | Serial input and output, with LBS_init and LBS_Out. |
| Controller | `ldpc_controller.sv` | FSM, schedule tables, stored-rotation tracking and iteration count. |
| Top | `ldpc_decoder.sv` | Instantiates all of the above. |

**Message widths.** APP values are 8 bits. VTC and CTV messages are 6 bits.
A compressed record stores, per row:

- 12 sign bits;
- min1 and min2, as 5-bit magnitudes;
- idx1 and idx2, as 4-bit slot indices.

**No shifter on write-back.** Each block column remembers the rotation in which
it is currently stored. When a layer with shift s reads the column, the slot's
LBS rotates by (s − stored) mod 42. The result is written back in that new
rotation, and the controller records s as the column's new stored rotation.
Only one barrel shifter per slot is needed.

The column is preloaded in the right rotation:

- LBS_init stores each column pre-rotated by the shift of the first layer that
  reads it.
- LBS_Out rotates the hard decisions back to natural order on output.

**Two CTV memories.** CTV memory 1 has one row per layer (depth 8). Each row holds
a half record: 6 signs, the two minima and the two indices, or 24 bits x 42 lanes.
CTV memory 2 is only 3 deep and has the same width. It is written only by steps
that need more than a half record:

- layers with more than 6 edges (all rate-13/16 layers), which keep their upper 6
  signs there;
- merged steps (see below), which keep the second layer's whole half record there.

**Layer merging.** Two layers can share one step if they touch no common block
column and each has at most 6 edges. In that case:

- CNU_1 serves one layer and CNU_2 serves the other.
- Compare & Select is bypassed.
- The syndrome check evaluates the two halves as separate rows.

The schedule is found at elaboration by a greedy pass over the layers. At rate
1/2 it pairs layers (0,3), (1,4) and (2,5) and leaves 6 and 7 alone, so an
iteration takes 5 steps instead of 8. The parameter `LAYER_MERGE` (default 1)
turns merging off.

## Control and timing

The controller runs IDLE → (RD, VC, WB per step) → SYN (one cycle per step) →
either the next iteration or OUT. The step phases are:

| Cycle | Work |
|---|---|
| RD | Read the step's records from both CTV memories. |
| VC | Read network, LBS and VNU; the VTC buffer captures the result. |
| WB | The CNU result goes to the CTV memories; new APPs are written back. |

An iteration takes 4·S cycles for S steps:

| Rate | Steps S | Cycles per iteration |
|---|---|---|
| 1/2 | 5 | 20 |
| 13/16 | 3 | 12 |

The first output bit is ready 4·S·iterations + 2 clock edges after start is sampled.

Decoding stops when the syndrome is zero (`valid_codeword = 1`) or when `max_iter`
iterations have run (`valid_codeword = 0`). The hard decision follows the LLR
convention L = ln P(0)/P(1): a negative APP value decodes to bit 1.

## Interface

All signals are synchronous to `clk`. Reset is synchronous and active low (`rst_n`).

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `configure` | in | 1 | In idle, latch `max_iter` and `code_rate`. |
| `max_iter` | in | 8 | Iteration limit. 0 is treated as 1 and values above 15 as 15. |
| `code_rate` | in | 1 | 0 = rate 1/2, 1 = rate 13/16. |
| `load`, `llr_in` | in | 1, 8 | One two's-complement LLR per cycle while `load` is high; 672 values in bit order. |
| `start` | in | 1 | Start decoding. Accepted in idle once a full frame is loaded. |
| `data_out_ready` | out | 1 | `decoded_data` holds a valid bit. |
| `data_out_ack` | in | 1 | Consumer took the bit; the next one follows. |
| `decoded_data` | out | 1 | Information bits, in natural order. |
| `used_iter` | out | 4 | Iterations actually run. |
| `decoder_status` | out | 1 | Busy from start until the last bit is acknowledged. |
| `valid_codeword` | out | 1 | The last decode ended with a zero syndrome. |

## Assumptions and departures

The source leaves several points open. This design settles them as follows:

- The code tables are this design's own (see above). The 5G base graphs BG1/BG2
  need 52 or 68 block columns and lifting sizes up to 384. They do not fit this
  16-column, Z = 42 build. A rate of 9/10 is not possible with 672 bits and 16
  block columns, so it is not offered.
- Widths are 6 bits for CTV/VTC messages, 8 bits for APP values, and an offset of 1.
- Merging pairs are chosen greedily.
- The cycle-level schedule, the `code_rate` port, the 1-bit acknowledge and the
  `valid_codeword` flag are design choices.
- CTV memory 1 is 8 x 1008 bits and memory 2 is 3 x 1008 bits, sized from the
  record format for Z = 42. The source's quoted figure of 512 bytes does not
  correspond to any stated Z.
- The channel model, modulator, BER and capacity analysis that surround the
  decoder in the source's simulation chain are not hardware and are not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog timer.

`tb/tb_ldpc_decoder.sv` runs the top at its default parameters. It contains:

- a reference encoder that builds codewords from random information bits;
- a bit-exact behavioural model of the same layered offset-min-sum algorithm.

It tests clean frames at both rates, Gaussian-noise frames, random "garbage" frames
that never converge, and the clamping of `max_iter` (0 and 200). It also stalls
the output handshake. For every frame it compares against the model:

- the decoded bits;
- `used_iter`;
- `valid_codeword`;
- the exact latency.

A converged frame must also equal the transmitted bits. The testbench counts each
mechanism and fails if any never occurred:

- early stop;
- multi-iteration decodes;
- stop at the limit;
- both rates;
- merged steps;
- steps using CTV memory 2;
- output stalls.

`tb/tb_ldpc_controller.sv` checks the schedule of both controller builds: with
layer merging (default) and with `LAYER_MERGE = 0`, where every step holds one layer.
The full decoder is simulated only with merging on.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
          rtl/ldpc_pkg.sv $(ls rtl/*.sv | grep -v ldpc_pkg) tb/tb_ldpc_decoder.sv \
          --top-module tb_ldpc_decoder
./obj_dir/Vtb_ldpc_decoder
```
