# HGCAL back-end DAQ readout circuit: a packet aggregator for one SLink

In the back-end data acquisition of the CMS High-Granularity Calorimeter, every
FPGA receives detector data on 54 *capture blocks* and sends it out on 12 SLink
links of 24 Gb/s each. Between the two sits a *readout circuit* per SLink. For
every Level-1 Accept (L1A) trigger it collects one sub-packet from each capture
block assigned to it, in a fixed order and without interleaving, and sends them
as one event packet. Software decides which capture blocks each readout circuit
reads, which lets one FPGA design balance the load across its 12 outputs.

The hard part is that the capture blocks are scattered across the FPGA's
super logic regions. Every signal between a capture block and the readout
circuit therefore passes through a register pipeline of several stages, in both
directions. Those stages cannot be stalled individually. The circuit also must
not use block RAM and must stay small. This RTL solves it the way the original
architecture does:

* The controller sends read **acknowledgements** down the pipeline. The
  requested word comes back a fixed number of cycles later.
* A **delay module** delays the controller's description of each request by
  the same round-trip time. Data and control then meet at the output without
  the controller knowing the pipeline depth.
* A small **backpressure FIFO** catches the words still in flight when the
  SLink says "stop". For the controller, backpressure is just a clock enable.

This repository has one complete readout circuit (`readout_circuit`) with up to
10 capture block inputs. That is the configuration used for the hardware
evaluation. Its default is 64-bit words at 380 MHz. Setting `DATA_W = 128` gives
the 128-bit variant meant for 190 MHz.

## How a word travels

```
 capture block i end                     |  readout end
                                         |
 CB --wr--> [Event Buffer i] --head--> [data stages x PIPE_DEPTH] ---> data mux --+
               ^ rd_ack                  |                          (sel = delayed |
               |                         |                           pointer)      v
            [ack stages x PIPE_DEPTH] <------------ rd_ack[i] ------ controller   [backpressure FIFO] --> SLink
                                         |                             |   |         ^ rd = !slink_bp
 CB --len--> [len stages x PIPE_DEPTH] -----> [Size FIFO i] --> size mux   |         |
 CB <-afull- [afull stages x PIPE_DEPTH] <--- afull                        +--> [delay module, 2 x PIPE_DEPTH]
```

Suppose the controller issues an acknowledgement for capture block *i* in
cycle *t*:

1. The acknowledgement crosses `PIPE_DEPTH` registers and reaches Event Buffer
   *i* in cycle *t + PIPE_DEPTH*. The buffer is first-word-fall-through, so its
   head word is already on its output. The acknowledgement pops it, and the
   first return register captures it.
2. The word crosses `PIPE_DEPTH` return registers and appears at the data
   multiplexer in cycle *t + 2·PIPE_DEPTH*.
3. In cycle *t* the controller also produced a control word
   `{valid, pointer, sop, eop}` (type `word_ctrl_t`). The delay module releases
   it in cycle *t + 2·PIPE_DEPTH*. Its pointer steers the data multiplexer, and
   its `valid` writes `{sop, eop, data}` into the backpressure FIFO.
4. The backpressure FIFO's read enable is `!slink_bp`. With no backpressure,
   each word spends exactly one cycle in it, like a register. From
   acknowledgement to `slink_valid` the total latency is `2·PIPE_DEPTH + 1`
   cycles.

The return registers sample the buffer head every cycle, whether or not a word
was acknowledged. Only the delayed `valid` says which samples are real. This
keeps the distributed pipeline free of any control logic.

### Why the backpressure FIFO holds 2·PIPE_DEPTH + 1 words

When `slink_bp` rises in cycle *t0*, the controller issues no new
acknowledgement from *t0* onward. It reacts in the same cycle, because `bp`
gates `rd_ack` combinationally. The acknowledgements issued in the
`2·PIPE_DEPTH` cycles before *t0* are still in flight, and their words land in
the FIFO during the following `2·PIPE_DEPTH` cycles. The FIFO may also already
hold the word it is presenting to the SLink. So at most `2·PIPE_DEPTH + 1`
words pile up, and that is the depth used (9 for the default depth of 4).
The architecture states the rule as "twice the pipeline depth". The extra
entry is the output word, which this implementation counts separately. The
end-to-end test reaches exactly 9 and never overflows. A sticky `overflow` flag
and an assertion guard the sizing. A second assertion checks the output
handshake: a word offered under backpressure stays offered and unchanged.

Both the FIFO and the delay module are written as plain shift registers with
no reset (the FIFO uses a shift-in FIFO whose oldest entry is at index
`count-1`). This is the form that synthesis maps onto shift-register LUTs: one
LUT per bit covers 16 or 32 stages, instead of `2·PIPE_DEPTH` flip-flops per
bit. Because the delay line cannot be reset, `readout_circuit` ignores its
output for the first `2·PIPE_DEPTH` cycles after reset, until it has been
refilled.

## The controller (`readout_controller`)

The controller has three states:

| state       | does                                                                          |
|-------------|-------------------------------------------------------------------------------|
| `IDLE`      | waits until an L1A is pending and at least one capture block is enabled; points at the lowest enabled block |
| `WAIT_SIZE` | waits until that block's Size FIFO is not empty, which means its sub-packet is complete; loads the length |
| `READ`      | issues one acknowledgement per cycle while `slink_bp` is low and counts the length down; after the last word moves to the next enabled block, or ends the event after the highest one |

On the last word of a sub-packet, the next length may already be waiting: the
next block's, or the next event's first block's if another L1A is pending. The
controller then loads it in the same cycle, so reading continues with no gap.
This matters. At 380 MHz and 64 bits, one word per clock is 24.32 Gb/s. That
leaves less than 2 % headroom over the 24 Gb/s requirement, and one idle
cycle per sub-packet would already break it for 50-word sub-packets.

The first word of an event carries `sop` and the last word of the last enabled
block carries `eop`. L1As that arrive while an event is being read are counted
(8-bit counter, sticky overflow flag) and served in order. The enable mask is
sampled when an event starts, so changing it never splits an event. Lengths
must be between 1 and 4095 words. A zero length is flagged by an assertion.

## What a capture block must do

Each capture block has two write ports on `readout_circuit`:

* `cb_evt_wr_en/cb_evt_wr_data` write the data words into its Event Buffer.
  `cb_evt_full` is local, with no pipeline delay.
* `cb_size_wr_en/cb_size_wr_data` post the length of a finished sub-packet.
  The length must be posted **after** the sub-packet's last word has been
  written. A visible length is what tells the controller that the data can be
  read.

The Size FIFO sits at the readout end, so the controller sees lengths without
delay. Writes and the almost-full flag cross the pipeline instead. A capture
block must stop posting lengths while `cb_size_afull` is high. The flag is
raised `2·PIPE_DEPTH` entries early, which covers every write already on its
way.

## Registers (`readout_regs`)

A plain synchronous register port (`reg_we`, `reg_addr[1:0]`, `reg_wdata`,
combinational `reg_rdata`) stands in for the IPBus slave of the real system:

| addr | access | content |
|------|--------|---------|
| 0 | RW | capture block mask, bit *i* enables block *i*; reset value all ones |
| 1 | RO | events sent |
| 2 | RO | `{controller state[1:0], trigger overflow, FIFO overflow, pending triggers[7:0]}` |
| 3 | RO | highest backpressure FIFO occupancy seen; any write clears it |

Software must make sure that no capture block is enabled in two readout
circuits.

## Output stream

`slink_data`, `slink_valid`, `slink_sop`, `slink_eop` and the input
`slink_bp` form a valid/backpressure stream. A word is transferred in every
cycle with `slink_valid && !slink_bp`. The SLink protocol's own headers,
trailers and CRC are not generated here. They belong to the SLink sender.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_CB` | 10 | capture block inputs (at most 16, see `PTR_W` in `readout_pkg`) |
| `DATA_W` | 64 | word width; 128 for the 190 MHz variant |
| `SIZE_W` | 12 | length field, so sub-packets of up to 4095 words |
| `PIPE_DEPTH` | 4 | register stages per direction between a capture block and the readout end (at least 2) |
| `EVT_DEPTH` | 4096 | Event Buffer words per capture block, one maximum sub-packet |
| `SIZE_DEPTH` | 32 | Size FIFO entries per capture block |

`N_CB`, `DATA_W` and `SIZE_W` come from the architecture. The other three are
this design's own choices. The architecture only expects fewer than 8 pipeline
stages, and it leaves the buffer depths open. The delay module and the
backpressure FIFO size themselves from `PIPE_DEPTH`. Nothing else changes when
the pipeline gets deeper or shallower.

## Where this RTL departs from, or goes beyond, the architecture

* **Size FIFO placement.** Each capture block connects through an Event Buffer
  and a Size FIFO, but which end of the pipeline each one sits at is this
  design's choice. Here the Event Buffer is at the capture block end and the
  Size FIFO at the readout end (see above).
* **Backpressure FIFO depth:** `2·PIPE_DEPTH + 1` rather than `2·PIPE_DEPTH`,
  for the reason given above.
* **Gapless transitions** between sub-packets and events, the trigger counter,
  the mask sampling, the register map and the `sop`/`eop` framing are this
  design's choices.
* **Event Buffer memory.** This is a plain array. In the real system the
  capture blocks own the block RAM, and the readout circuit itself uses none.
  The multiplexers are combinational.
* **Not included.** The capture blocks, the SLink sender and IPBus are external
  designs. The fixed interconnect that links the 54 capture blocks of an FPGA to
  subsets of its 12 readout circuits is not here either: that mapping is not
  published with the architecture. With the mapping, a full FPGA is 12
  instances of `readout_circuit`, with each capture block wired to the inputs
  of the instances that may read it and enabled in exactly one of them. No
  trigger-throttle output exists. The pending-trigger count in register 2 is
  the nearest signal.
* **Resource figures** for the reference FPGA implementation (about 5k LUTs and
  28k flip-flops for all 12 readout circuits with their interconnect) cannot be
  compared with a generic synthesis of this RTL. Part of that gap is the Event
  Buffers, which are counted here but belong to the capture blocks there.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_event_buffer`, `tb_size_fifo`, `tb_bp_fifo` | FIFOs against queue models: full/empty/almost-full, order, overflow flag; the backpressure FIFO fed as in the circuit reaches exactly 9 words |
| `tb_delay_chain`, `tb_delay_module` | every output equals its input exactly `PIPE_DEPTH` or `2·PIPE_DEPTH` cycles earlier |
| `tb_input_mux`, `tb_readout_regs` | selection, register map |
| `tb_readout_controller` | order of requests, flags, nothing issued under backpressure, waiting for late data, mask changes, gapless issue over 15 queued events |
| `tb_readout_circuit` | end to end at the default size with 10 capture block emulators (`tb/cb_emulator.sv`): random traffic and backpressure, a mask change, slow capture blocks, a trigger burst that fills the Size FIFOs, two 10 × 4095-word events that fill the Event Buffers, and a saturated run that must take exactly one cycle per word. It counts each of these mechanisms and fails if one never happened. |
| `tb_throughput` | 500 × 64-bit words per L1A, L1A from 100 kHz to 1 MHz at 380 MHz: 3.2, 8, 16, 24.0 and 24.32 (saturated) Gb/s |
| `tb_pipe_depth` | the same RTL at `PIPE_DEPTH` 2, 5 and 7 (3 capture blocks, random traffic and backpressure): every word intact, and the backpressure FIFO peaks at exactly `2·PIPE_DEPTH + 1` |
| `tb_readout_w128` | the 128-bit variant at 190 MHz: 24.0 Gb/s at 750 kHz, 24.32 Gb/s saturated, plus random backpressure |

To run one with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    --top-module tb_readout_circuit -y rtl -y tb +libext+.sv -Irtl rtl/readout_pkg.sv tb/tb_readout_circuit.sv
./obj_dir/Vtb_readout_circuit
```

Replace the top module and file name for the other testbenches. Every
testbench runs in seconds.

## Files

`rtl/readout_pkg.sv` holds the shared defaults, the control-word struct and the
controller state type. `rtl/readout_circuit.sv` is the top. The blocks are
`event_buffer`, `size_fifo`, `delay_chain`, `input_mux`, `readout_controller`,
`delay_module`, `bp_fifo` and `readout_regs`, one module per file.
`tb/cb_emulator.sv` is a behavioural capture block used by the system-level
testbenches. `tb/depth_harness.sv` wraps one readout circuit with its emulators
and checker for `tb_pipe_depth`.
