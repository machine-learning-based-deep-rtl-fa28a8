# Line-rate ML deep packet inspection for a RoCEv2 receive path

RDMA over Converged Ethernet (RoCEv2) lets a remote host write straight into
local memory. The host OS never sees the traffic, so it cannot filter it. This
design adds that filter to the NIC. It inspects the payload of every received
RDMA packet with a small machine-learning classifier that flags chunks which
look like executable code. A flagged packet is answered with a NAK and its
payload is discarded instead of being written to host memory.

The classifier runs beside the stack's receive pipeline, not inside it. It
takes one 512-bit chunk per clock (II = 1). At 250 MHz that is 128 Gb/s, more
than the 100 Gb/s line rate. Its verdict is ready before the stack's own
44-cycle header pipeline needs it, so the stack never waits and neither its
throughput nor its latency changes.

```
 RoCEv2 rx stream (512-bit AXI4-Stream, tapped, never stalled)
   │
   ├──────────────────────────────► RDMA stack: headers, CRC, 44 cycles ──┐
   │                                                                       │ hdr_* {QPN,PSN,ok}
   ▼                                                                       ▼
 payload_extractor ──chunks──► ternary_nn (11 cyc) ─┐               ext_header_proc ──► resp_*
   │                      └──► sr_model   (6 cyc) ──┤ flag/last         ▲         ACK+write / NAK+drop
   │                                                ▼                   │
   └──────── {QPN, has_payload} ──────────► decision_aggregator ───────┘ {QPN, malicious}
```

## How a packet is inspected

1. **Extraction** (`payload_extractor`). The first beat of a frame holds
   every header. The extractor reads three fields from it: the BTH opcode,
   the destination QPN (queue-pair number, which identifies the RDMA
   connection) and the IPv4 total length.
   - The opcode gives the header length H. Ethernet + IPv4 + UDP + BTH is 54
     bytes. A RETH adds 16 (WRITE FIRST/ONLY, READ request). An AETH adds 4
     (read responses, ACK).
   - The IP length gives where the payload ends: just before the 4-byte ICRC.
   - Payload byte k is frame byte H + k. Chunk j is therefore made of the top
     `64 - H mod 64` bytes of one beat and the bottom `H mod 64` bytes of the
     next. A 1024-bit funnel shift by `H mod 64` bytes builds it.
   - Bytes past the payload end are set to zero: the ICRC, the next frame's
     bytes, and the padding of the last chunk.
   - The funnel shift completes one chunk per beat. Sometimes a beat also
     starts and ends the packet's short final chunk, and then it completes
     two. A 4-entry queue releases them one per cycle. A packet never has
     more chunks than beats, so the queue soon drains again.
   - On each frame's first beat, the extractor sends a `{QPN, has_payload}`
     record to the aggregator.
2. **Classification** (`ternary_nn` by default, or `sr_model`). Each chunk is
   a 512-dimensional binary vector, one bit per feature. The model returns
   a flag a fixed number of cycles later. A `last` bit travels with each
   chunk through the pipeline.
3. **Aggregation** (`decision_aggregator`). A counter adds up the flags of
   the current packet. On the packet's last chunk it pushes the verdict
   `count >= THRESH` into a FIFO. The default `THRESH = 1` rejects a packet
   as soon as any one of its chunks is flagged. The packet records wait in a
   second FIFO. The record at the head is paired with the next verdict. A
   record without payload (ACK, read request) passes at once as clean. So
   every packet gets exactly one verdict, in packet order.
4. **Decision** (`ext_header_proc`). The stack offers `{QPN, PSN, hdr_ok}`
   for each packet on a valid/ready handshake. The block pairs it with the
   oldest verdict and issues:
   - `ack = hdr_ok && !malicious`. The payload may then be written to host
     memory.
   - Otherwise a NAK, and the payload is dropped. `dpi_reject` marks NAKs
     caused by the classifier alone.

   If the verdict is not there yet, the block holds `hdr_ready` low and
   counts the cycle in `stall_cycles`. This does not happen at the default
   sizes. A verdict whose QPN differs from the stack's sets `qpn_mismatch`
   and is NAKed.

### Latency budget

A packet of up to MTU/BW = 4096/64 = 64 chunks enters the model one chunk
per cycle. Its verdict is ready

    l_model + l_overhead + II * (chunks - 1)

cycles after its first chunk. The stack only asks for the verdict 44 cycles
after the packet's *last* beat. What counts, then, is the time from the
last beat to the verdict. That is the model latency plus a few cycles:
11 + 4 = 15 cycles for the ternary network, measured in the end-to-end
test. This only holds because every stage has II = 1. A model with II = 2
would fall behind by 63 cycles on a full-size packet.

## The ternary network (`ternary_nn`, `ternary_dense`, `ternary_output`)

Architecture: 512 binary inputs → 32 → 64 → 64 → 1.

- **Ternary weights.** Every weight is -1, 0 or +1, so each "multiply" is
  add, subtract or skip. A neuron is an adder tree, and no DSP blocks are
  used.
- **Pipeline of a hidden layer** (`ternary_dense`): 3 cycles.
  1. Partial sums over groups of `GROUP` inputs.
  2. Sum of the groups, plus the bias.
  3. Quantized ReLU: negative values become 0, the rest are shifted right by
     `SHIFT` and saturated to 4 bits.
- **Output neuron** (`ternary_output`): 2 cycles. The trained network ends in
  `sigmoid(z) >= t`. The sigmoid is monotonic, so this equals
  `z >= ln(t/(1-t))`. The hardware therefore compares the integer logit z
  with the constant `T_HAT` and never computes the sigmoid.
- **Total latency** is 3 + 3 + 3 + 2 = 11 cycles, and a new chunk can enter
  every cycle.

The weights are constants fixed when the design is built, not loaded at run
time. They come from `dpi_pkg::tern_w(seed, neuron, input)` and the biases
from `dpi_pkg::tern_b`. **The shipped values are a fixed pseudo-random
stand-in, not a trained model**, so the verdicts in simulation show that the
datapath works, not that it detects anything. To deploy a trained network,
replace the bodies of those two functions with a lookup into the trained
values. Scale the biases, `SHIFT1..3` and `T_HAT` to the integer accumulator
domain of the trained model. Nothing else changes.

Own choices, where the architecture leaves things open: 4-bit activations,
requantization by shift and saturation, integer biases, the 3/3/3/2 split of
the pipeline, and `T_HAT = 0` (t = 0.5).

## The symbolic-regression model (`sr_model`, `exp_lut`)

This is the lighter alternative: a closed-form expression in place of a
network. After pruning, its only non-linear operator is `exp()`. It has two
multipliers and a 6-cycle, II = 1 pipeline. The trained expression is not
available, so this module builds an expression form with those ingredients:

    u = BU + Σ AU[k]·x[IU[k]]     v = BV + Σ AV[k]·x[IV[k]]     (8 input bits each)
    z = C0 + C1·exp(u) + C2·v      flag = z > T_HAT

- `exp()` is a 1024-entry ROM (`exp_lut`) over [-4, 4) with a step of 1/128.
  Entry a holds `round(exp((a-512)/128)·1024)`. The ROM is computed at
  elaboration with `$exp`, so it becomes an initialised block RAM.
- The pipeline stages are: half sums, sums, table read, products, z, and the
  compare.
- Treat this block as a template. The input selection and the constants are
  stand-ins; the expression form is this design's guess.

## Choosing a model at run time

`dpi_rdma_top` contains both models; `model_sel` picks one (0 = ternary,
1 = SR). They have different latencies. If the switch happened while chunks
were in flight, the faster model's results could overtake the slower one's.
The top therefore counts the chunks in flight and copies `model_sel` into
`active_model` only when that count is zero and no chunk is entering. Under
unbroken traffic the switch waits for a gap. A single-model build is
obtained by removing one instance.

## Interfaces

All shared types are in `rtl/dpi_pkg.sv`.

| port group | signals | notes |
|---|---|---|
| stream tap | `s_tvalid s_tready s_tdata[511:0] s_tkeep[63:0] s_tlast` | A beat is `valid && ready`. Frame byte 0 is in `tdata[7:0]`. There is no back-pressure from this design. |
| stack result | `hdr_valid`, `hdr` = `{qpn[23:0], psn[23:0], hdr_ok}`, `hdr_ready` | One per packet, in packet order. |
| response | `resp_valid`, `resp` = `{qpn, psn, ack, dpi_reject}` | Issued 1 cycle after the handshake. |
| model | `model_sel`, `active_model` | See above. |
| observation | `verdict_valid/verdict`, `stall_cycles`, `qpn_mismatch`, `queue_overflow` | The last two are sticky error flags. |

Reset is asynchronous and active low, and it clears all control state.
Datapath registers are not reset; their contents are always qualified by a
valid bit.

Assertions check three protocol rules:
- no FIFO is written when full;
- the two models never deliver a result in the same cycle;
- the stack's header result stays stable while it waits for `hdr_ready`.

## Assumptions and limits

- Frames are RoCEv2 over IPv4 without options or VLAN tag, and every frame on
  the tapped stream is RoCE. The ICRC is not checked here; checking it is the
  stack's job.
- Verdicts and header results are matched by order, with the QPN as a
  consistency check. This relies on the stack reporting packets in the order
  they arrived.
- FIFO depths (32 records, 32 verdicts) cover the packets that can be in
  flight during the model latency when every packet is a single beat.
- The RDMA stack, the 100G MAC and the host DMA are not part of this RTL.
  Their signals are the top's ports. `tb/rdma_rx_stack_model.sv` is a
  behavioural stand-in for the stack's header pipeline (QPN/PSN extraction,
  a fake ICRC check, a 44-cycle delay).
- No timing closure or FPGA implementation has been done. The 250 MHz target
  drives the pipelining, but it is not verified. Layer 1 of the network is
  32 adder trees over 512 one-bit inputs, so expect long synthesis runs.

## Where this design departs from the published system

- **Weights and constants.** Both classifiers ship with stand-in values, not
  trained ones (see above). The datapaths, sizes and latencies are the
  published ones; the detection quality is not reproduced.
- **SR expression and tables.** The published SR model is described only by
  its ingredients: pruned inputs, `exp()` as its one unary operator, two
  multipliers, 6 cycles, and four block RAMs for its look-up tables. Here the
  expression form is assumed. Its single `exp()` table is 1024 x 16 bits,
  about one 18-kbit block RAM.
- **Run-time model switch.** The published models are evaluated one at a
  time, the end-to-end runs with the ternary network. Holding both behind
  `model_sel` is this design's addition. Remove one instance to get a
  single-model build.
- **Packet-level verdicts only.** A threshold over the number of flagged
  *packets* of a message, rejecting the whole message, is a proposed
  extension of the aggregator. It is not built: each packet is judged on its
  own chunks.
- **No network-level measurement.** The published end-to-end figures come
  from two FPGA NICs on a 100G switch. Here the same kind of traffic (RDMA
  WRITE ping-pongs and 1000-message batches) is simulated against a model of
  the stack (`tb_dpi_line_rate`). The claim it checks is the structural one:
  a packet's response comes a fixed number of cycles after its last beat,
  whatever the message size and load.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Put the package first on
the command line, for example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dpi_pkg.sv rtl/sync_fifo.sv rtl/payload_extractor.sv rtl/ternary_dense.sv \
  rtl/ternary_output.sv rtl/ternary_nn.sv rtl/exp_lut.sv rtl/sr_model.sv \
  rtl/decision_aggregator.sv rtl/ext_header_proc.sv rtl/dpi_rdma_top.sv \
  tb/roce_frame_pkg.sv tb/dpi_ref_pkg.sv tb/rdma_rx_stack_model.sv tb/tb_dpi_rdma_top.sv \
  --top-module tb_dpi_rdma_top && ./obj_dir/Vtb_dpi_rdma_top
```

| testbench | what it establishes |
|---|---|
| `tb_payload_extractor` | Every header variant, payload sizes 0 to 4096 bytes around chunk boundaries, and stream stalls. Chunks and records are compared against chunks cut from the payload bytes. |
| `tb_ternary_nn` | Bit-exact logits and flags against an integer re-computation. Checks the 11-cycle latency and back-to-back input. |
| `tb_exp_lut` | Every entry against `$exp`, plus clamping. |
| `tb_sr_model` | Bit-exact logits against the expression. Checks the 6-cycle latency. |
| `tb_decision_aggregator` | Thresholds 1 and 2, packets without payload, and results delayed against their records. |
| `tb_ext_header_proc` | The ACK/NAK rule, stalls when a verdict is late, and QPN mismatch. |
| `tb_dpi_rdma_top` | End to end at the default sizes, with a 44-cycle stack model. Each packet's response is checked. The verdict must always be ready before the stack asks for it (0 stall cycles). Every mechanism must occur: ACK, DPI NAK, CRC NAK, empty packets, MTU packets, two-chunk beats, rejection on a later chunk, and model switches. |
| `tb_dpi_line_rate` | Benchmark-style traffic: RDMA WRITE messages from 64 B to 64 KB, split at the MTU. There are 10 ping-pong exchanges per size, then batches (1000 messages of the small sizes) with the stream valid on every cycle. Every response must come 46 cycles after its packet's last beat (44-cycle stack plus handshake), with no stall and no overflow. It prints the payload rate per size. |

`tb/roce_frame_pkg.sv` builds the test frames byte by byte. `tb/dpi_ref_pkg.sv`
holds the integer reference models of both classifiers. Test data is
generated in the testbenches; no data files are needed.
