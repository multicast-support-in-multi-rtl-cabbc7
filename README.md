# IMRR: a multicast cell scheduler split across chips

An input-queued switch moves fixed-size cells from input ports to output ports
through a crossbar. In every time slot a scheduler must pick a conflict-free
pattern: each output takes at most one input. A multicast input may feed many
outputs at once, because the crossbar copies for free. For large, fast switches
the scheduler no longer fits on one chip. It is then built from separate chips:
one **input selector (IS)** per input and one **output selector (OS)** per
output. A request from an IS reaches an OS only after some slots, and the grant
takes as long to come back. The request-to-grant round trip (**RTT**) can be
many slots long. Classic multicast schedulers keep state that all output
selectors must agree on at once, so they do not work in this setting.

This RTL implements **IMRR** (Improved Multicast Round Robin), a multicast
scheduler designed for this fully distributed setting, and the switch around
it:

* every OS keeps its own copy of a *preferential-input* pointer. The pointer
  moves on by one every slot, whatever was granted. All copies stay equal with
  no communication between chips;
* an OS grants the preferential input if it requested. Otherwise it grants the
  requesting input whose cell has the smallest fanout (number of outputs still
  to be reached);
* each input has **RTT+1 FIFO queues** and visits one per slot in a fixed
  rotation. A cell waiting for its grants therefore does not stall the input,
  and no cell is requested twice while its grants are still in flight.

The default size is a 16 x 16 switch, RTT = 4 slots, 5 queues per input and
64-byte (512-bit) cells.

## Block map

```
               in_* ──► line_card[i] ──tx_cell──────────────► crossbar ──► out_*
                         ▲  │ HoL fanout, lengths                 ▲
                  grants │  ▼                                     │ cfg (GNT_LAT)
                     input_selector[i]                            │
                         │ request (mask, weight)                 │
                         ▼                                        │
              interchip_link (REQ_LAT) ──► output_selector[j] ────┤
                         ▲                                        │
                         └────── interchip_link (GNT_LAT) ◄───────┘ grant
```

| module | role |
|---|---|
| `imrr_switch` | top: N line cards, N ISs, N OSs, the links and the crossbar |
| `line_card` | K multicast FIFOs per input; queue assignment; residual fanout; HoL removal |
| `mc_fifo` | one FIFO (payload + fanout set) |
| `input_selector` | queue pointer; queue choice; request; matching of returning grants to queues |
| `output_selector` | preferential-input pointer and the IMRR grant rule |
| `interchip_link` | inter-chip latency as a register pipeline of LAT slots (LAT = 0 is a wire) |
| `crossbar` | multicast crossbar with registered outputs |
| `imrr_pkg` | default sizes, popcount helper |

## One request, slot by slot

One clock cycle is one slot. The round trip is split into
`REQ_LAT = RTT - RTT/2` slots towards the OSs and `GNT_LAT = RTT/2` slots back.

| slot | what happens |
|---|---|
| t | IS i reads its queue pointer `rtt = t mod (RTT+1)`. It requests every output in the *residual* fanout of that queue's head-of-line (HoL) cell, with weight = number of those outputs |
| t + REQ_LAT | every OS j sees the requests of all inputs and grants one (combinationally) |
| t + RTT | IS i receives the grants. It passes them to the line card with the index of the queue that requested at t, which it remembers in an RTT-deep shift register. The line card puts that queue's HoL cell on its crossbar input. The OS decisions reach the crossbar through a configuration path also delayed by GNT_LAT, so they set the crossbar in this same slot |
| t + RTT + 1 | the copies leave the crossbar (`out_valid`, `out_cell`) |

The same queue is visited again at t + RTT + 1, one slot after its grants came
back. By then the line card has updated the HoL cell. So at most one request
per queue is ever in flight. This is the reason for RTT+1 queues.

A cell accepted in slot a is in its queue from slot a+1. In an empty switch it
leaves between RTT+2 and 2·RTT+2 slots after arrival, depending on where the
rotation stands.

## The grant rule and why it works distributed

In `output_selector`, in each slot:

1. if the preferential input `pref` requests this output, grant it;
2. otherwise grant the requester with the smallest weight; on a tie, the lowest
   input index wins;
3. `pref <= (pref + 1) mod N`, unconditionally.

Step 3 carries the whole design. Its predecessor (mRRM) moved a shared pointer
past the input that was actually served, and that needs every OS to know what
the others did. A pointer that moves every slot needs no such knowledge. All
OSs still favour the *same* input in a given slot, so a multicast cell tends to
win all its outputs at once, which limits fanout splitting. Preferring small
fanouts otherwise finishes cells quickly and frees their queues.

Under broadcast overload every input requests every output. All OSs then grant
the same preferential input, so every output is busy every slot: 100 %
throughput. The end-to-end test checks this.

## Queues, fanout splitting and the k-queue variant

`line_card` stores each cell with its fanout set (bit j = output j; a unicast
cell has one bit set). For each queue it keeps a mask of outputs already served
for the HoL cell. The residual fanout is `fanout & ~served`. A grant for only
some of those outputs sends the cell to them and leaves the rest for the next
visit to that queue (*fanout splitting*). When the residual fanout is empty,
the cell is popped.

Cells are spread over the queues **packet by packet**: all cells of a packet go
to one queue, and the next packet goes to the next queue in rotation (`in_last`
marks the end of a packet). Cells of one flow can therefore leave out of order.
This is inherent to the scheme, not a defect of the RTL.

With `QPS = 2` the input has k = 2(RTT+1) queues. At pointer value r it looks
at queues 2r and 2r+1 and requests for the one with the larger
*queue length + HoL fanout*, lower index on a tie. This reduces head-of-line
blocking.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | ports |
| `RTT` | 4 | round trip in slots; 0 = single-chip scheduler |
| `QPS` | 1 | queues looked at per slot: 1 gives RTT+1 queues, 2 gives 2(RTT+1) |
| `CELL_W` | 512 | cell payload bits (64 bytes) |
| `DEPTH` | 32 | cells per FIFO |

The defaults live in `imrr_pkg`. Synthesised at the default size, the queues
hold 1.35 Mbit of memory (16 inputs × 5 queues × 32 × 528 bits).

## Interface of `imrr_switch`

* `in_valid[i]`, `in_cell[i]`, `in_fanout[i]`, `in_last[i]`: a cell offered at
  input i. It is taken on a rising edge where `in_ready[i]` is high.
  `in_ready` falls when the queue taking the current packet is full; the source
  must then hold the cell. A cell with an empty fanout is dropped.
* `out_valid[j]`, `out_cell[j]`: the cell leaving output j in this slot.
* `match_size`: number of crossbar connections set up in this slot.
* `rst_n`: asynchronous active-low reset. It empties the queues and sets all
  pointers to 0. All selectors must leave reset in the same cycle, or the
  preferential pointers disagree.

## What is this design's own choice

The scheduling rule, the RTT+1 and 2(RTT+1) queue counts, the weights,
packet-by-packet queue assignment and the default sizes all follow the IMRR
scheme as published. These details are not specified there and were chosen
here:

* how the RTT is split between the request and grant directions; the
  configuration path to the crossbar is delayed like the grants;
* how returning grants are matched to queues (a shift register of queue
  indices);
* tie-breaking: lowest input index among equal fanouts, lower queue among equal
  queue weights;
* the round-robin order of queue assignment, the valid/ready arrival handshake,
  the FIFO depth and the registered crossbar output;
* in the two-queue variant, which two queues form a group (2r and 2r+1).

The queue pointer counts modulo RTT+1 (every queue is visited). A grant is
applied to the queue that requested RTT slots earlier, not to the queue the
pointer names now.

Not included: the baseline schedulers the scheme is compared with (WBA, mRRM,
multi-copy unicast scheduling), the less distributed partitions (everything on
one chip, or all OSs on one chip), and VOQ unicast line cards. This design
handles unicast as multicast with fanout 1. The inter-chip links are abstract:
they model the latency as whole slots, not serialisation or pin sharing.

## Verification

Each testbench checks against its own model of the expected behaviour and
prints `TB_RESULT checks=… failures=…`.

The RTL also carries assertions, active in simulation with `--assert`:

* the FIFOs never overflow or underflow;
* every grant is for an output the HoL cell still needs;
* grants arrive only for a queue that has a request in flight;
* at the top, the crossbar configuration chosen by the OSs matches, pair by
  pair, what each line card sends;
* all preferential-input pointers agree, and so do all queue pointers.

| testbench | what it checks |
|---|---|
| `tb_interchip_link` | exact delay for LAT = 3 and LAT = 0, cleared after reset |
| `tb_mc_fifo` | head, flags and count against a queue model, including full and empty |
| `tb_output_selector` | grant rule and pointer, every slot, random requests; preferential, smallest-fanout, tie and idle cases all seen |
| `tb_input_selector` (uses `tb_is_harness`) | pointer, queue choice, request mask and weight, grant-to-queue matching; RTT = 4 / QPS = 1, RTT = 2 / QPS = 2 and RTT = 0 / QPS = 2 |
| `tb_line_card` | packet-wise queue assignment, back-pressure, residual fanout, partial and completing grants |
| `tb_crossbar` | per-output selection including multicast copies |
| `tb_imrr_switch` (default size) | exact single-cell latency; 100 % throughput under broadcast overload; mixed unicast, broadcast and multicast packets of 1–16 cells with back-pressure; every copy delivered exactly once and intact. Counts preferential and smallest-fanout grants, splits, removals, multicast sends, back-pressure and multi-cell packets, and fails if any never happened |
| `tb_imrr_switch_k2` | the same driver and scoreboard (`tb_switch_driver`) on 6×6 with RTT = 2 and 2(RTT+1) queues, on 4×4 with RTT = 0, and on 8×8 with RTT = 21 (11 slots out, 10 back) |
| `tb_imrr_workloads` (uses `tb_workload_env`) | saturation throughput, matching size and persistency for the evaluated traffic patterns at 16×16 and RTT = 4, with RTT+1 and with 2(RTT+1) queues, with a full scoreboard |

Saturation throughput measured by `tb_imrr_workloads` at 16×16 and RTT = 4, in
copies per output per slot over slots 300–1500 of each run. Every active input
is kept overloaded.

| traffic | RTT+1 queues | 2(RTT+1) queues | mean matching size (RTT+1) |
|---|---|---|---|
| uniform multicast cells (each output with probability 1/2) | 0.93 | 0.96 | 14.9 |
| gathered: 5 active inputs, binomial fanout of mean 3.66 | 0.59–0.60 | 0.61–0.62 | 9.5 |
| unicast / broadcast, half of the cells each | 0.997 | 0.997 | 16.0 |
| unicast / multicast, half of the offered load each | 0.80 | 0.80 | 12.8 |
| multicast packets of 1–16 cells | 0.79–0.81 | 0.84 | 12.9 |
| unicast only | 0.60 | 0.60 | 9.6 |

These agree with the published behaviour of the scheme:

* multicast cells reach about 0.95;
* gathered traffic saturates near 0.57, and slightly higher with two queues
  per slot;
* unicast only is limited to about 0.6 by head-of-line blocking;
* packet arrivals lower throughput to about 0.8.

The testbench checks the RTT+1-queue results against tolerance bands. It also
checks that two queues per slot raise gathered throughput.

The percentages of the two mixes are defined as follows. For the
unicast/broadcast mix, half of the *cells* are broadcast. For the
unicast/multicast mix, half of the *offered copies* are multicast: one
multicast cell per eight unicast cells. Each definition reproduces the
published curve for its mix. With the other definition the results are 0.83
and 0.91 instead.

The gathered pattern draws each output with probability 3.66/16 and redraws an
empty set. That is a binomial fanout conditioned on at least one output.

## Simulating

With Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert --top-module tb_imrr_switch \
  -y rtl -y tb +libext+.sv rtl/imrr_pkg.sv tb/tb_imrr_switch.sv
./obj_dir/Vtb_imrr_switch
```

Replace `tb_imrr_switch` with any testbench name above. Each run takes under a
minute. To try another configuration, override the parameters of
`imrr_switch` as `tb_imrr_switch_k2` does. `tb_switch_driver` takes the same
N / RTT / QPS and works out the expected latencies itself.
