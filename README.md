# DAVRID cluster in SystemVerilog

DAVRID is a multithreaded parallel machine built on the dataflow idea, but
only between threads. A program is cut into short threads that, once started,
run to the end on an ordinary RISC processor without ever waiting. A thread is
started only when everything it needs has arrived: each thread has a
*synchronization counter* in the frame of the function (or loop) it belongs
to, every value or signal sent to the thread counts it down, and the last
arrival puts the thread's *continuation* `<fp, ip>` (frame pointer, code
address) into a queue of ready threads. Long-latency work, such as a remote
read or a frame allocation, is a message whose answer is just another arrival
at some counter, so processors never stall on the network.

The machine is a set of *clusters* joined by a message network. A cluster has
up to four *nodes* and one NIMU (Node Interface and Management Unit). A node
has a TPU (Thread Processing Unit: the RISC processor running thread code), an
SU (Synchronization Unit: the message handler doing the counting and frame
management), a Frame Memory shared by both, and four queues. The NIMU routes
messages, owns the cluster's Structured Memory (global data with I-structure
semantics) and balances frame allocations over the nodes.

This repository holds synthesizable RTL for one cluster (`davrid_cluster`):
the SUs, Frame Memories and queues of four nodes, and the NIMU. The TPUs, the
inter-cluster network and the host are outside it; their connections are
ports of the top module. A behavioural TPU model in `tb/` runs a test
program and three benchmark programs on the cluster.

## Frames, counters and continuations

A frame is a block of 32-bit words in a node's Frame Memory (FM). Two kinds of
words live there, and messages address both relative to the frame base `fp`:

* a *sync slot* at `fp + off` holds `{sc[31:24], ip[23:0]}`: the number of
  arrivals still missing and the code address of the thread they enable;
* a *value slot* at `fp + disp` holds an argument.

What the SU does for an arrival (`START fp, off, disp, value`):

```
FM[fp+disp] <- value                 (not for a bare signal)
slot = FM[fp+off]
if slot.sc == 1:  ATQ <- <fp, slot.ip>     slot is left unchanged
else:             FM[fp+off] <- {slot.sc-1, slot.ip}
```

A count of 1 means "this is the last arrival". The slot is not cleared when
its thread starts, so a thread that is to run again must have its slot
rewritten (by a thread of the same frame, through its FM port). Slot 0 of a
new frame is written by the allocation itself (see FALLOC below); a thread
sets up the other slots of its own frame before anything can reach them.

The TPU side of a node sees three queues and one FM port:

* **ATQ** (Active Thread Queue): ready continuations. Popping one is the
  `NEXT` step that starts a thread.
* **STQ** (Setup Token Queue): work the TPU hands to its own SU without a
  message. An entry is either `STQ_CONT <fp, ip>` ("make this continuation
  ready", the STARTd operation) or `STQ_SYNC <fp, off>` ("count down the slot
  at `fp+off`", STARTln: the TPU has already stored the value itself).
* **ETQ** (External Token Queue): every message the TPU sends. The SU sends
  its replies into the same ETQ; when both try in the same cycle the SU wins
  and `tpu_etq_ready` is low for the TPU.

## Messages

Every message is one header of two 32-bit words plus up to four body words
`w[0..3]`, carried as one `msg_t` (192 bits) on every queue and port. The
header, leftmost bit first:

| field | bits | meaning |
|-------|------|---------|
| NODE  | 12 | destination node `{cluster[9:0], node[1:0]}`, or `{cluster, 2'b00}` for an SM request |
| FBA   | 20 | frame base address in that node's FM, or the SM address |
| MT    | 8  | message type |
| S     | 4  | number of body words used |
| OFF   | 10 | offset of the sync slot |
| DISP  | 10 | displacement of the value slot |

A *global frame address* is the 32-bit word `{NODE, FBA}`; it is what a
thread keeps to talk to another frame, and what FALLOC returns. A *global SM
address* is `{cluster, 2'b00, smaddr}`, returned by HALLOC; an SM message puts
it in NODE/FBA.

Message types (codes in `davrid_pkg::mt_e`) and how their fields are used:

| type | code | goes to | fields | effect |
|------|------|---------|--------|--------|
| START    | 01 | SU of NODE | FBA, OFF, DISP, w0 = value | store, count down |
| STARTN   | 04 | SU of NODE | same | same as START |
| STARTn   | 03 | SU of NODE | FBA, OFF | count down (signal) |
| STARTr   | 02 | SU of NODE | as START; w1 = sender frame `{NODE,FBA}`, w2 = r_off | as START, then STARTn back to `w1` at offset `w2` |
| FALLOC   | 10 | SU picked by the NIMU | NODE/FBA/OFF/DISP = where to answer; w0 = size; w1 = first slot `{sc, ip}` | take a frame, write w1 at its offset 0, answer START with `{node, fp}` |
| M_FALLOC | 11 | SU picked by the NIMU | w0 = size; w1 = `{sc, ip}` of the entry thread | take a frame, write w1, start `<fp, ip>` at once (main function) |
| FDEALLOC, LDEALLOC, PLDEALLOC | 12, 13, 14 | SU of NODE | FBA = frame, w0 = size | free the frame |
| ILOAD    | 20 | SM of the cluster | FBA = smaddr, OFF/DISP = where to answer, w0 = requester `{NODE,FBA}` | answer START with the word, now or once it is written |
| ISTORE   | 21 | SM | FBA = smaddr, OFF, w0 = requester, w1 = value | write, mark full, answer waiting reads, then STARTn to requester at OFF |
| ISTOREr  | 22 | SM | FBA = smaddr, w1 = value | as ISTORE without the signal |
| HALLOC   | 23 | SM | OFF/DISP = where to answer, w0 = requester, w1 = words | take an SM block, mark it empty, answer START with its global SM address |
| HDEALLOC | 24 | SM | FBA = smaddr | free the block |
| HOST_OUT1, HOST_OUT2 | 30, 31 | host port | w0..w3 as the program likes | passed on to the host |

Any answer is an ordinary START message to `<NODE, FBA, OFF, DISP>` of the
requester, so a request's answer arrives exactly like a value sent by another
thread.

## The Synchronization Unit (`su`)

The SU is a small state machine that takes one item at a time, STQ first and
then ITQ, and owns FM port B:

| work | cycles the SU is busy |
|------|------------------------|
| START/STARTN/STARTn/STARTr that only counts down | 3 (take and store value, read slot, write slot) |
| the same when it activates | 4, plus any wait for room in the ATQ |
| STARTr | as above, plus 1 to send the signal (more if the ETQ is full) |
| FALLOC | 3 (take, allocate and write slot 0, send answer) |
| M_FALLOC | 3 (take, allocate and write slot 0, push continuation) |
| FDEALLOC | 1 |
| STQ_CONT | 2 |

Frames are fixed blocks of 2^FRAME_LOG = 1024 words, the reach of a 10-bit
displacement; the requested size only has to fit. Free frames are kept by
`block_alloc` (a bump counter for never-used blocks plus a stack of freed
ones). A request larger than a block, or with no block left, sets the sticky
`err_alloc` flag and is answered with the frame address `32'hFFFF_FFFF`.
Unknown message types set `err_msg` and are dropped.

## The NIMU (`nimu`)

The NIMU is three parts joined by two 4-entry FIFOs: a router, the load table
and the Structured Memory handler.

### Routing (`nimu_router`)

One message moves per cycle. Sources are the SM handler's answers, the four
ETQs and the network input; destinations are the four ITQs, the SM request
FIFO, the network output and the host output. The destination comes from the
header alone:

1. SM types (ILOAD ... HDEALLOC): this cluster's SM if the cluster field of
   NODE is this cluster, else the network;
2. HOST_OUT1/2: the host port;
3. FALLOC and M_FALLOC: the ITQ of the node the load table picks, whatever NODE
   says (NODE names the requester);
4. anything else: the ITQ of NODE if it is in this cluster, else the network.

A source is only taken in a cycle in which its destination can accept the
message. So a full ITQ or a stalled network holds back only the messages that
go there, and the SM handler can always empty its answers, which go first.
The ETQs and the network input share the remaining cycles round robin. This
rule is what keeps the cluster free of deadlock when a node is flooded (the
end-to-end test floods one ITQ from the network on purpose).

### Load balancing (`nimu_lb`)

The table holds, per node, the sum of `w[0]` (requested size) of the
allocations routed there minus that of the deallocations routed there. An
allocation goes to the node with the smallest sum, the lowest number on a tie.
It only balances within the cluster.

### Structured Memory and I-structures (`nimu_sm`)

The SM is 2^20 words, each with a 2-bit tag: EMPTY, FULL or DEFERRED. HALLOC
hands out blocks of 1024 words and clears the words it was asked for (one word
per cycle). An ILOAD of a FULL word is answered at once (2 cycles after the
handler takes it). An ILOAD of a word that is not FULL does not wait in the
handler: it is written into a *cell* (requester, OFF, DISP, link) from a pool of
256, the word becomes DEFERRED and its data field points at the newest cell.
An ISTORE writes the value, marks the word FULL, walks the list answering every
deferred read with a START (one per cycle, newest first, freeing each cell),
and finally sends its own signal. A second store to a FULL word sets
`err_istore` (and overwrites); a deferred read with no cell left sets
`err_defer` and is lost; a refused HALLOC sets `err_alloc` and answers
`32'hFFFF_FFFF`.

## Using the cluster (`davrid_cluster`)

Parameters (defaults in brackets): `NNODES` (4), `FM_AW` (20: 2^20-word FM per
node), `FRAME_LOG` (10: frame block size), `Q_DEPTH` (512 messages per queue),
`SM_AW` (20), `SM_BLK_LOG` (10: SM block size), `DEF_N` (256 deferred cells).
At the defaults the FMs and SM amount to about 170 Mbit of memory arrays.

Each TPU connects to its node's entries of the `tpu_*` arrays:

* `tpu_atq_rdata`/`tpu_atq_empty` show the next continuation; pulse
  `tpu_atq_pop` to take it.
* `tpu_stq_push`/`tpu_stq_wdata` insert a setup token while `tpu_stq_full` is
  low.
* `tpu_etq_push`/`tpu_etq_wdata` offer a message; it is taken in a cycle where
  `tpu_etq_ready` is high. Hold it until then.
* `tpu_fm_*` is a synchronous RAM port: read data appear the cycle after
  `tpu_fm_en` with `tpu_fm_we` low.

The network input and output and the host output are valid/ready ports: a
message moves in a cycle in which both are high. A program is started by
sending M_FALLOC into `net_in` (the host's role). `frames_in_use`, `load`,
`su_busy`, `sm_busy` and the sticky `err_*` flags are for observation.

All state is reset by the asynchronous active-low `rst_n`; memory contents
are not reset, except the SM tags, which are cleared block by block by
HALLOC.

## Queue depth and lock-up

The queues have full flags and nothing else: there is no credit scheme, and
nothing throttles a thread that sends many messages. If every ETQ and ITQ
fills, each SU waits to send a reply while the NIMU waits for room in an ITQ,
and the cluster locks up. Whether this happens depends on how fast a program
fans out, so the queue depth must cover the bursts of the programs run. The
recursive Fibonacci benchmark (below) locks up with 64-entry queues and runs
with 256; the default is 512. A program with a larger fan-out needs deeper
queues or code that limits its own parallelism.

## Benchmarks and what they show

Three of the machine's benchmark programs run on one default-size cluster of
four nodes, written as thread programs for the behavioural TPU:

| testbench | program | result | cycles |
|-----------|---------|--------|--------|
| `tb_workload_fib` | doubly recursive fib(15), one frame per call (1973 frames, at most 1283 held at once) | 610 | 14 065 |
| `tb_workload_matrix` | 20 x 20 matrix product, arrays in the SM, both outer loops unfolded (421 frames), inner loop sequential with two ILOADs per step (16 000 ILOADs) | all of C correct | 55 583 |
| `tb_workload_lll1` | Livermore loop 1 over 1001 elements in integers, unfolded 16 times, three ILOADs and one ISTOREr per iteration | all of x correct | 18 287 |

The NIMU is the shared resource: in the Fibonacci run the router moves a
message in 98% of all cycles while TPUs and SUs are busy about half the time,
and in the two array programs the SM handler is busy about 60% of the time
(an ILOAD of a present word holds it for 3 cycles). The behavioural TPU costs
one cycle per FM access or message, which is far faster than a processor
building messages in software, so the balance on the real machine would lie
more on the TPU side.

## Where this RTL departs from the original machine

* The SU and NIMU were programmed processors (MIPS R3051 with a message
  handler in EPROM), and the queues were asynchronous FIFO chips. Here they are
  single-clock state machines and FIFOs. Message semantics are kept. Timing is
  not: the table above is this RTL's own.
* The message type codes, the split of the node id, the body-word use of every
  message, the sync slot layout `{sc, ip}` and the queue depths are this
  design's choices. No encoding was specified for them.
* The counter rule follows the original handler: a count of 1 activates the
  thread and is not written back.
* Only one initial sync slot is set by FALLOC. The longer operand list of the
  original (initial counts for several slots, return slots) is left to the
  thread code.
* Not built: STARTc and closure allocation (AP1, APn, APf), the loop-frame
  messages (GETsel1_FRAME, PUTsel1_FRAME, GETsel2_FRAME, GETpl1_FRAME), the
  array descriptor of HALLOC (type and bounds) with ARRAY_BOUND, untagged SM
  loads and stores, and load balancing across clusters. The formats these need
  were not specified.
* The TPU, its program memory, the cluster-to-cluster network and the host are
  not part of the RTL.
* Errors are reported by sticky flags instead of being handled.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `tb_msg_fifo` | random push/pop against a queue model, full/empty/count |
| `tb_frame_memory` | both ports against a model, write collision |
| `tb_block_alloc` | random allocate/free, no block handed out twice, counts |
| `tb_su` | every message type, counter rule, STQ priority, cycle counts, frame exhaustion, errors |
| `tb_nimu_lb` | least-loaded pick against a model over random traffic |
| `tb_nimu_sm` | full and deferred reads, list order, HALLOC/HDEALLOC, errors, timing |
| `tb_nimu_router` | every route, round robin, blocked destinations, scoreboard of all messages |
| `tb_uim`, `tb_davrid_node`, `tb_nimu` | the assembled units, including the shared ETQ port |
| `tb_davrid_cluster` | the whole cluster at default size running a program |
| `tb_workload_fib`, `tb_workload_matrix`, `tb_workload_lll1` | the benchmark programs above, results checked against models in the testbench |

`tb_davrid_cluster` connects four instances of `tpu_model` (a behavioural TPU
that runs a fixed thread program) and plays the network and the host. The
program: the main thread allocates a 6-element I-structure array in the SM and
six worker frames, which the load table spreads over the nodes; it asks for
every array element before any is written, so all reads wait as deferred
cells; each worker computes `i*i+3`, stores it (ISTORE with signal), returns it
by STARTr and frees its frame; the main threads add the values both ways, read
one word from another cluster's SM through the network, and report to the
host; the test checks the sums (73) and that all frames and blocks are free. A
second phase holds the network output so that a thread's remote stores fill
its ETQ, then floods one node's ITQ through the network port. Every mechanism
(activations, countdowns, STQ syncs and continuations, allocation on several
nodes, M_FALLOC, deferred answers, ISTORE and STARTr signals, HALLOC,
HDEALLOC, deallocation, network in/out, host output, TPU waiting for the ETQ,
a held network output, ITQ back-pressure on the network) is counted and must
occur at least once.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/davrid_pkg.sv tb/tb_davrid_cluster.sv --top-module tb_davrid_cluster
./obj_dir/Vtb_davrid_cluster
```

Replace the testbench name for the others. The unit testbenches use reduced
sizes; the cluster and benchmark tests use the defaults and each runs in a
few seconds.

## Files

| file | content |
|------|---------|
| `rtl/davrid_pkg.sv` | message header, message types, continuation and STQ types, helpers |
| `rtl/msg_fifo.sv` | the queue used for ATQ, STQ, ITQ, ETQ and the SM FIFOs |
| `rtl/frame_memory.sv` | two-port FM |
| `rtl/block_alloc.sv` | fixed-block allocator (frames, SM blocks, deferred cells) |
| `rtl/uim.sv` | FM plus the four queues of a node |
| `rtl/su.sv` | Synchronization Unit |
| `rtl/davrid_node.sv` | UIM + SU, TPU side brought out |
| `rtl/nimu_lb.sv` | load table |
| `rtl/nimu_sm.sv` | Structured Memory handler |
| `rtl/nimu_router.sv` | message router |
| `rtl/nimu.sv` | router + load table + SM |
| `rtl/davrid_cluster.sv` | top: nodes + NIMU |
| `tb/tpu_model.sv` | behavioural TPU running the test and benchmark programs |
| `tb/tb_*.sv` | testbenches |
