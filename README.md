# Run-time task mapping for a coarse-grain reconfigurable ring

A coarse-grain reconfigurable co-processor is only useful in a multi-application
system if somebody decides, while the system runs, which hardware task gets which
processing elements. This design does that in hardware. Each hardware task is
compiled once, for one fixed placement. A small controller then maps it at run
time onto whatever part of the co-processor is free. It moves the configuration
to another place when the original one is occupied, pre-empts lower-priority
tasks when there is no room, and uses idle resources to run a second copy of a
running task.

The method is called dynamic hardware multiplexing (DHM). Here it is applied to
an 8-element *systolic ring*: 4 layers of 2 processing elements (*Dnodes*)
closed into a ring. The SystemVerilog covers three parts:

* the controller (`dhm_saturn` with `dhm_fit_check`);
* its programme memory (`cfg_mem`);
* the ring (`systolic_ring`, `ring_switch`, `dnode`, `local_seq`, `sync_fifo`).

The top module is `dhm_system`. The CPU, its memory and the mechanism that moves
samples between data memory and the ring are outside it. Its ports are their
connections.

## The mapping problem in one example

Number Dnode `p(i,j)` by layer `i` (0..3) and position `j` (0..1). A task is
described by:

* the set of Dnodes it uses, `P_k`;
* the set of layer FIFO channels it uses, `C_k`;
* a priority.

A task that uses layers 0 and 1 (`P = {{1,1},{1,1},{0,0},{0,0}}`) is running.
A second task with the same design-time placement arrives. There are enough free
resources, so Lemma 1 holds. But the two placements overlap, so Lemma 2 fails.

Every Dnode has the same operation set and every layer is wired the same way. So
rotating a configuration along the dataflow, `p(i,j) -> p((i+r) mod 4, j)`, does
not change what it computes. The controller therefore tries r = 1, where the task
still overlaps layer 1, and then r = 2, where it fits on layers 2 and 3. It
writes the configuration there. `tb_dhm_saturn` replays this example.

## Controller (`dhm_saturn`)

### Admission tests

For a candidate rotation r, `dhm_fit_check` computes the rotated Dnode and
channel masks and two tests:

* **Lemma 1.** The header's `n_op` is at most the number of free Dnodes, and
  `n_chan` is at most the number of free channels.
* **Lemma 2.** The rotated masks do not overlap what is in use.

### Handling a task-start request

1. **Fetch.** Read the header at `cfg_addr`.
2. **Search.** Try r = 0, 1, 2, 3, one rotation per cycle. If Lemma 1 fails,
   skip the remaining rotations: rotating cannot free resources.
3. **Pre-emption.** If nothing fits, take the lowest-priority running task that
   has a strictly lower priority than the new one. Mark it *stalled*: the
   analysis no longer counts it, but it keeps running. Then repeat the search.
   This goes on until the task fits or no lower-priority task is left.
4. **Commit or refuse.**
   * If it fits, every stalled task is removed, one per cycle. Its Dnodes are
     released, and its context goes out on `evict_*` so the OS can continue
     it on the CPU (see *Context of a removed task*).
   * If it does not fit, the stalled tasks simply continue. The response says
     "not accepted", and the OS runs the task in software.
5. **Load.** Copy the task's configuration lines from memory to the ring, one
   per cycle. Each line moves to physical layer `(layer + r) mod 4`, and the
   absolute bus index in every Dnode word is rotated by r as well. References to
   the previous layer are relative, so they need no change.
6. **Respond.** Send one `resp_valid` strobe carrying `accepted`, `task_id` and
   `rotation`.

A task-end request releases the task's Dnodes, including its duplicate, and
responds with `accepted = 1` if the task was found.

### Task duplication

Whenever the controller is idle after a decision, it goes through the running
tasks from the highest priority down. For each one, it tries to place a second
instance on the free resources, using the same rotation search. The duplicate
runs the same kernel on its own layer FIFOs. Feeding it, and using its results,
is up to the data side.

Any new request first suspends (releases) every duplicate before its own
analysis. Duplication is enabled by the parameter `TD_EN` (default 1). With
`TD_EN = 0` the controller is the plain multi-tasking version.

### Context of a removed task

A pre-empted task has already done part of its work, so the OS needs to know
where it got to. With each `evict_valid` strobe the controller gives:

* `evict_task_id`;
* `evict_cfg_addr`, the task's programme address (its initial context);
* `evict_ctx`, the accumulators of its Dnodes (its current context).

The accumulators are sampled in the cycle the Dnodes are cleared. They are put
back at the task's design-time Dnode positions by undoing the rotation, so
software sees the same layout whatever rotation the task ran at. Entries
outside the task's topology are zero.

Register-file contents and the position of each local sequencer are not part
of the context. A kernel whose state lives there cannot be resumed exactly.

### Resource state

The resource state is a task table of 8 entries. Each entry holds:

* task id, header and memory address;
* the placed Dnode and channel masks;
* the duplicate's masks.

`pe_busy`, `ch_busy` and `dup_pe` are derived from this table. An assertion
checks that no Dnode is ever owned by two instances.

### Decision latency

Latency is counted from the request handshake cycle to the `resp_valid` cycle,
both included.

| case | cycles |
|---|---|
| task fits at once, 1 configuration line | 6 |
| each further line | +1 |
| each rotation tried | +1 |
| duplicate suspension | +1 |
| each stalled task | +1, plus its re-search |
| each eviction | +1, plus 1 once after the last |
| task end | 3 |

The published hardware controller reports 6 to 25 cycles. The minimum is the
same here. In the end-to-end test, decisions take between 3 cycles (a task
end) and 20 cycles. There is no hard upper bound of 25: a task with many lines,
or a long pre-emption chain, takes longer. Over 4900 random decisions on the
8-Dnode ring, one took 26 cycles and all others at most 25.

## Task image format (`dhm_pkg`)

The programme memory holds 45-bit words. A task is a header word followed by
`n_lines` configuration lines.

**Header (`cfg_header_t`)**

| field | bits | meaning |
|---|---|---|
| `n_op` | 4 | Dnodes required |
| `n_chan` | 3 | FIFO channels required |
| `topology` | 8 | design-time Dnode mask; bit i*2+j is p(i,j) |
| `channels` | 4 | design-time layer mask of FIFO channels |
| `prio` | 4 | priority; larger wins |
| `n_lines` | 6 | configuration lines that follow |

**Configuration line (`cfg_line_t`)**

| field | bits | meaning |
|---|---|---|
| `layer` | 2 | design-time layer |
| `slot` | 3 | configuration register, 0..7 |
| `word[0]`, `word[1]` | 20 each | Dnode words for positions 0 and 1 |

Only Dnodes in the task's topology take the word.

**Dnode word (`dnode_cfg_t`)**

| field | bits | meaning |
|---|---|---|
| `op` | 4 | NOP, PASS, ADD, SUB, MUL, MAC, ABSD, SAD, SHRA, AND, OR, XOR, ACC |
| `src_a`, `src_b` | 3 each | operand source (see below) |
| `bus_sel` | 2 | bus to read; rotated on relocation |
| `rf_ra`, `rf_wa`, `rf_we` | 2, 2, 1 | register file read address, write address, write enable |
| `fifo_pop` | 1 | take a word from the layer's input FIFO |
| `fifo_push` | 1 | put the result into the layer's output FIFO |
| `bus_wr` | 1 | drive the layer's bus with the result |

The operand source is one of:

* previous-layer Dnode 0 or 1;
* the input FIFO head;
* the selected bus;
* the register file;
* the accumulator;
* zero.

Lines must be stored in slot order for each Dnode. Writing slot s sets that
Dnode's loop length to s+1, and writing slot 0 clears its accumulator and
register file.

## The systolic ring (`systolic_ring`)

Each layer has:

* a `ring_switch`;
* two Dnodes, each with an 8-word configuration bank and a local sequencer
  (`local_seq`);
* an input FIFO and an output FIFO (8 x 16 bit);
* a bus register.

**Switch.** It gives every Dnode of its layer:

* the outputs of both Dnodes of the previous layer (`(i-1) mod 4`);
* the head of the layer's input FIFO;
* any layer's bus. Every switch can read every bus, which is how data is fed
  back to earlier layers.

**Dnode.** A 4-word register file, two operand multiplexers, a 16-bit
ALU/multiplier and an accumulator. The accumulator is the Dnode's output.

**Local sequencer.** Each Dnode steps through its configuration slots
0..len-1, one slot each time it executes. A kernel can therefore be a short
micro-program, for example "load a sample into the register file, then combine
it with the next sample".

### Firing rule

This is the part most worth understanding before writing kernels.

A Dnode executes in a cycle only if every operand it names is fresh:

* A previous-layer or bus operand needs that producer's one-cycle **token**. A
  Dnode raises its token in the cycle after it executed a non-NOP operation; a
  bus raises its token in the cycle after it was written.
* A FIFO operand or pop needs a non-empty input FIFO.
* A push needs room in the output FIFO. If both Dnodes of a layer push in the
  same cycle, position 0 goes first and position 1 waits.

A Dnode that cannot execute holds its state and its slot. `layer_stall` shows
such waits.

Two consequences follow:

* Kernels run in dataflow order whatever the input rate, and start-up needs no
  global sequencing.
* The ring has **no back-pressure towards earlier layers**. A token that is not
  consumed in its cycle is lost. The side streams of a kernel (coefficients, a
  second operand stream) must therefore already be in their FIFOs when the main
  stream arrives, and the output FIFOs must be drained. The testbenches feed
  side streams in chunks of at most 8 words ahead of the main stream.

When both Dnodes of a layer pop in the same cycle, they share the one head word.
This is how the butterfly kernel feeds its `+` and `-` Dnodes from one stream.

## Interfaces of `dhm_system` and timing

| port | meaning |
|---|---|
| `host_wr_en/addr/data` | write task images into the programme memory |
| `req_valid`, `req_ready`, `req` (`on`, `task_id`, `cfg_addr`) | task start (`on = 1`) or end; hold `req_valid` until `req_ready`, which is high only while the controller is idle |
| `resp_valid`, `resp` | decision strobe (the interrupt to the OS) |
| `evict_valid`, `evict_task_id`, `evict_cfg_addr`, `evict_ctx` | a running task was removed; its context |
| `in_push/in_data/in_full`, `out_pop/out_data/out_empty` | per-layer FIFOs; outputs are first-word fall-through |
| `pe_busy`, `ch_busy`, `dup_pe`, `pe_active`, `layer_stall`, `ev` | state and one-cycle event strobes |

Timing and reset:

* Single clock, synchronous active-low reset.
* The programme memory read has one cycle of latency.
* A Dnode result is seen by the next layer one cycle later.

## Sizes

The sizes are constants in `dhm_pkg`, because the record types depend on them:

* `L_LAYERS = 4` and `D_PER_LAYER = 2`: the 8-Dnode instance the hardware
  controller was built for;
* `DW = 16`: 16-bit samples;
* `N_CFG = 8`: configuration registers per Dnode.

Register file, FIFO depth, programme memory depth, id width and priority width
are this design's choices.

The 32-element ring that was also studied (l = 8, d = 4) means changing the two
size constants. At that size the design lints cleanly and the scenario campaign
(`tb_dhm_campaign`) passes. The ring-level test kernels in `tb/dhm_tb_pkg.sv`
are written for d = 2, so the other testbenches need the default size.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dhm_system \
  -y rtl -y tb +libext+.sv rtl/dhm_pkg.sv tb/dhm_tb_pkg.sv tb/tb_dhm_system.sv
./obj_dir/Vtb_dhm_system
```

Any other testbench runs the same way with its own name in place of
`tb_dhm_system`. The package files must come first on the command line.

| testbench | what it checks |
|---|---|
| `tb_dhm_system` | Full size. Loads five kernels and issues start/end requests. Streams data into the layers given by the reported rotations and checks every output word against a model. Checks the context of an evicted task against the model's running sum. Maps the two-Dnode block-matching kernel, lets it be duplicated and checks both instances over an 8 x 8 block. Checks the 7-cycle direct mapping of a 2-line task, and at most 25 cycles for every decision in the run. Requires each mechanism to occur at least once: direct mapping, rotation, stall, eviction, refusal, release, duplication, duplicate suspension, FIFO wait, multi-slot sequencing and bus use. |
| `tb_dhm_campaign` | 300 random task scenarios on two controllers, one with duplication and one without. Every decision is compared with an independent reference model of the mapping: acceptance, rotation, evicted tasks and exact latency. The busy and duplicate masks are compared after every step. Reports the acceptance and utilisation figures below. |
| `tb_dhm_saturn` | The relocation example, pre-emption with the handed-over contexts, refusal, duplication, release and latencies, using the controller alone. |
| `tb_dhm_fit_check` | Rotation and the two lemmas, on the example and on random cases. |
| `tb_systolic_ring` | Kernels configured by hand at several rotations. |
| `tb_ring_switch` | Firing, stall and arbitration rules. |
| `tb_dnode` | Every operation and every operand source. |
| `tb_local_seq`, `tb_sync_fifo`, `tb_cfg_mem` | Unit tests. |

The test kernels are in `tb/dhm_tb_pkg.sv`:

* `K_MAD`: absolute-difference accumulator;
* `K_BUS`: adds two streams over a bus;
* `K_BFLY`: even/odd butterfly with two MACs;
* `K_BIG`: 4-layer chain;
* `K_FSBM`: block matching on two Dnodes, an absolute-difference Dnode
  followed by an accumulator Dnode.

## Behaviour on random task mixes

`tb_dhm_campaign` runs 300 scenarios of 2 to 30 tasks each. Every task has a
random shape of 1 to 3 layers, a random priority and a random lifetime. Four
figures are measured:

* **WL**, the offered workload: the sum over all tasks of Dnodes x lifetime,
  divided by (ring size x scenario length). Above 100 % means more work is
  offered than the ring can hold;
* **MT_eff**, the share of start requests the co-processor accepts;
* **P_eff**, the share of Dnode-cycles in use;
* **R**, the share of time the co-processor is in use at all.

| instance | WL | MT_eff, controller | MT_eff, fixed placement | P_eff without duplication | P_eff with duplication | R |
|---|---|---|---|---|---|---|
| 8 Dnodes (default) | 110 % | 61 % | 24 % | 44 % | 54 % | 83 % |
| 32 Dnodes (l = 8, d = 4) | 43 % | 85 % | 23 % | 29 % | 40 % | 85 % |

"Fixed placement" is a model that only accepts a task at its design-time place
and never pre-empts. Duplication does not change which tasks are accepted; it
only fills idle Dnodes. The figures depend on the task mix, so they show trends
rather than reproduce any published number.

## Where this design departs from, or goes beyond, the published method

**Pre-emption.** A stalled task keeps running until the new task is known to
fit, and is untouched if the request is refused. A simpler reading of the
published algorithm unmaps the lower-priority task at once.

**Eviction context.** The content of the context handed to the OS is this
design's choice: the programme address and the accumulators. Turning it into a
software task state is left to the OS.

**Channels.** There is one FIFO channel per layer. Channels rotate with the
layers and are counted in Lemma 1 and Lemma 2.

**Reconfiguration rate.** One layer (2 of 8 Dnodes, 25 %) can be configured per
cycle. The source also quotes 12.5 % of Dnodes per cycle; the layer-per-cycle
figure is the one followed here.

**Own choices.** The following are all this design's own:

* the operation set;
* the configuration word, header and line encodings;
* the firing rule with its tokens;
* the FIFO and arbitration rules;
* the task table;
* tie-breaking, which picks the lowest table index.

**Controller FSM.** The state machine has 12 states. The published controller
has about 52 states, plus 20 for duplication. Its state graph is not
reproduced.

**One FIFO pair per layer.** The system-level drawing of the ring has one input
and one output FIFO per layer, and that is what is built. Some published kernel
mappings draw a FIFO per Dnode instead:

* The DCT mapping has a FIFO per Dnode column. Here the two samples of a
  butterfly arrive one after the other, and the first is kept in the register
  file.
* The wavelet (lifting) mapping pushes its detail and smooth outputs into two
  FIFOs of the same layer. That mapping has not been ported. Its lifting
  weights would also have to come from a FIFO or the register file, since a
  Dnode has no immediate operand.

**Not modelled.** Area, power and clock-rate results. The software version of
the controller on a soft processor. The OS task states.

**Not included.** The CPU, system memory, DMA controller, timer, UART, bus
arbiters and buses, data memory, data access mechanism and the global sequencer.
The design's ports stand in for them.
