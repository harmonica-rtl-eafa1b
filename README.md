# Harmonica NCA: a memristor-crossbar neural accelerator with an analog routing network, in SystemVerilog

Harmonica pairs a general-purpose CPU pipeline with a *neuromorphic computing
accelerator* (NCA). The NCA evaluates neural-network layers in memristor
crossbar arrays (MBC arrays). Each array computes a whole 64x64
vector-matrix product in one analog step. The data stays analog while it moves
from array to array through a mixed-signal network (the M-Net). It is converted
between digital and analog only at the CPU boundary. The CPU drives the NCA with
four added instructions and three queues. An inline calibration scheme
periodically re-tunes crossbar weights that have drifted.

This RTL models the whole NCA at the level of the 4-bit codes its DACs and ADCs
produce. It covers the queues and instruction interface, the routers with their
controllers, the 16 crossbar arrays (as behavioural models) and the calibration
controller. Wherever the architecture only sets out what a part must do, the
implementation here is one simple way of doing it. Those choices are listed in
the last sections.

## The machine at a glance

```
 CPU pipeline ──instr──► nca_cpu_if ──packet──► central_router ──► group_router 0 ─┬─ MBC 0.0 .. 0.3
   setp movd launch deq   Config-queue 128x64     5 ports          group_router 1 ─┼─ MBC 1.0 .. 1.3
                          In-queue   64x4                          group_router 2 ─┼─ MBC 2.0 .. 2.3
                          Out-queue  64x4  ◄──result──             group_router 3 ─┴─ MBC 3.0 .. 3.3
                                                ▲                  (the 4 group routers are fully
                          calib_ctrl ───────────┘                   connected to each other)
```

* **4 groups x 4 arrays**, each array 64x64. Each array is made of four
  sub-arrays for the four sign combinations of input and weight.
* **Group router**: 8 ports. Four go to the local arrays, three to the other
  group routers and one to the central router.
* **Central router**: 5 ports. Four go to the group routers and one to the CPU
  boundary.
* A **packet** is one vector of 64 samples plus one 64-bit routing word. In
  hardware the 64 samples are 64 parallel analog wires. Here each sample is a
  4-bit code.

## Routing word: how a network topology becomes a path

The CPU does not configure the arrays. Each packet carries its own route. The
word is written into the Config-queue by `setp`:

| bits   | field | meaning |
|--------|-------|---------|
| 63     | V     | valid; a packet with V = 0 is dropped by the first router that sees it |
| 62     | H     | 0 = MLP word, 1 = AAM word |
| 61:7   | route | MLP: `Addr0, Addr1, ..., CPU`; AAM: `Addr0, Loop[6:0], CPU` (5-bit addresses from bit 61 downwards) |
| 6:0    | count | number of output lanes the CPU will read (0 = all 64) |

Address format: bit 4 = 1 means the CPU. Otherwise bits 3:2 give the array
within the group and bits 1:0 give the group (`nca_pkg::mbc_addr(group, array)`).
The route field holds up to 11 MLP addresses.

Every router looks only at the **head address**, the top 5 bits of the route
field. A CPU address goes towards the central router and then to the Out-queue.
An address in the router's own group goes to that local array. Any other address
goes to the router of the group it names. After an array has computed, its
group router's **packet generator** shifts the served address out of the word:

* **MLP** (`H = 0`): one shift of 5 bits. The next layer's array becomes the
  head. A three-layer network is therefore `Addr0, Addr1, Addr2, CPU`, one array
  per layer, in any groups.
* **AAM** (`H = 1`): the Hopfield iteration stays inside one array. The work-queue
  entry feeds the array output straight back into its input `Loop` more times,
  so there are `Loop + 1` passes in all (1 to 128). The PG then removes both the
  address and the loop field. It clears H, so the CPU address is at the head.

## Inside a group router

Each group router has these parts:

1. **Input buffers (sample-and-hold)**: one packet per port from another router.
   A buffer's ready signal is its emptiness, so a full buffer pushes back on the
   sender. For the four local arrays the buffer is the work queue's result
   register.
2. **Route computation**: the head address of each buffered packet picks one of
   the 8 outputs.
3. **Switch allocator (SA)**: for every output, a round-robin choice among the
   buffers that want it, provided the output can accept.
4. **Crossbar multiplexer**: each output takes the packet of its granted buffer.
   A hop from one router's buffer into the next router's buffer takes one cycle.
5. **Work queue (WQ)**: one entry per local array. A packet delivered to array
   *k* fills entry *k*. The entry keeps the routing word, pulses `mbc_start` and
   loads its **computing counter** (CO) with the array latency. It samples the
   array output when the counter expires. It counts AAM passes. It hands the
   result to the **packet generator**, which writes the result packet with its
   advanced routing word into the result buffer. The entry takes a new packet
   as soon as its result has moved into that buffer. So a route may name the
   same array twice in a row without deadlock.
6. **Status recorder (SR)**: a registered word with array-busy, result-buffer and
   input-buffer occupancy.

The central router has the same buffers, route computation, SA and crossbar,
but no work queue.

## The crossbar array model

`mbc_array` is a behavioural model of the analog array. It computes the same
function as the real part, on the codes:

```
y[j] = sat4( ( sum_i x[i] * w[i][j] ) >>> ACT_SHIFT )
```

Inputs and outputs are signed 4-bit codes. Weights are signed 8-bit, which is a
sign plus a 7-bit memristor conductance level. The sum is accumulated as four
partial sums (+x·+w, +x·−w, −x·+w, −x·−w), as the four physical sub-arrays
would produce them, and then combined. The neuron is a saturating linear stand-in
for the sigmoid, with the scale set by `ACT_SHIFT` (7, so a full-scale weight of
127 is about 1.0). The result is valid `LAT` = 2 cycles after `start`. The array
has no done signal: the work queue counts the latency itself. Weights are not
reset, because memristors keep their state. The model does not include noise,
device variation or drift.

## Instruction interface and queues (`nca_cpu_if`)

| instruction | action | stalls while |
|-------------|--------|--------------|
| `setp reg`  | push routing word `reg` into the Config-queue (128 x 64 bit) | Config-queue full |
| `movd reg`  | push input element `reg[3:0]` into the In-queue (64 x 4 bit) | In-queue full |
| `launch`    | pop one routing word, read the **whole** In-queue as one 64-lane vector (lane *k* = entry *k*, unfilled lanes 0) and send the packet to the central router | Config-queue empty, previous packet not yet taken, calibration pending |
| `deq reg`   | pop one element from the Out-queue | Out-queue empty |

A result arriving from the central router is loaded into the Out-queue in one
step, but only when the Out-queue is empty. Only the number of lanes given in
the routing word's count field is loaded. Until then the result waits in the
network and the network backs up behind it. The CPU must therefore read each
result before a later one can arrive. A program that launches more runs than
the network can hold without reading would stall the in-order pipeline on a
`launch`. The compiler has to avoid that.

The instruction port is a request/ready pair. An instruction is presented with
`instr_valid`, `instr_op` and `instr_data`, and it completes in the cycle
`instr_ready` is high. For `deq`, the data is on `deq_data` in that cycle
(`deq_fire`).

## Inline calibration (`calib_ctrl`)

Small read currents slowly shift memristor resistances. The shift is fastest in
AAM mode, where the same inputs are applied over and over. The controller counts
completed runs. After `T_ITVL` = 20000 runs it calibrates:

1. It raises `hold`, so new `launch` instructions stall. It then waits until no
   launched run is left inside the NCA, so calibration always falls between two
   NCA operations.
2. For each stored training vector (array address, input, target) it injects a
   packet routed to that array and back. It takes the result itself: results go
   neither to the Out-queue nor to the CPU.
3. It applies a sign-sign delta rule, one weight per cycle through the array's
   read/write port, over all 64x64 weights:
   `w[i][j] += STEP * sign(t[j] − y[j]) * sign(x[i])`, saturating. A weight
   changes only when its output was wrong and its input non-zero.
4. It repeats passes over the training set until every output matches its
   target, or until `MAX_PASS` passes are done. It then clears the counter and
   releases `hold`.

`cal_start` starts a calibration at once. The host loads the training set
through `ts_*` and offline-trained weights through `prog_*`.

## Timing (default parameters, one clock = the 333 MHz control clock)

* Router hop, buffer to buffer: 1 cycle. A buffer accepts at most one packet
  every 2 cycles.
* Array evaluation inside a work-queue entry: `LAT + 2` cycles from the hop into
  the entry until the result packet is buffered. Each further AAM pass costs
  `LAT + 1` cycles.
* A two-layer MLP inside one group takes `10 + 2*LAT` = 14 cycles. The count
  runs from presenting `launch` to the result being in the Out-queue. It breaks
  down as follows:
  * 1 cycle to issue the instruction;
  * 1 cycle in the launch register;
  * 1 cycle each in the central and group buffers;
  * `LAT + 2` cycles per array;
  * 1 cycle each through the central buffer and into the Out-queue.
* Calibration takes about 4100 cycles per training vector per pass, because it
  sweeps all 4096 weights.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `harmonica_nca` | `MBC_LAT` | 2 | own choice (crossbar + op-amp + sigmoid ≈ 3.8 ns at 333 MHz) |
| | `ACT_SHIFT` | 7 | own choice |
| | `T_ITVL` | 20000 | architecture |
| | `CAL_VEC`, `CAL_PASS`, `CAL_STEP` | 8, 16, 1 | own choice |
| `nca_pkg` | lanes, code width, weight width | 64, 4, 8 | 64 and 4 from the architecture; 8 (sign + 7 bits) own choice |
| `sync_fifo` (Config-queue) | `WIDTH`, `DEPTH` | 64, 128 | architecture |
| `in_queue`, `out_queue` | `DEPTH` | 64 | architecture |
| `mbc_array` | `N_ROW`, `N_COL` | 64, 64 | architecture |

## Where this design departs from, or adds to, the architecture

* **Analog parts are codes.** The DACs, ADCs, amplifiers, sample-and-holds and
  the crossbar are not circuits here. The DAC/ADC conversion is the identity.
  The S/H is a register. The crossbar and sigmoid are the arithmetic model
  above. Signal distortion, noise, device variation and drift are not modelled.
* **No layer partitioning.** A layer wider than 64 inputs or outputs has to be
  split over several arrays whose outputs are added in the analog domain. How
  that addition is done is not specified, so each route address here is one
  whole layer on one array. Networks such as 120→100→3, 64→128→32→10 or
  125→32→2 therefore do not run. 36→16→2, 42→30→3, 29→19→4 and 21→32→3 do,
  with one array per layer.
* **AAM on one array.** The AAM routing format names a single array. The
  iteration is kept inside that array's work-queue entry, which is up to 64
  neurons and up to 128 passes. AAM networks spread over several arrays are not
  supported.
* **Output lane count in the routing word** (bits 6:0): an addition so that
  `deq` reads exactly the network's outputs.
* **Group router port 8** goes to the central router. The architecture also
  describes it as going to "the CPU". Both readings reach the CPU through the
  central router.
* **The status recorder is only observed.** Flow control between routers uses
  per-link valid/ready signals. The status words come out at the top as
  `group_status` and `central_status` and nothing inside uses them.
* **Handshakes, buffer depths, arbitration, cycle latencies, stall rules, the
  instruction encoding (`nca_op_e`), the weight-programming port, the size of the
  calibration training set and the sign-sign form of the delta rule** are this
  design's choices.
* The host CPU is not included. Its interface is the instruction port of the top.

## Files

| file | contents |
|------|----------|
| `rtl/nca_pkg.sv` | sizes, packet and routing-word types, routing helpers (head, loop, PG advance) |
| `rtl/harmonica_nca.sv` | top: CPU boundary, calibration, central router, 4 group routers, 16 arrays |
| `rtl/nca_cpu_if.sv` | instruction execution, injection and ejection, run/idle tracking |
| `rtl/sync_fifo.sv`, `rtl/in_queue.sv`, `rtl/out_queue.sv` | Config-, In- and Out-queue |
| `rtl/central_router.sv`, `rtl/group_router.sv` | routers; the group router includes S/H buffers, crossbar mux and status recorder |
| `rtl/switch_alloc.sv` | round-robin switch allocator |
| `rtl/work_queue.sv` | WQ entries with computing counters and packet generator |
| `rtl/mbc_array.sv` | behavioural crossbar array + neuron |
| `rtl/calib_ctrl.sv` | inline calibration |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_harmonica_nca.sv` | end-to-end test (shortened calibration interval) |
| `tb/tb_harmonica_full.sv` | one full operation at default parameters |
| `tb/nca_ref_pkg.sv` | reference layer function used by the testbenches |

## Verification

Each testbench compares the outputs of its module with values it computes on its
own. The crossbar reference is a plain dot product with shift and saturation
(`nca_ref_pkg::mvm`). Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The end-to-end testbench (`tb_harmonica_nca`) runs the following through the
instruction interface. All results are checked against the reference.

* an MLP inside one group, with its latency;
* an MLP across two groups;
* an AAM with four passes;
* runs on drifted weights;
* a burst whose results back up behind the Out-queue;
* a calibration triggered by the run interval that restores the drifted weights
  exactly, while a launch stalls behind it;
* back-to-back launches, with contention at the central router;
* a dropped invalid packet.

It counts each of these mechanisms and fails if any of them never happened.
`tb_harmonica_full` runs one 64-input, two-layer operation across two groups at
the default parameters.

## Simulating

With Verilator 5 (the testbenches use `--timing` constructs):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/nca_pkg.sv tb/nca_ref_pkg.sv tb/tb_harmonica_nca.sv --top-module tb_harmonica_nca
./obj_dir/Vtb_harmonica_nca
```

Replace the testbench file and top module to run any other test. Verilator's
two-state simulation starts uninitialised state at random values. The design
resets all control state, and the testbenches program every weight they rely on.
