# Cell switching fabrics for high-performance routers

This repository holds synthesizable SystemVerilog for two switching fabrics. Both move fixed-length
cells between the line cards of a router, and both try to lose fewer cells under congestion without
the cost of a larger crossbar.

* **Overflow-buffer crossbar** (`ofb_switch`). An input-queued 16-port crossbar gets one extra
  input. A shared bus connects every line card to a common *overflow buffer*, and that buffer is
  the crossbar's 17th input. Normally a line card keeps its cells in its own virtual output queues
  (VOQs). When a burst fills one of those queues, further cells are not dropped. They go over the
  bus into the overflow buffer, and the crossbar drains them from there. The added hardware grows
  as O(N), where adding crossbar inputs would grow as O(N²).
* **Interleaved multistage switching fabric** (`imsf_fabric`). This is a 256-port fabric built
  from several *panels*. Each panel is an I-Cubeout network: a chain of stages of small 4×8
  self-routing elements that deflect cells instead of buffering them. Cells that fall off the end
  of one panel recirculate into the next panel. Up to two cells per cycle leave the fabric at each
  output. Because the panels are independent, they also act as redundant hardware: a failed
  element is routed around, and a failed panel can be replaced by a standby one.

`router_fabrics_top` places the two side by side, each with its own ports (prefixes `ofb_` and
`imsf_`). They share only the clock and reset.

## Interleaved fabric

### Lines, digits and stages

The N = 256 lines are numbered in base b = 4, so a line number has n = log₄256 = 4 digits. A
switching element (SE) joins the b lines whose numbers differ only in the digit that its stage
corrects. Stage s (0-based) corrects digit `s mod n`:

* stages 0–3 form one full copy of the indirect 4-cube;
* stages 4–5 repeat the pattern of stages 0–1.

Each stage has N/b = 64 elements. An element has:

* 4 inlets;
* 4 remote outlets, which lead to the next stage;
* 4 local outlets, one to the destination of each of its 4 rows.

### Routing tag and distance

Each cell carries a routing tag: the digit-wise XOR of its input line and its destination.

* A nonzero digit means the cell still has to change that digit of its line number.
* A zero digit means it does not.
* An all-zero tag means the cell is on its destination row and may leave through a local outlet.

All stages use the same element because the tag is **rotated left by one digit at every stage**.
Each element therefore only looks at the leftmost digit. At the element, the outlet the cell wants
is `inlet XOR digit`. Taking that outlet clears the digit.

The **distance** of a cell is the position of the rightmost nonzero digit. It is the least number of
further stages the cell needs.

### Inside one switching element (`ico_se`, combinational)

1. A cell with distance 0 asks for its local outlet. If that outlet is free, the cell leaves the
   fabric there.
2. The other cells are served in order of increasing distance. Each takes the remote outlet it
   wants if it can. A cell that loses is **deflected** to the first free outlet, and its digit is
   rewritten to `taken XOR wanted`. The digit then still names the change that is left to make;
   the next copy of this stage can make it. Deflection costs at least one extra copy of stages.
3. Cells with the same distance are ordered from a rotating start. The fabric drives that start
   from a 16-bit LFSR, which gives the random tie break the architecture asks for.

An outlet that leads to a faulty element is never used. A cell that finds no usable outlet is
dropped. That happens only when elements are faulty.

### One panel (`ico_panel`)

Every remote outlet ends in a one-cell latch, so a cell advances exactly one stage per clock.
Every local outlet also ends in a one-cell latch. That latch is held until the output's
concentrator drains it. If it is still full, a distance-0 cell that wants it is deflected.

Cells leaving the last stage are the panel's *primary outputs*. They recirculate into the last
copy of stages, which is stages X−n … X−1 = 2…5. Two rules govern re-entry:

* **Same logical row.** A cell leaving on line L re-enters on line L. Re-entering on the same
  physical position can leave a cell with an all-zero tag on the wrong row, and it then never
  arrives.
* **First available entry point (FA).** The cell enters at the first stage of the last copy whose
  inlet on line L is free this cycle and whose element works. Its tag is rotated by (entry stage −
  (X−n)) digits, so it lines up with that stage. For example, a cell entering at stage X−2 has
  its digits rotated one place left.

A cell that finds no entry point is dropped.

### Several panels (`imsf_fabric`)

* **Input demultiplexers (`panel_demux`).** They compute the tag and send *all* cells of a cycle to
  the same panel. Successive cycles use successive panels, so each panel sees a load of p/Y.
* **Recirculation between panels.** Cells from panel i's primary outputs recirculate into panel
  i+1 (mod Y), following the rules above. This is where the interleaving pays off, in fewer lost cells here and in lower latency when the elements have queues: a deflected cell
  gets a fresh, lightly loaded set of stages instead of competing with the next input cells of the
  same panel.
* **Concentrators (`concentrator`).** Each output has one. Every cycle it takes up to ξ = 2 cells
  from the 12 local-outlet latches of its row: 6 stages × 2 panels. The rightmost stage goes first,
  so cells that have travelled longest are not starved. At the same stage, the lower-numbered panel
  goes first.

### Latency

A cell that meets no conflict leaves at the stage where its tag becomes zero. It appears on
`out_v/out_pay` **distance + 1** cycles after it is presented on `in_v`.

### Faults and the redundant array (`raif_ctrl`)

`fault[p][s][e]` marks element e of stage s in panel p as faulty. A faulty element accepts nothing:

* the previous stage deflects cells away from it;
* FA re-entry skips it;
* cells arriving at a faulty first-stage element are lost.

`raif_ctrl` treats the panels like disks in a RAID array:

| mode | panels carrying traffic | other working panels |
|---|---|---|
| RAIF0 | all | – |
| RAIF1 | 1 | stand by |
| RAIF2 | Y−1 | 1 stands by |

`panel_fail[p]` takes a panel out. The next working panel takes over on the following clock.
`degraded` is set when fewer panels are working than the mode asks for. The demultiplexers and
recirculation use only active panels.

### Interface

* `in_v[l]`, `in_dest[l]`, `in_pay[l]`: one cell per input per cycle. There is no back pressure: a
  cell the fabric cannot carry is dropped and counted.
* `out_v[l][k]`, `out_pay[l][k]`: up to ξ cells per output per cycle.
* `n_in`, `n_out`, `n_drop`, `n_defl`, `n_rc`: event counts for the current cycle.
* `active`, `standby`, `degraded`, `in_panel`: panel state.

The payload is 16 bits wide (`PW`). The default configuration is "S6/P2": N=256, b=4, X=6 stages,
Y=2 panels, ξ=2. The parameters accept other configurations (S4, S8, S12; one panel). Elaboration
stops if X < n.

### Where this departs from the published architecture

* **No queues inside the elements.** The performance studies of the original architecture use
  elements with a 12-cell queue on every outlet, each accepting up to ξ cells per cycle. How such
  an element orders and forwards its queued cells is not specified. This design therefore uses the
  bufferless element of the original analytical model, with one latch per outlet. Expect somewhat
  different numbers from the buffered model: the full-size testbench measures a mean latency of
  about 5.5 cycles and a drop rate of about 0.05% at full uniform load, against roughly 4.7 cycles
  and 0.013% reported for the buffered S6/P2.
* **No destination queues or resequencing buffers.** The ξ cells per output per cycle are handed
  straight to the port. Cells of one flow can leave out of order when they take different panels
  or are deflected.
* **Inactive panels are skipped.** The original rule is "cycle t goes to panel (t mod Y)+1". Here
  the pointer skips panels that the RAIF control has switched off.

## Overflow-buffer crossbar

### Data path (`ofb_switch`)

Each of the N = 16 line cards has an `ingress_mux` and an input buffer (`voq_buffer`). The buffer
holds 16 VOQs of 8 cells each, 128 cells in all.

1. **Arrival.** The multiplexer stores an arriving cell in the VOQ for its destination if that
   queue has room. Otherwise the cell requests the shared bus.
2. **Shared bus.** `bus_arbiter` grants the bus to one requester per cell time; the other
   requesters' cells are lost. The winner's cell goes into the overflow buffer, a second
   `voq_buffer` whose size is RATIO × 128 cells (RATIO = 2 by default). If the overflow queue for
   that destination is full under the current policy, the cell is lost there.
3. **Crossbar.** `islip_sched` matches the 17 inputs (16 line cards plus the overflow buffer) to
   the 16 outputs. `crossbar` moves one cell per matched pair.

A cell arriving in cycle t can leave in cycle t+1.

### Shared bus arbitration (`bus_arbiter`, `arb_mode`)

* **PRIORITY**: a fixed order; requester 0 always wins. It is the cheapest, but it starves
  high-numbered ports under load.
* **RR**: a round-robin pointer marks the requester with the highest priority. After each grant the
  pointer moves to one past the winner, so the last winner has the lowest priority.

  The original description also says the pointer "is incremented by one location", which is a
  different rule. The one-past-the-winner rule is used because it is the one that gives the
  fairness that description claims.
* **RRG**: round robin that considers only requesters whose overflow queue still has room. This
  spends no bus cycles on cells that would be thrown away on arrival.

### Buffer policies (`voq_buffer`, `buf_policy`)

The queues are linked lists in one memory with a free list. The memory accepts one write and one
read per cell time. The policy decides whether a queue may accept a cell:

* **PRIVATE**: each queue owns CAP/N slots.
* **PUBLIC**: any queue may use any free slot.
* **PUBLIC-PRIVATE**: each queue owns CAP/(2N) slots. It may also take from a public half of CAP/2
  slots while that half has room.

Input buffers always use PRIVATE. The overflow buffer uses `buf_policy`, which may be changed at run
time.

### Scheduler (`islip_sched`)

iSLIP runs four request–grant–accept iterations per cell time. Grant and accept pointers are
round-robin. They move one past the matched partner, and only for matches made in the first
iteration.

The iteration count, cell width (32 bits) and VOQ depth (8) are choices of this design.

### Counters

`n_bus`, `n_bus_lost`, `n_of_full` and `n_of_out` count, per cell time:

* cells moved over the bus;
* cells that lost arbitration;
* cells refused by the overflow buffer;
* cells sent from the overflow buffer through the crossbar.

## Files

| file | contents |
|---|---|
| `rtl/ofb_pkg.sv`, `rtl/imsf_pkg.sv` | default sizes; mode enums |
| `rtl/ofb_switch.sv` | `ingress_mux`, `voq_buffer`, `bus_arbiter`, `islip_sched`, `crossbar` wired together |
| `rtl/imsf_fabric.sv` | `panel_demux`, `ico_panel` (built from `ico_se`), `concentrator`, `raif_ctrl` wired together |
| `rtl/router_fabrics_top.sv` | both fabrics |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench checks the outputs against values it works out itself. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on its own, with a watchdog as a backstop. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ofb_pkg.sv rtl/imsf_pkg.sv \
    tb/tb_imsf_fabric.sv --top-module tb_imsf_fabric
obj_dir/Vtb_imsf_fabric
```

Unreferenced modules are found in `rtl/` through `-Irtl`. Run any other testbench by swapping the
name.

Most unit testbenches run reduced sizes to stay fast. For example, the fabric tests use 16 ports,
3 stages and 2 panels; the switch test uses 4 ports and 2-cell VOQs.

`tb_router_fabrics_top` runs both designs at full size:

* It compiles in about 4 minutes with 4 GB of memory and then simulates in seconds.
* It runs uniform traffic at full load, the five-hot-spot pattern (outputs 19, 63, 135, 182, 237
  with 12% extra traffic), a faulty element, and a RAIF1 panel swap. On the switch side it runs a
  hot spot and every arbitration × policy pair.
* It checks every delivered cell and checks that every cell is accounted for. It also fails if any
  mechanism never happened: bus transfer, bus collision, overflow refusal, overflow output,
  deflection, recirculation, drop, dual-cell output, standby and replacement.
* It prints the mean latency and drop rate of each phase.

Two further testbenches reproduce the shape of the published performance studies:

* `tb_ofb_workloads` drives four 16-port switches with overflow-buffer ratios 1, 2, 4 and 8 with the
  same cells. Every input carries a flow loaded to 92%. Two flow mixes are used: eight bursty plus
  eight Bernoulli inputs, and sixteen bursty inputs. The mean burst is 16 cells, a choice of the
  testbench. Each mix runs under all three arbitration methods and all three policies. The
  testbench prints the drop rate and mean delay of each combination. It checks that a larger
  ratio never drops more, and that RRG never moves a cell that is then refused.
* `tb_imsf_configs` runs five 64-port fabrics under the same uniform traffic: S4/P1, S4/P2,
  S6/P1, S6/P2 and S12/P1. A final phase adds a faulty element. The testbench checks that two
  panels drop fewer cells than one panel of the same length. It also checks that, with the fault,
  S6/P2 drops fewer cells than both S6/P1 and S12/P1, although S12/P1 has as many stages. A
  typical run at full load gives drop rates of 22% for S4/P1 against 0.7% for S4/P2. With the
  fault at 80% load the rates are 5.0% for S6/P1, 4.9% for S12/P1 and 2.5% for S6/P2.

## Trust and limits

* The fabric results are measured on bufferless elements, not the 12-cell buffered ones (see
  above).
* Mean latency is not a good figure of merit for the bufferless elements. A cell that would wait
  in a queue is deflected or dropped instead, so a short fabric that drops many cells can show a
  *lower* latency than a longer one. Compare drop rates.
* A line card turns to the shared bus when the VOQ for the cell's destination is full, not only
  when its whole buffer is. The overflow buffer is a register array; a real design would put it in
  DRAM.
* No testbench runs the full-length statistical studies (10⁵–2·10⁵ cycles). They are a matter of
  run time only: nothing in the RTL limits run length.
* The panel wiring, routing and FA re-entry are checked exhaustively at 16 ports. Every
  input/destination pair must leave at its own row after distance + 1 cycles, and every cell
  under random traffic must be delivered once or counted as dropped. At 256 ports they are checked
  end to end by the full-size testbench.
