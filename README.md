# ABR flow control for an ATM end system

An ATM end system that offers the ABR (available bit rate) service must send
each virtual connection no faster than its *allowed cell rate* (ACR), and the
ACR changes all the time as resource management (RM) cells come back from the
network. The hard part splits in two. Working out the new rate from RM-cell
contents needs floating point and changes with every revision of the
standard, so it suits software. Enforcing the rate cell by cell, and
inserting and extracting RM cells at line speed, must be done in hardware.

This RTL is the hardware half. Software on an external CPU writes one number
per connection, the **allowed emission interval (AEI)**: the number of cell
times between two cells of that connection. The hardware then does three
things:

* It queues the cells of up to 32 connections in **one shared cell memory**,
  as one linked list per connection.
* Once per cell time it **sweeps a small parameter memory** to decide which
  connections may send.
* It sends **forward RM cells** after every Nrm data cells, or after Mrm
  cells once Trm has elapsed. It sends **backward RM cells** as soon as the
  software hands them over. On the receive side it **takes out the RM
  cells** of its connections for the software.

The design follows the structure published in "Design of Flow Control
Function for ABR Service in ATM Networks". Widths, sizes, the CPU bus and all
handshakes are this implementation's own (see *Departures and own choices*).

## Block structure

```
 service side (transmit)                                     ATM side (transmit)
   svc_tx_* ──► cell_queue ──────────────┐                     atm_tx_*
                 one_cell_fifo            │ release             ▲
                 vc_lookup                ▼                     │
                 write/read address  ┌───────────┐  RM cell  ┌──────────┐
                 memories            │cell_tx_ctrl│◄─────────│rm_cell_out│◄─ templates,
                 idle address FIFO   └───────────┘          │ + crc10   │   backward RM
                 cell_buffer          ▲   │ data_sent        └──────────┘   cells (CPU)
                                      │   ▼                       ▲ frm_req
   cell_slot_timer ── slot_start ──►emission_scheduler   rm_emission_ctrl
                                      (TCD/AEI sweep)     (Ndt/Nrm/Mrm/Trc/Trm)

 ATM side (receive)                                         service side (receive)
   atm_rx_* ──► rm_cell_input ──────────────────────────────► svc_rx_*
                  └─► received-RM FIFO, EFCI state ──► cpu_if ◄──► CPU bus, irq
```

`abr_flow_ctrl` is the top. In the source design the cell rate control block
(CRCB) holds the cell queue and the emission scheduler. The RM cell output
block (RCOB) holds `rm_emission_ctrl`, `rm_cell_out` and `crc10`. The RM cell
input block (RCIB) is `rm_cell_input`. The control parameter calculation
block (CPCB) is the software on the other side of `cpu_if`.

The PHY, the ATM layer chip and the adaptation interfaces on both sides are
outside this RTL. Their cell streams are the top's ports.

## The shared cell buffer and its linked lists

This is the least obvious part of the design. Giving each connection its own
FIFO wastes memory. A connection allowed one cell per 20,000 cell times needs
a 20,000-cell FIFO. A FIFO chip cannot be sized per connection, so every
FIFO would need that size. Two connections with intervals of 1,000 and 20,000
cell times would need 2 × 20,000 cells in FIFOs, but only 21,000 in a shared
memory.

The shared memory (`cell_buffer`, 2^AW locations) stores at each location a
53-octet cell and a **tag**: the address of the next cell of the same list.
Three small structures manage it:

| structure | contents |
|---|---|
| write address memory `W[n]` | the location where the next cell of list *n* will be written. It is always a reserved, still-empty location. |
| read address memory `R[n]` | the location of the oldest cell of list *n* |
| idle address FIFO | every location not in use |

**Store**, in one clock. The cell's VPI/VCI is looked up to give list *n*.
The cell is written at `W[n]`. Its tag is the address *A* at the head of the
idle address FIFO. *A* is popped and becomes the new `W[n]`. The list thus
always ends in a reserved empty location that the next cell will fill.

**Release**, in two clocks. If `R[n] == W[n]`, the list is empty. Otherwise
the location `R[n]` is read. The cell goes out, its tag becomes the new
`R[n]`, and the old `R[n]` goes back into the idle address FIFO.

Example with two lists, initialised to `W=R=AAAA` (list 1) and `W=R=BBBB`
(list 2), with X, Y, YY, XX next in the idle FIFO:

```
cell 1 of list 1 -> AAAA, tag X ; W1=X
cell 1 of list 2 -> BBBB, tag Y ; W2=Y
cell 2 of list 2 -> Y,    tag YY; W2=YY
cell 2 of list 1 -> X,    tag XX; W1=XX
release list 1: read AAAA, R1=X,  AAAA -> idle FIFO
release list 2: read BBBB, R2=Y,  BBBB -> idle FIFO
```

Software must set things up before any cell arrives. Each list *n* gets its
own address with `W[n] = R[n]`, and every other address goes into the idle
address FIFO exactly once. With NUM_VC lists, 2^AW − NUM_VC cells can be held.

A cell is dropped and counted (status register 2) in two cases: its VPI/VCI
is not in the connection table, or no idle address is left.

## Deciding emission instants: the parameter sweep

Each connection could have its own down-counter, but the logic would then
grow with the number of connections. Instead, `emission_scheduler` keeps, per
entry:

* `TCD`: cell times since the connection was last allowed to send;
* `AEI`;
* the list number of the entry's cell queue.

At every `slot_start` an access controller walks through the entries, one per
clock. For each entry one shared adder forms `TCD+1` and one comparator
checks it against `AEI`:

* If `TCD+1 >= AEI`, TCD is cleared and the list number is issued as a
  **permit**.
* Otherwise `TCD+1` is written back.

A connection with interval AEI is therefore permitted exactly once every AEI
cell times. `AEI = 0` leaves an entry idle.

The whole sweep must fit in one cell time. At 149.76 Mbit/s a cell time is
2.83 µs. This RTL assumes an octet-rate clock of 18.72 MHz, which gives 53
clocks per cell time (`CELL_CLKS`). The 32-entry sweep takes 34 of those 53
clocks. An elaboration-time assertion in the top checks `NUM_VC + 2 <=
CELL_CLKS`. To serve more connections, raise the clock or add a second
scheduler.

## One cell per cell time: `cell_tx_ctrl`

Permits go into a FIFO. At each `slot_start` the transmit controller sends
one of these, in this order:

1. a waiting RM cell from `rm_cell_out` (backward RM cells before forward
   ones);
2. otherwise the head cell of the oldest permitted list. If that list is
   empty, the permit is spent and the next one is tried, up to `MAX_TRY`
   lists per cell time.

A slot with nothing to send produces no `atm_tx_valid`, so the ATM layer
sends an idle cell. Permits that find the FIFO full are lost and counted.
This can only happen when the software has booked more than the link rate.

When several connections are permitted in the same sweep, all but one are
delayed by one or more cell times. The long-run rate is exact, but single
cells can be late. Cell delay variation was not addressed by the source
design either.

## RM cells

**Forward RM cells** (`rm_emission_ctrl`). For each data cell sent on list
*n*, `Ndt[n]+1` is computed. A forward RM cell is requested when either of
these holds:

* `Ndt+1 >= Nrm`;
* `Ndt+1 >= Mrm` and `Trc >= Trm`, where `Trc` counts cell times since the
  last forward RM cell. A second sweep advances it at every cell time.

A request clears `Ndt` and `Trc`. The list number goes into the RM request
FIFO of `rm_cell_out`. That block sends the connection's **forward RM
template**, a full cell that the software rewrites whenever a rate field
changes. `Nrm = 0` switches a list off, and `Trm = 0` switches off the time
rule. With this rule, Nrm data cells go between two forward RM cells. To
count the RM cell itself as one of the Nrm cells, as the ATM Forum rule
does, load Nrm − 1.

**Backward RM cells** are built by software from a received forward RM cell.
The software pushes them into a FIFO, and they are sent first.

**CRC-10.** The hardware replaces the last 10 payload bits of every outgoing
RM cell with a CRC-10 of the other 374 payload bits. The generator is
x^10+x^9+x^5+x^4+x+1, with the register starting at 0.

**Receive** (`rm_cell_input`). A cell with PT = 110 whose VPI/VCI is in the
connection table is removed from the stream and queued for the CPU, and `irq`
rises. All other cells pass to `svc_rx_*` one clock later. For data cells of
known connections the EFCI bit (PT[1]) is tracked per list. A change sets a
bit in the EFCI-changed register, which also raises `irq`.

## Software interface (`cpu_if`)

The bus uses 32-bit words. `cpu_wr` and `cpu_rd` are one-clock strobes, and
read data appears one clock after `cpu_rd`. Address bits [15:12] select the
region and bits [11:0] the index:

| region | index | write | read |
|---|---|---|---|
| 0 status | 0 | — | {EFCI changed pending, RM cell pending} |
| | 1, 2, 3 | — | received-RM count, store drops, EFCI state |
| | 4 | write 1s to clear EFCI-changed bits | EFCI changed bits |
| | 5, 6, 7, 8, 9 | — | permit drops, received-RM drops, idle addresses, forward-request drops, backward-RM drops |
| 1 connection table | list | {valid[24], VPI[23:16], VCI[15:0]} | — |
| 2 / 3 | list | write / read address memory | — |
| 4 | — | push an address into the idle address FIFO | — |
| 5 scheduler | 2·entry | {list[..:16], AEI[15:0]} | — |
| | 2·entry+1 | TCD | — |
| 6 RM parameters | 4·list + f | f = 0 Nrm, 1 Mrm, 2 Trm, 3 clear Ndt/Trc | — |
| 7 staging | 0..13 | cell word (word 0 = octets 0..3) | same |
| 8 | list | copy the staged cell to the forward RM template | — |
| 9 | — | push the staged cell as a backward RM cell | — |
| A received RM | 0..13 | any write pops the oldest cell | word of the oldest cell |

The start-up sequence is:

1. Write regions 2 and 3 for every list.
2. Push the remaining addresses into region 4.
3. Write the connection table (region 1).
4. Write each connection's forward RM template (region 7, then 8) and its
   RM parameters (region 6).
5. Last, write the AEI (region 5). TCD is not reset and keeps counting
   while AEI is 0, so clear TCD (region 5, 2·entry+1) just before the first
   AEI write if the first cell should wait a full interval. Writing an AEI
   does not reset TCD, so a rate can be changed on the fly.

## Parameters (top `abr_flow_ctrl`)

| parameter | default | meaning |
|---|---|---|
| `NUM_VC` | 32 | connections (lists and scheduler entries) |
| `AW` | 15 | buffer address width: 32,768 cell locations |
| `AEI_W` | 16 | AEI and TCD width (intervals up to 65,535 cell times) |
| `CELL_CLKS` | 53 | clocks per cell time |
| `CNT_W` | 9 | Ndt/Nrm/Mrm width |
| `TRM_W` | 16 | Trc/Trm width, in cell times |
| `RX_DEPTH`, `BRM_DEPTH` | 16 | received-RM and backward-RM FIFO depths |
| `MAX_TRY` | 8 | empty lists skipped per cell time |

Cells are passed whole as `abr_pkg::cell_t`: 424 bits, with the UNI header
(GFC, VPI, VCI, PT, CLP, HEC) first, then the 48-octet payload. The
`events` output gives one-clock strobes (stored, dropped, permit, data sent,
empty list, forward RM by each rule, RM sent) for monitoring.

## Departures and own choices

The source design gives the block structure, the shared-memory linked-list
procedure, the TCD/AEI sweep and the Ndt/Nrm/Trc/Trm RM control. All the
following is this implementation's:

* The number of connections (32). The source leaves it to the speed of the
  memory.
* The buffer size (32,768, chosen to hold the 21,000-cell example).
* All widths, the clock rate and the cell-wide transport.
* VPI/VCI translation through an associative table. The source says only
  that the identifier is translated.
* Comparing with `>=`, where the source describes both an equality test and
  a `TCD < AEI` test. This gives the same results and is robust when a
  parameter is lowered.
* Forward RM cells kept as per-connection templates, where the source speaks
  of FIFOs.
* The transmit order between RM and data cells, the permit FIFO and the
  handling of empty lists.
* The drop policies and the whole CPU register map.
* RM-cell extraction written as logic. The source suggests leaving it to a
  commercial ATM layer chip.
* The polynomial and coverage of CRC-10, which come from the ATM standards.

Not part of this RTL:

* the rate computation (ACR/AEI, and turning received RM cells into backward
  RM cells), which is software;
* the CPU and its memory;
* the PHY and ATM layer devices;
* the service and ATM adaptation interfaces.

## How far it is verified

Every module has a self-checking testbench in `tb/` with an independent
model. The models are queues per list, a TCD/AEI model, an Ndt/Trc model, and
a long-division CRC. Each testbench has also been shown to fail on a
deliberately broken copy of its module.

`tb_abr_flow_ctrl` runs the top at its default size for 3,000 cell times. Six
connections have intervals from 4 to 24 cell times. The testbench plays the
software:

* it initialises the design;
* it answers every received RM cell with a backward RM cell;
* it clears EFCI changes;
* it floods one list until the 32K-cell buffer is full.

It checks:

* per-connection order and content;
* data-cell counts within the bounds set by AEI;
* forward RM cells equal to their templates, with valid CRC and with Mrm to
  Nrm data cells between them;
* backward RM cells;
* pass-through of received traffic.

Every mechanism must occur at least once.

`tb_workload_two_vc` runs the two-connection example (1,000 and 20,000 cell
times). It stores 21,000 cells without loss, then checks that the cells leave
exactly 1,000 × 53 and 20,000 × 53 clocks apart.

`tb_workload_full_rate` keeps the link completely full in two ways:

* one connection with AEI = 1 sends 300 cells in 300 consecutive cell times;
* all 32 connections with AEI = 32 share the link. The sweep then issues
  32 permits per round, the link carries a cell in every cell time, and each
  connection's cells leave exactly 32 cell times apart.

Not verified: gate-level timing, and behaviour under sustained overbooking
beyond counting the lost permits.

## Simulating

All files are SystemVerilog 2017. The package `rtl/abr_pkg.sv` must be read
first. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/abr_pkg.sv \
          tb/tb_abr_flow_ctrl.sv --top-module tb_abr_flow_ctrl -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=M`. Block testbenches
are named `tb_<module>.sv`, except that `tb_list_addr_mem.sv` covers both
address memories. All of them run in a few seconds at most. The full-size end-to-end
test runs in under a second. It simulates about 3 ms, most of which goes to
loading the 32,736 idle addresses.
