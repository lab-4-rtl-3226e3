# Memory traffic controller

A small CPU system has one memory and three masters that want it: the
CPU's instruction **fetch unit**, the CPU's **data path**, and an **I/O
unit** with DMA. The memory traffic controller sits between them and the
memory and lets exactly one master through at a time. It is a three-port
multiplexer whose select comes from a three-state Moore state machine; the
state simply names the master being served.

```
 fetch unit  ──┐                         ┌──────────┐
 data path   ──┼── mtc_port_mux ─────────┤  memory  │
 I/O unit    ──┘        ▲ sel            └──────────┘
                        │
               mtc_arbiter_fsm  (state = unit being served)
```

## How a master gets the memory

There is no grant signal. A master raises `*_req` together with `*_rd` or
`*_wr`, an address and (for a write) write data, and **holds all of them
until it sees its `*_ready`**. The memory's `mem_ready` is passed only to
the master being served; every other master sees its ready low and just
keeps waiting with its request up. When the served master sees ready it
either drops its request, or keeps it up with a new operation to make
back-to-back accesses without losing the memory.

The memory side uses the same convention: `mem_req` with `mem_rd`/`mem_wr`
and `mem_addr`/`mem_wdata`, held until the memory answers with `mem_ready`
(and `mem_rdata` for a read). The memory may take any number of cycles.

## Arbitration

The state machine (`mtc_arbiter_fsm`) has three states, *serving fetch*,
*serving data path* and *serving I/O*. Every clock edge it chooses the next
owner in this order:

1. the current owner, as long as its request is active: an owner is never
   pre-empted, so it keeps the memory for as many operations as it holds
   its request for;
2. otherwise the fetch unit, then the data path, then the I/O unit;
3. if nobody requests, the fetch unit. Fetch is the most frequent user
   (at least one access per instruction), so parking on it means its next
   access starts without a switch cycle.

| current state | 1st            | 2nd            | 3rd            | no request |
|---------------|----------------|----------------|----------------|------------|
| serving fetch | fetch → stay   | data path      | I/O            | stay       |
| serving data path | data path → stay | fetch    | I/O            | fetch      |
| serving I/O   | I/O → stay     | fetch          | data path      | fetch      |

Reset (asynchronous, active high) puts the machine in *serving fetch*.

### Timing consequences

Because the multiplexer select is the registered state (Moore outputs),
the selected master's signals pass through combinationally, but a change
of owner costs one clock edge:

- The owner, and the fetch unit while the controller is parked on it,
  reach the memory in the same cycle they raise their request.
- Any other master reaches the memory on the first clock edge at which the
  current owner's request is low and it wins the priority order. After an
  owner finishes (ready, then request dropped) there is therefore one
  cycle in which the memory port shows the idle old owner before the new
  one is connected.
- The fixed priority can starve the I/O unit if the fetch unit and the
  data path keep requesting; nothing in the arbiter prevents it.

## Interface of `mem_traffic_ctrl`

| group      | signals                                                                  |
|------------|--------------------------------------------------------------------------|
| clock/reset| `clk`, `rst` (async, active high)                                        |
| fetch unit | in: `fetch_req`, `fetch_rd`, `fetch_addr`; out: `fetch_rdata`, `fetch_ready` (read only, no write) |
| data path  | in: `dp_req`, `dp_rd`, `dp_wr`, `dp_addr`, `dp_wdata`; out: `dp_rdata`, `dp_ready` |
| I/O unit   | in: `io_req`, `io_rd`, `io_wr`, `io_addr`, `io_wdata`; out: `io_rdata`, `io_ready` |
| memory     | out: `mem_req`, `mem_rd`, `mem_wr`, `mem_addr`, `mem_wdata`; in: `mem_rdata`, `mem_ready` |
| status     | out: `serving` — 0 fetch, 1 data path, 2 I/O                             |

Parameters: `ADDR_W` and `DATA_W`, both 16 by default. Read data goes to
the served master only; the others see zero.

## Files

| file | contents |
|------|----------|
| `rtl/mtc_pkg.sv` | unit index and state enums (state code = unit index = multiplexer select) |
| `rtl/mtc_arbiter_fsm.sv` | next-state logic and state register, with assertions that an owner with an active request is never left |
| `rtl/mtc_port_mux.sv` | the three-port multiplexer and ready steering, with an assertion that at most one master sees ready |
| `rtl/mem_traffic_ctrl.sv` | top level: wires the two together to the named master and memory ports |
| `tb/tb_mtc_arbiter_fsm.sv` | every request pattern from every state, plus a random run, against a table of the rules |
| `tb/tb_mtc_port_mux.sv` | routing of every signal for every select value |
| `tb/tb_mem_traffic_ctrl.sv` | end-to-end run at default widths (see below) |
| `tb/mtc_mem_model.sv` | simulation model of the memory, 0–3 cycle random wait |
| `tb/mtc_unit_model.sv` | simulation model of a master issuing random reads/writes |

## Verification

`tb_mem_traffic_ctrl` runs the top with its default parameters against
three master models (fetch: 1500 reads; data path: 800 and I/O: 500 mixed
reads and writes, one operation in three back-to-back) and a memory model
with a random wait. Every cycle it compares `serving` with its own
reference arbiter (so every owner change must fall on the expected edge),
checks that the memory port carries the owner's signals and that ready
reaches only the owner, and checks every returned read word against its
own copy of the memory. It also counts each arc of the state diagram,
back-to-back holds, cycles in which a requesting master was held off, and
choices among several waiting masters, and fails if any never occurred.
It runs in well under a second.

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. To run one with plain Verilator:

```
verilator --binary --timing --assert --top-module tb_mem_traffic_ctrl \
  rtl/mtc_pkg.sv rtl/mtc_arbiter_fsm.sv rtl/mtc_port_mux.sv rtl/mem_traffic_ctrl.sv \
  tb/mtc_mem_model.sv tb/mtc_unit_model.sv tb/tb_mem_traffic_ctrl.sv
./obj_dir/Vtb_mem_traffic_ctrl
```

For the block tests, compile `rtl/mtc_pkg.sv`, the block and its
testbench (`tb_mtc_arbiter_fsm` or `tb_mtc_port_mux`) the same way.

## Design choices and departures

The arbitration rules, the three states, the reset state, the
ready-steering rule, the absence of a grant signal and the signal set of
each port are the design's. The following are choices made here:

- **When a state ends.** The owner is held for as long as its request is
  active, not just for one operation; a master that wants to give the
  memory up drops its request after its ready. A single operation per
  turn is the special case where the master always drops its request.
- **Data buses.** The data connections are two-way buses in the system
  diagram; here each is a separate read bus and write bus, with no
  tri-states.
- **Widths** of 16 bits for address and data; neither is fixed by the
  design.
- **Reset** is asynchronous and active high; **state encoding** is
  binary with the state code equal to the unit index; the unused fourth
  code returns to *serving fetch* and leaves the memory port idle.
- **`serving`** is an extra status output.
- Read data to masters that are not served is forced to zero.
- Only the plain Moore form is built. Registering the outputs (a Moore
  machine with an output register) would add a cycle of latency to every
  memory access and is not used.

The CPU, the I/O unit with DMA, the memory, and the UART bridge and UART
of the surrounding system are outside this design; the controller's ports
to them are its top-level ports.
