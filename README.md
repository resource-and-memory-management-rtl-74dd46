# Flat interconnect, memories and synchronisation for parallel HLS threads

When a C program with Pthreads is compiled to hardware, every thread becomes
its own hardware module, and the threads run at the same time. What they share
decides how fast and how large the result is. That includes memories, global
variables, locks, barriers, and large functional units such as dividers. This
RTL is the hardware around such thread modules. It covers:

- a **flat topology**. Every function, memory and functional unit sits at one
  level of hierarchy, so one unit can serve several modules.
- a generated **point-to-point interconnect**. Masters that never run at the
  same time share a slave through an OR gate. Masters that run in parallel
  share it through a round-robin arbiter.
- **deadlock prevention**. Every arbitrated master interface has a request
  module and a data receiver.
- **three classes of memory**:
  - a global memory controller for pointers resolved at run time (2-cycle
    loads);
  - local and shared-local memories for arrays whose pointers are known at
    compile time (1-cycle loads);
  - single-word variables turned into registers (0-cycle loads).
- **constant arrays replicated** as private ROMs, one per thread.
- a **hardware lock** and a **hardware barrier**, used through ordinary loads
  and stores.

The thread datapaths are not here. They are whatever the compiler produces for
a given program. Their master interfaces are the ports of the top module,
`hls_system`.

## The master-interface convention

Every connection has a master side (the thread) and a slave side (a memory, a
register, a lock, a barrier or a functional unit). A thread has one dedicated
master interface per slave port it uses. So a thread can load from two memories
and start a division in the same clock cycle.

A memory-style request is the struct `hls_pkg::mem_req_t` = `{en, we, addr,
wdata}`. A functional-unit request is `fu_req_t` = `{en, a, b}`. An idle master
drives **all zeros**. That rule is what lets sequential masters share a slave
through an OR gate.

A thread's FSM issues all the requests of one state together and holds them
until its stall is low. The stall is `thr_stall[t]`: the OR of the stalls of
all that thread's arbitrated interfaces. When the stall goes low, every request
of the state has been served exactly once, and the FSM moves on. In the cycle
when the stall goes low, call it cycle *c*:

| slave                          | load data valid on `*_rdata` | arbitrated |
|--------------------------------|------------------------------|------------|
| register module (`reg_*`)      | cycle *c* itself             | yes        |
| shared-local memory (`sl_*`)   | cycle *c*+1                  | yes        |
| hardware lock / barrier        | cycle *c*+1                  | yes        |
| global memory (`gm_*`)         | cycle *c*+2                  | yes        |
| divider (`div_*`)              | cycle *c*+32                 | yes        |
| local memory, ROMs, multiplier | cycle *c*+1                  | no (private) |

The data then stays on `*_rdata` until that interface's next access returns.
With `SHARE_MULT=1` the multiplier is arbitrated too, with the same 1-cycle
latency.

## Why the request module and the data receiver exist

This is the subtle part of the design. Take two threads, d0 and d1. Each
requests both of two shared memories in the same state. Arbiter 0 may pick d0
while arbiter 1 picks d1. Each thread is then stalled by the memory it did not
get. In the next cycle both threads still hold both requests, because their
FSMs have not moved. Round-robin arbiters then swap, and the pair can go on
like this for ever.

`req_module` (one per master interface) is a single register AND-ed with the
request. The register drops to 0 when the interface is granted while its thread
is still stalled by another interface. It holds 0 until the thread's stall
clears. A served interface therefore goes quiet, the remaining requests no
longer conflict, and every request of the state is served exactly once.

A side effect is that one state's accesses complete in different cycles, so
their data also returns in different cycles. The thread still reads all of it
in one cycle. `data_receiver` (one per master interface) handles this:

- A shift register as long as the slave latency takes a 1 on every grant.
- When that 1 reaches the MSB, the slave is returning this interface's data.
  The receiver passes the data straight through and also stores it.
- In every other cycle it presents the stored copy.

Slaves with 0-cycle latency (the register module) need no receiver. Their
output is wired to every master.

`arb_interconnect` bundles these parts for one slave port: N request modules,
a round-robin arbiter (`rr_arbiter`, combinational grant), the payload
multiplexer and N data receivers. `or_interconnect` is the sequential
counterpart, a plain OR of the zero-when-idle requests.

## Memory classes

- **Global memory controller** (`global_mem_ctrl`). This is used when a pointer
  may point into more than one array. The top 9 bits of the address are the
  array's *tag*:
  - the tag enables one RAM;
  - the low bits give the word offset;
  - a registered copy of the tag selects that RAM's output in a multiplexer;
  - the multiplexer's output is registered again.

  A load therefore takes 2 cycles. All arrays behind the controller share its
  two ports. By default two RAMs answer to tags 2 and 3 (`TAG_BASE`,
  `N_MEM`).
- **Local memory** (`dp_ram`, inside the owning thread). This is an array only
  one function uses. It has direct ports, no arbitration and a 1-cycle load.
- **Shared-local memory** (`dp_ram` behind one `arb_interconnect` per port).
  This is an array that several threads use but no ambiguous pointer reaches.
  Each such array has its own ports, so accesses to different arrays never
  contend.
- **Replicated ROM** (`const_rom`). A constant array is copied into each
  thread that reads it. This removes both the contention and the arbiter.
- **Register module** (`reg_module`). A global scalar is held in a register.
  Loads take 0 cycles, and the arbiter serialises stores.

All RAMs are dual-ported. Each port has its own arbiter.

## Synchronisation

- `hw_lock`. A load tries to take the lock. It returns 1 when the lock was free
  (and takes it), or 0 when it was held. A thread polls until it reads 1. A
  store releases the lock.
- `hw_barrier`. A counter reached by loads and stores:
  - a store to word 0 registers an arrival;
  - a load returns a generation number, which counts up each time the last
    participant arrives, and the arrival count then restarts by itself;
  - a thread reads the generation, stores its arrival, and polls until the
    generation changes;
  - a store to word 1 sets the number of participants.

Each lock and barrier has its own ports. Different locks can therefore be used
in the same cycle.

## Functional units

- `pipe_divider`: unsigned, fully pipelined, with a latency equal to the
  operand width (32). One divider is shared by all threads. Because it accepts
  one operation per cycle, threads that are even one cycle out of step hardly
  contend.
- `pipe_multiplier`: a 1-cycle multiplier. By default it is replicated inside
  every thread (`SHARE_MULT=0`). `SHARE_MULT=1` shares one multiplier through
  an arbiter, which saves multipliers and costs input multiplexers.

## Top level: `hls_system`

The default parameters give three threads:

- thread 0, `main`, which owns the local memory;
- threads 1 and 2, the workers, each with its own ROM.

All three share:

- the global memory controller (2 RAMs);
- 2 shared-local memories;
- the register module, the lock and the barrier;
- the divider.

Two sequential callees of `main` (`seq_gm_req`) reach the global memory
through `main`'s port-A interface. Their requests are OR-ed with `main`'s,
they get `main`'s data and stall, and they must not be active at the same time
as `main` (an assertion checks this).

| parameter    | default | meaning |
|--------------|---------|---------|
| `N_THREADS`  | 3       | parallel threads; thread 0 is `main` |
| `N_SEQ`      | 2       | sequential callees sharing `main`'s global-memory port A |
| `N_SL`       | 2       | shared-local memories |
| `SHARE_MULT` | 0       | 1 = one arbitrated multiplier, 0 = one per thread |
| `GM_N_MEM`, `GM_DEPTH` | 2, 256 | arrays behind the global controller, and words each |
| `SL_DEPTH`, `LOC_DEPTH`, `ROM_DEPTH` | 256 | words per memory |
| `ROM_INIT`   | ""      | hex file for the ROMs (zeros when empty) |
| `SL_LAT`     | 1       | shared-local load latency |
| `N_BAR`      | `N_THREADS-1` | barrier participants after reset |

Widths are in `hls_pkg`: 32-bit data, 32-bit addresses and a 9-bit tag.

## Where this RTL departs from, or adds to, the design it implements

- **Configuration.** Multipliers are replicated and the divider is shared.
  This is the configuration with the best run time. Sharing both units gave
  the best area-delay product, and it is one parameter away (`SHARE_MULT=1`).
  The nested (hierarchical) topology, which the flat one replaces, is not
  built.
- **Request module.** The register is specified as holding 0 after a grant
  that does not release the function, and 1 otherwise. Read cycle by cycle,
  that would re-raise the request after one cycle when three or more masters
  contend. Here the register holds 0 until the function's stall clears. With
  two masters the two readings behave the same.
- **Data receiver, variable latency.** The variable-latency mode uses one
  pending bit per interface. It assumes one access in flight per interface, and
  a valid signal that belongs to that interface.
- **Unspecified behaviour, chosen here:**
  - the barrier's whole protocol (only "a counter used through loads and
    stores" is given);
  - the lock's 1-cycle latency;
  - the divider's internals (restoring, unsigned, quotient only, all ones on
    division by zero);
  - the multiplier's latency;
  - word (not byte) addressing;
  - every memory depth and the 32-bit widths;
  - read-first RAMs;
  - synchronous active-low reset.
- **Where private parts sit.** The thread modules are not part of this RTL, so
  private components sit in `hls_system` next to the thread ports. These are
  the local memory, the ROMs and the replicated multipliers. Each one is wired
  only to its owner. In a generated system they would sit inside the thread
  module.
- **Sequential callees.** How sequential callees sit beside parallel threads
  is this design's choice: OR-ed into `main`'s global-memory port A.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against an independent model and checks cycle timing where latency is
part of the contract:

- 2 cycles for the global memory;
- 1 cycle for the local, shared-local and ROM memories;
- 32 cycles for the divider;
- 0 cycles for the register module.

Notable tests:

- `tb_arb_interconnect` reproduces the two-memory deadlock with three
  functions. It checks that every operation completes, that every interface is
  granted exactly once per operation, and that the held and passed-through
  data are both correct.
- `tb_hls_system` runs a parallel dot product with a lock-protected sum and a
  barrier on `main` plus two workers. It counts, and requires at least once,
  each of these:
  - arbitration stalls;
  - a masked request;
  - divider contention;
  - the sequential OR path;
  - a busy lock;
  - a barrier wait;
  - both global tags;
  - the 0-cycle register load;
  - ROM reads;
  - local memory accesses.
- `tb_hls_system_full` runs the same workload with every parameter at its
  default (the ROMs then read zero).
- `tb_hls_system_share_mult` runs it with one shared multiplier
  (`SHARE_MULT=1`) and requires multiplier contention.
- `tb_hls_system_sl_lat2` runs it with 2-cycle shared-local memories
  (`SL_LAT=2`).

Simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/hls_pkg.sv \
    tb/tb_hls_system.sv --top-module tb_hls_system
./obj_dir/Vtb_hls_system
```

Run from the folder that holds `rtl/` and `tb/`. The ROM image is read from
`tb/rom_init.hex`. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

The variable-latency receiver is tested on its own, not inside a full system.
None of this has been run on an FPGA.
