# A cacheless shared memory for 1024 cores over a combinational butterfly

This design gives up to 1024 small cores one shared address space with no caches and no coherence
protocol. Memory is split into as many modules as there are cores. Every core reaches every module
through a butterfly network (BN) that is a single combinational circuit: a load or store that meets no
other reference crosses the whole network in the cycle it is issued and is answered in the next one.
Two mechanisms keep this from collapsing under contention:

* **Address rehashing.** Each core's address goes through a hash before it picks a module, so
  regular access patterns (strides, arrays) do not pile onto one module. The hash function is picked
  from a family by a key loaded before a program runs.
* **Collision handling in the switches.** When packets compete for a switch output, the one with the
  highest priority goes on. A loser is parked in the switch's *intermediate register* and continues
  from there next cycle; if the register is taken, the loser is dropped back to its core, which repeats
  it. Every wait makes a packet older, and older packets win, so nothing starves.

The idea targets FPGAs, where the routing fabric absorbs the butterfly's wiring. The RTL is
parameterised from 2 to 1024 cores; the default is 1024.

## Block diagram

```
          core 0 .. N-1 memory ports (top-level ports)
                 |                         ^
           core_port (x N)                 | resp
           hash_unit inside                |
                 | packet     ^ fail       |
                 v            |            |
   +--------- bn_forward: log2 N levels x N/2 bn_switch ---------+
   |  level l routes on module bit (log2N-1-l), MSB first         |
   |  each switch: 2 in, 2 out, 1 intermediate register           |
   +--------------------------------------------------------------+
                 | packet     ^ refuse
                 v            |
           mem_module (x N)  --- resp --->  bn_backward (log2 N levels x N/2 bn_bswitch)
                                                 routes on the destination core number

   ring_buffer: two-port circular buffer, both ports at the top level
```

Files, all in `rtl/`:

| file | role |
|---|---|
| `bn_pkg.sv` | packet, response and hash-key types; the two priority comparisons |
| `hash_unit.sv` | address to (module, internal address) |
| `core_port.sv` | one core's memory port: hash, packet, retry, stall |
| `bn_switch.sv` | forward 2x2 switch with intermediate register |
| `bn_forward.sv` | forward butterfly |
| `bn_bswitch.sv` | backward 2x2 switch |
| `bn_backward.sv` | backward butterfly |
| `mem_module.sv` | one memory module with its response register |
| `ring_buffer.sv` | two-port ring buffer |
| `shared_mem_system.sv` | top level |

## Packets and priority

A reference travels as a `pkt_t` (`bn_pkg`): valid, R/W bit, module number, internal address, age,
source core, store data. The priority is "time + source": the packet with the greater **age** wins,
and on equal ages the **lower source core number** wins. Age starts at 0 and goes up by one (saturating
at 255) every cycle a packet is failed back to its core, and every cycle it spends in an
intermediate register. Field widths are fixed in `bn_pkg` for the largest configuration (10-bit core
and module numbers, 16-bit internal address, 32-bit data); smaller systems use the low bits.

Responses (`resp_t`) carry the destination core, the answering module, an age and the read data.
A store is answered too, with an acknowledge, so a core always knows when its reference is done.

## The forward switch (the hard part)

`bn_switch` sees up to three candidates in a cycle: its two inputs and the packet in its intermediate
register. A candidate asks for output `module_id[BIT]`. Per output, the best candidate by priority wins
and is driven onto `out_pkt`. The losers are then sorted out:

1. If the register packet did not get through, it stays, one age older.
2. Otherwise the better losing input packet is parked in the register (one age older).
3. Any other losing input is dropped: `in_fail` goes high for that input.

So with all three wanting one output: one goes on, one stays or parks, one goes back to its core.

The network is combinational in both directions in the same cycle. Packets flow forward through
`out_pkt`; the *failing signal* flows backward through `out_fail` -> `in_fail`, switch by switch,
to the core that sent the packet. `in_fail[i]` is high when the packet on input `i` was dropped here
or was granted here and failed further on. Parking is not a failure: the core just waits for the
response. The combinational logic is split into a forward process (arbitration) and a backward
process (park/drop and failing signal) so that no loop exists between neighbouring switches.

One case needs care: a packet leaving the register has no path back to its core. If it is failed
further on, it simply stays in the register; an input packet that lost in the same cycle can then not
park and is dropped.

Per level `l` of `bn_forward`, switch `j` joins rows `R0` and `R1 = R0 | 1<<B`, with `B = log2N-1-l` and
`R0` being `j` with a zero inserted at bit `B`. Core `c` enters on row `c`; after the last level a
packet is on the row of its module. The bit order (most significant first) is this design's choice;
any order gives a correct butterfly with one path per core-module pair.

## Memory modules and the backward network

`mem_module` takes the packet on its row if it is free, writes or reads its 512 x 32 array at the
clock edge, and holds the response in a register. From the next cycle the response is offered to
`bn_backward`. Because parked packets reach modules along paths that overlap, two responses can want
the same backward link. `bn_bswitch` lets the older response through (then the lower module number);
the other is refused, and its module keeps it and offers it again, one age older. While a module holds
a response that was refused it refuses new packets (`mod_fail`), which the forward network treats like
a drop. Cores never refuse a response.

## Core port and timing

`core_port` hashes the address and drives the packet into the network in the same cycle the core
raises `req_valid` (state IDLE), so hashing adds no cycle. If the packet is failed back it is repeated
every cycle with its age raised (state SEND); once it is not failed back it is in the network (state
WAIT) until the response arrives. `stall` is high from the cycle after the request until the cycle of
`resp_valid`. `req_ready` is high only in IDLE; one reference per core is outstanding.

Uncontended timing, in cycles of one clock:

| cycle | what happens |
|---|---|
| t | core raises req_valid; packet crosses bn_forward; module writes/reads at the edge |
| t+1 | response crosses bn_backward; `resp_valid` and `resp_rdata` at the core |
| t+2 | port idle again, next request possible |

Under contention every extra cycle is a retry, a cycle in a register, or a refused response.

## Address hashing

`hash_unit`: with `K = log2 N_CORES` and `IW = log2 MEM_DEPTH`, the logical word address splits into
`m = addr[K-1:0]` and `ia = addr[K+IW-1:K]` (higher bits are ignored). The result is

```
module = m ^ fold(ia & key.mask) ^ key.offset     internal address = ia
fold(x)[b] = XOR of x[j] for all j with j mod K == b
```

Because `ia` is kept, the mapping is one-to-one for every key. The key is loaded through `hash_key_we`
/ `hash_key_in` and reset to zero (identity: module = low address bits). After loading a new key the
old contents sit at different places, so load it before a program's data is written. The source
only says that a small hash family is used that costs no clock; this family is this design's own.

## Ring buffer

`ring_buffer` is a circular FIFO, default 16 x 32, with a write port and a read port usable in the
same cycle; the read port shows the oldest word (first-word fall-through). A write while full and a
read while empty are ignored. The source names a ring buffer with two real ports in its system diagram
but not what it connects to, so both ports are top-level ports here and its size is a guess.

## What is not here

* The cores themselves (32-bit soft processors), their private call/return stack and instruction ROM,
  the interrupt bus, and the host CPU. Each core's memory port is a set of top-level ports
  (`core_req_*`, `core_resp_*`, `core_stall`); a core connects there.
* A single-core configuration (no network): `N_CORES` must be a power of two from 2 to 1024.
* Choices of this design where the source is silent: module depth (512 words), field widths, reset
  (synchronous, active low), store acknowledges, module refusal, the backward switch's collision rule,
  the hash family, the ring buffer's size and placement.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| shared_mem_system | N_CORES | 1024 | cores = memory modules, power of two 2..1024 |
| shared_mem_system | MEM_DEPTH | 512 | words per module |
| shared_mem_system | RB_DEPTH | 16 | ring buffer entries |

## Simulation

Every testbench in `tb/` checks itself and ends with a line `TB_RESULT checks=<n> failures=<n>`.
With plain verilator, from the directory holding `rtl/` and `tb/` (package first):

```
verilator --binary --timing -Wno-fatal --top-module tb_shared_mem_system \
    rtl/bn_pkg.sv $(ls rtl/*.sv | grep -v bn_pkg) tb/tb_shared_mem_system.sv
./obj_dir/Vtb_shared_mem_system
```

| testbench | what it checks |
|---|---|
| tb_hash_unit | result against a slice-fold reference; one-to-one for several keys |
| tb_core_port | packet contents, same-cycle injection, retry with age, stall, response |
| tb_bn_switch | pass, two-way and three-way collisions, parking, register forwarding, downstream failure |
| tb_bn_forward | 8 cores, random hot-spot traffic: every packet arrives once on its module's row |
| tb_bn_backward | 8 modules: every response arrives once at its core; collisions happen |
| tb_mem_module | loads and stores against a model, one-cycle answer, hold and refusal |
| tb_ring_buffer | fill, overfill, drain, random traffic against a queue |
| tb_shared_mem_system | 16 cores x 64 words end to end: latency, random owned traffic after a key change, hot spot, ring buffer; every mechanism must occur |

At 16 cores, 3200 random references with a hot-spot bias took about 700 cycles; 64 loads of one word
by all cores took 65 cycles (one per cycle, the module's rate).

The largest configuration simulated end to end is 16 cores x 64 words. At the default 1024 cores the
design lints cleanly in verilator (about 3 minutes) and elaborates in slang, but a verilator simulation
build of it takes well over 10 minutes of C++ compilation and about 5 GB of memory; a testbench for it
is `tb_shared_mem_system` with `N = 1024, D = 512` and the parameter override removed.
