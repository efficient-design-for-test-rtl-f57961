# Online test for a mesh network-on-chip router

This RTL lets a 2-D mesh network-on-chip test its own routers while the
network goes on carrying traffic. Each router is taken out of service one at a
time and briefly. While that happens, packets that would have crossed it are
routed around it by an adaptive routing function. Two kinds of fault are
covered:

- **Data path faults** in the links, buffers and crossbar. These are found by
  sending test packets *through* the router under test (RUT). The generators
  sit in its neighbours and the analysers sit in its other neighbours.
- **Control path faults** in the routing, allocation and credit logic. These
  are found by a built-in self-test (BIST) while the router is isolated. It
  still forwards traffic on a few fixed straight paths, so the network does
  not stall.

Everything is synchronous to one clock, with an active-low reset (`rst_n`).
The top module is `esy_mesh`, a mesh of `esy_router` instances.

## Test procedure of one router

Each router has a test control unit (`tcu`). It holds a countdown timer that
starts at the router's offset `TIV` and then reloads every test interval
`TIT`. When the timer expires, the router steps through five phases. The
two-bit `tp` code it sends to its neighbours is given in brackets.

1. **Free-Slot** (`01`, `T_FREE` cycles). In each neighbour, a test packet
   generator (`tpg`) in the output port facing the RUT may inject test
   packets. It gets the link only when no normal flit asks for it. Test
   traffic therefore fills idle slots and costs almost nothing.
2. **Block** (`11`, `T_BLOCK` cycles). The generators now win over normal
   traffic. This makes sure every test packet is sent even under heavy load.
   At the end, the test analysers (`tpa`) in the receiving neighbours report:
   - a wrong vector, a wrong length or a wrong tail is a data path fault;
   - a missing packet is an incomplete test.
3. **Emptying** (`10`). The router asserts ER to its network interface, which
   stops injecting. The routers around it stop routing new packets into it.
   The phase ends when all of its buffers are empty.
4. **Testing** (`T_TEST` cycles). The crossbar is forced into a fixed pattern:
   - north ↔ south;
   - local ↔ east, or local ↔ west on the eastern border.

   Each input buffer shrinks to a single register stage. A flit therefore
   crosses the router in one cycle instead of three. Credits are passed
   straight through from the far side, so flow control still works end to end.
   `cp_bist_en` is high, and the external control path BIST reports on
   `cp_bist_fail`.
5. **Recovery**. Normal mode returns. ER drops, and EA releases the interface.

A router does not start a test while a neighbour that matters to it is under
test. Neighbours are kept apart by the schedule below. Any start that would
overlap waits until the neighbour is done.

### The four-group schedule

Routers are split into four groups by the parity of their coordinates:
`group = x%2 + 2*(y%2)`. A router's order is its index within its group.
Its timer offset is `TIV = order * TIT / NR`, where `NR` is the number of
routers in the group. This spreads the tests evenly over one interval. Two
adjacent routers are never tested at once, so a detour around a RUT never
leads into another RUT. `esy_pkg::test_order` and `test_tiv` compute this.

## Routing around a router under test

`route_unit` is a minimal adaptive router. It uses two virtual subnetworks
and one virtual channel (VC) per subnetwork:

- Subnetwork A takes eastbound and straight-vertical packets on VC0 (ports
  E, N1, S1).
- Subnetwork B takes westbound packets on VC1 (ports W, N2, S2).

A packet never changes subnetwork, which keeps routing deadlock-free.

Every router tells its neighbours its test status:

- **DNS** means direct-neighbour status: "I am under control path test".
- **INS** carries the status of a corner router. Each router passes on its
  east neighbour's DNS to the north, north's to the west, west's to the
  south and south's to the east. So every router knows all four of its
  diagonal neighbours.

Using this, the route unit applies five rules:

- It avoids a productive direction whose next hop is under test. If both
  productive directions are blocked, it falls back to the other one.
- When the packet is already in the destination column, it detours one
  column sideways around a RUT in that column. It picks the side whose
  corner routers are free.
- A packet whose destination is the RUT itself is held at the neighbour
  until the test ends. It is never misrouted.
- Packets that need the RUT's fixed paths still use them. For example, a
  packet going straight north or south through a RUT crosses on its fixed
  N↔S connection.
- A packet does not turn back towards a direction it just left.

Credits on every output VC limit each choice. A direction with no free credit
is not chosen while another productive one has credit.

## Router microarchitecture and timing

`esy_router` has five ports (L, N, S, E, W). It has seven input VCs, one
buffer each: L, N1, N2, S1, S2, E, W. The N and S ports carry two VCs, one
per subnetwork; every other port carries one. Each buffer holds `DEPTH`
(12) flits. Flow control uses credits: every link carries a flit and a VC
bit, and every reverse link carries a small per-VC credit count.

The pipeline has three stages, so a flit takes three cycles from link in to
link out:

| Cycle | Action |
|---|---|
| 1 | Buffer write (`input_buffer`) |
| 2 | Route computation for head flits (`route_unit`); switch allocation (`switch_allocator`, one matrix arbiter per output, `matrix_arbiter`) |
| 3 | Crossbar traversal (`crossbar`, a 7×5 one-hot AND-OR mux) into the output register |

A packet holds its output until its tail has passed.

`cp_wrapper` sits between the allocator and the crossbar. In normal mode it
is transparent. In fixed mode it:

- replaces the selects with the fixed pattern above;
- forwards credits from each output back to the input that feeds it;
- lets the buffers bypass to one register stage.

Each output port has a `tpg` beside its arbiter. The allocator gives it one
of three priorities:

- *off*;
- *low*: only when no normal flit requests that output;
- *high*: ahead of normal flits.

Once a test packet has started, it keeps the output until its tail has been
sent. Each input port has a `tpa` that picks test flits (flit bit `test`)
off the link before they enter the buffer.

## Flits and test packets

`esy_pkg` defines the shared types:

- `flit_t = {ftype[1:0], test, data[33:0]}`;
- `link_t = {valid, vc, flit}`;
- `credit_t`, a per-VC two-bit count.

A head flit's data holds the following fields. A single-flit packet uses the
same layout.

| Bits | Field |
|---|---|
| 33:30 | destination x |
| 29:26 | destination y |
| 25:22 | source x |
| 21:18 | source y |
| 17:12 | packet index |
| 11:0 | payload |

A test packet has three parts:

1. A head whose `test` bit is set.
2. `VEC_PER_PKT` body flits, each carrying one test vector.
3. A tail that repeats the head word.

Vector `i` is a walking one when `i` is even and a walking zero when `i` is
odd. Together the vectors toggle every data bit both ways. A generator sends
`NUM_VEC` vectors in all (34 by default). Its packets go in turn to the RUT's
other neighbours, so every crossbar path from its port is used. By default
there is one vector per packet, so each test is 34 three-flit packets per
generator. With `VEC_PER_PKT = 34`, each test is instead one packet of 36
flits. The analyser recomputes the expected vectors on its own.

## Parameters of `esy_mesh`

| Parameter | Default | Meaning |
|---|---|---|
| `XDIM`, `YDIM` | 10, 8 | mesh size |
| `DEPTH` | 12 | flits per input buffer |
| `TIT` | 20000 | cycles between two tests of one router |
| `T_FREE`, `T_BLOCK` | 1000, 1000 | length of the two data path phases |
| `T_TEST` | 2000 | length of the control path Testing phase |
| `NUM_VEC`, `VEC_PER_PKT` | 34, 1 | test vectors per generator, and per packet |

The top brings out four kinds of signal:

- each router's local port with its ER/EA pair, for a network interface;
- `cp_bist_en` and `cp_bist_fail` for each router, for the control path BIST;
- each router's status outputs: test phase, fixed mode, data path fault,
  incomplete test, control path fault, number of tests done, number of test
  packets sent and received;
- the analyser error counts.

## Own choices and departures

The following are this design's own choices:

- The control path BIST is not included. It is modelled as an external unit
  with an enable and a fail flag. A testbench can drive `cp_bist_fail` to
  inject a control path fault.
- The network interfaces and cores are not included. The testbenches use a
  behavioural interface model (`tb/tb_ni.sv`). It makes random 5-flit packets
  and checks the packets it receives.
- The local port gets no generator or analyser. Data path test covers the
  four mesh ports.
- Phase lengths are fixed parameters. Emptying and Recovery have no fixed
  length: they last until the buffers are empty.
- The encodings chosen here are:
  - the head-flit layout and the 4-bit coordinates, which limit the mesh to
    16×16;
  - the credit format;
  - the ordering of vectors.
- In fixed mode, the two VCs of the N and S ports share the single straight
  path. At most one of them holds a flit at a time.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/*.sv tb/tb_ni.sv \
        tb/tb_esy_mesh.sv --top-module tb_esy_mesh
    ./obj_dir/Vtb_esy_mesh

`tb_esy_mesh` runs a 4×4 mesh with shorter phases (TIT 4000, T_FREE 100,
T_BLOCK 400, T_TEST 200) under random traffic. It checks three things:

- every packet is delivered intact;
- every router is tested and passes;
- an injected control path fault is reported.

It also counts these events and fails if any of them never happens:

- free-slot and block-phase test flits;
- interface pauses;
- flits crossing a router in fixed mode;
- flits delivered to the core of a router under test through its fixed local
  path;
- route decisions taken next to a router under test.

The largest mesh simulated is this 4×4. The default 10×8 mesh compiles, but
the simulator build alone takes more than 20 minutes, because each router
position is a separate specialisation. So no full-size run is included. To
run one, instantiate `esy_mesh` without parameters, as `tb_esy_mesh` does
with its own.
