# Bus control for a heterogeneous multiprocessor board

A board carries very different sub-systems: a general-purpose processor
(an 80486), a DSP (a TMS320C25), an ASIC, an FPGA and a memory they all
share. They sit on one bus. A **communication controller** decides who
owns the bus. It then routes each transfer to the resource the address
names. Where that resource speaks another protocol (here a VME system
reached from an ISA-style bus) it translates the signals.

Every block here is a small control state machine written in the
*co-design FSM* style:

- A block reacts to input events and emits output events.
- Its outputs are registered, so every reaction takes at least one clock.
- An event that one block sends to another waits in a one-place buffer
  until the receiver takes it. If the sender emits again before that, the
  new event overwrites the old one.

Blocks therefore never depend on reacting in the same clock. This is the
property that lets any one of them be moved to software later.

This RTL covers the control part: bus arbitration, the bus control unit,
the ISA to VME adapter, the bus interface models of the processors, the
event buffers and a shared memory. The processors, the ASIC and the FPGA
are not part of it. Their bus connections are brought out as ports.

## Block map

```
 cpu_cmd[0] --> bim_master (80486, line 0) --+
 cpu_cmd[1] --> bim_master (DSP,   line 1) --+
 x_* (ASIC 2, FPGA 3, spare 4..7) ----------+
                                            |  BReq/Grant, addr, data, RD_bar/W_bar, READY
                               +------------v-------------------------------------------+
                               | comm_ctrl                                              |
                               |   bus_arbiter --grant--> bus switch --> bcu            |
                               |                                         | addr[2:0]=k  |
                               |            cfsm_event (request k) <-----+              |
                               |            cfsm_event (acknowledge k) --> bcu          |
                               |   k=1: vme_adapter  <------------------------------> vme_* (VME bus)
                               |   k=0,2..7: t_* ports                                  |
                               +-----------|--------------------------------------------+
                                           | k = 0
                                      shared_mem          k = 2..7 -> t_* ports of mp_system
```

| File | Block |
|---|---|
| `rtl/cfsm_pkg.sv` | Widths, interface codes, arbitration options, the transfer-request struct |
| `rtl/cfsm_event.sv` | One-place event buffer |
| `rtl/bus_arbiter.sv` | Eight-line arbiter: fixed, round-robin or daisy-chain priority |
| `rtl/bim_master.sv` | Bus interface model of one processor |
| `rtl/bcu.sv` | Bus control unit: decodes the target, waits for the answer, raises READY |
| `rtl/vme_adapter.sv` | ISA to VME adapter: AS/UDS/LDS/DTACK sequence |
| `rtl/shared_mem.sv` | Shared memory, 1024 x 16 |
| `rtl/comm_ctrl.sv` | Communication controller: arbiter, bus switch, BCU, event buffers, VME adapter |
| `rtl/mp_system.sv` | Top: two processor interfaces, the controller, the shared memory |

## Anatomy of one transfer

This is the part that takes the most care to follow. The example is a lone
read by the 80486 from the shared memory. Clock numbers count from the edge
that accepts the command.

| Clock | Block | What happens |
|---|---|---|
| 0 | bim_master | Takes the command. Raises BReq and enters *Wait*. |
| 1 | bus_arbiter | The bus is idle, so it registers the grant for line 0. |
| 2 | bim_master / bcu | The BIM sees Grant and enters *State1*, with the address on the bus. The BCU sees the bus owned and enters *CommuNature*. |
| 3 | bim_master | Enters *State2* and pulls RD_bar low. |
| 4 | bcu | Sees the strobe and reads `addr[2:0]` = 0. Emits the request event for interface 0 and enters *WaitOnData*. |
| 5 | cfsm_event | The request is now present at the shared memory. |
| 6 | shared_mem | Takes the request, reads the word and emits the acknowledge event. |
| 7 | cfsm_event | The acknowledge is present at the BCU. |
| 8 | bcu | Takes the acknowledge and latches the data (*Latch-com*). Pulses READY and returns to *Idle*. |
| 9 | bim_master | Sees READY. Releases RD_bar and BReq, stores the data and pulses `done`. |
| 10 | bus_arbiter | Sees BReq gone and re-arbitrates among the pending requests. |

A lone transfer therefore costs 9 clocks plus the target's own time. A VME
read with no DTACK delay takes 14 clocks. Each extra clock the VME slave
spends before asserting or releasing DTACK_bar adds one clock.

Two rules keep this handshake safe:

- The BCU reads the address only once the owner's RD_bar or W_bar is low.
  The grant alone is not enough: the grant arrives two clocks before the
  strobe.
- The BCU leaves *Idle* only while READY is low. The master still holds its
  strobe during the READY clock, so this keeps the old strobe from starting
  a second transfer.

The BCU keeps one transfer outstanding at a time. As a result the event
buffers inside the controller never actually overwrite an event. The
overwrite flag still exists, and the buffer's own test exercises it.

## Communication nature: the address map

The three least significant address bits choose the interface that serves
a transfer. The remaining bits are the resource's own address.

| `addr[2:0]` | Interface | Where |
|---|---|---|
| 0 | Shared memory, word index `addr[12:3]` | inside `mp_system` |
| 1 | ISA to VME adapter; the full 24-bit address goes to the VME bus | inside `comm_ctrl` |
| 2 | ASIC | `t_*` ports, index 2 |
| 3 | FPGA | `t_*` ports, index 3 |
| 4..7 | Further external resources | `t_*` ports |

An interface on the `t_*` ports follows this protocol:

- It sees `t_req_present[k]` with the transfer in `t_req_val[k]`, a struct
  of `rw` (1 = read), `addr` and `wdata`.
- It pulses `t_req_detect[k]` to take the transfer.
- Later it answers by pulsing `t_ack_emit[k]` with the read data in
  `t_ack_val[k]`.

Writes are acknowledged in the same way. If an address names an interface
that never answers, the bus stays owned. The controller has no timeout.

## Bus arbitration

There are eight request lines, each with its own grant line:

| Line | Requester |
|---|---|
| 0 | 80486 |
| 1 | DSP |
| 2 | ASIC |
| 3 | FPGA |
| 4..7 | Spare |

Arbitration rules:

- The grant is a register. It appears the clock after a request reaches an
  idle bus.
- The owner keeps the grant as long as it holds its request. Nothing
  pre-empts it.
- When the owner releases its request, the arbiter picks the next owner in
  the same clock.

`arb_mode` selects the priority option:

- **Fixed** (`ARB_FIXED`): the highest-numbered pending line wins. Line
  number is read as request level.
- **Round robin** (`ARB_ROUND_ROBIN`): the search starts at the line after
  the last grant and wraps around.
- **Daisy chain** (`ARB_DAISY_CHAIN`): the grant enters the chain at line 0.
  Every line that is not requesting passes it on. This is built as a
  ripple, like a physical chain.

The grant is asserted to be one-hot or zero.

## The VME cycle

`vme_adapter` runs one 16-bit VME cycle for each request:

1. **State1:** drives the address onto the VME address lines and sets
   R/W_bar. For a write it also drives the data.
2. **State2:** pulls AS_bar, UDS_bar and LDS_bar low together, one clock
   after the address.
3. **State3:** waits until the slave pulls DTACK_bar low.
4. **State4:** latches the data, releases the three strobes and the data
   bus, and waits for DTACK_bar to go high.
5. **Idle:** acknowledges to the BCU.

Notes on the signals:

- Both data strobes are always used. Byte transfers and an A0 line are not
  provided.
- The data bus is split into `vme_d_in`, `vme_d_out` and `vme_d_oe`.
  Combine them into a tri-state pad at the board level.

## Ports and parameters of `mp_system`

| Parameter | Default | Meaning |
|---|---|---|
| `N_REQ` | 8 | Request/grant lines (at least 3) |
| `N_TGT` | 8 | Interfaces; codes at or above `N_TGT` are not decoded (at least 2) |
| `MEM_WORDS` | 1024 | Shared-memory words |

Widths are fixed in `cfsm_pkg`:

- 16-bit data (`DATA_W`).
- 24-bit address (`ADDR_W`).
- 3 select bits (`SEL_W`).

The ports are:

- `cpu_cmd_*` / `cpu_done` / `cpu_rdata`, index 0 = 80486 and 1 = DSP. A
  command is taken when `cpu_cmd_ready` is high. `done` pulses when the
  transfer ends.
- `x_*`: requesters on lines 2..7, as `x_*[j]` = line j+2. Each drives the
  same signals a `bim_master` drives:
  - `breq`, held for the whole transfer;
  - address and write data;
  - an active-low strobe (`rd_n` or `wr_n`), held until `bus_ready`.
- `t_*`: interfaces 2..7. Indices 0 and 1 are served inside and are unused.
- `vme_*`: the VME bus.
- Observation outputs: `grant`, `bus_busy`, `nature` (the last decoded
  code), `vme_busy` and `ev_overwritten`.

Reset (`rst_n`) is active-low and asynchronous. It returns every state
machine to idle with all strobes negated. The memory array is not reset.

## What follows the reference design and what is chosen here

These parts follow the reference design:

- The set of sub-systems, and a single controller that does both the
  arbitration and the interfacing.
- Eight request lines with grant lines.
- The three priority options.
- Decoding the target from the three address LSBs.
- The state sequences of the bus control unit, the VME adapter and the
  processor bus interface.
- The VME signal names and the 16-bit VME data path.
- One-place, overwritable event buffers between blocks.
- Registered outputs on every block.

These are choices made for this RTL:

- All widths other than the 16 data bits.
- The nature codes and the request-line assignment.
- The order of the fixed and daisy-chain priorities.
- Holding the grant until the request is released.
- Routing shared-memory transfers through the controller like any other
  interface.
- Waiting for the strobe before decoding.
- Write support in the VME adapter. The reference describes only the read
  cycle.
- Acknowledging a VME cycle after DTACK_bar is released.
- The shared memory's size and its one-clock timing.
- The split data bus.

Two things are left out. There is no bus timeout, and there is no further
priority scheme beyond the three named.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. The helpers in `tb/` are
behavioural models:

- `vme_slave_model` is a VME slave with adjustable DTACK delays and a
  protocol checker.
- `target_model` is an interface that answers after a programmable delay.

Run a testbench with Verilator 5. The package goes first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cfsm_pkg.sv tb/tb_mp_system.sv --top-module tb_mp_system
./obj_dir/Vtb_mp_system
```

Replace `tb_mp_system` with `tb_cfsm_event`, `tb_bus_arbiter`,
`tb_bim_master`, `tb_bcu`, `tb_vme_adapter`, `tb_shared_mem` or
`tb_comm_ctrl`.

`tb_mp_system` runs the top at its default size. Eight requesters (the two
processors plus six `bim_master` instances) send random reads and writes
under each priority option. Each requester works on its own words, and
every read is checked against that requester's copy. The test:

- includes transfers from the processor to the ASIC, from the ASIC to the
  FPGA, from the FPGA to the shared memory and from the processor to the
  VME system;
- checks the 9- and 14-clock latencies of lone transfers;
- counts bus contention under each option, shared-memory and VME reads and
  writes, DTACK wait states and the use of every external interface, and
  fails if any of them never happened.

It finishes in a few seconds.

`tb_comm_ctrl` does the same at the controller level. The unit testbenches
compare their block cycle by cycle with a reference model: an arbiter model
for each priority option, and the state sequence of the VME cycle against
the slave model.
