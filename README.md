# Five-port 2D mesh router (64-bit)

This is a router for a node of a two-dimensional network-on-chip mesh. It has
five ports: one each toward its east, west, north and south neighbours, and
one toward the local processing element. Each port has a 64-bit packet input
and a 64-bit packet output.

The router does not compute routes itself. An outside controller chooses a
port with a 3-bit port code and gives one of two commands:

- **write** stores the packet on that port's input in the port's data register.
- **read** copies that data register to the port's output register.

The output register drives the port's output pins. A packet therefore crosses
the router in two clocked steps and leaves by the output of the direction it
came in on. The outputs keep their value between reads.

The whole design is ten 64-bit registers and the multiplexers between them.
It has 640 flip-flops and 647 I/O pins: 640 data pins plus clock, reset, three
code bits, read and write.

## Pins

| Pin | Width | Meaning |
|---|---|---|
| `clk` | 1 | Clock. Every register loads on the rising edge. |
| `reset` | 1 | Synchronous reset, active high. Clears all data registers and all outputs to zero. |
| `selection_logic` | 3 | Port code, listed below. |
| `write_logic` | 1 | Write command: store the selected input in its data register. |
| `read_logic` | 1 | Read command: copy the selected data register to its output. |
| `East_Data_in` … `Local_Data_in` | 64 each | Packet inputs. |
| `East_Data_out` … `Local_Data_out` | 64 each | Packet outputs. Each is a register. |

The port codes are:

| `selection_logic` | Port | Data register |
|---|---|---|
| `000` | east | r0 |
| `001` | west | r1 |
| `010` | north | r2 |
| `011` | south | r3 |
| `100` | local | r4 |
| `101`, `110`, `111` | none | Commands with these codes do nothing. |

## How a packet moves, cycle by cycle

All inputs are sampled at the rising edge of `clk`. The usual sequence for
port *p* is:

1. **Write cycle.** Set `selection_logic = p` and `write_logic = 1`, and hold
   the packet on the port's input. At the next edge, data register r*p* takes
   the packet. The port's output does not change yet.
2. **Read cycle.** Keep `selection_logic = p` and set `read_logic = 1`. At the
   next edge, the port's output register takes the contents of r*p*. The packet
   is on the output pins from then on.

So a packet reaches the output pins two rising edges after it is presented:
one edge for the write, one for the read. The two steps do not have to follow
each other directly. A data register keeps its packet until the next write to
its port. An output keeps its value until the next read to its port.

Only the selected port is touched. A write or read to one port leaves the other
four registers and outputs unchanged. If `write_logic` and `read_logic` are both
high, both happen at the same edge. The read copies the register value from
before that edge, so the output gets the packet from the previous write, not
the packet being written.

The reference test drives the 64-bit word `64'h005072617465656B` (the ASCII
text "Prateek") on the east, west, north, south and local inputs in turn. For
each port it does one write and then one read. At the end all five outputs
hold the word.

## Structure

```
 X_Data_in ──┐
             ├─ router_crossbar ── wr_data ──> data_register_file (r0..r4)
 (5 ports)   │   (write side: input[sel])              │ q[0..4]
             │                                         v
             └─ router_crossbar ── rd_data <── (read side: r[sel])
                                      │
                                      v
                     port_register x5 (load = rd_en[p]) ──> X_Data_out

 selection_logic, write_logic, read_logic ──> port_control x5 ──> wr_en[p], rd_en[p]
```

| File | Role |
|---|---|
| `rtl/router_pkg.sv` | Port count, code width, data width, and the `port_e` code enum. |
| `rtl/port_control.sv` | One per port. Compares the port code with its own port number. On a match it passes `write_logic` and `read_logic` on as that port's `wr_en` and `rd_en`. Purely combinational. |
| `rtl/router_crossbar.sv` | Two 5-to-1 multiplexers driven by the port code. The write side selects the input packet of the selected port. The read side selects the data register of the selected port. Unused codes give zero. |
| `rtl/data_register_file.sv` | Data registers r0–r4. They share one write bus and have a one-hot write enable. An assertion checks that at most one enable is high. |
| `rtl/port_register.sv` | One output register with a load enable. There are five of them. |
| `rtl/router2d_logic.sv` | The top level. It wires the blocks above to the chip's pins. |

The five `port_control` instances decode different codes, so they can never
enable two ports at once. That is why the register file can share one write
bus and all five output registers can share one read bus.

## What is specified and what is chosen here

These come from the original chip description:

- the five ports and their names;
- the 64-bit data width and the 3-bit port code;
- the code values for each port;
- the write and read commands and what each does;
- the register on every output, and the five data registers;
- a reset that clears the data and output values;
- the rising-edge clock.

The 640 flip-flops and 647 I/O pins match the resource counts reported for the
chip.

These are this design's own choices:

- **Reset** is synchronous and active high.
- **Latency** is one clock edge for a write and one for a read. The source
  gives no cycle counts.
- **Codes `101`–`111`** are treated as no operation.
- **Write and read together** both act. The read sees the register value from
  before the edge.
- **Internal blocks.** The source names a control block per port, a crossbar
  and port registers, but gives no internal detail for any of them. Each is
  built here in the simplest form that behaves as described.
- **Command names.** One published pin table swaps the two commands: it
  describes `read_logic` as the one that writes ports into registers. This
  design follows the simulated behaviour instead: `write_logic` stores and
  `read_logic` outputs.

These are left out:

- **Input queues.** A data-flow diagram of the router shows a short queue on
  each input. The design is described as bufferless, and the chip's
  flip-flop count leaves no room for queues.
- **Arbitration.** No arbiter is built. Which port to serve is decided outside
  the router and arrives on `selection_logic`.

## Simulating

Every testbench checks its own results. Each one prints a single line
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs and
counts that as a failure. Example for the full design at its default 64-bit
size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/router_pkg.sv tb/tb_router2d_logic.sv --top-module tb_router2d_logic
./obj_dir/Vtb_router2d_logic
```

Replace `tb_router2d_logic` with another testbench name to run it the same
way. The testbenches:

- `tb/tb_router2d_logic.sv` runs the whole router at full size in two parts.
  - It first replays the "Prateek" sequence. It checks that an output does not
    move on the write edge, and that it carries the word right after the read
    edge.
  - It then runs 3000 random commands against a reference model. The commands
    use all eight codes, every mix of write and read, and random packets, with
    an occasional reset. All five outputs are compared after every edge.
  - It counts writes and reads per port, simultaneous write and read, unused
    codes, idle cycles and resets. It fails if any of these never happened.
- `tb/tb_port_control.sv` tries every code and command combination on all five
  decoders.
- `tb/tb_router_crossbar.sv` checks both multiplexers for every code with random
  data.
- `tb/tb_data_register_file.sv` does random single-port writes against a
  model, including a reset partway through.
- `tb/tb_port_register.sv` does random load, hold and reset against a model.

The design uses no vendor primitives. The testbenches use only `$urandom`, so
they need no constraint solver and run on a two-state simulator.

## Changing it

- **Packet width.** `DATA_WIDTH` on `router2d_logic` sets the packet width. Its
  default is `router_pkg::DATA_W` = 64. Every block follows it.
- **Port count.** `NUM_PORTS` and the `port_e` codes are in `router_pkg`. The
  top's pin list names the five directions explicitly, so adding a port means
  adding its pins and one line each in the `port_in` and `port_out` maps.
- **Adding queues or an arbiter.** To add input queues, put them in front of
  `port_in`. To add an arbiter, drive `selection_logic`, `write_logic` and
  `read_logic` from it. Neither changes the blocks inside.
