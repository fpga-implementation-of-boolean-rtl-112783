# A Boolean neural network as lookup tables, behind a register file

A Boolean neural network (BNN) computes Boolean functions from Boolean inputs.
Every neuron is a Boolean function y = f_B(x, w): its inputs, its weights and
its output are all 0 or 1. A neuron with at most four inputs is therefore
nothing but a four-input truth table, which is exactly what one FPGA lookup
table (LUT) holds. A trained network maps onto the FPGA one neuron per LUT,
with no multipliers and no adders. The only other cost is the wiring between
the LUTs.

This RTL implements one trained example network. It has three inputs x1..x3,
four hidden neurons k1..k4 and ten outputs y0..y9. The network is the
hardware half of a software object: a host program writes the inputs, starts
an evaluation, waits for it to finish and reads the outputs back. All of that
goes through a register file on an internal register bus.

## The network

The hidden neurons are arbitrary functions of (x1, x2, x3):

| x1 x2 x3 | k1 | k2 | k3 | k4 |
|----------|----|----|----|----|
| 000      | 0  | 0  | 1  | 0  |
| 001      | 1  | 0  | 1  | 0  |
| 010      | 0  | 0  | 0  | 1  |
| 011      | 1  | 0  | 0  | 0  |
| 100      | 0  | 1  | 0  | 0  |
| 101      | 1  | 0  | 0  | 1  |
| 110      | 1  | 0  | 0  | 0  |
| 111      | 0  | 0  | 0  | 1  |

Each output neuron is an OR of the hidden neurons whose weight is 1:

|    | y0 | y1 | y2 | y3 | y4 | y5 | y6 | y7 | y8 | y9 |
|----|----|----|----|----|----|----|----|----|----|----|
| k1 | 1  | 1  | 0  | 1  | 0  | 1  | 1  | 0  | 0  | 0  |
| k2 | 0  | 1  | 0  | 0  | 1  | 0  | 1  | 1  | 1  | 0  |
| k3 | 0  | 0  | 1  | 1  | 0  | 0  | 1  | 1  | 1  | 0  |
| k4 | 0  | 0  | 1  | 0  | 1  | 1  | 0  | 0  | 1  | 1  |

For example, y1 = k1 | k2 and y8 = k2 | k3 | k4. All ten outputs are functions
of the same four hidden functions. That shared decomposition is what training
produced. The network has 4 + 10 = 14 neurons, and each is one LUT.

### How a neuron becomes a table

`bnn_neuron` is one LUT. Its parameter `INIT` holds the whole neuron, that is
its transfer function and its weights together. Bit n of `INIT` is the output
when the input vector, read as an unsigned number, equals n. Bit i of every
vector is input i+1: x1 is bit 0 of x, k1 is bit 0 of k, y0 is bit 0 of y.

`bnn_pkg` builds the tables from the two tables above, so they can be
checked against them:

* `rows_to_init` turns a hidden column, written in the row order of the table
  above (x1 as the most significant digit), into an INIT vector indexed by
  {x3, x2, x1}: `init[n] = rows[{n[0], n[1], n[2]}]`.
* `or_init(w)` gives the table of a four-input disjunction neuron with
  weights w: `init[n] = |(w & n)`. A zero weight simply makes the table ignore
  that input, so every output neuron can be wired to all four k signals.

Examples: k4 is `8'hA4` in this bit order. In a three-input LUT with pins
I2 = x2, I1 = x1 and I0 = x3, the same function is `INIT = 8'h98`. The neuron
testbench checks that table against its Karnaugh map. `NIN` can be raised to 5
or 6, the neuron sizes that a slice or a whole logic block can hold.

`bnn_layer` puts `NOUT` neurons side by side on the same `NIN` inputs. Its
defaults build the hidden layer. With `NIN=4, NOUT=10, INIT=Y_INIT` it is the
output layer.

## The Bnn object in hardware

In software the network is a class, `Bnn`, with attributes a, b, c
(the inputs), k01..k04 (the hidden values) and y00..y09 (the outputs). It has
one method per neuron, k1()..k4() and y0()..y9(), and a method calculate()
that evaluates the whole network. The hardware keeps that shape:

```
 host bridge ──bus_i/bus_o──► bnn_regfile ──x (a,b,c)──► bnn_calculate ──k01..k04──┐
                               ▲   │  ▲                  (hidden + output layer)   │
                               │   │  └──y_we / y_d (y00..y09)──────────────────────┤
                               │   │                                               │
                               │   └─go──► 4 × bnn_method k1()..k4()  (read a,b,c)  │
                               │         10 × bnn_method y0()..y9()  (read k01..k04)◄┘
                               └──────── busy / done / return value
```

### calculate(): one statement per state

`bnn_calculate` is a finite state machine with a datapath. It runs the method
body in the order it is written: `k01 = k1(); ... k04 = k4(); y00 = y0(); ...
y09 = y9(); return true;`. Every called method is inlined, so the datapath is
simply the two neuron layers. The hidden layer reads a, b, c. The output layer
reads the registered k01..k04, not the live hidden values.

The state vector is one-hot, with 16 states: IDLE, K1..K4, Y0..Y9 and RET.
State Ki loads attribute k0i. State Yj pulses `y_we[j]`, and the register file
stores `y_d[j]` as y0j. RET raises `done` for one cycle with
`return_value = 1`. From the cycle in which `go` is sampled to `done` takes
15 cycles, which is 150 ns at 100 MHz. The k attributes stay in
`bnn_calculate`. The y attributes live in the register file, next to the
inputs.

The original mapped implementation of calculate() had 22 one-hot states and
took 0.2 µs (20 cycles at 100 MHz). Its schedule is not known. The schedule
here is this design's own, and it stays inside that time.

### The separately callable methods

Each of the fourteen methods is an instance of `bnn_method`, with its own LUT.
The k methods read a, b, c. The y methods read the k attributes that the last
calculate() left behind. A method has the pins `go`, `done`, `busy` and
`return_value`. It has three states (IDLE, EVAL, FIN): the result is latched
in EVAL, and `done` is high in FIN, two cycles after `go`. `go` is ignored
while a method runs. The return value is held until the next call.

### Register file and synchronisation

`bnn_regfile` is the host's window. The bus carries one request per cycle
(`bus_req_t`: `req`, `we`, `addr`, `wdata`). A write takes effect at the
clock edge. A read returns `rvalid` and `rdata` on the next cycle.

| addr | name   | access | contents |
|------|--------|--------|----------|
| 0    | CTRL   | W      | bit 0 = 1 starts calculate() |
|      | STATUS | R      | bit 0 calculate busy, bit 1 calculate done (sticky), bit 2 its return value, bit 8 method busy, bit 9 method done (sticky), bit 10 method return value, bit 16 write refused (sticky, cleared by this read) |
| 1    | X      | RW     | bits 2:0 = x3 x2 x1 (a = x1) |
| 2    | Y      | R      | bits 9:0 = y9..y0 |
| 3    | K      | R      | bits 3:0 = k4..k1 |
| 4    | METHOD | W / R  | write 0..3 to call k1()..k4() and 4..13 to call y0()..y9(); read gives the last method called |

A start reaches the logic as a one-cycle `go` pulse in the cycle after the
write. A done bit is set one cycle after the logic's `done`, so the host sees
a calculate() finish 18 cycles after its start write. Only one piece of user
logic runs at a time. While something runs or is about to start, writes to X
and new starts are dropped, and the refused bit is set. This keeps the inputs
of the running logic stable. The register map, the bus and this rule are
choices of this design.

A host program runs like this: write X, write 1 to CTRL, poll STATUS until
bit 1 is set, then read Y. To call a single method, write its number to
METHOD, poll until bit 9 is set, and read bit 10.

## What is not here

* **The bridge** from the physical host link (PCI, Ethernet, a serial line) to
  the register bus is a platform component. `bus_i`/`bus_o` are the ports it
  would drive.
* **The host program** is software. The top-level testbench plays its part.
* **The constructor and destructor** methods of the object hold no logic and
  are not built.

## Where this departs from, or reads into, the source design

* **k1:** the hidden truth tables follow the trained truth table above. The
  expression given for the k1() method in the object model,
  `!a&&!c || a&&!b&&c || a&&b&&!c`, disagrees with that table. Read literally, it is true for x1x2x3 = 000, 010, 101 and
  110. The table gives 001, 011, 101 and 110. The table was followed, because
  it is the trained network, and its k4 column agrees with the LUT contents
  (INIT 0x98) reported for the mapped k4 method.
* **Schedules:** the controllers of calculate() and of the methods are as
  simple as possible. The original mapped methods have 3 to 7 states, and
  calculate() has 22. Those schedules are not given, so the cycle counts here
  are not the original ones. Only calculate()'s 0.2 µs bound is kept and
  checked.
* **Bus and registers:** the bus protocol, the 32-bit data width, the register
  map, the busy/refused rule and the asynchronous active-low reset are all
  choices of this design.
* **No FPGA mapping was run.** The LUT, slice and flip-flop counts of the
  original implementation (about 64 slices, 92 flip-flops and 91 LUTs on a
  Virtex-II) cannot be compared. Coarse synthesis of `bnn_top` gives 116
  flip-flop bits. The one-hot calculate() uses 16 state bits where the
  original used 22.

## Files

| file | contents |
|------|----------|
| `rtl/bnn_pkg.sv` | sizes, truth tables, weights, table functions, bus structs, register map |
| `rtl/bnn_neuron.sv` | one Boolean neuron = one LUT |
| `rtl/bnn_layer.sv` | a layer of neurons on shared inputs |
| `rtl/bnn_method.sv` | one callable k or y method (go / done / return value) |
| `rtl/bnn_calculate.sv` | calculate(): one-hot FSM with both layers |
| `rtl/bnn_regfile.sv` | register file, bus slave, start and status logic |
| `rtl/bnn_top.sv` | top: register file, calculate() and the 14 methods |
| `tb/tb_bnn_ref_pkg.sv` | reference network, typed from the two tables above |
| `tb/tb_<block>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_bnn_top rtl/bnn_pkg.sv tb/tb_bnn_ref_pkg.sv tb/tb_bnn_top.sv
./obj_dir/Vtb_bnn_top
```

`tb_bnn_top` runs the design at its only size, with all defaults. It acts as
the host and checks the following:

* For all eight input combinations, calculate() gives the reference y and k.
* Every method returns the reference value for those inputs.
* Writes and starts made while logic runs are refused and flagged.
* The host-visible calculate() latency is 18 cycles.

It counts calculate runs, method calls, busy polls, refused writes and
refused starts, and fails if any count is zero. The block testbenches
(`tb_bnn_neuron`, `tb_bnn_layer`, `tb_bnn_method`, `tb_bnn_calculate`,
`tb_bnn_regfile`) are exhaustive over their inputs and check cycle timing
exactly.

To build a different trained network, change the tables in `bnn_pkg`
(`K?_ROWS`, `W_Y?`, and `NX`, `NK`, `NY`). The reference tables in
`tb_bnn_ref_pkg` must then change too. `bnn_calculate` takes its state count
(one per neuron, plus IDLE and RET) from `NK` and `NY`; the hidden layer's
`rows_to_init` is written for three inputs. The register map assumes at most 16 methods and 32-bit registers.
