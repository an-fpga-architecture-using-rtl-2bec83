# Cluster-based FPGA fabric for vertical nanowire CMOS

This is a small island-style FPGA: a square array of logic clusters joined by
eight-wire routing channels. Each cluster holds three 4-input look-up tables
(LUTs), and each LUT output can be registered or passed straight on. Where a
horizontal and a vertical channel cross, each wire has its own six-transistor
"traffic pole" switch (TPS). The TPS joins any two of the four wire segments
that meet at the crossing. The fabric was drawn for a process built from
vertical silicon nanowire transistors with a surrounding gate. Its LUTs and
routing are made almost entirely of NMOS pass gates and tri-state inverters.

The RTL here gives the fabric's logic behaviour: what gets stored, what gets
selected, and what reaches where. It does not model transistor-level effects:
threshold drops on pass gates, slow edges, delay and power. Those limit how far
a signal should travel (see "Routing reach" below), but they do not change the
function.

## Structure

```
fpga_array            ROWS x COLS clusters, (ROWS+1) x (COLS+1) crossings
├── tps_switch        one per crossing, eight wires, six enables per wire
├── chan_in_mux       12 per cluster: channel wire -> Data pin (8-1)
├── chan_out_demux    3 per cluster: OutCluster -> channel wire (1-8)
└── cluster           three LUTs
    ├── lut_in_mux    12 per cluster: Data pin or OutCluster1..3 -> LUT input (4-1)
    ├── lut4          16 cells, read tree / write tree
    │   └── mem_cell  one bit
    └── lut_out_stage flip-flop and the registered/bypass 2-1 mux
fpga_pkg              constants and configuration structs
```

Sizes that come from the architecture are 3 LUTs per cluster, 4 inputs per
LUT, 16 cells per LUT, 8 wires per channel, 4-1 LUT input muxes, 8-1 channel
input muxes, 1-8 output demuxes and 6 switches per wire per crossing. The array
size is this design's own choice: `fpga_array` defaults to 5 x 5 clusters. That
is the smallest array in which a net can run four cluster lengths diagonally,
the longest route the fabric is specified for.

## The cluster

Cluster pins are named by LUT and input. `Data<n><i>` is input `i` of LUT `n`,
and `s<n><i>1..4` is the select of the mux in front of it. In the RTL these
are `data[n-1][i-1]` and `s[n-1][i-1][0..3]`.

* **LUT inputs.** Each of the 12 LUT inputs comes from a 4-1 mux. The mux
  chooses between its own Data pin and the three cluster outputs. This is how
  one LUT feeds another inside the cluster without using the channels, and how
  a LUT with a registered output becomes a state machine. The select is
  one-hot. Bit 0 picks the Data pin, and bits 1..3 pick OutCluster1..3.
* **LUT.** The LUT stores 16 bits. Reading steers a binary tree with the four
  inputs. InLUT1 drives the level nearest the cells and InLUT4 the level
  nearest the output, so the bit read is `M[{InLUT4,InLUT3,InLUT2,InLUT1}]`.
  Writing uses the same tree in reverse: the inputs address one cell and `Pin`
  is stored in it.
* **Output stage.** OutLUT goes to a D flip-flop. With `b=1`, OutCluster is
  the flip-flop output. With `b=0`, it is OutLUT itself (the bypass).

`W` and `R` are shared by the cluster's three LUTs. `Pin1..3` are separate.

### Programming a LUT

Programming is the least obvious part of the fabric. No separate address bus
exists: **the address of a write is whatever the LUT inputs currently see.**
To write a cluster's LUTs:

1. Route four wires to the LUT's Data pins, and set the 4-1 muxes to the Data
   pins.
2. Lower `R` and raise `W`.
3. On each clock, present an address on the four wires and the table bit on
   `Pin<n>`.

Sixteen clocks write a whole LUT, and the three LUTs of a cluster are written
in parallel. `tb/tb_fpga_array.sv` programs all 75 LUTs of the 5 x 5 array at
once this way. Every crossing passes wires 1–4 straight through. The west edge
drives the address onto every horizontal channel, and the north edge drives it
onto every vertical channel. `R` and `W` must never both be high, because they
share the tree; an assertion in `lut4` enforces this.

## The routing fabric

### Geometry

Cluster `(r,c)` is framed by four channel segments:

| side   | segment        | use                                   |
|--------|----------------|---------------------------------------|
| top    | `hseg[r][c]`   | Data11..Data14 (LUT 1) via 8-1 muxes  |
| left   | `vseg[r][c]`   | Data21..Data24 (LUT 2) via 8-1 muxes  |
| bottom | `hseg[r+1][c]` | Data31..Data34 (LUT 3) via 8-1 muxes  |
| right  | `vseg[r][c+1]` | OutCluster1..3 via 1-8 demuxes        |

The right-hand channel of one cluster is therefore the left-hand channel of
its neighbour. A cluster's outputs can reach the next cluster to the east
without passing any switch. Crossing `(i,j)` sits at the corner shared by
clusters `(i-1..i, j-1..j)`. Wires that reach the array boundary become edge
ports:

* `edge_*_in` drives a wire into the array.
* `edge_*_out` is what arrives there from inside.

### How a pass-gate network is modelled

A real channel wire is bidirectional, and a turned-on pass gate simply joins
two segments into one electrical net. A two-state RTL model cannot do that
directly, so each wire segment is carried as **two directed signals**, one for
each direction. Each switch is modelled as follows:

```
out_N = ns&in_S | ne&in_E | nw&in_W      (and likewise for S, E, W)
```

A signal entering a crossing leaves on every other side whose transistor is
on. It never reflects back onto the side it came from. Drivers are OR-merged,
both within a switch and on each segment, where the segment's value is
(east-going | west-going | any cluster output driven onto it). A wire that
nothing drives reads 0.

This is exact for every configuration in which **each routed net is a tree
with exactly one driver**, which is the only sane way to use a pass-gate
fabric. Two configurations break it:

* **Two drivers on one net.** The OR hides the contention a real chip would
  show.
* **A ring of switches that closes on itself.** This makes a real
  combinational loop in simulation.

Lint tools report structural loops in `fpga_array` and `cluster`. Those come
from the programmability itself: any switch may turn, and any cluster output
may come back to a cluster input. They are loops only in a configuration that
closes one.

The channel input muxes and output demuxes are one-hot, one bit per pass gate.
Assertions in `fpga_array` and `cluster` flag selects with more than one bit
set.

### Routing reach

Every pass gate on a path costs a threshold drop on a logic 1 and a slower
edge. Inverters in the cluster restore the level only at the LUT inputs. A
route from a cluster to the cluster three places away diagonally passes seven
pass gates: the output demux, five switches and the input mux. Routes longer
than four diagonal cluster lengths should be avoided. The transistor-level
figures for this fabric are listed below for reference; the RTL does not
reproduce any of them.

| quantity                              | value                          |
|---------------------------------------|--------------------------------|
| cluster rise delay, Read Enable → out | 9·FO + 61 ps                   |
| cluster fall delay                    | 12.5·FO + 59.5 ps              |
| wire delay, 1 diagonal spacing        | 4·FO + 23 ps                   |
| wire delay, 4 diagonal spacings       | 14.5·FO + 54.5 ps              |
| 4-LUT power at 10 GHz (write / read)  | 2.15 µW / 3.08 µW              |
| cluster power at 10 GHz (write / read)| 7.09 µW / 10.16 µW             |
| cluster area (three LUTs)             | about 8.0 µm²                  |

FO is fan-out: the number of clusters connected to one cluster output.

## Configuration ports

The architecture does not say how selector and switch bits are held, so
`fpga_array` takes them as plain inputs, grouped in `fpga_pkg`:

* `cluster_cfg_t cfg[ROWS][COLS]` holds the following fields:
  * `s`: the 4-1 LUT input selects.
  * `b`: the output mode of each LUT.
  * `in_sel`: the 8-1 channel mux selects, indexed by LUT then input.
  * `out_sel`: the 1-8 output demux selects.
* `corner_cfg_t tps_cfg[ROWS+1][COLS+1]` holds a `tps_cfg_t` per wire, with
  the enables `ns, ew, ne, nw, se, sw`.
* `w`, `r` and `pin[2:0]` are per cluster. `clk` and `rst_n` are shared.

A real device would back these with configuration memory and a loading chain.
That layer is not part of this design.

## Timing and reset

* All paths are combinational from edge inputs and configuration to LUT
  inputs, and from LUT inputs to OutCluster when `b=0`.
* LUT cells are written on the rising edge of `clk` while `W` is high. The
  circuit's cell is a static latch written level-sensitively; the clocked
  write is the synthesizable stand-in.
* The output flip-flops load on the rising edge. `rst_n`, active low and
  asynchronous, clears them.
* LUT cells have no reset. Program them before reading.
* With `R` low, a LUT output is 0. In the circuit it would float.

## Where this RTL departs from the circuit, or fills gaps

The following points are choices made in this design, not given by the
architecture:

* The one-hot encodings of all selects.
* Which 4-1 mux input is the Data pin (bit 0).
* `b=1` meaning registered.
* The flip-flop reset.
* Per-cluster `W`/`R`.
* The edge ports.
* The 5 x 5 default size.
* The directed-signal model of bidirectional wires.
* Undriven nodes reading 0.

Everything analog is outside the model: the nanowire devices, the restoring
and tri-state inverters as circuits, and the extra feedback transistors that
ease write contention in the memory cell.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fpga_pkg.sv tb/tb_fpga_array.sv \
          --top-module tb_fpga_array -Wno-fatal
./obj_dir/Vtb_fpga_array
```

Replace `tb_fpga_array` with any other testbench name. `-Wno-fatal` is needed
only because the fabric's structural loops produce lint warnings.

`tb_fpga_array` runs the full 5 x 5 array at its default parameters and takes
about a second:

1. It programs every LUT with a random table.
2. It reads the whole array in bypass mode and in registered mode.
3. It checks the values passing straight through to the east and south edges.
4. It runs routes in parallel:
   * three diagonal cluster lengths, through exactly five switches;
   * four diagonal lengths;
   * one diagonal length;
   * a fan-out of three.
5. It chains two LUTs inside a cluster.
6. It runs a one-bit toggle state machine on a LUT fed by its own flip-flop.

It counts each of these mechanisms and fails if one never happened.

To change the array size, override `ROWS`/`COLS` on `fpga_array`. The
testbench's route coordinates assume at least 5 x 5.
