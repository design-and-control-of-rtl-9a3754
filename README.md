# Adaptive wiring panel: cell logic

An adaptive wiring panel replaces a fixed wiring harness with a grid of identical
*cells*. Each cell carries a small array of relays that can short its row and
column wires together, contact pads on top for the components ("modules") being
wired, and logic underneath. Once modules are plugged in, a central *Cell
Management Unit* (CMU) works out where everything is. It computes shortest paths
between the module pins that must be joined and tells each cell which of its
relays to close. Because the wiring is only relay settings, it can be changed in
the field. A broken path can be replaced by another one, and temporary probe
connections can be set up for diagnostics.

This repository holds the synthesizable logic of a cell and of a panel made of
cells, in SystemVerilog. The CMU is a host program. Here it is only a behavioural
model in the testbenches, and so are the modules.

## What a cell does

A cell (`cell_unit`) has four jobs:

1. **Relays.** It drives 72 relay outputs, one per switch of its crossbar-like
   switch array (`relay_ctrl`).
2. **Neighbors.** It finds out which cell sits to its North, East, South and West
   (`neighbor_master`, `neighbor_slave`). The CMU needs this to build its map of
   the panel.
3. **Modules.** It detects a module on its probe connector, learns how the module
   is turned, and reads the module's electronic data sheet (`module_probe`).
4. **Reporting.** It answers the CMU on a shared I2C bus at its global cell ID, and
   accepts relay commands there (`cmu_slave`).

All communication uses I2C. A cell has six I2C ports:

| port                  | role of the cell | engine            | purpose                                 |
|-----------------------|------------------|-------------------|-----------------------------------------|
| CMU bus (shared)      | slave            | `i2c_slave_byte`  | register reads, Enable Switch messages  |
| North, East           | master           | `i2c_master_byte` | ask the neighbor for its ID             |
| South, West           | slave            | `i2c_slave_byte`  | answer the neighbor                     |
| probe connector (4 pin pairs) | master   | `i2c_master_byte` | read the module's data sheet            |

Roles on the neighbor buses are fixed: the cell is master towards North and East,
and slave towards South and West. When two cells are joined, each bus between
them therefore has exactly one master and one slave. No arbitration or
multi-master logic is needed.

## The panel

`awp_panel` is a `ROWS x COLS` grid of cells, with CU(0,0) at the top left. Cell
(r, c) gets the ID `BASE_ID + r*COLS + c`. The panel makes these connections:

- Each cell's North bus goes to the South bus of the cell above it.
- Each cell's East bus goes to the West bus of the cell to its right.
- Buses at the panel edge are left idle (pulled up), so those neighbors read as
  absent.
- All cells share the one CMU bus.

The default is the two-cell prototype arrangement: `ROWS=1`, `COLS=2`, IDs 0x09
and 0x0A.

### How the CMU uses it

These steps are not in the RTL. They show what the registers are for:

1. The CMU sweeps addresses upward and reads register 0x44 until a cell answers.
   That cell, the one with the lowest address, starts the map.
2. The CMU reads that cell's neighbor registers (North, East, South, West). Each
   new ID goes into the map, one step away in that direction, and joins a queue.
   This breadth-first search continues until every cell found has been visited.
3. For each cell, the CMU reads the module registers. It looks up the module ID in
   its database (for example 0x02 LED, 0x03 1 kΩ resistor, 0x04 5 V supply).
4. The CMU computes routes and sends each cell on a route an Enable Switch message.

## CMU register map

All codes are one byte. To read, the CMU writes the code to the cell's address and
then reads one byte. The read may follow a repeated START or come as a separate
transfer.

| code      | returns                                          |
|-----------|--------------------------------------------------|
| 0x44      | cell ID                                          |
| 0x45–0x48 | N, E, S, W neighbor ID (0x01 = no neighbor)      |
| 0x49      | module ID (0x01 = no module)                     |
| 0x50      | number of netlist/config bytes of the module     |
| 0x51–0x59 | module config bytes 1–9 (0 beyond the count)     |
| 0x5A      | module orientation 0–3 (0xFF = no module)        |
| other     | 0x00                                             |

Note the jump from 0x49 to 0x50: the codes are used exactly as listed, and
0x4A–0x4F are unused. 0x5A is an addition of this design. Every other code comes
from the cell's command list.

**Enable Switch**: `[address+W] 0x33 N i1 i2 … iN [STOP]`

- The message closes switches `i1..iN` (0–71) and opens every other switch of the
  cell. The list replaces the cell's closed set; it does not add to it. That way
  the one command can both close and open relays.
- `N = 0` opens all relays.
- The indices are collected in a staging register. The relay outputs change in a
  single clock, after the N-th index arrives.
- A message cut short by a STOP leaves the relays as they were.
- Indices of 72 and above are ignored.

## Neighbor discovery

Every `POLL_CYCLES` clocks, starting right after reset, each North and East port
runs one exchange on its bus (address `NEIGHBOR_ADDR` = 0x44):

```
START  0x44+W  <own ID>  RESTART  0x44+R  <neighbor ID, NACK>  STOP
```

This gives each side the other's ID:

- **Master side.** It stores the ID it reads back. If any acknowledge is missing,
  it records 0x01 (no neighbor).
- **Slave side.** It stores the ID written to it. If no ID arrives within
  `NBR_TIMEOUT_CYCLES`, it falls back to 0x01.

The CMU needs both directions for registers 0x45–0x48. Sending the master's own
ID in the write phase is what gives the South and West sides theirs.

## Module probe and orientation

The probe connector is a 4x4 socket that carries four SCL/SDA pin pairs. A module
populates only four pins: power, ground, SCL and SDA. Which pin pair is live
depends on the module's rotation (0°, 90°, 180° or 270°).

`module_probe` tries pairs 0, 1, 2, 3 in turn. On each pair it sends a START and
the module address (`MODULE_ADDR` = 0x20) with the read bit set.

- **A pair acknowledges.** The probe reads 11 bytes: module ID, byte count,
  config bytes 1–9. It then publishes them, with that pair's index as the
  orientation.
- **No pair acknowledges.** It reports ID 0x01 and orientation 0xFF.

A new scan starts `PROBE_GAP_CYCLES` after the previous one ends. Plugging in or
removing a module shows up within one scan.

## Electrical convention and timing

- **Open-drain lines.** Every I2C line is modelled as open-drain. A `*_oe` or
  `sda_oe` output of 1 means "pull this line low". The matching `*_i` input is the
  level actually on the wire. The pad, its pull-up and the wired-AND are outside
  the logic. The panel computes the wired-AND internally for its neighbor buses.
  For the CMU bus, it brings out the OR of the cells' pull-downs.
- **Master timing.** The masters use a four-phase bit of `4 * QTR_CYCLES` clocks.
  They do not support clock stretching.
- **Slave timing.** The slaves synchronise SCL and SDA with two flip-flops. SCL must
  stay high and stay low for at least about four clocks.
- **Reset.** Reset is asynchronous and active low. After reset, all relays are
  open and all IDs read 0x01.

Defaults assume a 50 MHz clock:

| parameter            | default     | meaning                                   |
|----------------------|-------------|-------------------------------------------|
| `QTR_CYCLES`         | 125         | quarter SCL period (100 kHz I2C)          |
| `POLL_CYCLES`        | 100 000 000 | neighbor poll interval (2 s)              |
| `NBR_TIMEOUT_CYCLES` | 300 000 000 | silent S/W neighbor dropped after (6 s)   |
| `PROBE_GAP_CYCLES`   | 50 000      | pause between module scans (1 ms)         |
| `NUM_SWITCHES`       | 72          | relays per cell                           |

## What is design choice, and what is not here

These come from the design as published:

- the three-part architecture (cells, a central manager, modules);
- I2C everywhere, with fixed master/slave roles (master to North and East);
- the command codes 0x33 and 0x44–0x59, and 0x01 for "not existing";
- 72 relays per cell, driven one per output pin;
- four probe pin pairs that are polled, with the answering pair giving the
  orientation;
- breadth-first assembly of the cell map from the lowest address;
- the 2 s polling period of the manager.

These are choices made for this RTL, where the source is silent:

- the internal design of both I2C engines;
- the neighbor exchange format and the use of 0x44 as its bus address;
- the slave-side timeout;
- the module address 0x20 and the fixed 11-byte data-sheet read;
- register 0x5A for orientation;
- replace semantics for Enable Switch and atomic application of the list;
- the clock rate, I2C rate and scan interval;
- cell IDs from a strap input (per cell) and `BASE_ID + index` (in the panel).

Not in this RTL:

- **The CMU.** It is host software with Dijkstra shortest-path routing. Nodes
  already used by a route get a high weight so that later routes avoid them. It
  reaches the panel through a USB-to-I2C adapter.
- **The relay board and the cell-to-cell signal wiring.** Which row/column
  crossing each of the 72 switches sits on, and which edge wires join which
  neighbor wires, belong to the relay board. The logic only numbers the switches
  0–71.
- **The modules' own I2C devices and the low-current module supply.**
- **Self-healing and probe formation.** These are procedures of the manager built
  from the same Enable Switch command. No extra cell logic is involved.

## Files

`rtl/` (one module or package per file):

- `awm_pkg.sv`: command codes, constants, I2C pin structs, `module_info_t`
- `i2c_master_byte.sv`, `i2c_slave_byte.sv`: byte-level I2C engines
- `relay_ctrl.sv`: switch staging register and relay outputs
- `cmu_slave.sv`: CMU register map and Enable Switch parser
- `neighbor_master.sv`, `neighbor_slave.sv`: neighbor discovery
- `module_probe.sv`: probe connector scan
- `cell_unit.sv`: one cell
- `awp_panel.sv`: the grid (top)

`tb/`:

- `tb_<module>.sv`: one self-checking testbench per module.
- `tb_awp_panel.sv`: end to end on a 2x3 panel with short timings.
- `tb_awp_panel_full.sv`: the same test on the default panel with default timings.
- `awp_panel_tb_body.svh`: the body shared by the two panel testbenches. It holds
  the behavioural CMU (address sweep, breadth-first map, module reads,
  Dijkstra routing over the cell graph with used cells weighted, and Enable
  Switch messages along each route).
- `i2c_bfm.svh`: a behavioural I2C master.
- `eds_module_model.sv`: a behavioural module data sheet device.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog
ends a hung run. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/awm_pkg.sv tb/tb_awp_panel.sv --top-module tb_awp_panel -Mdir obj
./obj/Vtb_awp_panel
```

Substitute any other testbench name. The reduced panel test checks that every
mechanism happened at least once:

- neighbors found, and edges read as 0x01;
- modules found, one of them rotated;
- an empty cell;
- a module removed;
- relays closed, and a relay list replaced;
- absent addresses ignored;
- a second route (LED to supply) steered around the cells of the first (LED to
  resistor);
- repeated (periodic) neighbor polls.

The full-size test runs the default two-cell panel at 100 kHz I2C. It takes about
a second of host time.

To lint a module on its own:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/awm_pkg.sv rtl/awp_panel.sv
```

The remaining lint warnings are of three kinds. Unused status pulses
(`poll_done`, `scan_done`, `bad_idx`, `tx_load`) are left in place as observation
points. Some package constants are unused. The asynchronous reset also appears in
the `disable iff` of the concurrent assertions, which Verilator flags as
SYNCASYNCNET.

## How far it is verified

- Every module has a self-checking testbench. All testbenches pass with
  Verilator's random initialisation of unreset state.
- Each testbench is known to fail on a deliberately broken copy of its module.
- Concurrent assertions check the bus rules. Master data bits change only while
  SCL is low. The slave drives SDA only when addressed and changes it only while
  SCL is low. Relays move only on a commit.
- The I2C engines have only been tested against each other and against the
  behavioural models in `tb/`. They have not been tested against third-party I2C
  devices or on hardware. In particular, slaves that stretch the clock are not
  supported.
- The relay numbering used by the testbench CMU is arbitrary, because the
  crossbar layout of a cell belongs to the relay board.
