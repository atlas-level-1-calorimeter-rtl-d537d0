# FEX-Hub: switch module logic for an L1Calo FEX shelf

An ATCA shelf of the ATLAS Level-1 Calorimeter trigger holds up to twelve Feature Extractor
(FEX) modules in its node slots and two Hub modules in logical slots 1 and 2. The Hubs are
the shelf's switch modules. They do three jobs:

* **Timing.** One clock and one control stream reach every FEX. The Hub in slot 1 (Hub-1)
  carries a TTC mezzanine, which supplies the LHC clock and TTC control data. Hub-1 fans
  both out to the twelve node slots, its own ROD, its own FPGA and the other Hub: 15
  destinations in all.
* **Readout.** Every FEX sends six readout streams to each Hub. A Hub copies each stream
  twice: one copy goes to its ROD (Readout Driver) mezzanine, the other to its own FPGA for
  monitoring.
* **Control.** The Hub gives its FPGA a geographic address, watches its own power, sequences
  the ROD's power-up, and serves a register bank to the slow-control network.

Both Hubs are the same board. A board learns its role from the hardware address pins of
its slot. This repository holds the digital part of one Hub. Its top level is `fex_hub`,
and an end-to-end testbench connects two copies back to back, one in each role.

```
                  TTC mezzanine (Hub-1 only)
                        | clock, TTC data
                        v
  ROD back data --> ttc_ctrl_merge --> ttc_fanout --> 12 node slots
  (own ROD and ROD       (Hub-1)                  --> own ROD, own FPGA
   of the other Hub)                              --> other Hub

  72 FEX streams + 2 other-Hub streams --+--> ROD (plus this FPGA's 2 streams = 76)
                                         +--> readout_monitor (74 channels)

  combined stream as this FPGA receives it --> ctl_stream_rx (decode, counts)

  ctrl_regs <--> register bus      geo_addr   power_monitor   rod_power_ctrl
```

## Hub-1 and Hub-2

`geo_addr` synchronises the hardware address pins with two flops. It takes the logical slot
from their low four bits. `is_hub1` is high only in slot 1. The role changes the top level as
follows:

| | Hub-1 (slot 1) | Hub-2 (slot 2) |
|---|---|---|
| Source of clock and control for the fan-out | local TTC mezzanine and the merged stream | pair received from Hub-1 |
| Node-slot clock and control outputs | driven | tied low |
| Its own ROD and its own FPGA | fed from the local merge | fed from the pair received from Hub-1 |
| Clock pair towards the other Hub | drives the clock | tied low |
| Control pair towards the other Hub | the combined stream | its own ROD's back data |
| Merge block | active | inputs gated off |

On the board, the TTC clock passes only through fan-out chips. `ttc_fanout` is therefore
combinational. The readout paths to and from the other Hub (two streams each way) do not
depend on the role.

## The combined control stream

This is the least obvious part of the design. The FEX modules receive one control stream.
It carries the TTC data and also messages from the two RODs, such as readout back-pressure.
ROD-1 is the ROD on Hub-1; ROD-2 is the ROD on Hub-2. The RODs' messages are called back
data here. The Hub-1 FPGA builds the stream. Its format is this design's own. Each clock
carries one `hub_pkg::ctl_word_t`:

| Field | Bits | Meaning |
|---|---|---|
| `ttc_valid` | 1 | TTC word present |
| `ttc` | 8 | TTC data of this bunch crossing |
| `back_valid` | 1 | back-data slot occupied |
| `back_src` | 1 | 0 = ROD-1, 1 = ROD-2 |
| `back` | 16 | back-data word |

The links are modelled as the word they carry each clock, after deserialisation. A real
board would serialise this word on its backplane pair.

`ttc_ctrl_merge` works as follows:

* **TTC data** always comes out one clock after it goes in. Back data never delays it.
* **Buffering.** Each ROD has a 4-deep first-word-fall-through FIFO (`sync_fifo`).
* **Arbitration.** When both FIFOs hold data, the single back-data slot alternates between
  them, round robin. A lone back word comes out two clocks after it arrives.
* **Overflow.** The ROD links have no ready signal. A word that arrives at a full FIFO is
  dropped, and a sticky overflow flag is set for that ROD. Software reads the flags in
  `R_MERGE` and clears them with a pulse.
* **Enables.** Each ROD's back data is accepted only while its enable bit in `R_CTRL` is
  set. The enables are zero after reset, so software must turn merging on.

ROD-2 sits on Hub-2, so its back data has to cross the backplane first. Hub-2 registers it
into the `back` field of a `ctl_word_t`, with `back_src` = ROD-2. It sends that word on the
control pair towards Hub-1. Hub-1 feeds the `back` field into the merge block as its ROD-2
input.

### Receiving the stream

Each destination decodes the combined stream in its own firmware. The Hub FPGA is one of
the destinations. Its decoder is `ctl_stream_rx`, which is fed from `fpga_ctl`. On Hub-1
that is the merged stream; on Hub-2 it is the copy relayed by Hub-1.

`ctl_stream_rx` keeps three things:

* the last TTC word received;
* a count of TTC words;
* a count of back words from each ROD.

The counts are read through snapshot registers (12–15). Comparing them on the two Hubs
checks TTC distribution through one or two boards without a FEX in the shelf.

## Readout fan-out and monitor

The board fans out the readout with 2-way buffer chips. Here they are wires in `fex_hub`.
The ROD receives 76 streams on `rod_ro_*`, in this order:

| Index | Source |
|---|---|
| 0–71 | FEX streams; stream *s* of node *n* is at index *n*·6+*s*, node 0 being the first node slot |
| 72–73 | the two streams from the other Hub's FPGA |
| 74–75 | this Hub FPGA's own two streams |

The FPGA's own two streams also go out on `hub_ro_out_*` to the other Hub's ROD. What the
FPGA puts in them is left to the user: they enter as `own_ro_*`.

`readout_monitor` receives the first 74 streams. The PCB may swap the two wires of a
differential pair. So each channel has a polarity bit (`R_POL0..2`), and a set bit inverts
the received word. The corrected words come out on `mon_*` one clock later.

Each channel also counts its words. A Pulse bit copies all 74 counters at once into shadow
registers. Software then selects a channel in `R_MON_SEL` and reads its shadow in
`R_MON_COUNT`. A counter that is still counting is therefore never read directly. A clear
pulse zeroes the counters and the shadows.

## Register bank

`ctrl_regs` is a generic bank. Each register is one of three types:

* **Status**: read-only, driven by the hardware.
* **Control**: read/write. Reads return the last value written.
* **Pulse**: a write gives a one-clock pulse on each written '1' bit. Reads return zero.

All registers are zero at power-up. Only the defined bits of a register (`REG_MASK`) can be
written or read back; the other bits read zero. An access outside the map reads zero and
raises `bus_err`.

The bus stands in for the IPbus endpoint. The address is 5 bits. A one-clock `bus_we` or `bus_re` strobe is
answered by `bus_ack` one clock later, with `bus_rdata` valid at the same time.

| Addr | Name | Type | Bits |
|---|---|---|---|
| 0 | R_GEO | S | [7:0] geographic address, [8] address valid, [9] this is Hub-1 |
| 1 | R_POWER | S | [0] power good, [2:1] ROD status, [4:3] ROD control, [7:5] sequencer state |
| 2 | R_RAILFAULT | S | [11:0] sticky rail faults |
| 3 | R_CTRL | C | [0] ROD power enable, [1] merge ROD-1, [2] merge ROD-2 |
| 4 | R_PULSE | P | [0] clear rail faults, [1] snapshot counters, [2] clear counters, [3] clear overflow flags |
| 5 | R_MON_SEL | C | [6:0] monitored channel |
| 6 | R_MON_COUNT | S | snapshot count of that channel |
| 7 | R_MERGE | S | [1:0] ROD-1 / ROD-2 overflow |
| 8–10 | R_POL0..2 | C | polarity bits for channels 0–31, 32–63 and 64–73 |
| 11 | R_SHELF | C | [7:0] shelf address, [8] valid |
| 12 | R_RX_TTC | S | received stream: [7:0] last TTC word, [8] a TTC word was seen |
| 13–15 | R_RX_NTTC, R_RX_NBACK1, R_RX_NBACK2 | S | snapshot counts of received TTC, ROD-1 and ROD-2 words |

The snapshot and clear bits of `R_PULSE` act on the readout counters and the received-stream
counters together. Addresses 16–31 are outside the map.

The map is defined in `hub_pkg`. To add a register, extend `N_REGS`, `REG_TYPE` and
`REG_MASK`, then wire the new register in `fex_hub`.

## Geographic address

The 8-bit address combines the slot with the shelf address. The shelf address comes from
the shelf manager, through the IPMC, which writes it into `R_SHELF`. The packing is
`{shelf[3:0], slot[3:0]}`, which is this design's choice. `ga_valid` follows the valid bit
of `R_SHELF`. The address pins take three clocks to reach `ga`; the shelf register takes one.

## Power

`power_monitor` watches the window flags of the Hub's twelve DC/DC rails: FPGA core, I/O,
AUX, GTH VCC, GTH VTT and GTH VAUX, and switch VDD, VDDX, VTT, VDDA, VDD33 and VDDA33.

* **Inputs.** The flags are synchronised with two flops.
* **Power good.** `power_good` is the AND of all twelve.
* **Faults.** A rail that leaves its window sets a sticky fault bit, which a Pulse bit clears.
* **After reset.** A short arming delay keeps reset from being recorded as a fault.

`rod_power_ctrl` sequences the ROD's power over two control and two status lines. The
sequence is this design's own:

| State | `rod_ctrl` | Next state |
|---|---|---|
| OFF | `00` | STAGE1, once enable is set and Hub power is good |
| STAGE1 | `01` | STAGE2, once status bit 0 is high |
| STAGE2 | `11` | ON, once status bit 1 is high |
| ON | `11` | stays while both status bits are high |
| FAULT | `00` | OFF, once enable is cleared |

FAULT is entered in three cases:

* a stage waits longer than `TIMEOUT_CYC` clocks (40000 by default, about 1 ms at 40 MHz);
* the Hub power fails;
* a status bit drops while ON.

Clearing enable switches the ROD off from any state. An assertion checks that `rod_ctrl` is
never `10`.

## Clocking and reset

All logic is in one clock domain, `clk`. On the board this clock comes from the fanned-out
LHC clock (`fpga_clk`). The clock fan-out itself is combinational and does not use `clk`.
Reset is asynchronous and active low (`rst_n`), and it brings every register to zero.

## Where this departs from the source specification

The specification describes these functions without their insides. The following are this
design's own choices:

* the format of the combined stream, the FIFO depth, round-robin arbitration and dropping on
  overflow;
* the register map and the bus handshake;
* the packing of the geographic address;
* the ROD power sequence and its timeout;
* the counters and snapshot scheme of the readout monitor, and what the Hub FPGA extracts
  from the received stream;
* the 32-bit readout word;
* the order of streams on the ROD port.

Not built, because they are bought parts or mezzanines with functions of their own:

* the Ethernet switch chips and the PHYs;
* the IPMC;
* the TTC and ROD mezzanines;
* the multi-gigabit transceivers and the optical transmitters;
* the IPbus protocol engine;
* the supplies and the I2C sensor chain.

Where they connect, `fex_hub` has ports.

The specification gives the Hub-to-Hub readout pairs in two places, and the two disagree.
This design follows the connector table: pairs 0 and 1 carry clock and control, pairs 2 and
3 carry the readout streams. This only names the ports; the logic does not depend on it.

Because the readout fan-out is wiring, synthesis shows a large share of outputs with no
logic behind them: all of `rod_ro_*` and `hub_ro_out_*`. This is expected.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog if it hangs.
`tb_fex_hub` runs two Hubs at the default parameters. It covers the role decode, TTC
fan-out, the tie-low outputs, the Hub-2 relay, back data from both RODs, contention,
overflow, readout fan-out, polarity correction, counter snapshots, ROD power-up, rail and
ROD faults, decoding of the received stream on both Hubs, and bus errors. Any of these that never happens counts as a failure.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/hub_pkg.sv rtl/sync_fifo.sv rtl/ttc_ctrl_merge.sv rtl/ttc_fanout.sv \
  rtl/readout_monitor.sv rtl/ctrl_regs.sv rtl/geo_addr.sv rtl/power_monitor.sv \
  rtl/rod_power_ctrl.sv rtl/ctl_stream_rx.sv rtl/fex_hub.sv tb/tb_fex_hub.sv \
  --top-module tb_fex_hub
./obj_dir/Vtb_fex_hub
```

For a single block, list `rtl/hub_pkg.sv`, that block's file (for `ttc_ctrl_merge`, add
`rtl/sync_fifo.sv`) and its `tb/tb_<block>.sv`. The simulator has two states, so every
register is reset. The testbenches draw their stimulus from `$urandom`.
