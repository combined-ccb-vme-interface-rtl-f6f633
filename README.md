# Combined CCB-VME interface FPGA

A sector-processor (SP) board of a muon track finder takes its clock, its
trigger timing and its reset from a Clock and Control Board (CCB) over the
backplane, and is set up and read back over VME. This design puts both
interfaces into one small FPGA instead of splitting them between a VME FPGA
and the Main (track-finding) FPGA on the mezzanine card. The benefit is that
almost everything except track finding works with only the main board and
a VME crate: the FPGAs can be configured, their registers and look-up
memories written and read back, test patterns and fake L1Accepts produced,
and the board keeps a clock when the CCB is absent, because the FPGA switches
to an on-board oscillator.

The RTL here is that interface FPGA. The other parts of the board are
outside it: five Front FPGAs (one per chamber group 4, 3, 2, 1B, 1A), the
Main FPGA, their memories and configuration PROMs, the optical links, the
GTLP/LVDS backplane transceivers and the clock de-skew DLLs of the Virtex
devices. They appear only as ports.

## Structure

```
                 CCB backplane                         VME P1/J1
   CCB_CLOCK40   fast control  reload bus        AS* DS* A23..1 AM D15..0
  osc 40 MHz |        |            |                       |
        +----v--------|------------|----+         +--------v---------+
        | clock_switch|            |    |         | vme_slave        |
        +----+--------|------------|----+         | A24/D16, BLT     |
             | clk_sys|            |              +--------+---------+
   +---------v----+   |   +--------v-----+                 | one access
   | ttc_fanout   |<--+   | reset_config |        +--------v---------+
   | CCB | VME    |   |   | PROG*, DONE, |        | ib_controller    |
   +------+-------+   |   | INIT         |        | + vme_addr_decoder|
          |       +---v---+-----+  +-----+        +---+----------+---+
   6 x {L1A,BX0,  |ccb_cmd_decoder|  SP_CFG_DONE      |          |
   BCNTRES,       +-------+------+                    |   CE*[5:0], address,
   EVCNTRES}              |           +-----------+   |   data to Front and
                          +---------->| vme_regs  |<--+   Main FPGAs
                  status, counters -->| control / |
                                      | status    |--> force_osc, fake pulses,
                                      +-----------+    program requests, JTAG
```

| Module | Job |
|---|---|
| `ccb_vme_top` | wires the blocks; board-level ports |
| `clock_switch` | CCB clock-loss detector and glitch-free clock multiplexer |
| `vme_slave` | VME A24/D16 slave, single cycles and block transfers |
| `ib_controller` | runs each VME access on the internal downloading/readout bus |
| `vme_addr_decoder` | internal address map, one select per destination |
| `vme_regs` | the FPGA's own control and status registers |
| `ttc_fanout` | BX0, BCNTRES, EVCNTRES, L1ACCEPT from CCB or VME to every FPGA |
| `ccb_cmd_decoder` | captures CCB commands and data |
| `reset_config` | hard reset and program pulses; DONE/INIT into SP_CFG_DONE |
| `reset_sync` | asynchronous-assert, synchronous-release reset |
| `ccb_vme_pkg` | counts, address-modifier codes, pulse struct, register map |

## Clocks and the clock switch

There is one system clock, `clk_sys`, and all logic except the loss
detector runs on it, including the VME slave. That is deliberate: if VME ran
on the CCB clock it would stop with the CCB, and if it ran on the oscillator
every control bit would have to cross into the CCB domain. The price is that
`clk_sys` must never glitch, since the whole FPGA (and, through the de-skew
DLLs, the whole board) runs on it.

`clock_switch` does three things.

**Loss detection.** A flop toggled by the CCB clock is synchronized into the
oscillator domain. Each change seen there is a CCB clock edge. After
`LOSS_CYCLES` (8) oscillator cycles without one, `clk_lost` is set. After
`RECOVER_EDGES` (1024) edges without a new gap it is cleared and the CCB
clock is selected again unless VME forces the oscillator.

**Selection.** `want_osc = force_osc | clk_lost`, formed in the oscillator
domain. `force_osc` comes from the CSR register.

**Glitch-free multiplexer.** Each source has a two-flop enable chain clocked
on that source's own falling edge. A source's enable can only rise once the
other enable has fallen, so at most one clock is gated through at any time
and each change happens while the gated clock is low. On a switch `clk_sys`
therefore shows one stretched low phase and never a short pulse.

The standard scheme has one trap: a stopped clock cannot clear its own
enable flop. The CCB enable chain therefore also has an asynchronous clear,
driven by the registered loss flag. By the time that flag is set the CCB clock
has been idle for 8 oscillator cycles. If it stopped high, the clear only
ends an already long high phase. If it stopped low, the clear changes
nothing on `clk_sys`. The testbench checks both cases, plus recovery and a
forced switch, for any `clk_sys` phase shorter than 11.9 ns.

`clk_sys` is a gated clock in this RTL. In a Virtex device it should map
onto a global clock-buffer multiplexer, and `clk_sys` is also brought out of
the top for the board's clock de-skew DLLs.

## VME slave

The board answers A24 cycles with address modifiers 0x39, 0x3A, 0x3D and
0x3E (single cycles) and 0x3B and 0x3F (block transfers). The five
geographical-address pins of the slot select the board's window:
A23..A19 must equal GA4..GA0, which leaves 2^19 bytes per board. The slave
also checks GA parity (GAP*), ignores IACK* cycles and answers 16-bit
transfers only (LWORD* high). DS1* enables D15..D8 and DS0* enables D7..D0.

One cycle runs like this:

1. AS*, DS1* and DS0* pass two-flop synchronizers. The address, AM code,
   LWORD* and IACK* are sampled once AS* is seen low. They are stable for the
   whole address phase, so they need no synchronizer.
2. The board decides in the next clock whether it is addressed. If not, it
   waits for AS* to rise.
3. A data strobe seen low in two successive clocks starts one access on the
   internal bus. The write data and byte lanes are sampled at that point.
4. On the access's `ack` the read data go onto the bus. DTACK* follows one
   clock later. On `err` (an address in no region) BERR* is asserted
   instead.
5. DTACK* or BERR* is held until both data strobes are high again.

In a block transfer the address then advances by 2 bytes, and the next data
phase follows under the same AS*. In a single cycle, further data strobes
under the same AS* are ignored.

From DS* low to DTACK* low takes 7 to 8 clocks (about 185-195 ns) for a
register of this FPGA and about 11 clocks (270 ns) for a Front or Main FPGA
with the default 4 wait states; the spread is the synchronizer phase. DTACK*, BERR* and
the data bus are ports with an active level and an output enable, for the
board's open-collector and three-state drivers.

## Internal address map and the downloading/readout bus

The Front FPGAs, the Main FPGA and this FPGA's registers share one address
space inside the board's window. Only the Front FPGAs' size (0x100 each) is
fixed by the design's specification; the rest is this design's choice and
is set by parameters of `vme_addr_decoder`.

| Byte offset in window | Destination | CE* |
|---|---|---|
| 0x00000 - 0x000FF | registers of this FPGA | internal |
| 0x00100 - 0x001FF | Front FPGA 0 (chamber 4) | `ib_ce_n[0]` |
| 0x00200 - 0x005FF | Front FPGAs 1-4 (chambers 3, 2, 1B, 1A) | `ib_ce_n[1..4]` |
| 0x40000 - 0x7FFFF | Main FPGA | `ib_ce_n[5]` |
| anything else | none: BERR* | - |

For an FPGA, `ib_controller` drives that FPGA's CE* low together with the
region-relative word address `ib_addr`, the byte lanes, and either `ib_we`
(write data on `ib_wdata`) or `ib_oe`. It keeps them for
`IB_WAIT_CYCLES` (4) clocks and samples `ib_rdata` in the last of them. The
FPGAs are expected to be synchronous to `clk_sys` and to answer within that
time. Write and read data are separate ports; on the board they are one
bidirectional bus. Only one CE* is ever low; an assertion checks this.

## Registers of this FPGA

Word offsets (byte offset = 2 x word offset). All writable bits are in
D7..D0.

| Word | Name | Bits |
|---|---|---|
| 0x00 | CSR (RW) | [0] force oscillator, [1] forward CCB pulses (reset 1), [2] forward VME pulses (reset 1) |
| 0x01 | TTC (WO) | [3] L1Accept, [2] BX0, [1] BCNTRES, [0] EVCNTRES: writing 1 sends one pulse |
| 0x02 | RECONFIG (WO) | [5:0] program pulse to Front FPGA 0-4 and Main FPGA (bit 5) |
| 0x03 | STATUS (RO) | [0] CCB clock lost, [1] on oscillator, [2] CCB_READY, [3] CCB_CLOCK40_ENABLE, [4] SP_CFG_DONE, [8:5] CCB_RESERVED |
| 0x04 | DONE (RO) | [5:0] DONE, [13:8] INIT of the six FPGAs |
| 0x05 | CCB_CMD (RO) | [5:0] last command, [15:8] commands received |
| 0x06 | CCB_DATA (RO) | [7:0] last data, [15:8] data words received |
| 0x07 | JTAG (RW) | [0] TCK, [1] TMS (reset 1), [2] TDI, [3] TDO (RO) |
| 0x08 | COUNT (RO) | [7:0] L1Accepts sent, [15:8] hard resets received |

Status bits from pins and from the oscillator domain pass through two-flop
synchronizers, so they show 2 clocks late. JTAG is driven one bit at a time:
software toggles TCK through register writes.

## Timing signals, commands and reset

**Timing pulses.** BX0, BCNTRES, EVCNTRES and L1ACCEPT arrive from the CCB
as one-clock (25 ns) pulses. They are registered, ORed with the pulses
written to the TTC register (each source can be disabled in the CSR), and
registered again in one copy per FPGA (`ttc_out[0..5]`). From the backplane
the latency is 2 clocks; from a VME write it is 1 clock after the register
pulse. Every output pulse is one clock wide.

**Commands.** CCB_CMD[5:0] is captured on CCB_CMD_STROBE and CCB_DATA[7:0]
on CCB_DATA_STROBE, two clocks later. Each captured command is passed on to
the FPGAs as `sp_cmd` with the one-clock strobe `sp_cmd_valid`. The command
set itself was never defined. `ccb_cmd_decoder` therefore takes a list of
up to `N_HIT` codes as a parameter and raises a one-clock hit line for each.
The list is empty by default.

**Hard reset and configuration.** A rising SP_HARD_RESET (a 300 ns pulse)
sends a program pulse (`fpga_prog_n` low) to all six FPGAs. Writing to
RECONFIG sends one to the selected FPGAs. The pulse lasts at least
`PROG_CYCLES` (12 clocks, 300 ns), and for as long as SP_HARD_RESET stays
high. SP_CFG_DONE to the CCB is high when all six DONE lines are high, no
INIT line is low (INIT low after configuration flags an error) and no
program pulse is running.

**Reset of this FPGA.** The board's power-on reset ANDed with VME
SYSRESET*, released synchronously to `clk_sys`.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_FRONT`, `N_FPGA` | 5, 6 | `ccb_vme_pkg` | Front FPGAs; plus the Main FPGA |
| `IB_WAIT_CYCLES` | 4 | top, `ib_controller` | CE* width for an FPGA access |
| `LOSS_CYCLES` | 8 | top, `clock_switch` | oscillator cycles without a CCB edge before the clock counts as lost |
| `RECOVER_EDGES` | 1024 | top, `clock_switch` | CCB edges before the CCB clock is taken back |
| `PROG_CYCLES` | 12 | top, `reset_config` | minimum program pulse |
| `REGS_/FRONT_/MAIN_BASE/SIZE` | see map | `vme_addr_decoder` | address map |
| `N_HIT`, `HIT_CODES`, `HIT_MASK` | 4, none | `ccb_cmd_decoder` | CCB command codes to decode |

Of these, only the five Front FPGAs, their 0x100-byte regions, the A24
modifier codes, the slot-based 2^19-byte window, the 40 MHz clock and the
300 ns reset pulse come from the specification. The other values are this
design's choices.

## Where this design departs from, or goes beyond, its specification

- **Own choices where the specification is open:** the address map outside
  the Front FPGAs, the register map, the internal-bus timing, how clock loss
  is detected, taking the CCB clock back automatically, the SP_CFG_DONE rule,
  and the bit-level JTAG access. The specification only says the FPGAs are
  configured over VME and shows a JTAG line.
- **CCB command decoding** is a parameterised table with no entries, because
  no commands were defined.
- **Clock de-skew** is left to the Virtex DLLs; `clk_sys` is an output for
  them.
- **I/O count.** The specification budgets 130-150 FPGA I/Os in all, with
  10-25 for the CCB functions on the SP side. As written, the top has 195
  board pins. That counts the 16-bit internal data bus once, as the one
  bidirectional bus it would be on the board. The excess comes from choices
  made here for clarity: one registered copy of the four timing pulses per
  FPGA (24 pins), separate DONE and INIT inputs per FPGA (12), and a
  separate 18-bit internal address bus. A board version would buss the
  timing pulses to a few groups of FPGAs, wire-AND DONE and INIT, and could
  share pins between the internal bus and VME.
- **VME pins:** IACK* is used, in addition to the 59 VME lines the
  specification counts, so that interrupt-acknowledge cycles are ignored.
- SP_RESERVED[3:0] have no function and are driven low. CCB_CLOCK40_ENABLE
  and CCB_READY are only reported in STATUS.

## Simulation

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
`tb_ccb_vme_top` runs the whole FPGA at its default parameters against
models of a VME master, the six FPGAs, the CCB and a JTAG chain. The run
covers:

- register, Front and Main FPGA access, a block transfer, a bus error and a
  foreign-slot cycle;
- CCB and VME timing pulses, with source masking;
- command and data capture;
- a hard reset and a VME reprogram request;
- JTAG access;
- loss and recovery of the CCB clock, with VME traffic continuing on the
  oscillator, and a forced switch.

It counts each of these and fails if one never happened.

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ccb_vme_pkg.sv tb/tb_ccb_vme_top.sv --top-module tb_ccb_vme_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_ccb_vme_top` with its name (`tb_vme_slave`,
`tb_clock_switch`, `tb_ib_controller`, `tb_vme_addr_decoder`, `tb_vme_regs`,
`tb_ttc_fanout`, `tb_ccb_cmd_decoder`, `tb_reset_config`). The simulator
is two-state, so the testbenches initialise everything they read. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ccb_vme_pkg.sv rtl/ccb_vme_top.sv`.
The remaining warnings are expected:

- the reset used inside assertions;
- unused high data bits in the register file;
- three deliberately open status outputs in the top.

All of `rtl/` is synthesizable. The gated `clk_sys` is the one construct
that should be replaced by the target's clock multiplexer primitive.
