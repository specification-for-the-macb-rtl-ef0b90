# MACB — clock, SYNC and trigger distribution box for FEE64 front-end cards

A set of FEE64 front-end cards can only merge their data if every card counts
the same 50 MHz clock and clears its timestamp counter on the same clock edge.
The MACB is a NIM unit that makes this possible, and it also connects the
cards to an external Correlation DAQ. It takes one clock source and one SYNC
source, chosen with a front-panel rotary switch, and sends the same Clock and
SYNC to four HDMI ports. A card (or a further MACB) sits on each port. It
collects the cards' ASIC Triggers onto Fast NIM outputs. It routes four spare
lines that carry the Correlation DAQ handshake: a 10 MHz clock, a scaler
reset, a reset request and a trigger accept.

A fifth HDMI port, *Port Next*, connects to the level above. MACBs therefore
form a tree: 1 level serves 4 cards, 2 levels 16, 3 levels 64, and 4 levels
256. Connect every card at the same depth so that all cards see equal delays.

This repository has synthesizable SystemVerilog for the logic of one MACB: the
switch decoder, the Timestamping multiplexers, the external-clock divider, the
spare-line router (a CPLD in the real unit) and the trigger OR. It also has
self-checking testbenches. One builds a two-level tree of three MACBs with
eight card models. Another builds the full four-level tree of 85 MACBs and 256
card models.

## The tree and the master card

One card in the system is the **master**. It sits on port 1 of the MACB
switched to a *Master* setting. When the system runs on the internal SYNC, the
master card makes the SYNC pulse and sends it on its SYNC_Return line. The
MACB turns that pulse around and sends it out again as SYNC on all four ports.
The master therefore receives its own pulse at the same moment as the other
cards.

In a tree the turnaround happens at the root:

```
 master card --SYNC_Return--> Master/Branch MACB (code 2), port 1
                                  | Port Next: SYNC_Return goes up
                                  v
                             Root MACB (code 0), port 1  --SYNC--> all its ports
                                  |                                 |
        Master/Branch <--SYNC-----+----SYNC--> Slave/Branch (code 3)
        all 4 ports                            all 4 ports
```

The master card must therefore be on port 1 of its MACB. That MACB, if it is a
branch, must be on port 1 of the root. The master card also makes the 10 MHz
Correlation DAQ clock and answers the DAQ's scaler reset request. These signals
travel up to the root the same way, and back down to every other card.

The MACB itself makes neither the SYNC pulse nor the 10 MHz clock. It only
selects and distributes. Apart from the clock divider it has no state.

## Switch codes

| code | role | Timestamping clock | SYNC to all ports | Correlation DAQ |
|---|---|---|---|---|
| 0 | Master / Root | on-board 50 MHz crystal | port 1 SYNC_Return | Fast NIM sockets |
| 1 | Master / Root | external SMA (50 MHz) | external SMA | Fast NIM sockets |
| 2 | Master / Branch | Port Next | Port Next | via Port Next; port 1's SYNC_Return, 10 MHz clock and reset go up |
| 3 | Slave / Branch | Port Next | Port Next | everything from Port Next |
| 4 | Master / Root | external SMA (50 MHz) | port 1 SYNC_Return | reset taken from a Fast NIM input (external timestamp reset) |
| 5 | Master / Root | external SMA (50 MHz) | port 1 SYNC_Return | Fast NIM sockets |
| 6 | Master / Root | external SMA 100 MHz ÷ 2 | port 1 SYNC_Return | Fast NIM sockets |
| 12 | Master / Root | external SMA 100 MHz ÷ 2 | external SMA | Fast NIM sockets |
| 13 | Master / Root | external SMA 200 MHz ÷ 4 | external SMA | Fast NIM sockets |
| others | commissioning | held low | held low | nothing driven |

The switch is decoded in `macb_mode_decoder` into a `macb_cfg_t` struct. The
struct's fields are `valid`, `master`, `root`, `clk_src`, `sync_src` and
`ext_ts_rst`. Every other block works from that struct only, so adding a code
touches only the decoder.

## The spare lines: who drives what

This is the part that is easiest to get wrong. Each HDMI port has four
single-ended spare lines. Their direction changes with the switch setting and
with the port. In the RTL each line is split into `_i` (what the pad sees),
`_o` and `_oe` (the MACB drives `_o` when `_oe` is 1).

| line | Root (0,1,5,6,12,13) | code 4 | Master/Branch (2) | Slave/Branch (3) |
|---|---|---|---|---|
| Spare1, 10 MHz clock | port 1 in; ports 2-4 and Fast NIM out 0 ← port 1 | same | port 1 in; ports 2-4 and Port Next ← port 1 | all ports ← Port Next |
| Spare2, scaler reset | port 1 in; ports 2-4 and Fast NIM out 1 ← port 1 | all 4 ports ← Fast NIM in 2; Fast NIM out 1 low | port 1 in; ports 2-4 and Port Next ← port 1 | all ports ← Port Next |
| Spare3, reset request | port 1 ← Fast NIM in 1; ports 2-4 undriven | same | port 1 ← Port Next; ports 2-4 undriven | undriven |
| Spare4, trigger accept | all ports ← Fast NIM in 0 | same | all ports ← Port Next | all ports ← Port Next |

Port Next's spare lines are driven only in code 2 (Spare1 and Spare2, going
up). In branch settings the Fast NIM outputs are low and the Fast NIM inputs
are ignored; only the ASIC trigger outputs are active there. An assertion in
`macb_daq_router` guards the one rule whose breach would short two drivers:
port 1's Spare1 is never driven by a Master MACB.

## Clock path and timing

`macb_timestamp_mux` selects from five clock sources and three SYNC sources.
It feeds the same pair to all four ports. In hardware these are dedicated
low-skew multiplexer chips. Here they are plain combinational selects, so in
simulation a port's clock is its source with zero delay. `macb_clk_divider`
makes ÷2 and ÷4 from the external clock with two toggle flip-flops. Both
outputs have a 50 % duty cycle and rise on the first external edge after
`rst_n` is released. `rst_n` is used by nothing else. The SYNC pulse is not
retimed to the divided clock: an external SYNC must already be aligned with
the clock the cards receive.

## Fast NIM sockets and HDMI pinout

The unit has 4 isolated Fast NIM inputs, 4 isolated Fast NIM outputs, and 4
Fast NIM ASIC Trigger outputs, one per port. Each ASIC Trigger output carries
that port's trigger. That is one card's trigger, or the OR of all cards below
a branch MACB, since every MACB sends the OR of its four ports up through Port
Next.

| socket | use (this design's numbering) |
|---|---|
| in 0 | Correlation DAQ trigger accept |
| in 1 | scaler reset request |
| in 2 | external timestamp reset (code 4) |
| out 0 | 10 MHz Correlation DAQ clock |
| out 1 | scaler reset |

HDMI Type C pins as used by the MACB:

| pins | signal |
|---|---|
| 2 / 3 | Clock + / − |
| 5 / 6 | SYNC + / − |
| 8 / 9 | SYNC_Return + / − |
| 11 / 12 | ASIC Trigger + / − |
| 14, 17, 15, 16 | Spare 1, 2, 3, 4 (LVCMOS33) |
| 1, 4, 7, 10, 13, 18, 19 | ground |

Each LVDS pair is one logic bit in the RTL. The structs `ts_down_t` (clock,
sync) and `ts_up_t` (sync_return, asic_trigger) in `macb_pkg` group them per
port.

## Where this RTL departs from, or adds to, the specification

- **Ports 2-4 clock in the external-clock codes.** The per-code tables for
  codes 4, 5, 6, 12 and 13 list ports 2-4 as clocked from the crystal while
  port 1 uses the external clock. That would defeat the purpose of the unit.
  Here all four ports use port 1's clock.
- **SYNC in codes 12 and 13.** The tables list the external SYNC for port 1
  but port 1's SYNC_Return for ports 2-4. Here all ports get the external SYNC,
  as the code names ("External SYNC") say and as in code 1.
- **Commissioning codes** (7-11, 14, 15) are not specified. Here they drive
  nothing.
- **Own choices:** the Fast NIM socket numbering, the socket for code 4's
  external reset (in 2), and the divider reset. Lines marked "not used" are
  left undriven. The OR is sent up Port Next in every setting.
- **Not modelled:** the analog parts (LVDS and Fast NIM transceivers,
  isolation, the crystal oscillator), the CPLD's JTAG programming, and the
  alternative Fast NIM configurations that the specification mentions but does
  not define.

## Files

| file | content |
|---|---|
| `rtl/macb_pkg.sv` | port counts, spare and socket indices, switch codes, `macb_cfg_t`, port bundles |
| `rtl/macb_mode_decoder.sv` | rotary switch → configuration |
| `rtl/macb_clk_divider.sv` | external clock ÷2 and ÷4 |
| `rtl/macb_timestamp_mux.sv` | Clock / SYNC selection and fan-out |
| `rtl/macb_daq_router.sv` | spare-line and Fast NIM routing |
| `rtl/macb_trigger_or.sv` | ASIC Trigger outputs and OR |
| `rtl/macb_top.sv` | one MACB |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_macb_tree.sv` | a complete tree of `LEVELS` levels (default 4: 85 MACBs, 256 cards) |
| `tb/fee64_model.sv` | behavioural FEE64 card: timestamp counter, SYNC loop-back or generation, 10 MHz clock, scaler reset |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
to run the end-to-end test of one unit and a three-MACB tree:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/macb_pkg.sv rtl/macb_*.sv tb/fee64_model.sv tb/tb_macb_top.sv \
  --top-module tb_macb_top -Mdir obj && obj/Vtb_macb_top
```

The unit testbenches need only `macb_pkg.sv`, their module and, for the mux
and router, `macb_mode_decoder.sv`. The testbenches for the decoder, the mux
and the router try every switch position against reference tables in the
testbench. `tb_macb_top` runs the tree with SYNC, the 10 MHz clock, the scaler
reset request, trigger accept and ASIC Triggers. It then runs a stand-alone
unit through 50, 100 and 200 MHz references, external SYNC, the code 4 reset
and a commissioning code. It counts each of these and fails if any never
happens. It also checks that no spare line is ever driven from both ends.
`tb_macb_tree` builds the largest tree named above: 4 levels, 85 MACBs and
256 card models. It checks that one SYNC from the master card, which sits four
levels down, clears all 256 timestamps on the same edge. It also checks that
the 10 MHz clock, the scaler reset and trigger accept reach every card, and
that any card's ASIC Trigger appears on the root output of the right port.
Set `LEVELS` inside it to 2 or 3 for the 16- and 64-card trees. At 4 levels it
builds in under half a minute and runs in well under a second.

Verilator reports circular logic (`UNOPTFLAT`) in `tb_macb_top` and
`tb_macb_tree`. The loop exists only at the level of whole arrays, where the
testbench models the bidirectional spare lines between MACBs and cards. No
single bit is in a loop, so the logic settles and the results are not
affected.
