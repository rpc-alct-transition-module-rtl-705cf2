# RAT2004 — RPC/ALCT transition module

The RAT2004 is a small board that plugs in behind a CSC trigger mother board
(TMB). It solves two connection problems for the TMB:

* **RPC data, too many pins.** Up to four RPC link boards each deliver 16 data
  bits, a 3-bit bunch-crossing number (BXN) and their own 40 MHz clock: 76 bits
  every 25 ns. Wiring them straight into the TMB's FPGA would cost 76 pins. The
  RAT's FPGA latches the four words, moves them into the TMB's clock domain and
  sends them over **38 lines at 80 MHz**, two 12.5 ns halves per 40 MHz period.
* **ALCT cables.** The anode LCT board (ALCT) talks to the TMB over two 50-pin
  LVDS cables. The RAT converts between the TMB's LVTTL and LVDS and never
  changes the bits. It has a normal mode (21 bits out, 29 in) and a loopback mode
  for TMB self-test (25 out, 25 in).

This repository holds synthesizable SystemVerilog for the logic of both parts,
plus self-checking testbenches. The analog parts are outside the RTL: the LVDS
electrical layer, the configuration PROM, the external programmable delay chip
and the FPGA's DLL.

## Block structure

```
rat2004_top
├── rpc_mux_fpga            the RPC multiplexer FPGA
│   ├── rpc_latch  x4       step 1: latch each link on a selectable clock edge
│   ├── rpc_clk_detect x4   "RPC n clock detected" LEDs
│   ├── rpc_sync            step 2: one register on the TMB 40 MHz clock
│   └── rpc_mux80           step 3: 2-to-1 multiplexer to 80 MHz, sync pattern
└── alct_transceiver        ALCT cable drivers/receivers, normal and loopback
rat_pkg                     widths, pair counts, link word type
```

## The RPC path, step by step

This path is the only part of the board with real timing, and the part to read
first.

**1. Latch on the link clock (`rpc_latch`).** Each link's word
`{bxn[2:0], data[15:0]}` (19 bits) is captured on the rising edge of the
link's clock by one register and on its falling edge by another.
`rpc_posneg` picks which register is used: 0 = rising, 1 = falling. The TMB
uses this to move the sampling point half a period away from the data
transitions. One `rpc_posneg` serves all four links.

**2. Move to the TMB clock (`rpc_sync`).** All 76 latched bits are registered
once on the rising edge of the TMB's 40 MHz clock `clk40`. The link clocks have
the same frequency as `clk40`. On the real board an external programmable delay
chip sets their phase so that this single register samples stable data. There
is no multi-flop synchroniser: the data is a bus, and correct phase is the
delay chip's job.

**3. Multiplex to 80 MHz (`rpc_mux80`).** Each 25 ns `clk40` period is cut into
two 12.5 ns phases. The first phase starts at the rising edge of `clk40`:

| phase | time after clk40 rise | `rpc_tx[18:0]` | `rpc_tx[37:19]` |
|-------|-----------------------|----------------|-----------------|
| first | 0 – 12.5 ns           | link 0 word    | link 1 word     |
| second| 12.5 – 25 ns          | link 2 word    | link 3 word     |

`rpc_tx` is a register on `clk80`, a clock with rising edges at both edges of
`clk40`. On the board it comes from the FPGA's DLL; here it is an input. To tell
the two `clk80` edges apart, the clock is never sampled as data. Instead a flag
toggles on every `clk40` rising edge, and a `clk80` copy of it lags by one
80 MHz cycle. The flag and its copy differ only at the mid-period edge. At the
first-phase edge the lower half goes out and the upper half is stored. The
stored half goes out at the mid-period edge, so both halves always come from
the same 40 MHz word. `rpc_phase` shows which half is on the lines. An assertion in `rpc_mux80` flags a `clk80` that is not
the edge-aligned double of `clk40`.

On the backplane, `rpc_tx[31:0]` are the lines `rpc_rx0`–`rpc_rx31` and
`rpc_tx[37:32]` are `rpc_in32`–`rpc_in37`.

**Sync mode.** With `rpc_sync = 1`, every line is 0 in the first phase and 1 in
the second. This 40 MHz square wave lets the TMB find the phase boundary when it
sets up its receiver.

**Latency.** Suppose link data changes 1 ns after the link's rising edge, and
the link clock lags `clk40` by 8 ns (the case in the testbenches). Word W[k] is
then on the cable from 25k + 9 ns. It reaches the TMB in the 25 ns after `clk40`
edge k + 3 with `rpc_posneg = 0`, or edge k + 2 with `rpc_posneg = 1`. In
general: one link edge, one `clk40` edge, then one `clk40` period of output.

**Clock-detected LEDs (`rpc_clk_detect`).** A flip-flop toggles on each link
clock edge. Two `clk40` flip-flops synchronise it, and each change seen reloads
a down-counter with `TIMEOUT` (default 255). The LED is on while the counter is
non-zero. It lights 2–3 `clk40` cycles after the link clock starts and goes
dark `TIMEOUT` cycles after the clock stops.

**Reset.** A TMB hard reset reloads the FPGA from its PROM, and that clears
every register. The RTL models this as the asynchronous reset `hard_reset`.

## The ALCT path

`alct_transceiver` is combinational. It models logic levels and directions, not
LVDS electrical behaviour. Pair *p* of a cable is bit *p−1* of the cable vectors.

| cable B (J6) pair | normal mode           | loopback mode          | driven from        |
|-------------------|-----------------------|------------------------|--------------------|
| 1 – 19            | out                   | out                    | `alct_tx[18:0]`    |
| 20 (clock_en)     | out                   | out                    | `alct_clk_en`      |
| 21 (clock)        | out                   | out                    | `alct_clock`       |
| 22 – 25           | in → `alct_rx[28:25]` | out                    | `alct_tx[22:19]`   |

All 25 cable A (J5) pairs go in, to `alct_rx[24:0]`. `alct_rx[31:29]` is unused
and reads 0. So does `alct_rx[28:25]` in loopback mode. `alct_tx[23]` is a spare.
`alct_oe` enables the cable B drivers and `txoe` enables the drivers toward the
TMB. A disabled output reads 0 and its enable output is low. In loopback mode a
cable from J6 to J5 returns the 25 transmitted bits on `alct_rx[24:0]`. The
top-level testbench checks exactly that.

Most ALCT pairs carry two signals, time-multiplexed at 80 MHz (for example,
pair 1 of cable A carries first_valid, then second_valid). The multiplexing is
done at the two ends of the cables, not on the RAT. On several pairs the + and −
legs are swapped on the board. `rat_pkg::J5_INVERTED` and `J6_INVERTED` list
them. The RAT does not correct this; the far end does.

## Front-panel LEDs

| LED | meaning                  | source in this RTL             |
|-----|--------------------------|--------------------------------|
| 0–3 | RPC 0–3 clock detected   | `rpc_clk_detect`               |
| 4   | ALCT Tx cable detected   | input `alct_tx_cable_ok`       |
| 5   | ALCT Rx cable detected   | input `alct_rx_cable_ok`       |
| 6   | ALCT cable error         | input `alct_cable_err`         |
| 7   | RPC cable error          | input `rpc_cable_err`          |

How a cable, or a cable error, is detected is not defined for this board.
LEDs 4–7 are therefore inputs to the top.

## What follows the board description and what is assumed

These points come from the board description:

* the three RPC processing steps;
* the edge select, the 0/1 sync pattern and the 76 → 38 line count;
* the four links with 16 data bits and 3 BXN bits each;
* the ALCT bit counts and pair directions in both modes;
* the LED list and the inverted pairs.

These are this design's own choices:

* the bit order of the link word and of the two 80 MHz halves;
* `rpc_posneg = 0` selecting the rising edge;
* how the 80 MHz phase is found;
* the clock-detect scheme and its `TIMEOUT`;
* the mapping of backplane `alct_tx`/`alct_rx` bits to cable pairs;
* the meaning of `alct_oe`, `txoe` and `alct_loop`;
* hard reset as an asynchronous reset.

Change any of them if your TMB firmware expects something else. The bit orders
are each confined to a single line of `rpc_mux_fpga.sv`, `rpc_mux80.sv` or
`alct_transceiver.sv`.

Not built:

* the configuration PROM and its JTAG chain;
* the external delay chip;
* DLL-adjustable clock delays inside the FPGA;
* the LVDS buffers and the BXN[2] grounding jumpers;
* the backplane lines `rpc_loop`, `smb_clk`, `smbrx`, `smbtx`, and `free_tx0`.
  These have no described function.

## Parameters

| module           | parameter        | default | note                                   |
|------------------|------------------|---------|----------------------------------------|
| `rat2004_top`    | `NRPC`           | 4       | must be even; output lines = 19·NRPC/2 |
| `rpc_mux_fpga`   | `CLKDET_TIMEOUT` | 255     | clk40 cycles before a stopped clock's LED goes off |
| `rpc_latch`      | `W`              | 19      |                                        |
| `rpc_sync`       | `W`              | 76      |                                        |
| `rpc_mux80`      | `W`              | 38      | output lines; input is 2·W             |

## Simulating

Each module in `rtl/` has a testbench `tb/<module>_tb.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
`rat2004_top_tb` runs the whole board at its default size. It covers:

* RPC data with rising- and falling-edge latching;
* the sync pattern, a stopped link clock and a hard reset;
* ALCT normal mode, and loopback through a J6-to-J5 cable;
* disabled drivers.

It counts each of these and fails if any never happened. To run it with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module rat2004_top_tb rtl/rat_pkg.sv tb/rat2004_top_tb.sv
./obj_dir/Vrat2004_top_tb
```

Replace the top module name to run another testbench. The testbenches drive
`clk40` and `clk80` from one process, so every `clk40` edge falls exactly on a
`clk80` rising edge. Keep that alignment in any new testbench, because
`rpc_mux80` depends on it.
