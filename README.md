# CONFETTI logic in SystemVerilog

CONFETTI is a platform for prototyping cellular computing. It is a large,
flat array of small FPGA boards, and each board runs one "cell" of an
application. Its building block is the **UltraStack**, a stack of four
board layers:

| layer      | what it holds                                              | logic in this repository |
|------------|------------------------------------------------------------|--------------------------|
| ECell      | up to 18 small boards, each one user FPGA (XC3S200) + SRAM | configuration port and data-link end only (user logic) |
| ERouting   | a 6 x 3 grid of routing FPGAs, one under each ECell         | `erouting_node` x 18: serial links, ECell loader |
| EPower     | converters, a supervisor, the display's framebuffer FPGA    | `power_supervisor`, `fan_controller`, `display_framebuffer` |
| EDisplay   | 48 x 24 RGB LED matrix with touch surface                  | none (analog) |

The central idea is that nothing in the machine is globally synchronous.
Every routing FPGA runs on its own oscillator. FPGAs talk only to their
four grid neighbours and to the ECell above them. Each link direction is
three LVDS pairs: one pair carries the sender's clock and two carry data.
Links at the edge of a board leave through connectors. Stacks placed side
by side therefore form one larger, seamless grid. The system that was
built is a 3 x 2 array of stacks, an 18 x 6 grid of routing FPGAs.

This repository implements the fixed logic of one UltraStack
(`ultrastack`) and of the 3 x 2 system built from six of them
(`confetti_system`, the top module). The packet router that runs in each
routing FPGA is an existing third-party core (a Hermes switch) and is
**not** included. Each node exposes five word streams where the router
plugs in.

```
            north edge links (6)
          +----+----+----+----+----+----+
 west     | n0 | n1 | n2 | n3 | n4 | n5 |     east
 edge     +----+----+----+----+----+----+     edge
 links    | n6 | .. |    |    |    | n11|     links
 (3)      +----+----+----+----+----+----+     (3)
          | n12| .. |    |    |    | n17|
          +----+----+----+----+----+----+
            south edge links (6)

 each node n = y*6 + x:  5 x lvds_link_tx, 5 x lvds_link_rx (N,E,S,W,ECell)
                         ecell_config_ctrl  <-> flash, ECell config pins
                         rt_* word streams  <-> external router core
 EPower (own clock):     power_supervisor -> releases the grid's reset
                         fan_controller, display_framebuffer (48x24x24b)
```

## The serial link (`lvds_link_tx`, `lvds_link_rx`)

This is the part that needs the most care. One link direction carries:

* `lnk_clk`: the sender's clock, forwarded;
* `lnk_d[1:0]` = {D1, D0}: one 2-bit symbol per clock.

At 500 Mbit/s per pair, that is 1 Gbit/s of raw data per direction.

**Framing (this design's choice).** The line idles at `00`. A word of
`WORD_W` bits (16 by default) is sent as one start symbol `11` followed by
`WORD_W/2` data symbols, most significant pair first. The receiver counts
symbols after a start symbol, so data may contain `11`. A word therefore
occupies `WORD_W/2 + 1` clocks: 9 for 16 bits, or 16/18 of the raw rate.
The transmitter's `in_ready` is high whenever it is idle, so back-to-back
words leave every 9 cycles.

**Capture and clock crossing.** The sender changes `lnk_d` just after the
rising edge of its clock. The receiver samples on the falling edge of the
forwarded clock, in the middle of the symbol. A small deframer runs on the
forwarded clock. Each finished word is written into a Gray-pointer
asynchronous FIFO (`async_fifo`, 8 words by default). The FIFO is read in
the receiving FPGA's own clock domain. A word shows on `out_valid` about
four local cycles after its last symbol.

**No back-pressure across the link.** The platform's description gives no
return channel for flow control, and none is built. If a word arrives
while the receive FIFO is full, the word is dropped and the sticky
`overflow` flag goes high until reset. The router, or the application
above it, must keep the rate into a node below what that node drains.
Two full-rate streams that merge into one output will overflow after
about 8 words. The system testbench paces its traffic for this reason, and
it also provokes an overflow on purpose. A credit scheme on the reverse
link would be the natural extension.

**Reset.** The receive side takes the local reset through `reset_sync`
into the forwarded-clock domain. An edge link with no neighbour has no
clock, so its receive side stays in reset and its FIFO stays empty.
Hardware gets this behaviour from the level-sensitive clear. Two-state
simulation does not: a flop that starts at a random value only sees an
asynchronous reset on a falling edge of `rst_n`. Testbenches therefore
start `rst_n` high and drop it at time 1. Any edge link input left unused
should idle on a running clock.

## Loading an ECell (`ecell_config_ctrl`)

Every routing FPGA has a 16 Mbit flash. The flash holds up to sixteen ECell
configurations, and an ECell FPGA can be reloaded at any time. The
controller treats the flash as sixteen 1 Mbit slots, so slot `s` starts at
byte `s * 131072`. One XC3S200 bitstream is 1 047 616 bits, which fits in a
slot with 120 bytes to spare.

On `start` the controller does the following:

1. It holds `PROG_B` low for `PROG_CYCLES` cycles.
2. It waits for `INIT_B` to go high (`err` on timeout).
3. It streams `CFG_BYTES` bytes of the slot, MSB first, on `DIN`, with `CCLK`
   at clk/2. This is the Xilinx slave-serial scheme, which is this design's
   choice: the platform only mentions "configuration lines".
4. It keeps clocking until `DONE` (`err` on timeout).

The next byte is fetched while the current one shifts. `CCLK` never pauses
as long as the flash answers within 13 cycles. A full bitstream takes
about 2.1 million controller cycles, or 21 ms at 100 MHz. This matches the
roughly 20 ms that the platform quotes for one configuration. The flash
port is a simple request/response byte read with one request outstanding.
A real parallel NOR flash needs a small adapter in front of it.

## EPower: start-up, fans, display

**`power_supervisor`**. On the real board this is firmware in a
micro-controller. Here it is a state machine that runs the same sequence:

```
OFF --power_on--> POWER_UP   all converters enabled; all pgood must be high
                             for STABLE_CYCLES, within PGOOD_TIMEOUT
        --------> CONFIG     rout_prog pulsed; all rout_done within ROUT_TIMEOUT
        --------> RUN        running = 1
any failure ----> SHUTDOWN   converters off, fault latched, until power_on drops
power_on low ---> OFF        from POWER_UP, CONFIG or RUN: switched off, no fault
```

The failures are a supply that does not come up, a supply that drops, a
configuration timeout, and any of the 45 temperature readings at or above
`T_TRIP` (85 C). Temperatures are checked in every powered state. The 45
sensors are, in this order: the 18 ECells, the 18 routing FPGAs, 3 more
spots on the routing board, and 6 on EPower. Inside `ultrastack`,
`running` gates the reset of the whole grid and of the display logic.

**`fan_controller`**. A fan board has six to eight independently
switched fans. The point is to cool hot spots without running every fan.
Fan `f` watches a contiguous group of sensors, those with
`floor(s*N_FANS/N_TEMP) == f`. The fan turns on at 55 C and off at 45 C.
The grouping and the thresholds are this design's choices.

**`display_framebuffer`**. The display is 48 x 24 pixels of 24 bits,
refreshed 100 times a second. Each ECell may draw only in the 8 x 8 square
directly above it. Every cell has its own write port carrying `(x, y)`
inside its square plus a colour, so a cell cannot draw outside its square.
A round-robin arbiter (`rr_arbiter`) accepts one write per cycle, and no
cell waits more than 18 cycles. The scan reads one pixel every
`PIX_DIV = CLK_HZ/(100*48*24)` cycles, which is 434 at 50 MHz, giving
100.006 frames/s. The pixel stream goes out on `pix_*`; the LED drive
scheme belongs to the LED board. How the ECells' pixel writes reach the
EPower FPGA is not specified, so they enter `ultrastack` as ports in the
EPower clock domain.

## Joining stacks (`confetti_system`)

A stack's edge links are the same link blocks as the links between
neighbouring nodes inside it, so joining stacks only needs wiring.
`confetti_system` places `SX x SY` stacks (3 x 2) in an array. Stack
`s = sy*SX + sx` has its east edge row `y` joined to the west edge row `y`
of stack `s+1`, and its south edge column `x` joined to the north edge
column `x` of stack `s+SX`. Only the links around the outside of the whole
array remain ports. Those are indexed by global column (`north_*`,
`south_*`, 0..17) or global row (`west_*`, `east_*`, 0..5). Every other
port of `ultrastack` appears once per stack, with one more array level in
front. A node at global position `(gx, gy)` is node `(gx%6) + 6*(gy%3)`
of stack `(gx/6) + 3*(gy/3)`.

Each stack keeps its own EPower logic, with its own clock, supervisor,
fans and display. A stack can therefore be switched off on its own. Its
node logic is then held in reset, and its transmitters send the idle
symbol on a running clock. Its neighbours receive nothing from it, and
traffic that does not need the stopped stack keeps flowing.
`tb_confetti_system` checks this with a row of words routed through the
three running stacks of the top half. There is no flow control on a
link, so a word sent towards a stopped stack is lost. Avoiding that is
the router's job.

## Files

| file | contents |
|------|----------|
| `rtl/confetti_pkg.sv` | port numbering, line symbols, supervisor states and fault codes |
| `rtl/lvds_link_tx.sv`, `rtl/lvds_link_rx.sv` | the two halves of a serial link |
| `rtl/async_fifo.sv`, `rtl/reset_sync.sv`, `rtl/rr_arbiter.sv` | helpers |
| `rtl/ecell_config_ctrl.sv` | flash-to-ECell configuration loader |
| `rtl/erouting_node.sv` | one routing FPGA: 5 links + loader |
| `rtl/display_framebuffer.sv`, `rtl/power_supervisor.sv`, `rtl/fan_controller.sv` | EPower logic |
| `rtl/ultrastack.sv` | one stack: 6 x 3 grid, edge links, EPower logic |
| `rtl/confetti_system.sv` | top: 3 x 2 stacks joined into an 18 x 6 grid |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_confetti_system_full.sv` | the top at default parameters |
| `tb/tb_ultrastack_full.sv` | one stack at default parameters, full-size ECell loading |
| `tb/xy_router_model.sv`, `tb/flash_model.sv`, `tb/ecell_cfg_model.sv` | behavioural models for testbenches only |

## Parameters of `ultrastack`

| parameter | default | origin |
|-----------|---------|--------|
| `MESH_X` x `MESH_Y` | 6 x 3 | platform (18 routing FPGAs per stack) |
| `WORD_W` | 16 | own choice |
| `FIFO_AW` | 3 (8 words) | own choice |
| `CFG_BYTES` | 130 952 | XC3S200 bitstream length |
| `CFG_TIMEOUT` | 100 000 cycles | own choice |
| `N_CONV`, `N_FANS` | 6, 8 | platform |
| `STABLE_CYCLES`, `PGOOD_TIMEOUT`, `ROUT_TIMEOUT` | 5 000, 500 000, 5 000 000 | own choice |
| `DISP_CLK_HZ` | 50 MHz | platform's local oscillator |

`confetti_system` adds `SX` x `SY` = 3 x 2 (the system that was built). It
passes the same defaults for `WORD_W`, `CFG_BYTES`, the timeouts and
`DISP_CLK_HZ` to every stack.

The flash size (16 Mbit), the 16 slots, the 48 x 24 display, the 8 x 8
squares and the 100 Hz refresh are fixed in the sub-modules as their
parameter defaults.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
The testbenches use only `$urandom` and no constraint solver. Example,
from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ultrastack \
    -y rtl -y tb +libext+.sv rtl/confetti_pkg.sv tb/tb_ultrastack.sv
./obj_dir/Vtb_ultrastack
```

* Block tests (`tb_lvds_link_tx`, `tb_lvds_link_rx`, `tb_ecell_config_ctrl`,
  `tb_erouting_node`, `tb_display_framebuffer`, `tb_power_supervisor`,
  `tb_fan_controller`) each run in a few seconds.
* `tb_ultrastack` runs the whole stack at reduced timeouts, with 64-byte
  configurations and a fast display scan. It powers up the stack and sends
  about 225 words between random ECells and edge connectors. Every word must
  arrive once, at the right place, unchanged. It then configures all 18
  ECells at once and checks a painted display frame. It forces a link
  overflow, switches on one fan zone, and trips an over-temperature
  shutdown. It counts each mechanism and fails if one never happened.
* `tb_ultrastack_full` uses the top with all defaults. It powers up the
  stack, routes one word from every ECell to the opposite corner, and loads
  all 18 ECells with full 130 952-byte configurations, comparing every byte.
  While they load, it checks one display frame and the 499 968-cycle frame
  period. It takes about 1.5 minutes.
* `tb_confetti_system` runs the six-stack system at reduced timing, with
  40-byte configurations. Every node and every EPower board has its own
  clock. All six supervisors start up. Every one of the 108 ECells sends a
  word to the diagonally opposite ECell, so most words cross one or more
  stack borders. Words enter at the west and north edges of the array and
  leave at the east edge. All 108 ECells load at once, and every stack's
  display frame and frame period are checked. One stack is then switched
  off while the others keep running and routing, and it is restarted.
* `tb_confetti_system_full` does the same with every parameter at its
  default. It leaves out the full-size ECell loading and the two
  500 000-cycle display frames, which `tb_ultrastack_full` already checks
  on one stack. It takes under a minute.

In these testbenches, `xy_router_model` stands in for the router. It forwards
single-word packets, x first then y, by a destination field at the top of
the word. Within one stack that field is `[15:13]` x and `[12:11]` y; in the
system tests it is `[15:11]` x and `[10:8]` y. This word format belongs to
the testbench, not to the design.

## Where this departs from, or goes beyond, the platform description

* **Not included:** the router core; the ECell user logic and its SRAM;
  the flash and temperature chips; the DC/DC converters; the LVDS pads and
  clock managers; the LED and touch hardware; the separate monitor board
  (MicroBlaze CPU, USB, CAN, PIC micro-controllers). The LVDS pads are
  replaced by single-ended signals, and the forwarded clock is a plain
  assignment where an FPGA would use an output DDR flop.
* **Own choices:**
  * the link framing, the word width, and the lack of flow control;
  * the slave-serial configuration protocol and the flash port;
  * the supervisor's timeouts, trip point and all-at-once converter start;
  * the fan zones and thresholds;
  * the write arbitration of the framebuffer;
  * switching a stack off by releasing `power_on`.
* The supervisor is logic here, where the platform uses a micro-controller.
* Two figures in the platform description disagree. The router core is
  quoted at 500 Mbit/s per direction, but the link at 1 Gbit/s per
  direction. The links here follow the 1 Gbit/s figure.
* In `confetti_system` each stack's fans are driven by its own
  `fan_controller`, from that stack's sensors. The real system has
  separate fan boards under the array. How their fans map onto stacks, and
  how the supervisors of several stacks work together through the monitor
  board, is not described, so each stack is controlled on its own.
