# Time-multiplexed FPGA routing fabric

In a conventional FPGA, each routing wire belongs to one net for the whole
clock cycle. Yet a signal uses a wire only for a short part of the cycle: the
wire sits idle until the transition arrives, and idle again once it has
passed. This design splits every user clock cycle into **K microcycles**. Each
routing switch stores a separate configuration for every microcycle, so one
physical wire can carry net N1 early in the cycle and net N2 later in the same
cycle. Fewer tracks per channel are then needed. The cost is K memory cells
per switch transistor where there used to be one.

The RTL describes an island-style array of this kind, with two variants:

* **TM-ARCH**: every track can be time-multiplexed. This is the default.
* **TM-ARCH(a)**: only a fraction `a` of the tracks can be time-multiplexed.
  All other tracks use ordinary single-context switches.

The logic blocks are ordinary clusters of 4-input LUTs. They are not
time-multiplexed.

## Microcycles

The fabric runs on one clock, `clk_f`, whose frequency is K times the user
clock.

A circular counter (`mc_counter`) counts 0, 1, ..., K-1 on `clk_f`:

* Counter value k means the fabric is in microcycle k+1.
* Each switch block has one counter, shared by all of its TM switches and by
  the connection block at the same corner.
* All counters reset together, so they stay in step.

The user clock edge is the `clk_f` edge that ends the last microcycle. That is
the only time the logic-block flip-flops load (`ucyc_end` / `last` is high
during that microcycle).

A net leaves a flip-flop at the start of the user cycle. It then travels
through wires that each carry it for one or more microcycles, and it must sit
at the destination LUT's input pin by the end of the cycle.

## The TM switch: the part to understand first

Every routing multiplexer is a **direct-drive multiplexer switch**: a
pass-transistor multiplexer followed by a buffer that drives one
uni-directional wire. Time-multiplexing changes it in two ways.

### 1. Contexts (`tm_pass_transistor`, `tm_switch`)

Each pass transistor is backed by K memory cells. A K:1 multiplexer, driven by
the microcycle counter, picks the cell that controls the gate: cell k+1 when
the counter reads k.

The 4-input switch is a two-level hybrid multiplexer:

```
 in0 --[s0]--+            column transistors: s0/s2 share cells (column 0)
 in1 --[s1]--+--[s4]--+                       s1/s3 share cells (column 1)
             ...      +--> buffer --> out      row transistors: s4 = in0/in1
 in2 --[s2]--+        |                                         s5 = in2/in3
 in3 --[s3]--+--[s5]--+
```

Input `in[r*NC+c]` reaches the buffer when column c and row r are both on.
Each context's configuration word is `{rows, columns}`: `{s5, s4, s1/s3, s0/s2}`
for the 4-input switch. As a worked example with K=2, take a switch that drives
wire w1 from w2 (on `in1`) in microcycle 1 and from w4 (on `in2`) in
microcycle 2:

| transistor | context 1 | context 2 |
|------------|-----------|-----------|
| s0 & s2    | 0 | 1 |
| s1 & s3    | 1 | 0 |
| s4         | 1 | 0 |
| s5         | 0 | 1 |

### 2. Latching (`tm_latch_switch`)

Suppose net N1 reached wire w3 through w1 in microcycle 1, and in microcycle 2
w1 carries N2. The switch between w1 and w3 must turn off in microcycle 2, but
w3 must not float, because N1's sink is still reading it. A seventh TM pass
transistor, **s6**, therefore connects the buffer output back to the buffer
input. In any microcycle where s6 is on and no input is selected, the switch
goes on driving its wire with the value it had at the end of the previous
microcycle. For the w1-to-w3 switch (w1 on `in3`):

| transistor | context 1 | context 2 |
|------------|-----------|-----------|
| s1 & s3    | 1 | 0 |
| s5         | 1 | 0 |
| s6         | 0 | 1 |
| others     | 0 | 0 |

Every TM switch in the array is of this latching kind. This includes the
connection-block switches in front of the LUT pins, so the LUT inputs need no
separate latches.

### How this is modelled

The two-state RTL models the switch circuits as follows:

* The feedback loop is a register, `fb_q`, that samples the switch output on
  every `clk_f` edge. Contexts only change at those edges, so this matches the
  circuit.
* A buffer input with nothing connected is *floating*. The model then drives
  0 and raises `floating` (latching switch) or lowers `driven` (plain
  switches). Unused switches float, which is harmless.
* Two inputs connected at once, or an input together with s6, is a short.
  The switch raises `conflict`, and the array ORs all of them into `err`.
* Level restoration and the NMOS threshold drop are analog effects and are
  not modelled.

## Array layout (`tm_fpga`)

```
          SB(0,1) ---h(0,1)--- SB(1,1) ---
             |                    |
           v(0,0)   LB(0,0)     v(1,0)   LB(1,0)
             |                    |
          SB(0,0) ---h(0,0)--- SB(1,0) ---
```

The array is built as follows:

* **Geometry.** There are NX x NY logic blocks `LB(i,j)` and (NX+1) x (NY+1)
  switch blocks `SB(i,j)`. `SB(i,j)` sits at the lower-left corner of
  `LB(i,j)`.
* **Channel segments.** Horizontal segment `h(i,j)` runs from `SB(i,j)` to
  `SB(i+1,j)`, below `LB(i,j)`. Vertical segment `v(i,j)` runs from `SB(i,j)`
  to `SB(i,j+1)`, left of `LB(i,j)`.
* **Tracks.** Each channel holds W uni-directional tracks: W/2 eastbound and
  W/2 westbound (or northbound and southbound).
* **Wires.** A wire spans L = 4 logic blocks and has a single driver at its
  start. The starts are staggered: on track t a wire starts at switch-block
  position p when `(p + t) mod L == 0`. At the array edge every track starts.
  At an interior switch block, W/2/L = 6 tracks per direction start. The other
  tracks pass straight through.
* **Switch-block multiplexers** (`tm_switch_block`). Each starting wire gets a
  4-input switch with these inputs:
  * in0: the same track arriving straight on;
  * in1: track t+1 of one perpendicular incoming direction;
  * in2: track t-1 of the other perpendicular incoming direction;
  * in3: logic-block output `t mod 10` of the adjacent logic block.
* **Connection blocks** (`tm_connection_block`). Logic-block pins 0..10 read
  the channel below the block; pins 11..21 read the channel to its left. Pin q
  of a channel has an 8-input switch (4 columns x 2 rows) over channel bits
  `(q + 6m) mod W`, m = 0..7. Channel bit c < W/2 is track c of the
  east/northbound wires; bit c >= W/2 is track c-W/2 of the west/southbound
  wires. Each pin thus reaches 8/48 of the channel, near the baseline's 0.15.
* **Logic blocks** (`logic_block`, `ble`). Each holds 10 BLEs: a 4-LUT, a
  flip-flop and an output select. A full crossbar feeds each LUT input from the
  22 block inputs or the 10 BLE outputs. Logic-block outputs drive the
  multiplexers of `SB(i,j)`.
* **I/O.** Every wire that would enter the array from outside is an input pad
  (`pad_in_<side>`). Every wire that leaves the array is an output pad
  (`pad_out_<side>`). For example, `pad_in_w[j]` feeds the eastbound tracks at
  `SB(0,j)`, and `pad_out_e[j]` shows the eastbound tracks ending at
  `SB(NX,j)`.

Routing can form rings (around a logic block, or through LUT feedback), so the
netlist contains structural combinational loops, and lint tools report them.
A loop only closes if the configuration programs a net in a ring. After reset
every switch is off, and logic-block outputs are held at 0 while `rst` is
high.

## Partial population: which switch goes where

`TM_TRACKS` sets how many tracks per direction, counted from track 0, can be
time-multiplexed, so `a = TM_TRACKS / (W/2)`. A switch driving wire B from wire
A must be a TM switch unless both wires are conventional:

* If B is multiplex-able, its other source must be able to turn off.
* If A is multiplex-able, A carries other nets at other times, which B must
  not see.

A multiplexer has several sources, so it gets a latching TM switch if its own
track or any track it can select is multiplex-able. Logic-block outputs count
as conventional. Otherwise it gets `dd_mux_switch`, which has one context and
ignores the context number of a configuration write.

## Configuration

All configuration goes through one write port, `cfg` (`tm_pkg::cfg_t`). Each
`clk_f` cycle with `we` high writes one word. The port's fields:

| field | meaning |
|-------|---------|
| `target` | `CFG_SB`, `CFG_CB` or `CFG_LB` |
| `x`, `y` | site: switch block (0..NX, 0..NY) or logic block / connection block (0..NX-1, 0..NY-1) |
| `idx` | SB: `dir*(W/2) + track`, dir E=0, W=1, N=2, S=3 (only starting tracks have a switch). CB: pin number. LB: `2b` = LUT mask of BLE b, `2b+1` = BLE control |
| `ctx` | context (microcycle - 1); ignored by conventional switches and logic blocks |
| `data` | SB word `{s6, row1, row0, col1, col0}`; CB word `{s6, row1, row0, col3..col0}`; LB control `{ff_sel, src3, src2, src1, src0}` with 5-bit sources (0..21 block inputs, 22..31 BLE outputs) |

Reset (`rst`, synchronous, active high) clears every memory cell and every
latch.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `K` microcycles per user cycle | 4 | architecture (evaluated at 2, 4, 6, 8) |
| `LUT_K` | 4 | baseline architecture |
| `N_BLE` BLEs per logic block | 10 | baseline architecture |
| `N_LB_IN` logic-block inputs | 22 | baseline architecture |
| `L` wire length | 4 | baseline architecture (all wires length 4) |
| `W` channel width | 48 | chosen. The architecture's minimum channel widths are per circuit, mostly 28-60 at K=4; 48 is a multiple of 2L |
| `NX`, `NY` | 4 x 4 | chosen, for a short full-size simulation |
| `TM_TRACKS` | W/2 (a = 1.0) | architecture sweeps a = 0.1, 0.2, 0.5, 1.0 |

`K` need not be a power of two: the counter wraps at K-1.

## Where this RTL departs from, or adds to, the architecture

The architecture specifies the TM pass transistor, the two TM switches, the
use of one counter per switch block, the switch-choice rule and the baseline
sizes. The following are this design's own choices:

* The exact switch-block turn pattern. The architecture names a Wilton switch
  block without its permutation; a ±1 track rotation is used here.
* The stagger formula for the wire starts.
* The logic-block pin fed to each wire-start multiplexer.
* The connection-block track pattern and the split of pins between the two
  channels.
* The logic-block crossbar.
* The perimeter pads.
* The configuration write port and reset.
* The 4 x 4 default array. Real benchmark circuits need 100 or more logic
  blocks, so this array holds examples, not benchmark designs.
* The choice of which tracks are conventional: the highest-numbered ones.

Clock generation for `clk_f` is outside the RTL. So are the transistor-level
memory cells and buffers, and the routing software that computes each net's
microcycle occupancy and the switch contexts.

## Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|-----------|---------------|
| `tb_mc_counter` | counting and wrap for K=4 and K=6 |
| `tb_tm_pass_transistor` | the four MC1/MC2 on/off cases at K=2; random cells at K=4 |
| `tb_tm_switch` | the w2/w4 example at K=2; random contexts against a model |
| `tb_tm_latch_switch` | the w1-to-w3 latch example; floating without s6; random contexts |
| `tb_dd_mux_switch` | single-context selection |
| `tb_tm_switch_block` | starting vs pass-through tracks, per-microcycle selection, latch, conventional switch, short detection |
| `tb_tm_connection_block` | pin track pattern per microcycle; a pin holding a net while its wire carries another |
| `tb_logic_block` | LUT contents, crossbar, feedback, once-per-user-cycle registers |
| `tb_tm_fpga` | default-size array: two nets sharing one wire in microcycles 1 and 2, pins and a switch-block latch holding values, a registered output one user cycle late, short detection |
| `tb_tm_fpga_partial` | a = 0.5 on a 2 x 2 array: conventional, multiplex-able and mixed tracks |
| `tb_tm_fpga_k` | K = 2, 6 and 8 on 2 x 2 arrays: up to three nets share one wire per user cycle (the third computed from the first by a logic block), then the switch latches; uses the helper `tm_fpga_k_env` |

To build and run one, for example the full array:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tm_fpga \
    -y rtl -y tb -Irtl rtl/tm_pkg.sv tb/tb_tm_fpga.sv
./obj_dir/Vtb_tm_fpga
```

On the default array, building takes a few minutes and the run takes seconds.
