# Scan test access for core-based chips: reconfigurable scan chains and TestRails

A chip built from many embedded cores is tested by shifting patterns into scan
registers, letting the logic run for one clock (capture), and shifting the
responses out. The pins that carry this data, the *test access mechanism* (TAM),
are few. The test time depends on how the scan registers are strung onto them.
This RTL implements two such mechanisms:

1. **Reconfigurable multiple scan chains (RMSC).** All cores share a few long
   scan chains. The cores are ordered by test length. When the core with the
   shortest test has received its last pattern, a *control signal* switches
   multiplexers that cut its registers out of every chain. From then on each
   pattern is shifted through shorter chains. Control signals stay on once set,
   so the chains only ever get shorter.
2. **TestRail TAM.** The test pins are split into several fixed-width
   *rails*. Each rail is a daisy chain through the test wrappers of its cores.
   The cores on a rail are tested one after another: the core under test puts
   its wrapper chains on the rail, and every other wrapper on that rail is in
   bypass. All rails run at the same time, so the chip's test time is that of
   its slowest rail.

The two mechanisms share no logic. `soc_tam_top` places them side by side.
The core logic and the tester are outside the RTL: the top brings out every
scan register's content and capture input.

## Reconfigurable multiple scan chains

### Sessions and control signals

Let the n cores have test lengths L_1 < L_2 < ... < L_n patterns. The test is
then n *sessions*. Session TS_i applies L_i - L_{i-1} patterns to every core
that still needs patterns (L_0 = 0). After TS_i, cores C_1..C_i are finished.

Control signal Ctrl_i goes active at the end of TS_i and stays active. Any
segment of registers belonging to C_1..C_i may be wired to Ctrl_i's
multiplexer. With all n-1 control signals built, each core leaves the chains
as soon as it is done. With fewer, consecutive sessions form a *block* that
shares one chain configuration. The RTL covers both cases: a segment names
the control signal that removes it, and unused control signals are simply
not connected.

### Chain cycles

The *chain cycles* CC_i of a session is the number of shift clocks each
pattern needs. It depends on what the registers do:

- **Pure drivers (I)** wrap a core input. They only feed stimulus, so only
  shift-in has to reach them.
- **Pure receivers (O)** wrap a core output. They only capture a response, so
  only shift-out has to drain them.
- **Driver-receivers (B)** wrap a bidirectional pin and do both.
- **Internal scan flip-flops** of a core also do both.

On one chain, the *shift-in depth* is the position of the last driving
register, counted from 1 at scan-in. The *shift-out depth* is the number of
registers from the first capturing register to scan-out. Shift-in of the next
pattern overlaps shift-out of the previous response, so CC_i is the largest
of these depths over all chains of the session. Ordering a chain as drivers,
then driver-receivers and internal flip-flops, then receivers keeps both
depths small.

`rmsc_tam` computes every CC_i at elaboration (function `chain_cycles`) from
the chain description.

### Schedule and test time

`session_ctrl` runs:

```
shift CC_1 cycles                               load pattern 1
for each session i, for each of its patterns:   capture 1 cycle
                                                shift CC_i cycles
```

The shift after the last capture of TS_i still uses the TS_i chains. That is
what unloads the last responses of the cores that just finished. Ctrl_i
switches at the clock edge that ends this shift, before the first capture of
TS_{i+1}. The total is exactly

```
tau = sum_i (L_i - L_{i-1}) * (CC_i + 1)  +  CC_1
```

cycles, from the cycle after `start` to `done`.

Because of this timing, the pattern loaded during that last TS_i shift is
placed for the *old* chains. The tester must load the first TS_{i+1} pattern
into the positions its registers have before the bypass. Registers that stay
in the chains keep their content when the others are cut out.

### The default configuration

The parameter defaults are a two-core example with two chains:

| chain | scan-in -> scan-out (registers 0..24)                              | bypassed by |
|-------|--------------------------------------------------------------------|-------------|
| 1     | core A: I I I + 4 FF (regs 0-6)                                    | Ctrl_1      |
|       | core B: 5 FF + O O (regs 7-13)                                     | -           |
| 2     | core B: I I I + 3 FF (regs 14-19)                                  | -           |
|       | core A: O O O O (regs 20-23)                                       | Ctrl_1      |
|       | core B: O (reg 24)                                                 | -           |

Core A has 30 patterns and core B has 100.

- **Session 1:** chain 1 has depths 12 (in) and 11 (out). Chain 2 has 6 and
  8. So CC_1 = 12.
- **Session 2:** chain 1 has 5 and 7. Chain 2 has 6 and 4. So CC_2 = 7.

The test takes 30*13 + 70*8 + 12 = **962 cycles**, which the testbenches
confirm cycle for cycle.

### Describing other chains

`rmsc_tam` / `rmsc_chains` take the chain layout as parameters:

- `SEG_CHAIN`, `SEG_LEN`, `SEG_CTRL`: for each segment k, the chain it sits
  on (from 0), its number of registers, and the control signal that bypasses
  it (i for Ctrl_i; 0 means never bypassed). These are `tam_pkg::size_tab_t`
  tables: packed arrays of 16-bit fields with segment 0 in field 0, so
  `size_tab_t'({16'd4, 16'd7})` gives segment 0 the value 7 and segment 1 the
  value 4. List the segments chain by chain, each from scan-in towards
  scan-out.
- `REG_KIND`: a packed array with one `tam_pkg::cell_kind_e` per register, in
  the same order. Element 0 is the first register of segment 0.
- `N_CH`, `N_SESS`, `N_SEG`, `N_REG`: the sizes of the above.

Per-session pattern counts are inputs (`npat`), so the same hardware can run
any test set with the same session order.

Two further testbenches use other layouts:

- **`tb_rmsc_order`** puts one core (two inputs, one bidirectional pin, three
  outputs, five flip-flops) on a single chain in two orders. The mixed order
  `O I FFFFF I O B O` needs CC = 11. Drivers first, `I I B FFFFF O O O`,
  needs CC = 9. With 20 patterns the tests take 251 and 209 cycles.
- **`tb_rmsc_blocks`** has four cores and four sessions on two chains, but
  builds only Ctrl_2. Sessions 1-2 and 3-4 then form two *blocks*, each with
  one chain configuration (CC = 13 and 7). The test takes 243 cycles. Choosing the segments, the register
order and which control signals to build is a design-time optimisation. It is
not part of the RTL.

## TestRail TAM

### Core wrapper

`core_wrapper` surrounds one core with W wrapper scan chains. The core's
inputs, scan flip-flops and outputs are each dealt round robin over the
chains: item i goes to chain i mod W. Each chain holds its input cells, then
its flip-flops, then its output cells. Chain 0 is the longest, which gives:

```
si = ceil(N_IN/W) + ceil(N_FF/W)      (scan-in length)
so = ceil(N_FF/W) + ceil(N_OUT/W)     (scan-out length)
```

The wrapper has three modes (`tam_pkg::wrap_mode_e`):

| mode        | rail                            | core                      | cells                                      |
|-------------|---------------------------------|---------------------------|--------------------------------------------|
| `WM_NORMAL` | passes through                  | sees `pi`; `po` = core out | flip-flops load `ff_d` every cycle          |
| `WM_INTEST` | runs through the wrapper chains | sees the input cells      | shift / capture under the controller        |
| `WM_BYPASS` | passes through, combinationally | sees the held input cells | everything holds                           |

### One rail

`testrail` chains the wrappers of its cores and adds `rail_ctrl`. For each
core in turn, the controller does the following:

1. Shift si cycles.
2. For each pattern: capture, then shift max(si, so) cycles. After the last
   capture it shifts only so cycles.

A core with p patterns therefore takes (1 + max(si,so)) * p + min(si,so)
cycles. The next core starts on the following cycle, and bypass adds no
registers. The rail time is therefore exactly the sum of its cores' times.

### Several rails

`testrail_tam` splits W_MAX pins into rails:

- `RAIL_W[r]` is the width of rail r.
- `RAIL_NCORE[r]` is how many cores it carries. Cores are numbered rail by
  rail.
- `N_IN`, `N_FF`, `N_OUT` give the size of each core.

These tables are `tam_pkg::size_tab_t`, packed arrays of 16-bit fields, with
core 0 in field 0. `done` rises when the slowest rail finishes.

The default has 16 pins: a 10-bit rail with two cores and a 6-bit rail with
two cores. It is an illustrative configuration, not a tuned partition.

## Tester interface and timing

- **Clocking and reset.** Everything is clocked on the rising edge of `clk`.
  `rst_n` is an active-low asynchronous reset that clears every flip-flop.
- **Starting a test.** Pulse `start` for one cycle while the mechanism is
  idle. The first shift cycle is the next cycle.
- **Shifting.** During a cycle with `shift_en` high, present the scan-input
  bit before the rising edge. Sample the scan output in the same cycle: it
  shows the last register's content before that edge. A bit driven on shift
  cycle c of an N-cycle shift ends at position N-1-c of its chain.
- **Capture.** `capture_en` marks the capture cycle.
- **Progress.** `sess`/`pat` (RMSC) and `mode`/`rail_pat` (TestRail) say
  where the test is.
- **Finishing.** `done` stays high from the end of the test until the next
  `start`.
- **Input rules.** `npat` must be stable during a test, with at least one
  pattern per session or core. Assertions flag violations.

## Files

- **Package:** `rtl/tam_pkg.sv` holds the cell kinds, wrapper modes and
  size-table helpers.
- **RMSC side:** `rtl/scan_cell.sv` (one scan flip-flop of any kind) ->
  `rtl/scan_segment.sv` (a run of cells plus its bypass multiplexer) ->
  `rtl/rmsc_chains.sv` -> `rtl/rmsc_tam.sv`, which also instantiates
  `rtl/session_ctrl.sv`.
- **TestRail side:** `rtl/core_wrapper.sv` (uses `scan_cell`) ->
  `rtl/testrail.sv`, which also instantiates `rtl/rail_ctrl.sv` ->
  `rtl/testrail_tam.sv`.
- **Top:** `rtl/soc_tam_top.sv`.
- **Testbenches:** `tb/tb_<module>.sv` for every module, plus
  `tb/tb_rmsc_order.sv` and `tb/tb_rmsc_blocks.sv`.
- **Testbench models:** `tb/rmsc_tester.sv` (the default layout),
  `tb/rmsc_gen_tester.sv` (any layout) and `tb/rail_tester.sv` are
  behavioural testers with core models. Each works out register positions
  and chain cycles on its own, not from the RTL.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_soc_tam_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/tam_pkg.sv tb/tb_soc_tam_top.sv
./obj_dir/Vtb_soc_tam_top
```

Replace `tb_soc_tam_top` with any other testbench. Each prints
`TB_RESULT checks=N failures=M`.

`tb_soc_tam_top` runs the whole design at its default sizes and does the
following:

- Applies the 962-cycle RMSC example.
- Tests all four TestRail cores.
- Checks every response bit and each mechanism's cycle count.
- Counts that each mechanism happened: pipelined capture, control-signal
  bypass, wrapper intest/bypass/normal modes, and parallel rails.

The unit testbenches compare against independent reference models. Example
references are shift/capture sequences built from the timing rules above,
and chain layouts written out by hand. The whole set runs in seconds.

## Where this design makes its own choices

- **Scan cell.** Each scan cell is a single flip-flop with no separate
  update stage. Bypassed cells hold their content.
- **Multiplexer polarity.** Select 1 means bypass.
- **TestRail bypass** is a wire through a multiplexer, not a register. This
  keeps a rail's time equal to the sum of its cores' times. A registered
  bypass would add one cycle of latency per bypassed wrapper to every shift.
- **Wrapper chains** are built by simple round-robin dealing. Scan flip-flops
  are treated as individually assignable. Cores whose internal scan chains
  are fixed would need a wrapper built from whole chains; `core_wrapper`
  would have to change for that.
- **Wrapper modes.** Only normal, internal test and bypass exist. There is no
  detach mode and no external (interconnect) test mode.
- **Test order.** Cores on a rail are tested in index order. Testing several
  cores on one rail at once is not supported.
- **Handshakes and counters.** The start/done handshakes and the 32-bit
  counters are this design's own. The counters are enough for tests of a few
  million cycles.
- **No optimisation in RTL.** The RTL contains no scheduling or optimisation.
  Rail partitions, segment layouts and the choice of control signals must be
  worked out beforehand and given as parameters.
