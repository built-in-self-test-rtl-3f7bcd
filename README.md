# Built-in self-test configurations for an AT40K-style FPGA core

An SRAM-based FPGA can test itself. Before it is loaded with its real
function, it is loaded, one configuration after another, with test circuits
built from its own resources. Some logic cells become **test pattern
generators (TPGs)**, others become the **blocks under test (BUTs)**, and
others become **output response analyzers (ORAs)**. The ORAs compare what
identically configured resources answer to identical stimuli. When every
resource has been a BUT in every mode, and every ORA flag reads "pass", the
core is fault-free. A failing flag also tells where the fault is.

This repository models that scheme for the Atmel AT40K family in
synthesizable SystemVerilog. The AT40K is a fine-grained array of logic
cells with one 32x4 RAM per 4x4 cells. The scheme is the one described in
"Built-In Self-Test Configurations for Atmel FPGAs Using Macro Generation
Language". Each BIST circuit is written as ordinary RTL. The FPGA's
configuration choices become mode inputs: the BUT macro, the test session,
the routing scheme, the RAM algorithm, and the partial reconfiguration of
the ORAs into a shift register. One model can therefore run every
configuration in turn. The model covers three families of configurations:

| family | what is tested | TPG | ORA | module |
|---|---|---|---|---|
| logic BIST | logic cells, in five modes | 5-bit up-counter | compares two BUTs, latches a mismatch | `logic_bist_array` |
| RAM BIST | all free RAMs, in parallel | March sequencer | compares a RAM with the expected data, or with the neighbouring RAM | `ram_bist` |
| routing BIST | wires and switches | 2-bit counter plus parity bit | parity check, latched | `routing_bist` |

`at40k_bist_top` puts the three families side by side. They share only the
clock, and each has its own `lb_`, `rb_` or `rt_` ports. Its default,
`ARRAY_SIZE = 48`, is the largest device: 48x48 cells and 144 RAMs.

## Files

| file | contents |
|---|---|
| `rtl/bist_pkg.sv` | BUT modes and their LUT tables, March algorithm tables, fault-injection records |
| `rtl/logic_tpg.sv` | 5-bit counter TPG |
| `rtl/plb_but.sv` | one logic cell as a BUT (two 8x1 LUTs, one flip-flop, five modes) |
| `rtl/bist_ora.sv` | single-cell comparison ORA with shift mode (used by the logic and RAM BIST) |
| `rtl/logic_bist_array.sv` | N x N logic BIST array |
| `rtl/free_ram.sv` | 32x4 RAM, single- or dual-port, synchronous or asynchronous write |
| `rtl/ram_bist_tpg.sv` | March sequencer for the three RAM tests |
| `rtl/ram_bist.sv` | all RAMs, their ORAs and the result shift chain |
| `rtl/routing_tpg.sv`, `rtl/routing_ora.sv`, `rtl/routing_bist.sv` | parity-based routing BIST |
| `rtl/at40k_bist_top.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the system tests |

## Logic BIST: columns, sessions and routing schemes

This is the most intricate part. A logic cell has two outputs. X goes to the
four diagonal neighbours and Y to the four orthogonal neighbours. A cell is
too small to hold an ORA that compares more than two signals and still keeps
its error flag. The arrangement has to meet four needs:

* every cell is a BUT at some point;
* every BUT output is observed;
* an ORA never compares two BUTs that are fed by the same TPG;
* the BUT reset is not shared with the ORAs.

For the last point, the array is laid out in **columns**, because clocks and
resets are distributed per column bank.

**Columns.** BUT columns and ORA columns alternate. The ORA at `(r, c)`
compares BUTs in columns `c-1` and `c+1`. Two identical 5-bit counters, TPG
A and TPG B, feed the BUT columns in turn. BUT column `k = c/2` takes A when
`k` is even and B when `k` is odd. Each ORA therefore sees one BUT from each
TPG, and a TPG fault also shows up as a mismatch.

**Sessions.** One session leaves the TPG column and the ORA columns
untested, so the roles are flipped:

```
session 1 (session=0):  T  B  O  B  O  B ... O  B      column 0 = TPGs
session 2 (session=1):  B  O  B  O  B ... O  B  T      column N-1 = TPGs
```

Across the two sessions, every column has been a BUT once. N must be even.
The five BUT modes in two sessions give the **ten logic configurations**.
The four rotated configurations, described below, add to these.

**Routing schemes.** Rows are paired (0-1, 2-3, ...). An ORA takes one
signal from a BUT of its own row, over a Y connection. It takes the other
from a BUT of the partner row `p = r ^ 1`, over an X connection:

```
scheme 1 (scheme=0):  ORA(r,c) compares  X of BUT(p, c-1)  with  Y of BUT(r, c+1)
scheme 2 (scheme=1):  ORA(r,c) compares  Y of BUT(r, c-1)  with  X of BUT(p, c+1)
```

A BUT drives the same value on X and Y, over separate output paths. Across
two configurations with different schemes, each BUT has had both outputs
checked. The tester alternates the scheme from one configuration to the
next.

A defective output of the BUT at `(r, c)` is flagged at one predictable ORA:

| scheme | defective X output | defective Y output |
|---|---|---|
| 1 | ORA `(r^1, c+1)` | ORA `(r, c-1)` |
| 2 | ORA `(r^1, c-1)` | ORA `(r, c+1)` |

A wrong LUT bit corrupts both outputs and lights both ORAs.

**Rotation.** `rotate = 1` turns the whole arrangement by 90 degrees:

* rows take the part of columns: row 0 holds the TPGs in session 1, row
  N-1 in session 2;
* the ORA at `(r, c)` compares BUTs in rows `r-1` and `r+1`;
* columns, instead of rows, are paired for the X connections;
* each ORA row becomes a shift chain, and `scan_out[r]` gives column `N-1`
  first.

These rotated configurations exercise the horizontal bus connections into
the cells. Two modes in two sessions give the four extra configurations.
Clocks and resets are distributed per column bank, so rotated
configurations should use modes that need no BUT reset, such as `BUT_FGEN1`
or `BUT_MGEN`. The model itself does not share resets between cells, so it
does not enforce this.

**One configuration, step by step:**

1. Hold `cfg_init`, `tpg_rst` and `ora_rst` high for one clock. This is the
   configuration load: BUT flip-flops are initialised and TPGs and ORAs are
   cleared.
2. Raise `run` for at least 32 clocks. The counters then apply all 32 input
   patterns; the testbenches use 64, so that the sequential modes see every
   pattern with both histories. ORAs compare at every rising edge and
   latch the first mismatch.
3. Raise `shift`. This stands for the partial reconfiguration of each ORA
   cell into a shift-register stage, which keeps its flip-flop contents.
   Each ORA column then shifts up, and `scan_out[c]` gives rows `N-1`,
   `N-2`, ..., `0` on successive clocks. `ora_fail` shows the same flags in
   parallel.

### The five BUT modes (`plb_but`)

The cell has two 8x1 LUTs, F and G, and one D flip-flop. The mode list
below is the one of the original BIST. The mapping of the five TPG bits and
the LUT contents are this model's choice, because the original gives only
the macro names.

| mode | cell use | output |
|---|---|---|
| `BUT_FGEN1R` | 4-input LUT `in[3] ? G(in[2:0]) : F(in[2:0])`, rising-edge FF, `in[4]` = active-high reset | FF |
| `BUT_FGEN1` | the same 4-input LUT | combinational |
| `BUT_FGEN1RF` | 4-input LUT with the FF fed back in place of `in[2]`, falling-edge FF, `in[4]` = active-low set | FF |
| `BUT_MGEN` | multiplier cell: `p = in[0] & in[1]`; F = sum, G = carry of `p, in[2], in[3]`; `in[4]` picks one | combinational |
| `BUT_FGEN2F` | two 3-input LUTs chained: `G(F(in[2:0]), in[3], in[4])` | combinational |

The LUT tables are in `bist_pkg::but_lut_f` and `but_lut_g`. Address bit 0 is
the first LUT input.

## RAM BIST

One TPG (`ram_bist_tpg`) drives the addresses, data and write strobe of
every RAM at once. Each RAM has four ORAs, one per data bit. The three
configurations are:

| `alg` | RAM mode | algorithm, per word | clocks |
|---|---|---|---|
| `ALG_DPR` | synchronous dual-port | (w0:n); ⇓(n:r0); ⇑(w1:⇓r1); ⇓(w0:⇑r0) | 4 x 32 = 128 |
| `ALG_MARCH_LR_BDS` | synchronous single-port | March-LR with background data 0101/1010 and 0011/1100, 30 operations (table in `bist_pkg`) | 30 x 32 = 960 |
| `ALG_MARCH_Y` | asynchronous single-port | (w0); ⇑(r0,w1,r1); ⇓(r1,w0,r0); ⇑(r0) | 2 x 8 x 32 = 512 |

In the DPR notation, `write:read` lists what the write port and the read
port do in the same clock. Each port has its own address order. Elements
marked as either direction run upwards here.

**What the ORAs compare.** In the single-port tests, each ORA compares a
read bit with the TPG's expected bit, and only in the clocks where
`cmp_en` marks a read. In the dual-port test there is no expected value.
The dual-port RAMs of a row form a ring, and each ORA compares its RAM's
bit with the same bit of the next RAM in the ring. All RAMs except the
rightmost column have a dual-port mode. A defective RAM therefore fails two
neighbouring comparisons: its own and its predecessor's. The ORAs of the
rightmost column are idle in this test.

**Reading results.** All ORAs form one chain, in RAM order and then bit
order. ORA index `j = 4*(row*RAM_COLS + col) + bit`. After `done`, `shift`
moves the flags out through `scan_out`, the highest index first. The
position of a 1 gives the RAM and the data bit.

**Timing.** A pulse on `start` (while idle) latches `alg`. `busy` stays high
for the clock counts above, and then `done` rises. Reads are asynchronous
in every mode. In synchronous mode, a write is stored at the clock edge
that ends its cycle. In asynchronous mode, `we` is itself the write strobe.
Each operation then takes two clocks: one setup clock, then one clock with
`we` (or `cmp_en`) high. Address and data are thus stable a full clock
before the strobe rises.

**Known property of the DPR sequence.** As written, the last two DPR
elements read words 16 to 31 either before they are written (element 3) or
after they have been overwritten (element 4). The DPR test alone therefore
misses a stuck-at-0 cell in the upper half. The two single-port tests do
detect it. The sequence is kept as published.

## Routing BIST

Every test pattern carries its own check. Each TPG is a 2-bit counter plus
a parity bit, `pattern = {parity, cnt[1], cnt[0]}`, and comes in two kinds:

* **up/even** (`DOWN=0`): counts up, even parity;
* **down/odd** (`DOWN=1`): counts down, odd parity.

The three bits go over a set of three wires under test (WUTs). Within four
clocks, every pair of wires carries both (0,1) and (1,0), so any short
between two of them is exercised. The ORA (`routing_ora`) XORs the three
bits for even parity, or XNORs them for odd parity. It latches an error
through an OR feedback into its flip-flop.

`routing_bist` has one TPG of each kind. Each drives alternate WUT sets, so
neighbouring sets carry different patterns. There are `NSETS` sets, 8 by
default. The wires themselves are the FPGA's programmable routing and
contain no logic. They are reached through `wut_tx` (what is sent on each
set) and `wut_rx` (what arrives at each ORA). Connect one straight to the
other for a fault-free fabric, or put a wiring fault model in between, as
the testbenches do. The ORAs start comparing one clock after `run` rises.

## Emulated defects

The fault inputs only serve to show the BIST at work in simulation. Tie
them to zero for a fault-free device.

* `lb_fault[r][c]` (`but_fault_t`) can do two things to the cell at
  `(r, c)`:
  * hold its X or Y output path at a fixed value;
  * invert one LUT configuration bit (`lut_bit[3]` selects G).
* `rb_fault[k]` (`ram_fault_t`) makes one storage cell of RAM `k` always
  read a fixed value.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/bist_pkg.sv tb/tb_at40k_bist_top.sv --top-module tb_at40k_bist_top
./obj_dir/Vtb_at40k_bist_top
```

| testbench | what it runs |
|---|---|
| `tb_at40k_bist_top` | end to end on a 12x12 core: all ten logic configurations, four rotated ones, located cell defects in both orientations, the three RAM algorithms with and without a stuck cell, routing with a stuck wire and a short; counts every mechanism |
| `tb_at40k_bist_top_full` | the top at its defaults (48x48, 144 RAMs), one logic configuration, March-LR and a routing run, with defects located through the shift chains |
| `tb_device_sizes` | ten logic and three RAM configurations at 16x16, 24x24 and 32x32 |
| `tb_<module>` | unit tests of each module against independent reference models |

At full size the model builds in about a minute, and its test runs in a few
seconds.

## Choices this model makes where the original BIST gives no detail

* **BUT internals.** The input mapping, the LUT contents and the MGEN
  multiplier-cell reading are this model's own; the original gives only
  the macro names. X and Y carry the same value, which the X/Y comparison
  requires.
* **Flip-flop edge.** The cell's single flip-flop with selectable edge is
  modelled as two flip-flops, of which a mode uses one.
* **Logic BIST structure.** The model uses two TPGs, assigns them to
  alternate BUT columns, and pairs the rows. The TPG column holds no cells
  in the model.
* **Partial reconfiguration.** Turning the ORAs into shift-register stages
  is a `shift` input.
* **Asynchronous RAM write.** It is modelled as storing at the rising edge
  of the write strobe.
* **RAM data bus.** The single-port bidirectional bus and its tri-state
  buffer are split into `din` and `dout`.
* **Shared RAM addresses.** Neighbouring RAMs share read and write
  addresses. This is not modelled, because one TPG drives the same
  addresses to all RAMs anyway.
* **RAM ring.** The ring pairing for the dual-port test and the order of
  the ORA chain are this model's choice.
* **RAM compare qualifier.** The ORA's `cmp_en` is this model's addition.
  It is tied high in the logic BIST.
* **Routing sets.** `NSETS = 8` is assumed. The one-clock start delay of
  the routing ORAs is this model's choice.
* **Not modelled.** The per-configuration routing of the 32 routing
  configurations is FPGA configuration content and is not modelled: which
  switches, repeaters and cross-points are on. Neither are the cell counts
  and timing of a real FPGA implementation.
* **Not included.** The two alternatives mentioned for the smallest device
  are not included: March-Y with background data, and running March-LR in
  two halves. Nor is the two-cell ORA variant.

## Synthesis notes

In `free_ram`, the write clock is a selection between `clk` and the write
strobe. This is intended: in asynchronous mode the strobe is the write
clock.

In `logic_bist_array`, the ORA cells of columns 0 and N-1 are never ORAs in
either session. Their flags stay 0, and synthesis reports them as constant.
