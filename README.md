# LSRDP: a reconfigurable floating-point data-path accelerator

The LSRDP (large-scale reconfigurable data path) accelerates the inner loops of
scientific codes by mapping a loop body's data-flow graph directly onto hardware.
It is a grid of double-precision processing elements (PEs). Data enters at the
bottom row and moves strictly upward, one row per clock. Between two rows, an
operand routing network (ORN) takes each result to the PEs above it that need it.
Intermediate values are handed from PE to PE and never touch memory. Once the
array is configured, it accepts a new input vector every clock and returns one
result vector per clock. The host processor prepares data in a wide scratchpad
memory (SPM), loads a configuration bitstream, and starts runs.

The architecture was proposed for superconducting single-flux-quantum (SFQ)
logic clocked at about 80 GHz. This RTL models it at the clock-cycle level:
one RTL clock is one LSRDP cycle. It is ordinary synchronous SystemVerilog.

```
            host (GPP)                          main memory
   cfg bitstream | exec cmd | DMA cmd        req/gnt, rvalid
          |          |          |                  |
   +------v----------v---+   +--v------------------v--+
   |     lsrdp_ctrl      |   |          dma           |
   +--+-------------+----+   +-----------+------------+
      | chains,     | row addr           | word port
      | commit      v                    v
      |   +---------------------------------------+
      |   |  spm: 64 banks x 1024 x 64 bit        |
      |   +---------------------------------------+
      |        | 64 words/clk          ^ 64 words/clk
      v        v                       |
   +------------------------------------------------+
   | lsrdp: row 7  PE PE PE ... PE (32 columns)     |
   |               ORN                              |
   |        ...                                     |
   |        row 1  PE PE PE ... PE                  |
   |               ORN                              |
   |        row 0  PE PE PE ... PE                  |
   +------------------------------------------------+
```

## The processing element

Every PE has the same structure (`rtl/pe.sv`):

* **FU (functional unit)** (`rtl/fu.sv`): computes `A op B`. `op` is ADD, SUB (`A - B`),
  MUL, or PASS (`A`). PASS lets an FU act as an extra transfer unit.
  The result is registered.
* **MUX**: feeds the FU's second operand from input B or from the PE's 64-bit
  **immediate register**. This is how constants such as `r` or `0.5` enter a
  computation.
* **TU (transfer unit)**: a one-clock register that carries input C to the next
  row unchanged. A value needed two or more rows higher travels there through
  TUs, because an ORN connects only neighbouring rows.

A PE therefore has three inputs (A, B, C) and two outputs (FU, TU), and both
paths take exactly one clock. Operand timing then never depends on the
operation, so all values of one input vector stay aligned as they rise
through the array.

## Operand routing between rows

The ORN between row *i* and row *i+1* (`rtl/orn.sv`) lets each of the three
inputs of every PE in row *i+1* pick one source. A source is the FU or TU
output of a PE in row *i* at most MCL columns to either side, where MCL is the
maximum connection length. That gives 2·(2·MCL+1) sources and
`ceil(log2(2·(2·MCL+1)))` select bits per input, so a PE carries three selects.
With the default MCL = 1 that is 6 sources and 3 bits per select.

Each input chooses its source independently. One output can therefore feed any
number of inputs (multicast), including both inputs of the same FU. Select
encoding:

```
sel = 2*(d + MCL) + k      d = source column - destination column (-MCL..MCL)
                           k = 0: FU output, 1: TU output
```

With MCL = 1: 0 = FU left, 1 = TU left, 2 = FU same column, 3 = TU same column,
4 = FU right, 5 = TU right. Codes 6 and 7, and any source column outside the
array, deliver +0.0. The +0.0 gives a stencil a zero boundary at the array edges.

### Crossbar form

In the SFQ circuit the ORN is built from crossbar switches, not multiplexers.
`rtl/orn_xbar.sv` models that network for the FU-to-FU connections:

* Each FU output enters a **½CB** (`rtl/half_cb.sv`). A ½CB sends its input up,
  down or both ways.
* 2·MCL stages of **2×2 CBs** (`rtl/cb.sv`) follow, in a checkerboard
  arrangement. Each CB is set to bar, cross, or multicast of either input.
* Each stage moves a value by at most half a column. The CBs of the last stage
  sit in line with the destination PEs, and their two outputs drive inputs A
  and B.

To picture the geometry, put FU *j* at position 2*j*. Stage *s* holds CBs at
the positions with the same parity as *s*, from −*s* to 2·(COLS−1)+*s*. The CBs
at the extreme ends represent links that leave the drawn array; where no
neighbour exists they receive +0.0. A CB at position *x* takes `in0` from the
down output of the node at *x*−1 and `in1` from the up output of the node at
*x*+1. It sends `out0` up and `out1` down.

Example (MCL = 1): every PE adds its left and right neighbour. Set all ½CBs to
"both", all stage-1 CBs to cross, and all stage-2 CBs to bar.

Setting `XBAR_ORN = 1` on `lsrdp`/`lsrdp_system` makes every ORN route A and B
through this crossbar. C keeps a select, because the crossbar carries only FU
outputs. The default is the select form for two reasons:

* a crossbar blocks some combinations of connections that the select form can make;
* in crossbar mode a TU value cannot reach inputs A and B.

## Configuration: chains, shadow registers and commit

Three serial chains run along every row, from column 0 to column COLS−1:

| chain | per PE | per row at defaults |
|-------|--------|--------------------|
| immediate | 64 bits (immediate register) | 2048 bits |
| PE | 3 bits `{imm_sel, op[1:0]}` | 96 bits |
| ORN | 3 selects `{sel_c, sel_b, sel_a}`, 3 bits each | 288 bits (row 0 has no ORN) |

Each link (`rtl/cfg_reg.sv`) holds a **shadow** register and an **active** register.
Bits enter at a link's MSB and leave at its LSB to the next column. A one-clock
`commit` copies every shadow register into its active register at the same
time. A new configuration can thus be shifted in while the array still
computes with the old one (pre-configuration). Switching between them costs
one clock.

**Building a bitstream.** For one chain of one row, concatenate the link
values with column 0 in the most significant position:
`V = {link[0], link[1], ..., link[COLS-1]}`. Send bit `V[t]` at beat `t`, for
`t = 0 .. len-1`. That is, send the LSB of the last column first.

`lsrdp_ctrl` takes one beat per clock with `cfg_valid`. A beat carries one bit
for each of the 3·ROWS chains (`cfg_imm[r]`, `cfg_pe[r]`, `cfg_orn[r]`). The
controller shifts each chain kind only during the first *len* beats of that
kind: 2048 for immediates, 96 for PE words and 288 for ORN selects. The PE and
ORN bits therefore go in the first beats of the stream. After 2048 beats the
configuration is complete and waits in the shadow registers (`cfg_ready`).

## Running a kernel

`lsrdp_system` ties the blocks together. The SPM (`rtl/spm.sv`) has 2·COLS = 64
banks, so one SPM *row* (one address in every bank) is one array input or
output vector. The SPM reads one row and writes one row every clock.
This gives 64 × 8 bytes per clock in each direction.

Bank ↔ array mapping:

* bank 2j → input A of PE j in row 0;
* bank 2j+1 → inputs B and C of PE j in row 0;
* bank 2j ← FU result of PE j in the last row;
* bank 2j+1 ← TU value of PE j in the last row.

A run is started with `exec_start`, a first source row, a first destination
row and a vector count *N*:

* With `exec_reconf = 1`, the controller first waits until a configuration is
  ready. It counts every waiting clock in `stall_cycles`, then commits the
  configuration in one clock.
* With `exec_reconf = 0`, it reuses the active configuration.
* It reads rows `src .. src+N-1`, one per clock. Each result is written to
  `dst + k` as it leaves the array, and `exec_done` pulses after the last
  write.

Timing: the SPM read latency is 1 clock and each array row adds 1 clock. A run
takes N + ROWS + 2 clocks from command to `exec_done`, plus 1 clock when it
commits a configuration.

With the basic heat mapping below, results land in the SPM in the same layout
as the inputs. The next time step of an iterative solver can therefore run
directly on them, with no main-memory traffic or data rearrangement between
steps.

The DMA engine (`rtl/dma.sv`) moves blocks of 64-bit words between main memory and
the SPM's word port (word address = row · 64 + bank).

* Main-memory port: a request/grant handshake with in-order read responses.
* Loads issue reads back to back with no limit on outstanding requests. A long
  memory latency (7500 clocks in the system test) costs it only once per block.
* Stores read the SPM ahead into a two-entry buffer and send one word per clock.

### Example mapping: 1-D heat equation

`u'[j] = u[j] + r·((u[j-1] + u[j+1]) − u[j] − u[j])`. Each array column handles
one grid point, and `u` is in the even banks.

| row | FU | A | B | C (TU) |
|-----|----|---|---|--------|
| 0 | PASS | port 2j (u) | – | – |
| 1 | ADD | FU left (0) | FU right (4) | FU same (2) |
| 2 | SUB | FU same (2) | TU same (3) | TU same (3) |
| 3 | SUB | FU same (2) | TU same (3) | TU same (3) |
| 4 | MUL, B = immediate r | FU same (2) | – | TU same (3) |
| 5 | ADD | FU same (2) | TU same (3) | TU same (3) |
| 6, 7 | PASS | FU same (2) | – | TU same (3) |

The result `u'` leaves in bank 2j and the old `u` in bank 2j+1.

### Example mapping: two heat time steps in one pass

A larger DFG can fold several time steps into one pass, so intermediate
results never return to the SPM. The same update is rewritten as
`u' = r·((u[j-1] + k·u[j]) + u[j+1])` with the constant `k = (1 − 2r)/r`.
Each step then needs only four rows, and the default eight rows hold two steps.
For this, the host places `u[j]` in both banks 2j and 2j+1.

| row | FU | A | B | C (TU) |
|-----|----|---|---|--------|
| 0 | MUL, B = immediate k | port 2j (u) | – | port 2j+1 (u) |
| 1 | ADD | TU left (1) | FU same (2) | TU right (5) |
| 2 | ADD | FU same (2) | TU same (3) | – |
| 3 | MUL, B = immediate r | FU same (2) | – | – |
| 4 | MUL, B = immediate k | FU same (2) | – | FU same (2) |
| 5–7 | as rows 1–3 | | | |

The result `u''` leaves in bank 2j. Before the next pass the host copies it
into both banks again. Rounding differs from the basic mapping because the
operations differ; each mapping is exact IEEE arithmetic of its own formula.

### Example mapping: 2-D Poisson (Jacobi sweep)

`u'[i][p] = 0.25·((((u[i-1][p] + u[i+1][p]) + u[i][p-1]) + u[i][p+1]) − h²f[i][p])`.

Each grid point uses two columns, c0 = 2p and c1 = 2p+1. The input vector of
grid row *i* carries, for each point p:

* bank 4p: `u[i][p]`;
* bank 4p+1: `u[i-1][p]`;
* bank 4p+2: `u[i+1][p]`;
* bank 4p+3: `h²f[i][p]`.

The host builds this layout between sweeps, because the array sees only one
vector per clock.

The horizontal neighbours are two columns away, but an ORN reaches only one.
The odd column therefore relays them:

* row 1: c1 picks up `u[p+1]` on its FU and `u[p]` on its TU;
* row 2: c0 adds its left neighbour's relayed value;
* row 3: c0 adds its right neighbour's relayed value.

Rows 4 and 5 subtract `h²f` and multiply by the immediate 0.25. The result
leaves in bank 4p. The run handles 16 grid points per vector.

## Floating point

`fp64_add` and `fp64_mul` are combinational IEEE-754 double units with round to
nearest even.

* Subnormal inputs are treated as zero, and results below the normal range are
  flushed to zero.
* Overflow gives ±∞.
* A NaN input, ∞ − ∞ or ∞ × 0 gives the quiet NaN `0x7FF8000000000000`.

For normal operands and normal results the units are bit-exact with IEEE
doubles. The testbenches compare them against the simulator's own `real`
arithmetic.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS` | 8 | array height (pipeline depth) |
| `COLS` | 32 | array width; the SPM has 2·COLS banks |
| `MCL` | 1 | maximum connection length of an ORN |
| `XBAR_ORN` | 0 | 1: crossbar ORNs for inputs A/B |
| `SPM_DEPTH` | 1024 | words per SPM bank (512 KiB total) |
| `MAW`, `NW` | 32, 16 | main-memory address and length widths |

The architecture leaves the array height and width, MCL, the SPM size and all
interface protocols open, so all of these defaults are choices of this design.
COLS = 32 was picked because 64 words per clock matches the intended
scratchpad bandwidth. MCL = 1 matches the three-way crossbar used as the
reference ORN.

## Where this model departs from the architecture, and what is missing

* **Timing model.** SFQ gates are pulse-clocked, and every gate is a pipeline
  stage. Here each FU and TU has a one-clock latency, the ORN and the crossbar
  switches are combinational, and the FP units compute in one clock. The
  clock-level behaviour (one vector per clock, a fixed latency per row) is
  preserved. Gate-level pipelining and SFQ circuit behaviour are not modelled.
* **Host processor and main memory** are outside the design and appear only as
  ports. `tb/main_memory_model.sv` is a behavioural stand-in used by the tests.
  A direct host-to-scratchpad path is not provided; the host reaches the SPM
  through the DMA.
* **Array input wiring.** Row 0 is wired straight to the SPM banks, with no
  input ORN. Any rearrangement of input data is left to the DMA and the data
  layout.
* **Crossbar ORN.** This is an option, not the default. It routes only FU
  outputs to A and B, and its settings are loaded as one block at the end of
  each row's ORN chain.
* **Mapping tools.** Nothing maps data-flow graphs onto the array
  automatically. Bitstreams are built by hand as shown above, as the
  testbenches do.
* **Evaluated workloads.** The basic heat step, a two-step heat DFG and one
  Jacobi sweep of the 2-D Poisson equation have been mapped and simulated.
  Heat DFGs with more than two steps need 4 rows per step, which is more rows
  than the default 8. Expanded Poisson DFGs and the vibration and
  electron-repulsion-integral kernels have not been mapped.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. What they cover:

* `tb_fp64_add`, `tb_fp64_mul`: thousands of random operands, exact ties,
  cancellation, zeros, ∞, NaN and overflow. All results are compared bit for
  bit.
* `tb_fu`, `tb_pe`, `tb_cfg_reg`: one-clock latency, the MUX and TU paths,
  chain order, and that a configuration does not take effect before commit.
* `tb_orn`, `tb_cb`, `tb_half_cb`, `tb_orn_xbar`: every select code,
  out-of-range sources, all switch settings, and random crossbar settings
  checked against a reference that traces each output back through the
  switches.
* `tb_lsrdp`: a 6×5 array with the heat mapping, including back-to-back
  vectors, exact latency, and a second configuration shifted in while the
  array runs. A crossbar-ORN array computes the neighbour sums.
* `tb_spm`, `tb_dma`, `tb_lsrdp_ctrl`: port timing, the write-collision rule,
  DMA under random back-pressure, beat counting, configuration stalls, the
  one-clock commit and reuse without commit.
* `tb_lsrdp_system`: runs at the default size with a 7500-clock main memory.
  It loads 120 vectors by DMA and runs three heat time steps:
  * the first waits for its configuration;
  * the second reuses that configuration while the next bitstream is shifted in;
  * the third commits the pre-loaded bitstream without stalling.

  It then stores the results and compares them bit for bit. It also checks
  that each run takes N + ROWS + 2 (+1) clocks and that every mechanism above
  occurred.
* `tb_workload_poisson`: runs at the default size. It performs three Jacobi
  sweeps on a 48 × 16 grid, with the host re-laying out the data in main
  memory between sweeps, and compares every point bit for bit.
* `tb_workload_heat2`: runs at the default size. It performs three passes of
  the two-step heat DFG (six time steps) on 64 rods of 32 points with a
  7500-clock main memory. It compares every point bit for bit and checks the
  clock count of each pass.

## Simulating

Verilator 5 builds any testbench. The package goes first and the rest is found
by module name:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/lsrdp_pkg.sv \
          tb/tb_lsrdp_system.sv --top-module tb_lsrdp_system -j 8
./obj_dir/Vtb_lsrdp_system
```

The full-size system test takes well under a minute to build and run. To
change the array, override the parameters of `lsrdp_system`; the controller
derives all chain lengths from them. Remember that a testbench's bitstream has
to be rebuilt for the new sizes, using the same formula.

### Files

| file | content |
|------|---------|
| `rtl/lsrdp_pkg.sv` | operand type, FU operations, PE config word, chain-length functions |
| `rtl/lsrdp_system.sv` | top level: controller, array, SPM, DMA |
| `rtl/lsrdp_ctrl.sv` | bitstream loading, commit, run sequencing |
| `rtl/lsrdp.sv` | the PE array with its ORNs |
| `rtl/pe.sv`, `rtl/fu.sv` | processing element, functional unit |
| `rtl/fp64_add.sv`, `rtl/fp64_mul.sv` | double-precision adder and multiplier |
| `rtl/cfg_reg.sv` | configuration chain link with shadow register |
| `rtl/orn.sv` | select-based ORN (optionally with crossbar A/B) |
| `rtl/orn_xbar.sv`, `rtl/cb.sv`, `rtl/half_cb.sv` | crossbar ORN and its switches |
| `rtl/spm.sv`, `rtl/dma.sv` | scratchpad and DMA engine |
| `tb/tb_*.sv` | testbenches |
| `tb/main_memory_model.sv` | behavioural main memory for the tests |
