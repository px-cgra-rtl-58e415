# PX-CGRA: a polymorphic approximate coarse-grained reconfigurable array

Streaming workloads such as FIR filters and polynomial evaluation tolerate
small arithmetic errors, and approximate adders and multipliers turn that
tolerance into energy savings. A CGRA that can only compute exactly leaves the
saving unused; a CGRA that is always approximate cannot serve applications
that need exact results. PX-CGRA resolves this with **heterogeneous tiles**:
every tile is a small mesh of ALU clusters, and tiles differ in how many of
their ALUs are approximate. At run time a selection unit picks, for the
application and the output-quality loss it can accept, the tile that keeps the
most ALUs busy, powers that tile and power-gates the rest.

This repository holds synthesizable SystemVerilog for the array, its ALU
clusters, the accuracy-configurable arithmetic, the tile-selection and
power-gating logic and the context memory, with a self-checking testbench for
every module.

## Structure

```
px_cgra                         top: N_TILES = 5 tiles + control
├── px_tile_select              picks a tile from a table (utilization, quality)
├── px_power_ctrl               powers the selected tile, gates the others
├── px_ctx_mem                  context words -> context registers of a tile
└── px_tile  (x5)               2 x 2 mesh of identical PACs
    └── px_pac (x4)             4 ALUs + switch box + 76-bit context register
        ├── px_switch_box       operand / output-port routing
        └── px_alu (x4)         exact, fixed approximate or configurable
            ├── px_approx_adder accuracy-configurable carry look-ahead adder
            └── px_approx_mult  accuracy-configurable multiplier
px_pkg                          shared types, widths, opcodes, context layout
```

Tile *t* (0..4) is built from PACs with *t* approximate and 4−*t* exact ALUs,
so the five tiles are the five cluster types PAC1 (all exact) to PAC5 (all
approximate). The host processor, main memory and data memory are not part of
this RTL: their connections are the ports of `px_cgra`.

## Approximate arithmetic

Every arithmetic operation of an ALU goes through one adder and one
multiplier, each with an accuracy-mode input.

**Adder (`px_approx_adder`).** In exact mode a plain 16-bit adder. In
approximate mode the carry into bit *i* is looked ahead over only the four bits
below it (bits *i*−4..*i*−1); a carry that would have to ripple further is
lost. Example: `0x00FF + 0x0001` gives `0x0100` exactly but `0x00E0`
approximately, because the carry generated at bit 0 dies after four bits.
Short carries are unaffected, so most sums of small or random operands are
exact or nearly so (about 18 % of random 16-bit sums differ).

**Multiplier (`px_approx_mult`).** The 16×16 partial-product array is reduced
column by column. In approximate mode the bits of the eight least significant
columns pass four at a time through an approximate 4:2 compressor,
`sum = (x1^x2)|(x3^x4)`, `carry = (x1&x2)|(x3&x4)`, which under-counts when
both pairs are 1 1 or both pairs differ; the remaining bits and columns are
summed exactly. The approximate product is never larger than the exact one.
The multiplier is written as a column sum, not as an explicit Dadda tree;
synthesis builds the tree.

The windowed adder (window 4) and a compressor-based accuracy-configurable
multiplier are the unit types the architecture selects for lowest
energy×delay×area per quality loss; the exact compressor equations, the
number of approximate columns and the window rule for the carry in are this
design's own.

## The ALU

`px_alu` implements 15 functions plus NOP:

| opcode | op  | opcode | op  | opcode | op  |
|-------:|-----|-------:|-----|-------:|-----|
| 0 | NOP (hold) | 6 | AND | 11 | LT (signed, 1/0) |
| 1 | ADD | 7 | OR  | 12 | EQ (1/0) |
| 2 | SUB | 8 | XOR | 13 | LSR by b[3:0] |
| 3 | MUL (low 16 bits) | 9 | NOT a | 14 | LSL |
| 4 | MAC: q + a·b | 10 | GT (signed, 1/0) | 15 | ASR |
| 5 | ABS |  |  |  |  |

ADD, SUB, ABS and MAC use the adder, MUL and MAC the multiplier; logic,
compare and shift are always exact. The `KIND` parameter fixes the ALU type
at design time:

* `ALU_EXACT` – both units exact;
* `ALU_APPROX` – both units always approximate (fixed level);
* `ALU_CONFIG` – context bit OM[0] makes the adder approximate, OM[1] the
  multiplier, giving four accuracy levels: OM = 0 exact, 1 approximate add,
  2 approximate multiply, 3 both.

The result is registered in the ALU's output register `q` on the clock edge
when the ALU is active (WR ≠ 0 and opcode ≠ NOP). MAC adds the product to `q`,
so `q` is the accumulator; clear it with `XOR q, q` (an exact operation).

## The PAC and its context word

A PAC (polymorphic-approximated ALU cluster) holds four ALUs and a switch box.
The switch box has eight sources, numbered:

| source | 0..3 | 4 | 5 | 6 | 7 |
|--------|------|---|---|---|---|
| value  | output register of ALU0..ALU3 | input N | input E | input S | input W |

The 76-bit context register (`pac_ctx_t`) holds one 16-bit field per ALU,
ALU0 in bits 15:0, and a 12-bit switch field in bits 75:64:

```
ALU field:  15:14 OM   13:11 WR   10:8 MUX_A   7:5 MUX_B   4:0 opcode
switch:     sw[d] (3 bits) for output port d = N, E, S, W (N in bits 66:64)
```

* MUX_A / MUX_B pick the ALU's operands among the eight sources.
* WR is the destination: 0 = idle, 1 = own output register, 2..5 = own output
  register **and** PAC output port N, E, S, W (6, 7 act as 1).
* An output port carries the result of the lowest-numbered active ALU whose WR
  names it; otherwise it carries the source its switch field selects, which
  lets a PAC forward a neighbour's data.

**Timing.** ALU operands are combinational from the sources; results and
output ports are registered. A value therefore moves one PAC per clock, and
an expression mapped on a PAC has one cycle per ALU level: `(N·E) + (S·W)`
computed by two multiplying ALUs feeding an adding ALU appears on the output
port two cycles after its inputs, and a new set of inputs can enter every
cycle.

The OM field is present in every ALU field and is ignored by exact and fixed
approximate ALUs, so all PAC types share one context format. The 14-bit
core of the field and its bit positions follow the architecture, which gives
WR 3 bits (13:11) in its context-word drawing while its prose calls WR a
2-bit field; the 3-bit reading is used here.

## Tiles, mesh and edges

`px_tile` is a 2×2 mesh of identical PACs, index r·2+c for row r, column c.
Adjacent PACs are wired in both directions (east output of (r,c) to west
input of (r,c+1), south output of (r,c) to north input of (r+1,c), and back).
The eight PAC sides on the tile boundary are the tile's edge ports:

| edge | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|------|---|---|---|---|---|---|---|---|
| side | N of (0,0) | N of (0,1) | E of (0,1) | E of (1,1) | S of (1,0) | S of (1,1) | W of (0,0) | W of (1,0) |

A whole-tile context word (4 × 76 bits) is written into all four PACs in one
cycle. `n_active` counts the ALUs that operate under the loaded context;
`n_active/16` is the tile's utilization ratio, the figure the selection table
ranks tiles by.

## Selecting and powering a tile

`px_tile_select` holds a table with one entry per (application, tile): a
valid bit, the output-quality degradation that mapping causes and the
utilization it reaches, both in percent. The table is filled by the host from
offline mapping results. A request names the application and the degradation
it tolerates; one cycle later the unit answers with the qualifying tile of
highest utilization (lower index on a tie) or `found = 0`.

`px_power_ctrl` then powers exactly that tile. A tile that was off needs
`WAKE` (4) cycles before `pwr_ready` rises; re-selecting the powered tile is
ready after one cycle. A failed selection or `all_off` gates every tile. A
gated tile is modelled by clearing all its registers, context included, so a
context must be (re)loaded after every power-up.

## Running an application (top-level protocol)

1. Write the selection table (`lut_we`, `lut_app`, `lut_tile`, `lut_valid`,
   `lut_qloss`, `lut_util`) and context words (`ctx_wr_en`, `ctx_wr_addr`,
   `ctx_wr_data`, one 304-bit word per cycle).
2. Pulse `sel_req` with `app_id` and `q_const`. `sel_done`/`sel_found`/
   `sel_tile` answer one cycle later; `pwr_en` changes on the next edge.
3. Wait for `pwr_ready`.
4. Pulse `ctx_ld_en` with `ctx_ld_addr`. The word is in the selected tile's
   PACs two edges later.
5. Drive operands on `data_in` (broadcast to every tile's edges) and read
   `data_out` (the selected tile's edges).

To run more operations than 16 ALUs hold, load further context words; ALU
registers keep their values across context loads, so partial results carry
over.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `DATA_W` | 16 | px_pkg | datapath width |
| `N_ALU` | 4 | px_pkg | ALUs per PAC (fixed by the 3-bit operand selects) |
| `OM_W` | 2 | px_pkg | accuracy-mode bits per ALU field |
| `TILE_ROWS`×`TILE_COLS` | 2×2 | px_pkg | PACs per tile |
| `N_TILES` | 5 | px_cgra | tiles; tile t has t approximate ALUs per PAC (1..5) |
| `CTX_DEPTH` | 16 | px_cgra | context words |
| `N_APPS` | 8 | px_cgra | applications in the selection table |
| `WAKE` | 4 | px_cgra | wake-up cycles of a gated tile |
| `N_APX`, `N_CFG` | 0, 0 | px_pac, px_tile | approximate / configurable ALUs per PAC |
| `W`, `WIN` | 16, 4 | px_approx_adder | width, carry look-ahead window |
| `W`, `APX_COLS` | 16, 8 | px_approx_mult | width, approximate columns |

Configurable ALUs are available in `px_pac`/`px_tile` (`N_CFG`) but the
top-level tiles use exact and fixed-level approximate ALUs only, because the
configurable ALU costs more than an exact one at its exact level.

## Workloads

The two applications the architecture is evaluated with, a 32-tap FIR filter
(32 multiplications, 31 additions) and a 32nd-order polynomial evaluation (32
multiplications, 32 additions), need 63 and 64 operations per output. A tile
offers 16 ALUs per context word, so either needs at least four context words
per output when unrolled, well within the 16-word context memory.
`tb/tb_px_workloads.sv` runs both sequentially through the top level, on the
exact tile and on the PAC2, PAC3 and PAC4 tiles:

* FIR: a clearing context (`XOR q, q`), then a MAC context; the 32 (x, c)
  pairs stream into edges 7 and 4, one per cycle, and the output appears on
  edge 4 after the 32nd cycle.
* Polynomial: Horner's rule on two ALUs (`q0 = q1 · x`, `q1 = q0 + a`), one
  step every two cycles, the coefficient presented in the second cycle.

Every result is checked bit for bit against the reference model at the tile's
accuracy, and its deviation from the exact result is printed. One thing the
run shows: an accumulator built on the windowed approximate adder loses the
long carries that a growing sum produces, so a 32-term MAC on an approximate
ALU deviates by tens of percent, while single products and sums deviate
little. Mapping accumulations onto exact ALUs (the error-sensitivity-driven
accuracy assignment the mapping flow performs) avoids this.

## Simulation

Every module has a testbench in `tb/` named `tb_<module>`; the shared
reference models (arithmetic worked out independently of the RTL) are in
`tb/tb_px_models.sv`. Each prints `TB_RESULT checks=N failures=M`. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/px_pkg.sv tb/tb_px_models.sv tb/tb_px_cgra.sv --top-module tb_px_cgra
./obj_dir/Vtb_px_cgra
```

Building a testbench that includes the top level takes about two minutes.
`tb_px_cgra` runs the top at its default parameters: it selects each of the
five tiles in turn through quality constraints of 0..20 %, waits for
wake-up, loads a context (a dot product across two PACs, a running MAC, a
subtraction and a comparison), streams 60 operand sets per tile and checks
every output at the accuracy of the tile, then checks a failed selection and
`all_off`. It also counts each mechanism and fails if one never occurs.

## Departures and limits

* Widths, opcode values, WR codes, the switch field, the MAC accumulator, the
  wake-up delay, the edge numbering and the table format are this design's
  choices; the architecture fixes only the function set, the 5-bit opcode,
  3-bit operand selects, the 14-bit ALU context field plus OM bits, four ALUs
  per cluster, 2×2 tiles, and the selection and gating policy.
* The internals of the selected approximate adder and multiplier are not
  reproduced gate for gate; the versions here have the same interface and
  kind of error (lost long carries, under-counting compressors).
* Selection-table entries for performance and energy constraints are not
  modelled; the table ranks by utilization under a quality limit only.
* Power gating is a logical model (registers cleared while gated), not a
  power-switch implementation.
* The mapping flow that produces context words and table entries (accuracy
  assignment by error-sensitivity analysis and ILP, list scheduling, clique-
  partitioning binding) is software and is not part of this RTL.
* The host processor, main memory and data memory subsystem are not included.
