# Embedded FPGA fabric with DUCK fast dynamic reconfiguration

Multi-context FPGAs reconfigure quickly because every resource stores
several complete contexts locally, and they pay for it in area and power.
This fabric keeps only **two** copies of each resource's configuration:
the live configuration registers and one *context register* held in a
**DUCK** (Dynamic Unifier and reConfiguration block). The DUCKs sit on a
scan path that is separate from the live configuration, so the next
context can be shifted in while the fabric keeps computing with the
current one. A *swap* then exchanges the two copies. The replaced context
lands in the DUCKs and can be shifted out again, which gives preemption
and readback for free. The scan path is also split into independent
**domains** that load in parallel.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It builds a
fine-grained fabric. Each tile is one 4-input logic cell plus one routing
box (DyRIBox), and each of the two has its own DUCK. At its default size
the fabric has 4960 tiles in 8 domains.

## How a reconfiguration runs

There are three phases, and a domain can be in any of them independently
of the other domains.

1. **Run.** The live configuration registers drive the fabric. The DUCKs
   hold either nothing useful or the next context.
2. **Load (in the background).** `conf_shift[d]` advances domain *d*'s
   scan path by one 6-bit word per clock. The words enter at `conf_in[d]`,
   and the DUCKs' previous contents leave at `conf_out[d]`. The fabric
   keeps computing with the live configuration the whole time.
3. **Swap.** A one-cycle pulse on `swap[d]` exchanges DUCK and live
   configuration in every tile of domain *d*:
   - **DyRIBox:** the 10 routing bits are exchanged in parallel on the
     next clock edge.
   - **Logic cell:** a counter in the cell's DUCK visits the cell's 20
     configuration bits one per cycle. Each cycle it writes the new bit
     and takes the old bit back. All cells of the domain do this in
     parallel, so the exchange takes 20 cycles. `busy[d]` is high during
     those 20 cycles, and `conf_shift[d]` must stay low then (assertion).

The cell is rewritten bit by bit rather than shifted. So a bit that is
already right is written with its own value, and the cell never sees a
wrong one. Swapping in the running context therefore disturbs nothing:
the outputs and the registers keep running through the swap. While a
different context is being swapped in, the fabric runs on a mix of old
and new bits for those 20 cycles. Treat its outputs as invalid during
that time, and keep `ram_we` low.

After the swap, the previous context sits in the DUCKs. The next load
shifts it out on `conf_out[d]`, one word per cycle, at the same time as the
next context goes in. Swapping twice without loading restores the
preempted context.

### Cost in cycles

| operation | cycles |
|---|---|
| load one domain context | 5 x (tiles per domain) = 3100 at default size |
| load all domains | the same: the domains shift in parallel |
| swap, routing | 1 |
| swap, logic cells | 20 (`busy`) |

## Configuration stream format

A tile is 30 bits: 20 for the logic cell and 10 for the DyRIBox. That is
5 words of 6 bits. The two DUCKs of a tile are chained DyRIBox first. A
DUCK shifts by a whole word per clock whatever its length, so the chain
behaves as one shift register that moves 6 bits per cycle. Seen as a
30-bit value, a tile is `{lc[19:0], dy[9:0]}`.

Within a domain the path visits the tiles row by row, starting at the
south-west corner. Tile (r, c) is chain position k = r·COLS + c, and
position 0 is nearest to `conf_in`. Concatenate all tiles of the domain
as `{tile[K-1], …, tile[1], tile[0]}`, 30·K bits in all. Send that value
most-significant word first: the first word sent ends up in the top
6 bits of the last tile. `conf_out` always shows the top word before the
shift. Word *i* of the readback is therefore the same slice of the old
contents. `tb/efpga_model_pkg.sv` (`stream_word`) computes this order.

### Logic-cell bits (`efpga_pkg::lc_cfg_t`)

| bits | field | meaning |
|---|---|---|
| 15:0 | `lut` | truth table, indexed by the inputs `{W, S, E, N}` |
| 16 | `ff_init` | value that `user_rst` loads into the output register |
| 17 | `seq_sel` | 1: registered output, 0: combinational output |
| 18 | `carry_sel` | 1: carry input from the chain, 0: carry input forced to 0 |
| 19 | `ram_mode` | the LUT is a 16x1 RAM written when `ram_we` is high |

The cell output is `lut[in] ^ cin`. The carry out is `lut[in] ? cin : in[0]`.
So with `carry_sel = 0` the cell is a plain LUT, and with `carry_sel = 1`
it is one bit of a ripple adder: the LUT gives the propagate term and
in[0] the generate operand. In RAM mode the write address is the four LUT
inputs and the write data is the DyRIBox's fifth output.

### DyRIBox bits

A DyRIBox with N inputs and M outputs has M select registers of
p = log2 P bits. Each output can reach only P of the inputs. In the tile,
N = M = 5: the inputs are N, E, S, W and the cell output, and the outputs
are N, E, S, W and the cell's RAM data input. P = 4, which gives
5 x 2 = 10 bits, with output j at `dy[2j+1:2j]`. Output j with select s
takes input (j + 1 + s) mod 5. So a side output can take any other side
or the cell, but never its own side's input. The cell-data output can take
any of the four sides. The module is generic in B, N_IN, M_OUT and P.

## Fabric datapath

- Each tile receives one wire from each neighbour. Those four wires are
  also the logic cell's LUT inputs, indexed N=0, E=1, S=2, W=3.
- The carry chain runs from south to north through every column and
  crosses domain boundaries.
- The outer edges of the fabric are ports:
  - north and south, one bit per column;
  - west and east, one bit per tile row;
  - `carry_in` at the south edge and `carry_out` at the north edge.
- `ram_we` and `user_rst` are fabric-wide.

Routing is configurable, so a context *can* close a combinational loop.
Verilator reports the structural loops (UNOPTFLAT). Contexts must be
loop-free, as on any FPGA. While `rst_n` is low every DyRIBox output is
forced to 0, so register contents from before reset cannot form an active
loop. All registers reset synchronously (active low) to zero.

## Modules

| file | role |
|---|---|
| `rtl/efpga_pkg.sv` | path width, bit counts, `lc_cfg_t`, side numbering |
| `rtl/efpga_top.sv` | the fabric: `DOMAINS` stacked domains, per-domain configuration ports |
| `rtl/config_domain.sv` | one domain: ROWS x COLS tiles, one scan path, one swap/busy |
| `rtl/efpga_tile.sv` | logic cell + DyRIBox + their two DUCKs |
| `rtl/dyribox.sv` | routing box with parallel-loadable select registers |
| `rtl/duck.sv` | DUCK with a one-cycle parallel exchange (for the DyRIBox) |
| `rtl/duck_serial.sv` | DUCK with a counter-driven, bit-at-a-time exchange (for the logic cell) |
| `rtl/logic_cell.sv` | LUT4 / carry / register / 16x1 RAM cell with addressed configuration bits |

Default parameters of `efpga_top`: `DOMAINS = 8`, `ROWS_PER_DOMAIN = 20`,
`COLS = 31` (620 cells per domain, 4960 in all). The path width is 6 bits.

## Sizing against the intended application

The fabric is sized for a WCDMA receiver. Three functions take turns in
each 66.6 µs slot, 22.2 µs each: the FIR filter (3475 cells), the searcher
(4953 cells) and the rake receiver (one 561-cell finger per domain). All of
them fit in the 4960 cells.

The load budget does **not** fit at a 50 MHz clock:

- a domain needs 3100 shift cycles, which is 62 µs at 50 MHz;
- about 22 µs is available;
- meeting it needs a scan clock of about 140 MHz or more, or more and
  smaller domains.

The RTL uses one clock for computing and configuration. Its cycle counts
are exact, so this arithmetic is easy to redo for other domain shapes: set
`ROWS_PER_DOMAIN` and `COLS`.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.

- `tb/efpga_model_pkg.sv` is a cycle-level reference model of the fabric.
  It was written from the rules above, independently of the RTL.
  `rand_ctx` makes random contexts whose routing cannot form a loop.
- `tb_efpga_top` runs a 3-domain, 2 x 3-tile-per-domain fabric. It checks
  every edge output on every cycle, including during loads and swaps. It
  also counts each mechanism and fails if one never happened:
  - parallel loads, full and partial swaps;
  - readback, swapping in an identical context;
  - RAM writes, user resets, carries across domain boundaries.
- `tb_efpga_full` runs the default 4960-tile fabric through one complete
  operation:
  - a context loads into all eight domains in parallel (3100 cycles);
  - it is swapped in;
  - the fabric computes with it.

  It uses stateless (combinational, non-RAM) contexts. The outputs are
  checked on every swap and run cycle, and on every 61st load cycle.
- The block testbenches check cycle counts:
  - 20 cycles for a logic-cell exchange;
  - 1 cycle for routing;
  - 5 words per tile for a load.

To simulate, for example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/efpga_pkg.sv tb/efpga_model_pkg.sv tb/tb_efpga_top.sv --top-module tb_efpga_top
./obj_dir/Vtb_efpga_top
```

Verilator warns about the fabric's structural combinational loops
(UNOPTFLAT). It also warns about package constants that a given module
does not use. Both are expected.

## Where this design makes its own choices

The reconfiguration scheme is taken as given: per-resource DUCK context
registers on a split 6-bit scan path, a one-cycle DyRIBox swap, a
counter-driven 20-cycle logic-cell swap, and eight domains of 620 cells.
The following details were not specified, and were chosen here:

- the tile wiring (LUT inputs taken straight from the four neighbours);
- which P inputs each DyRIBox output reaches;
- the layout of the 20 cell bits, the carry equations and the RAM-mode
  write port;
- the fabric-wide `user_rst` for the set/reset value;
- bit-addressed rather than shifted access to the cell's configuration,
  which keeps an identical-context swap disturbance-free;
- the DUCK order inside a tile and the row-major chain order;
- domains as horizontal bands of 20 x 31 tiles;
- one clock for computing and configuration;
- per-domain swap inputs;
- a synchronous reset that also disables routing.

Not included: the static memory that passes data between the
time-multiplexed functions, whose organisation is unspecified. Connect
such memories to the edge ports.
