# Redundant TSVs by chain shifting

In a 3D IC, the dies are connected by through-silicon vias (TSVs). A single
TSV that fails to bond ruins the whole stack of known-good dies. Failure rates of
10^-4 to 10^-5 per TSV are typical. With 500 TSVs per tier, about one stack in
twenty then has a failed TSV, and almost always just one or two.

This design repairs such stacks cheaply. The TSVs of a tier sit in small grid
blocks. Each block holds **one spare TSV**, and its TSVs are linked into a
**TSV-chain** that ends at the spare. When a TSV fails, every signal from the
failed TSV to the end of the chain moves over by one TSV, and the spare takes the
last one. Two 2:1 multiplexers per signal do the moving, one on the sending die
and one on the receiving die. Each multiplexer is set by its own e-fuse, and the
fuses are programmed once through a scan chain after the stack has been tested.

Each block repairs one failed TSV. With 10 blocks of 50 TSVs in a 500-TSV tier,
two random failures are repaired in 90.2 % of cases, and the tier's bonding yield
at a 10^-4 failure rate rises from 95.1 % to 99.986 %.

## The TSV-chain

```
 receiver tier    out_0   out_1   out_2   out_3
                   |0 1    |0 1    |0 1    |0 1      receiver MUX: 1 = take the TSV to the right
                  TSV_0   TSV_1   TSV_2   TSV_3   R_TSV
 sender tier       |      0 1|    0 1|    0 1|     |   sender MUX: 1 = take the signal from the left
                  in_0    in_1    in_2    in_3 ----+
```

A chain carries `NS` signals on `NS+1` TSVs. Chain position 0 is the *head*, and
position `NS` is the spare (redundant) TSV at the *tail*.

* Sender side (`tsv_chain_tx`): TSV `i` (for 1 ≤ i < NS) carries `sig_in[i]`, or
  `sig_in[i-1]` when `sel[i]` is 1. TSV 0 has no multiplexer. The spare TSV is
  always driven with `sig_in[NS-1]`.
* Receiver side (`tsv_chain_rx`): `sig_out[i]` reads TSV `i`, or TSV `i+1` when
  `sel[i]` is 1. For the last output, TSV `i+1` is the spare.

Repairing a failed TSV `f` (f < NS) takes two settings:

| tier     | selects set to 1          | effect                                          |
|----------|---------------------------|-------------------------------------------------|
| sender   | `sel_tx[f+1 .. NS-1]`     | signals f .. NS-1 are sent one TSV to the right |
| receiver | `sel_rx[f .. NS-1]`       | outputs f .. NS-1 read one TSV to the right     |

Both patterns are thermometer codes. Nothing reads the failed TSV any more. A
failed spare TSV needs no repair. When all selects are 0 (unprogrammed), every
signal uses its own TSV.

Only one failure per chain can be repaired. After a repair at `f`, a second failed
TSV `g > f` carries signal `g-1`, and that signal is lost. The testbenches check
this exact loss.

### Where a signal sits in the chain matters

A shifted signal takes a longer path through two extra multiplexers and a
neighbour-to-neighbour wire. Signal `k` (0 = head) moves whenever the failure lies
at or before position `k`. With one failure spread evenly over `n` regular TSVs,
that happens with probability `(k+1)/n`:

* The head moves only if its own TSV fails (probability `1/n`). Averaged over
  chains of 10, 20, …, 100 TSVs, this is 2.93 %.
* A signal placed at random moves with probability `(n+1)/(2n)`, which is always
  more than 50 %.

Timing-critical signals should therefore be routed through the TSVs at the head
of a chain. The ports of every module number signals by chain position for this
reason: `sig_in[0]` is the safest place.

## TSV blocks and chaining policies

`tsv_block` is one grid of `ROWS x COLS` TSVs that forms one chain. Grid cell
`(r, c)` holds chain position `tsv_pkg::chain_pos(STYLE, ROWS, COLS, r, c)`. The
block follows two rules:

1. Consecutive chain positions sit in neighbouring grid cells, so a shift always
   spans exactly one TSV pitch. The shifting delay is then small, fixed and known
   early in the design.
2. The head is where signals most often enter the block, so router-chosen
   timing-critical signals land at the head.

There are three policies (`tsv_pkg::chain_style_e`):

| policy   | use                                  | spare TSV                | head                                    |
|----------|--------------------------------------|--------------------------|-----------------------------------------|
| `SPIRAL` | block inside the tier                | middle of the block      | the whole outer ring                    |
| `SNAKE`  | block on a tier edge (row `ROWS-1`)  | cell `(ROWS-1, COLS-1)`  | row 0, the row farthest from the edge   |
| `HYBRID` | block at a tier corner (bottom right)| cell `(ROWS-1, COLS-1)`  | the L-shaped ring farthest from the corner |

Details of each policy:

* The spiral runs clockwise from cell (0,0) inwards. The last cell it reaches is
  the spare.
* The snake turns at each row end. Its last row runs left to right.
* The hybrid walks nested L-shaped rings around the corner cell, in alternating
  directions. The parity is chosen so that non-square grids also stay
  neighbour-to-neighbour.

The start cells, turning directions and the side taken to face the tier edge or
corner are this implementation's choices. The tests check all three policies
against both rules, on grids of 2x3, 4x5, 3x7, 7x3 and 5x10.

## Programming the repair

Each tier has its own scan chain (`scan_chain`) and its own e-fuse array
(`efuse_array`). The two tiers are separate dies.

| tier     | fuses (`TX_BITS` / `RX_BITS`) | fuse of block `b`, MUX `i` |
|----------|-------------------------------|----------------------------|
| sender   | `NUM_BLOCKS*(NS-1)` = 480     | `b*(NS-1) + (i-1)`, i = 1 .. NS-1 |
| receiver | `NUM_BLOCKS*NS` = 490         | `b*NS + i`, i = 0 .. NS-1  |

Programming sequence, synchronous to `clk`:

1. Test connectivity. With the fuses still blank, drive all ones. Every output
   that reads 0 names a failed chain position. The design does not contain this
   test; the end-to-end testbench plays the tester.
2. Shift each tier's pattern in, one bit per clock while `*_scan_en` is high,
   starting with the bit of the highest fuse index. Loading takes exactly
   `TX_BITS` / `RX_BITS` cycles. `*_scan_out` gives the last bit of the chain.
3. Pulse `*_fuse_prog` high for one cycle. This must not happen while shifting;
   an assertion checks this. Every fuse whose scan bit is 1 is blown, and the
   multiplexers switch at that clock edge.
4. Blown fuses stay blown. `rst_n` clears the scan chains but not the fuses, and
   a later strobe can only blow more fuses.

Until the strobe, the scan chain's contents have no effect on the data path.

## Size of a block

The default top, `tsv_redundancy_top`, is one tier-to-tier interface:

* `NUM_BLOCKS = 10` blocks of `ROWS x COLS = 5 x 10` TSVs
* 500 TSVs, 10 of them spares
* 490 signals

The block size is the largest that still repairs at least 90 % of two-failure
cases. With 500 TSVs in `B` blocks, two failures can be repaired exactly when they
fall in different blocks, so the rate is `C(B,2)·(500/B)² / C(500,2)`. The
hardware shows this exactly (`tb_recovery_rate` applies all 124,750 placements):

| TSVs per block | blocks | repaired      |
|----------------|--------|---------------|
| 25             | 20     | 95.19 %       |
| 50             | 10     | 90.18 %       |
| 100            | 5      | 80.16 %       |
| 250            | 2      | 50.10 %       |

At a failure rate `F = 10^-4` per TSV and 500 TSVs, a tier has:

| failed TSVs | probability |
|-------------|-------------|
| 0           | 95.12 %     |
| 1           | 4.76 %      |
| 2           | 0.12 %      |
| 3 or more   | < 0.002 %   |

Single failures are always repaired. The repaired yield is therefore
`P0 + P1 + 0.9018·P2` = 99.986 %.

The 5 x 10 grid shape is an assumption, since only the size of 50 is fixed by this
analysis. The policy per block is a parameter (`STYLE`, default all `SPIRAL`). The
real choice depends on where each block sits in the floorplan.

## Modules

| file | what it is |
|------|------------|
| `rtl/tsv_pkg.sv` | `chain_style_e` and the chain-order functions |
| `rtl/tsv_chain_tx.sv` | sender-side shift multiplexers of one chain |
| `rtl/tsv_chain_rx.sv` | receiver-side shift multiplexers of one chain |
| `rtl/tsv.sv` | **behavioural model** of a TSV with its bond pad; `fail` injects an open |
| `rtl/tsv_block.sv` | one grid block: tx MUXes, TSVs at grid cells, rx MUXes |
| `rtl/scan_chain.sv` | serial-in/parallel-out scan chain, one per tier |
| `rtl/efuse_array.sv` | **behavioural model** of one-time-programmable fuses |
| `rtl/tsv_redundancy_top.sv` | the whole interface: blocks, scan chains, fuse arrays |

Top ports:

* `sig_in` / `sig_out` are `[NUM_BLOCKS][NS]`; `sig_in[b][k]` is signal `k` of
  block `b`.
* `tsv_fail[b][r*COLS+c]` puts a defect on one TSV. It exists only for
  simulation.
* `tx_scan_en/in/out`, `tx_fuse_prog` and the same `rx_*` set program the two
  tiers.

The data path is purely combinational.

## Simulating

Every testbench prints one `TB_RESULT checks=N failures=M` line. It contains a
watchdog that counts a failure if the test hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/tsv_pkg.sv tb/tb_tsv_redundancy_top.sv --top-module tb_tsv_redundancy_top
./obj_dir/Vtb_tsv_redundancy_top
```

| testbench | checks |
|-----------|--------|
| `tb_tsv_redundancy_top` | The full default interface, end to end: defects at the head, at the tail, on a spare, in the middle, two in one block, random; connectivity test, scan loading with cycle count, fuse strobe, repair after reset. Each mechanism is counted. (about 15 s) |
| `tb_tsv_redundancy_styles` | The interface with one spiral, one snake and one hybrid 4x5 block: random single defects found, scanned in, burnt and repaired in 12 fresh stacks. |
| `tb_tsv_block` | Learns each block's chain order from the hardware. Checks the neighbour and head rules for all policies, repairs every single defect, and checks the six-TSV example (position `k` moves in `k+1` of 5 cases). |
| `tb_recovery_rate` | The recovery-rate table above, and the yield. (about 20 s) |
| `tb_shift_probability` | Head versus random placement for chains of 10 to 100 TSVs. |
| `tb_tsv_chain_tx`, `tb_tsv_chain_rx`, `tb_tsv`, `tb_scan_chain`, `tb_efuse_array` | unit tests |

Helpers used by the testbenches: `tsv_block_checker`, `recovery_counter`,
`shift_counter`.

## What is modelled, and what is not

These parts follow the scheme as published: the multiplexer arrangement, one
chain per block, the spare at the tail, one fuse per multiplexer programmed
through a scan chain with blank fuses meaning "no shift", the three chaining
policies, and the sizing analysis.

These are this design's own choices:

* TSV 0 has no sender multiplexer and the spare has none at all. This is the
  minimum the shifting needs. It can also be described as "two multiplexers per
  TSV", which is only approximately true.
* One scan chain and one fuse array per tier, with the fuse order described
  above.
* A one-cycle programming strobe and an asynchronous active-low reset of the scan
  chains.
* Signal transfer in one direction only, from the lower (sender) tier to the
  upper (receiver) tier.
* The grid shape and the exact cell order of each policy.

Not modelled:

* The pair of buffers per TSV that drives the shift wires. They are wires here.
* Any delay, including the extra delay of a shifted signal.
* TSV-to-TSV shorts. A failed TSV is modelled as an open that reads a fixed level
  (`OPEN_VALUE`).
* The fuse macro's electrical programming.
* The post-bond connectivity test.

`tsv` and `efuse_array` are behavioural models. A real implementation replaces
them with the process's TSV/bond-pad cells and its e-fuse macro, using the same
ports except `fail`.
