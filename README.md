# RFSM: a ReRAM CNN accelerator that keeps fused layers analog

In a ReRAM crossbar accelerator, a convolution becomes a matrix-vector product: the input
activations are driven as voltages on the word lines, and the weights sit in the cells as
conductances. The products then add up as currents on the bit lines. What costs time and energy is
not the product but the conversions around it. Every input has to pass a DAC, every output an ADC,
and a conventional design does this once per layer and per crossbar-sized piece of a layer.

RFSM (receptive-field and switch-matrix based accelerator) removes most of those conversions. Up to
three consecutive convolution layers form a **layer group**. Their crossbars are joined by
programmable **switch matrices**, so the analog outputs of one layer drive the word lines of the
next layer directly. Only the group input goes through DACs and only the group output through ADCs.

This only works if one evaluation of the crossbars has, on its word lines, every input value that
the final outputs depend on. So the work is not ordered layer by layer but by **receptive field**:
- The controller computes which square patch of the group input one final output depends on. With
  pooling, the patch belongs to one 2×2 pooling window of outputs.
- It lays out the crossbars so that all intermediate values of that patch exist at the same time as
  analog nodes.
- It then streams one patch after another through the tile.

This repository holds synthesizable SystemVerilog for the digital parts: the controller,
switch-matrix controller, tile pipeline, buffers and host interface. The analog parts (DACs, ADCs,
crossbars with their clippers, and analog max-pooling) are behavioural models that compute what the
analog circuit would settle to.

## Receptive-field geometry of a layer group

A group has an input with `cin` channels and 1 to 3 conv layers, each with a square kernel `k_l`,
stride `s_l` and output channel count `C_l`. Pooling is an optional 2×2 max pooling after the last
layer. Convolutions are unpadded. `rfsm_pkg::group_geom()` works backwards from the output:

```
g_L     = 2 if pooling, else 1          (outputs needed per evaluation, per side)
g_{l-1} = (g_l - 1) * s_l + k_l         (grid of layer l-1 values they depend on)
g_0     = receptive-field side on the group input
J       = s_1 * s_2 * ... * s_L  (* 2 with pooling)   input pixels between neighbouring fields
centre of the first field = ((g_0 - 1) / 2, (g_0 - 1) / 2)
```

Example: two 3×3 stride-1 layers and pooling give g = 2, 4, 6. A 6×6×`cin` patch of the input
produces one pooled output pixel (all of its channels), and neighbouring patches are 2 pixels apart.

Tensors in eDRAM are row-major with channels innermost, at address `base + (y*W + x)*C + c`. The
group output is `OH × OW` with `OH = (H - g_0)/J + 1`. The controller (`rfsm_controller`) computes
the geometry once per group and then issues one job per output position in raster order. A job
carries:
- the eDRAM address of the patch's top-left byte;
- the address where the output pixel goes in the next tile.

## Mapping a group onto crossbars (switch-matrix controller)

This is the core of the design, done by `sm_controller` inside each crossbar array set.

**Logical crossbars.** Layer `l` must produce a `g_l × g_l` grid of outputs at the same time. Each
grid position `(py, px)` is one *logical crossbar* of `k_l²·C_{l-1}` rows by `C_l` columns. Row
`(ky, kx, c)` of position `(py, px)` carries node

```
node = ((py*s_l + ky) * g_{l-1} + (px*s_l + kx)) * C_{l-1} + c
```

of the previous layer. For `l = 1` that node number is the DAC lane, so the DAC lanes hold the patch
in the same order as eDRAM, which is row by row of the patch with channels innermost. Column `o` of
that logical crossbar is output node `(py*g_l + px)*C_l + o` of layer `l`.

**Physical crossbars.** A logical crossbar larger than 128×128 is built from `V × H` physical
crossbars, with `V = ceil(rows/128)` and `H = ceil(C_l/128)`.
- The V crossbars of a column block share joined bit lines, so their currents add, as in one tall
  crossbar.
- The H column blocks sit side by side on the same word-line signals.
- Crossbars are handed out in the order layer, py, px, column block, row block.

For every physical crossbar the switch-matrix status records:
- its role: layer, grid position, column block and number of working columns;
- for each of its 128 word lines, the source: none, a DAC lane, or a node of the previous layer.

**Resource check.** One cycle after `start`, the controller checks that:
- the crossbars needed fit the tile (`NXB`);
- the patch fits the DACs (`g_0²·cin ≤ N_DAC`);
- the output channels fit the ADCs (`C_L ≤ N_ADC`);
- no layer has more than `MAX_NODES` analog nodes.

If any check fails, the controller raises `error`. Otherwise it clears the old status and writes one
word-line entry per cycle. `done` comes `X·128 + 3` cycles after `start` for a group of X
crossbars.

**How the table sizes come out.** The crossbar, DAC and ADC counts of the three tile types match
this mapping:

| Group | Crossbars | DAC lanes |
|---|---|---|
| two 3×3 layers with pooling on a 3-channel image | — | 6·6·3 = 108 |
| two 3×3 512→512 layers with pooling | (16 + 4) positions × 36 row blocks × 4 column blocks = 2880 | 6·6·512 = 18432 |

A 512-channel group uses `16·512 = 8192` nodes in its first layer, which sets `MAX_NODES`.

**Weights.** Programming the weights is the host's job. A weight `w[l][ky][kx][c][o]` goes, for every
grid position of layer `l`, to this place:
- crossbar: the one of row block `r / 128` and column block `o / 128`;
- row: `r mod 128`, where `r = (ky*k + kx)*C_{l-1} + c`;
- column: `o mod 128`.

The function `weight_loc()` in `tb/rfsm_ref_pkg.sv` computes this place and is the reference for the
allocation order. The same weights are stored once per grid position: the design trades crossbar
area for conversions.

## The crossbar array set (behavioural)

`crossbar_array_set` holds:
- the cell weights, signed 8 bit;
- the switch status;
- an instance of `sm_controller`.

During a D-C-A cycle it evaluates the fused layers in order:

```
I[node] = Σ over connected rows of V(row) * W(cell)      (bit lines of stacked crossbars add)
V_l[node] = max(I, 0) >>> shift                          reverse clipper: ReLU + I-to-V gain
out[j]  = clamp(max of the 2x2 window of channel j, 0, 255)   analog max-pool + bidirectional clipper
```

The one gain (`shift`) is shared by all layers of a group and stands for the current-to-voltage
conversion. Analog levels are integers in units of one DAC step: an ideal, noise-free circuit. Signed
cells stand for what a real array would build from column pairs. The model evaluates on the falling
edge of the D-C-A cycle, and the ADCs sample on the next rising edge.

Separate models cover the `dac_bank` (latched 8-bit codes, level = code), `adc_bank` (saturating
8-bit), `analog_maxpool` (4-input max, with bypass when there is no pooling) and
`bidirectional_clipper` (limits to the ADC range). Counters report how often a reverse clipper cut
a negative value and how often an ADC saturated.

## A tile and its pipeline

Each tile (`rfsm_tile`) has:
- a 50 KB eDRAM buffer: 8 byte-interleaved banks, any 8-byte access in one cycle;
- two input buffers (IB0/IB1) and two DA registers (DAR0/DAR1);
- the DACs, the crossbar array set and the ADCs;
- an AD register (ADR) and an output buffer (OB).

A patch moves through seven stages:

| Stage | Moves | Length |
|---|---|---|
| eI | eDRAM → IBk, one patch row at a time | ceil(bytes/8) cycles |
| ID | IBk → DARk | ceil(bytes/8) |
| DD | DARk → DAC latches (DACs shared, lanes in turn) | ceil(bytes/8) |
| D-C-A | DAC → crossbars → ADC | exactly 1 cycle, the cycle after the last DAC latch is loaded |
| AA | ADC latches → ADR | ceil(outputs/8) |
| AO | ADR → OB | ceil(outputs/8) |
| Oe | OB → eDRAM of the next tile | ceil(outputs/8), waits while the target is busy |

Handing a buffer from one stage to the next adds about one cycle. `tile_pipeline_ctrl` runs one small engine per stage. Every buffer has a full flag and carries its
job's output address as a tag. A stage starts when its source is full and its destination empty.
Jobs alternate between the two IB/DAR lanes, so one patch is fetched while the previous one is
converted. Because eI, ID and DD take many cycles for a large patch and D-C-A takes one, the pipeline
is non-linear: the short stages wait, and the controller counts these stall cycles. For an
18432-byte patch the transfer stages need 2304 cycles each, so the D-C-A comes about 6900 cycles
after the job starts.

## Chip, tiles and host interface

`rfsm_top` has:
- one `io_interface`;
- one `rfsm_controller`;
- `NT = 16` tiles.

The tiles form a ring on their data port: the OB of tile `t` writes into the eDRAM of tile `t+1`.
A network therefore runs as a sequence of groups on consecutive tiles. When a tile's eDRAM is
written by the previous tile, that write has priority over the host.

| Tiles | Crossbars | DACs | ADCs |
|---|---|---|---|
| 0 (network input, 3 channels) | 20 | 108 | 64 |
| 1–8 | 1440 | 18432 | 4096 |
| 9–15 | 2880 | 18432 | 4096 |

That is 31,700 crossbars of 128×128 in total. Setting the `ALL_2880` parameter builds the second
chip variant, in which every tile, tile 0 included, has 2880 crossbars, 18432 DACs and 4096 ADCs.

Host commands (`host_cmd_t`, valid/ready handshake; answers on `rsp_valid/rsp_data`):

| Opcode | Action |
|---|---|
| `OP_WR_REG` | write controller register `addr` with `data` |
| `OP_WR_EDRAM` | write `n` bytes to tile `tile`'s eDRAM at `addr` |
| `OP_RD_EDRAM` | read 8 bytes of tile `tile`'s eDRAM at `addr` |
| `OP_WR_WEIGHT` | write `n` cells of row `row` of crossbar `xbar` of tile `tile`, from column `col` |
| `OP_START` | run the configured group |
| `OP_RD_STATUS` | answer `{error, done, busy}` in bits 2:0 |

| Register | Contents |
|---|---|
| 0 `REG_GROUP` | `group_cfg_t` bits 63:0 (layers, pooling, cin, shift, per-layer k/s/cout) |
| 6 `REG_GROUP_HI` | `group_cfg_t` bits above 63 |
| 1 `REG_TILE` | tile that runs the group |
| 2 `REG_IN_BASE` | input tensor base in that tile's eDRAM |
| 3 `REG_OUT_BASE` | output tensor base in the next tile's eDRAM |
| 4 / 5 `REG_IN_H` / `REG_IN_W` | input height and width |
| 7 `REG_CTRL` | bit 0: keep the tile's switch-matrix status (skip the set-up) |

A typical run:
1. Write the input into tile `t`'s eDRAM.
2. Program the crossbar weights of tile `t` with `OP_WR_WEIGHT`, using the mapping above.
3. Write the registers.
4. Start the group.
5. Poll the status until done. To run the same group on the next input, write the new input and
   start again with `REG_CTRL` bit 0 set, so the tile keeps its switch matrices.
6. Continue with the next group on tile `t+1`, whose eDRAM now holds the input.

A group that does not fit its tile, or is larger than its input, ends with `error`.

## What is taken from the source design and what is not

**Taken from the source design:**
- The parts and how they connect: IO interface, controller and tiles. Each tile has an eDRAM buffer,
  two DARs, an ADR, DACs and ADCs, and a crossbar array set. The array set has a switch controller,
  switch matrices, analog max-pooling and clippers.
- Analog transfer between fused layers, with up to three layers per group.
- Geometry computed once per group, and switch matrices set once before the patches stream.
- The stage names and order, the two IB/DAR lanes, and the one-cycle D-C-A.
- The sizes: 50 KB eDRAM, 8-bit DAC/ADC/cells, 128×128 crossbars, 20/1440/2880 crossbars,
  108/18432 DACs, 64 to 4096 ADCs, 16 tiles.

**Own choices of this implementation:**
- The crossbar allocation and node numbering.
- Unpadded convolution, raster job order and the eDRAM tensor layout.
- The 8-byte transfer width and the eDRAM banking.
- The ring between tiles.
- Which tile positions get which type. The 8/7 split between the 1440- and 2880-crossbar tiles is
  chosen so that the total is close to the compute of two reference chips.
- The register map and host command set.
- The integer models of the analog parts, and the single shift as the clipper gain.

**Not built:**
- Fully connected layers. A VGG FC6 layer would need 6272 crossbars, more than any tile holds.
- Multi-chip systems and tile counts above 16: the tile field is 4 bits.
- Analog noise and device non-idealities.
- A single broadcast that configures every tile at once. Here each tile is set up when its group
  is first started, which costs `X·128 + 3` cycles. Setting `REG_CTRL` bit 0 makes later runs of
  the same group skip the set-up, so each tile is configured once for a stream of images or stripes.
  In the full-size test, a rerun of the tile-0 group takes 147 cycles instead of 2712.
- Feature maps larger than one tile's eDRAM, such as a full 224×224 image. The host has to cut them
  into stripes, running a group on a sub-image with its own `REG_IN_BASE`/`REG_IN_H`/`REG_IN_W`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. The packages have to
come first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/rfsm_pkg.sv tb/rfsm_ref_pkg.sv tb/tb_rfsm_top.sv --top-module tb_rfsm_top
./obj_dir/Vtb_rfsm_top
```

| Testbench | What it runs |
|---|---|
| `tb_<block>` | one block each, against independently computed values (reference convolution, pooling and clipping in `rfsm_ref_pkg`) |
| `tb_rfsm_top` | the full-size chip (16 tiles, default parameters), end to end through the host port |
| `tb_rfsm_top_all2880` | the all-2880 variant (two tiles): tile 0 runs the fused first VGG block (3→64→64 with pooling), which needs 36 crossbars and so cannot be fused on the default tile 0 |
| `tb_workload_vgg_conv5` | VGG layer groups on full-size tiles: one receptive field of a conv5 group on a 2880-crossbar tile, and the first VGG-11 block on a 16×16 crop on the tile-0 type |

`tb_rfsm_top` runs two groups:
- On tile 0: an 8×8×3 input, two 3×3 layers (3→4→36) with pooling. This uses all 20 crossbars and
  all 108 DACs.
- On tile 1: a 2×2 36→130 layer that needs 2×2 physical crossbars per position. Its result lands in
  tile 2.

Both results are read back through the host port and compared exactly. Group A then runs again on
a second image with the switch-matrix status kept. The test also checks that an oversized group is
refused, and that stalls, both lanes, multi-cycle transfers, clipping and ADC
saturation each occurred. It needs about 0.5 GB and about 15 seconds.

`tb_workload_vgg_conv5` covers two 3×3 512→512 layers with pooling. That group uses exactly 2880
crossbars and 18432 DAC lanes, and the test compares all 512 outputs with a direct computation.
Its weights are placed directly into the cells of the crossbar model; through the 8-cell weight port
they would take 5.9 million cycles. The second part programs tile 0 through its weight port, with
3×3 conv 3→64 and pooling. It issues 49 jobs for a 7×7 pooled output and compares all 3136 bytes.

Block testbenches scale the crossbars down to 8×8 through parameters, so the mapping is exercised
with many row and column blocks.

## Parameters

| Where | Parameter | Default | Meaning |
|---|---|---|---|
| `rfsm_pkg` | `NUM_TILES`, `XB_ROWS`, `XB_COLS`, `EDRAM_BYTES`, `BUS`, `MAX_LAYERS` | 16, 128, 128, 51200, 8, 3 | chip-wide sizes |
| `rfsm_pkg` | `tile_nxb/ndac/nadc()` | — | tile types by position |
| `rfsm_top` | `NT` | 16 | number of tiles |
| `rfsm_top` | `ALL_2880` | 0 | 1 builds the chip variant in which every tile has 2880 crossbars, 18432 DACs, 4096 ADCs |
| `rfsm_top` | `XB_SCALE` | 1 | divides the crossbar/DAC/ADC counts of tiles 1..NT-1 for small simulations |
| `rfsm_tile`, `crossbar_array_set` | `NXB`, `N_DAC`, `N_ADC`, `MAX_NODES` | per type, `MAX_NODES = 8192` | sizes of one tile |

At the full size, the weight memories of the behavioural crossbar models take about 0.5 GB in
simulation (31,700 × 16 KB).
