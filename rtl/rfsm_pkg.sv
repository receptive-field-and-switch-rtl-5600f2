// rfsm_pkg: constants, types and geometry functions shared by the RFSM
// accelerator.
//
// The accelerator fuses up to MAX_LAYERS convolution layers (a "layer
// group") into one pass through a tile's crossbar array set: the analog
// column outputs of one layer's crossbars feed the rows of the next layer's
// crossbars directly, so only the group's input is converted by DACs and only
// its output by ADCs. The geometry of such a group follows from receptive
// fields: one final output (or one 2x2 pooling window of them) depends on a
// square patch of the group's input whose side is computed by group_geom().
//
// Numbers from the design's published parameter table: 16 tiles, 50 KB
// eDRAM per tile, 8-bit DACs/ADCs, 128x128 crossbars with 8-bit cells,
// tile types with 20, 1440 and 2880 crossbars, 108 or 18432 DACs and 64 to
// 4096 ADCs. The assignment of tile types to tile positions, the byte-lane
// bus width and all encodings here are this implementation's own choices.
package rfsm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_TILES   = 16;
  localparam int unsigned DATA_W      = 8;       // DAC / ADC / cell resolution
  localparam int unsigned XB_ROWS     = 128;
  localparam int unsigned XB_COLS     = 128;
  localparam int unsigned EDRAM_BYTES = 51200;   // 50 KB
  localparam int unsigned BUS         = 8;       // bytes moved per cycle per transfer
  localparam int unsigned MAX_LAYERS  = 3;       // layers fused without conversion
  localparam int unsigned ADDR_W      = 16;      // eDRAM byte address
  localparam int unsigned XB_IDX_W    = 12;      // crossbar index (up to 4096)
  localparam int unsigned NODE_W      = 16;      // analog node / DAC lane index
  localparam int unsigned CH_W        = 10;      // channel count (up to 1023)

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [BUS-1:0][DATA_W-1:0] bus_t;      // lane i = byte at addr+i
  typedef logic [$clog2(BUS+1)-1:0] bus_n_t;     // number of valid lanes

  // Behavioural stand-in for an analog quantity (voltage or current),
  // in units of one DAC LSB.
  typedef int signed analog_t;

  // ---------------------------------------------------------- tile types
  // Tile 0 takes the 3-channel network input (20 crossbars); tiles 1..8 have
  // 1440 crossbars and tiles 9..15 have 2880, which brings the chip to
  // 31700 crossbars, about as many as two 168x96-crossbar reference chips.
  // With all_2880 set every tile is of the largest type (the all-2880 chip
  // variant).
  function automatic int unsigned tile_nxb(int unsigned t, bit all_2880 = 1'b0);
    return all_2880 ? 2880 : (t == 0) ? 20 : (t <= 8) ? 1440 : 2880;
  endfunction
  function automatic int unsigned tile_ndac(int unsigned t, bit all_2880 = 1'b0);
    return (t == 0 && !all_2880) ? 108 : 18432;
  endfunction
  function automatic int unsigned tile_nadc(int unsigned t, bit all_2880 = 1'b0);
    return (t == 0 && !all_2880) ? 64 : 4096;
  endfunction

  // ------------------------------------------------------- configuration
  typedef struct packed {
    logic [3:0]      k;      // square kernel side
    logic [2:0]      s;      // stride
    logic [CH_W-1:0] cout;   // output channels
  } layer_cfg_t;

  // One fused layer group: input channels, 1..3 conv layers, optional 2x2
  // max pooling of the last layer, and the current-to-voltage gain of the
  // clippers (a right shift).
  typedef struct packed {
    logic [1:0]                       nlayers;
    logic                             pool;
    logic [CH_W-1:0]                  cin;
    logic [4:0]                       shift;
    layer_cfg_t [MAX_LAYERS-1:0]      layer;
  } group_cfg_t;

  // Per-layer geometry of a group (index 0 = group input).
  typedef struct packed {
    logic [MAX_LAYERS:0][7:0]          g;      // side of the position grid of each layer
    logic [MAX_LAYERS:0][CH_W-1:0]     ch;     // channels of each layer
    logic [7:0]                        jump;   // input-pixel step between adjacent group outputs
  } group_geom_t;

  // g[L] = 2 with pooling (one 2x2 window) else 1; g[l-1] = (g[l]-1)*s[l] + k[l].
  function automatic group_geom_t group_geom(group_cfg_t c);
    group_geom_t r;
    int unsigned gl, j;
    r = '0;
    gl = c.pool ? 2 : 1;
    j  = c.pool ? 2 : 1;
    r.ch[0] = c.cin;
    for (int l = MAX_LAYERS; l >= 1; l--) begin
      if (l <= int'(c.nlayers)) begin
        r.g[l]  = 8'(gl);
        r.ch[l] = c.layer[l-1].cout;
        gl = (gl - 1) * c.layer[l-1].s + c.layer[l-1].k;
        j  = j * c.layer[l-1].s;
      end
    end
    r.g[0] = 8'(gl);
    r.jump = 8'(j);
    return r;
  endfunction

  // ------------------------------------------------- switch-matrix status
  typedef enum logic [1:0] {SRC_NONE = 2'd0, SRC_DAC = 2'd1, SRC_NODE = 2'd2} src_kind_e;

  // Connection of one crossbar row (word line).
  typedef struct packed {
    src_kind_e         kind;
    logic [NODE_W-1:0] idx;    // DAC lane, or node of the previous layer
  } route_t;

  // Role of one physical crossbar.
  typedef struct packed {
    logic            valid;
    logic [1:0]      layer;    // 1..3
    logic [7:0]      pos;      // position in the layer's grid
    logic [3:0]      hblk;     // column block (output channels hblk*XB_COLS..)
    logic [7:0]      ncols;    // working columns
  } xbar_cfg_t;

  // ------------------------------------------------------------ host side
  typedef enum logic [2:0] {
    OP_NOP = 3'd0, OP_WR_REG = 3'd1, OP_WR_EDRAM = 3'd2, OP_RD_EDRAM = 3'd3,
    OP_WR_WEIGHT = 3'd4, OP_START = 3'd5, OP_RD_STATUS = 3'd6
  } host_op_e;

  // Controller register map (OP_WR_REG addresses).
  localparam logic [3:0] REG_GROUP    = 4'd0;  // group_cfg_t bits 63:0
  localparam logic [3:0] REG_TILE     = 4'd1;  // tile running the group
  localparam logic [3:0] REG_IN_BASE  = 4'd2;  // input tensor base in that tile's eDRAM
  localparam logic [3:0] REG_OUT_BASE = 4'd3;  // output base in the next tile's eDRAM
  localparam logic [3:0] REG_IN_H     = 4'd4;  // input height
  localparam logic [3:0] REG_IN_W     = 4'd5;  // input width
  localparam logic [3:0] REG_GROUP_HI = 4'd6;  // group_cfg_t bits above 63
  localparam logic [3:0] REG_CTRL     = 4'd7;  // bit 0: keep the tile's switch-matrix status

  typedef struct packed {
    host_op_e               op;
    logic [3:0]             tile;
    logic [XB_IDX_W-1:0]    xbar;
    logic [6:0]             row;
    logic [6:0]             col;
    logic [ADDR_W-1:0]      addr;   // eDRAM byte address or register number
    bus_n_t                 n;      // valid lanes of data
    bus_t                   data;
  } host_cmd_t;

  // Tile transfer configuration sent by the controller with a group.
  typedef struct packed {
    logic [7:0]         rows;       // receptive-field rows to fetch
    logic [ADDR_W-1:0]  row_len;    // bytes per receptive-field row (g0*cin)
    logic [ADDR_W-1:0]  row_stride; // bytes between input rows (W*cin)
    logic [ADDR_W-1:0]  in_len;     // bytes per receptive field (g0*g0*cin)
    logic [ADDR_W-1:0]  out_len;    // bytes per output (channels of last layer)
  } tile_xfer_t;

  // One receptive field to process.
  typedef struct packed {
    logic [ADDR_W-1:0] in_addr;     // top-left of the receptive field
    logic [ADDR_W-1:0] out_addr;    // where the output goes in the next tile
  } job_t;

  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
