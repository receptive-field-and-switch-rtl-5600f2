// rfsm_top: the RFSM chip.
//
// A host-facing IO interface, one controller and NT computation tiles. The
// tiles form a ring on their digital data port: the output buffer of tile t
// writes into the eDRAM buffer of tile t+1 (the last tile into tile 0), so a
// network is run as a sequence of layer groups, group i on tile t and group
// i+1 on tile t+1. Inside a tile, each group's fused layers are computed in
// the analog domain without intermediate conversions. The controller
// broadcasts the group configuration and transfer sizes to all tiles and
// talks to the one selected by tile_sel.
//
// Tile types follow the design's parameter table (tile 0: 20 crossbars,
// 108 DACs, 64 ADCs; the others 1440 or 2880 crossbars, 18432 DACs, 4096
// ADCs); which tile gets which type is set by rfsm_pkg::tile_nxb() and is
// this implementation's choice, as are the ring and the host command set.
// The parameters NT and XB_SCALE exist to simulate a reduced chip: XB_SCALE
// divides the crossbar, DAC and ADC counts of tiles 1..NT-1 (defaults give
// the full chip). ALL_2880 builds the design's second chip variant, in
// which every tile has 2880 crossbars, 18432 DACs and 4096 ADCs.
//
// Ports: host commands (see io_interface), controller status and receptive-
// field geometry, and per-tile activity counters (D-C-A operations, pipeline
// stall cycles, jobs through the second IB/DAR lane, multi-cycle transfers,
// reverse-clipper cut-offs).
module rfsm_top
  import rfsm_pkg::*;
#(
  parameter int unsigned NT       = NUM_TILES,
  parameter int unsigned XB_SCALE = 1,
  parameter bit          ALL_2880 = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  host_cmd_t    cmd,
  output logic         cmd_ready,
  output logic         rsp_valid,
  output logic [63:0]  rsp_data,
  output logic         busy,
  output logic         done,
  output logic         error,
  output logic [7:0]   rf_size,
  output logic [7:0]   rf_stride,
  output logic [7:0]   rf_center,
  output logic [31:0]  n_dca   [NT],
  output logic [31:0]  n_stall [NT],
  output logic [31:0]  n_lane1 [NT],
  output logic [31:0]  n_multi [NT],
  output logic [31:0]  n_clip  [NT]
);
  // ------------------------------------------------------------ controller
  logic        reg_we, start;
  logic [3:0]  reg_addr;
  logic [63:0] reg_data;
  group_cfg_t  cfg;
  tile_xfer_t  xfer;
  logic [3:0]  tile_sel;
  logic        sm_start, sel_sm_done, sel_sm_error, job_valid, sel_job_ready, sel_idle;
  job_t        job;

  rfsm_controller u_ctrl (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_data, .start, .busy, .done, .error,
    .rf_size, .rf_stride, .rf_center,
    .cfg, .xfer, .tile_sel, .sm_start, .sm_done(sel_sm_done), .sm_error(sel_sm_error),
    .job_valid, .job, .job_ready(sel_job_ready), .tile_idle(sel_idle)
  );

  // ------------------------------------------------------------ IO interface
  logic [NT-1:0] w_we, h_wr_valid, h_wr_ready, h_rd_valid, h_rd_ready, h_rd_rvalid;
  bus_t          h_rd_data [NT];

  io_interface #(.NT(NT)) u_io (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .rsp_valid, .rsp_data,
    .reg_we, .reg_addr, .reg_data, .start, .ctrl_busy(busy), .ctrl_done(done), .ctrl_error(error),
    .w_we, .h_wr_valid, .h_wr_ready, .h_rd_valid, .h_rd_ready, .h_rd_rvalid, .h_rd_data
  );

  // ------------------------------------------------------------ tiles
  logic [NT-1:0]     sm_done_t, sm_error_t, sm_busy_t, job_ready_t, idle_t, oe_valid_t;
  logic [ADDR_W-1:0] oe_addr_t [NT];
  bus_n_t            oe_n_t    [NT];
  bus_t              oe_data_t [NT];

  for (genvar t = 0; t < NT; t++) begin : g_tile
    localparam int unsigned SC = (t == 0) ? 1 : XB_SCALE;
    localparam int unsigned P  = (t == 0) ? NT - 1 : t - 1;   // previous tile on the ring
    rfsm_tile #(
      .NXB(tile_nxb(t, ALL_2880) / SC), .N_DAC(tile_ndac(t, ALL_2880) / SC), .N_ADC(tile_nadc(t, ALL_2880) / SC)
    ) u_tile (
      .clk, .rst_n, .cfg, .xfer,
      .sm_start(sm_start && tile_sel == 4'(t)),
      .sm_busy(sm_busy_t[t]), .sm_done(sm_done_t[t]), .sm_error(sm_error_t[t]),
      .job_valid(job_valid && tile_sel == 4'(t)), .job, .job_ready(job_ready_t[t]),
      .w_we(w_we[t]), .w_xbar(cmd.xbar), .w_row(cmd.row), .w_col(cmd.col), .w_n(cmd.n), .w_data(cmd.data),
      .h_wr_valid(h_wr_valid[t]), .h_wr_addr(cmd.addr), .h_wr_n(cmd.n), .h_wr_data(cmd.data),
      .h_wr_ready(h_wr_ready[t]),
      .h_rd_valid(h_rd_valid[t]), .h_rd_addr(cmd.addr), .h_rd_ready(h_rd_ready[t]),
      .h_rd_rvalid(h_rd_rvalid[t]), .h_rd_data(h_rd_data[t]),
      .in_wr_valid(oe_valid_t[P]), .in_wr_addr(oe_addr_t[P]), .in_wr_n(oe_n_t[P]), .in_wr_data(oe_data_t[P]),
      .oe_valid(oe_valid_t[t]), .oe_addr(oe_addr_t[t]), .oe_n(oe_n_t[t]), .oe_data(oe_data_t[t]),
      .oe_ready(1'b1),
      .idle(idle_t[t]), .n_dca(n_dca[t]), .n_stall(n_stall[t]), .n_lane1(n_lane1[t]),
      .n_multi(n_multi[t]), .n_clip(n_clip[t])
    );
  end

  always_comb begin
    sel_sm_done   = 1'b0;
    sel_sm_error  = 1'b0;
    sel_job_ready = 1'b0;
    sel_idle      = 1'b1;
    for (int t = 0; t < NT; t++) begin
      if (tile_sel == 4'(t)) begin
        sel_sm_done   = sm_done_t[t];
        sel_sm_error  = sm_error_t[t];
        sel_job_ready = job_ready_t[t];
        sel_idle      = idle_t[t];
      end
    end
  end
endmodule
