// rfsm_controller: the chip controller of RFSM.
//
// For one layer group it (1) works out the receptive field of a group
// output on the group input: its side g0, its stride J (input pixels
// between neighbouring outputs) and the centre of the first one; (2) has the
// selected tile's switch-matrix controller configure the crossbar array set
// (sm_start, wait for sm_done); (3) sends the tile one job per receptive
// field, in raster order of the outputs, with the address of the field's
// top-left byte in the tile's eDRAM and the address its output takes in
// the next tile's eDRAM; (4) waits until the tile has drained and pulses
// `done`. Tensors are stored row-major with channels innermost
// (address = base + (y*W + x)*C + c) and convolutions are unpadded, so the
// group output is OH x OW with OH = (H - g0)/J + 1.
//
// Interface: registers are written with reg_we/reg_addr/reg_data (map in
// rfsm_pkg), `start` begins a group, busy/done/error report it. Towards the
// tiles: a broadcast group configuration and transfer sizes, tile_sel, and
// per-group sm_start/sm_done and job handshakes with the selected tile.
// With bit 0 of REG_CTRL set, step (2) is skipped: the tile keeps the
// switch-matrix status of its last set-up, so a group configured once can
// be run again on new input (the next image or stripe) without set-up.
// The document gives the controller's tasks (geometry once per network,
// switch-matrix configuration, reading one receptive field after another);
// the register map, the keep-status bit, the memory layout, raster job
// order and the unpadded convolution are this implementation's choices.
module rfsm_controller
  import rfsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we,
  input  logic [3:0]        reg_addr,
  input  logic [63:0]       reg_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              error,
  // receptive-field geometry of the current group
  output logic [7:0]        rf_size,
  output logic [7:0]        rf_stride,
  output logic [7:0]        rf_center,
  // to the tiles
  output group_cfg_t        cfg,
  output tile_xfer_t        xfer,
  output logic [3:0]        tile_sel,
  output logic              sm_start,
  input  logic              sm_done,
  input  logic              sm_error,
  output logic              job_valid,
  output job_t              job,
  input  logic              job_ready,
  input  logic              tile_idle
);
  typedef enum logic [2:0] {S_IDLE, S_GEOM, S_SM, S_SMWAIT, S_ISSUE, S_DRAIN, S_DONE} state_e;
  state_e state_q;

  logic [ADDR_W-1:0] in_base_q, out_base_q;
  logic [7:0]        in_h_q, in_w_q;
  logic              keep_sm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0; tile_sel <= '0; in_base_q <= '0; out_base_q <= '0; in_h_q <= '0; in_w_q <= '0;
      keep_sm_q <= 1'b0;
    end else if (reg_we && !busy) begin
      unique case (reg_addr)
        REG_GROUP:    cfg[63:0] <= reg_data;
        REG_GROUP_HI: cfg[$bits(group_cfg_t)-1:64] <= reg_data[$bits(group_cfg_t)-65:0];
        REG_TILE:     tile_sel <= reg_data[3:0];
        REG_IN_BASE:  in_base_q <= reg_data[ADDR_W-1:0];
        REG_OUT_BASE: out_base_q <= reg_data[ADDR_W-1:0];
        REG_IN_H:     in_h_q <= reg_data[7:0];
        REG_IN_W:     in_w_q <= reg_data[7:0];
        REG_CTRL:     keep_sm_q <= reg_data[0];
        default: ;
      endcase
    end
  end

  // geometry
  group_geom_t geo;
  logic [CH_W-1:0] c_last;
  assign geo    = group_geom(cfg);
  assign c_last = geo.ch[cfg.nlayers];

  logic [7:0]        oh_q, ow_q, oy_q, ox_q;
  logic [ADDR_W-1:0] row_addr_q, in_addr_q, out_addr_q;
  logic [ADDR_W-1:0] rf_step_x_q, rf_step_y_q;

  assign busy      = (state_q != S_IDLE);
  assign sm_start  = (state_q == S_SM);
  assign job_valid = (state_q == S_ISSUE);
  assign job.in_addr  = in_addr_q;
  assign job.out_addr = out_addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done <= 1'b0; error <= 1'b0;
      {oh_q, ow_q, oy_q, ox_q} <= '0;
      {row_addr_q, in_addr_q, out_addr_q, rf_step_x_q, rf_step_y_q} <= '0;
      xfer <= '0; rf_size <= '0; rf_stride <= '0; rf_center <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          error   <= 1'b0;
          state_q <= S_GEOM;
        end
        S_GEOM: begin
          rf_size   <= geo.g[0];
          rf_stride <= geo.jump;
          rf_center <= (geo.g[0] - 8'd1) >> 1;
          if (geo.g[0] > in_h_q || geo.g[0] > in_w_q || geo.jump == 0) begin
            error   <= 1'b1;
            state_q <= S_DONE;
          end else begin
            oh_q <= 8'((in_h_q - geo.g[0]) / geo.jump + 8'd1);
            ow_q <= 8'((in_w_q - geo.g[0]) / geo.jump + 8'd1);
            xfer.rows       <= geo.g[0];
            xfer.row_len    <= ADDR_W'(32'(geo.g[0]) * 32'(cfg.cin));
            xfer.row_stride <= ADDR_W'(32'(in_w_q) * 32'(cfg.cin));
            xfer.in_len     <= ADDR_W'(32'(geo.g[0]) * 32'(geo.g[0]) * 32'(cfg.cin));
            xfer.out_len    <= ADDR_W'(c_last);
            rf_step_x_q     <= ADDR_W'(32'(geo.jump) * 32'(cfg.cin));
            rf_step_y_q     <= ADDR_W'(32'(geo.jump) * 32'(in_w_q) * 32'(cfg.cin));
            row_addr_q <= in_base_q;
            in_addr_q  <= in_base_q;
            out_addr_q <= out_base_q;
            oy_q <= '0; ox_q <= '0;
            state_q <= keep_sm_q ? S_ISSUE : S_SM;
          end
        end
        S_SM: state_q <= S_SMWAIT;
        S_SMWAIT: if (sm_done) begin
          if (sm_error) begin
            error   <= 1'b1;
            state_q <= S_DONE;
          end else state_q <= S_ISSUE;
        end
        S_ISSUE: if (job_ready) begin
          out_addr_q <= out_addr_q + ADDR_W'(c_last);
          if (ox_q + 8'd1 == ow_q) begin
            ox_q <= '0;
            row_addr_q <= row_addr_q + rf_step_y_q;
            in_addr_q  <= row_addr_q + rf_step_y_q;
            if (oy_q + 8'd1 == oh_q) state_q <= S_DRAIN;
            else oy_q <= oy_q + 8'd1;
          end else begin
            ox_q      <= ox_q + 8'd1;
            in_addr_q <= in_addr_q + rf_step_x_q;
          end
        end
        S_DRAIN: if (tile_idle) state_q <= S_DONE;
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
