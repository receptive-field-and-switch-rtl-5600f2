// io_interface: the host port of the RFSM chip.
//
// The host sends one command per handshake (cmd_valid/cmd_ready, fields in
// rfsm_pkg::host_cmd_t) and reads answers on rsp_valid/rsp_data:
//   OP_WR_REG     write a controller register (addr = register number)
//   OP_WR_EDRAM   write n bytes into tile `tile`'s eDRAM at addr
//   OP_RD_EDRAM   read BUS bytes of tile `tile`'s eDRAM at addr (answer follows)
//   OP_WR_WEIGHT  program n cells of row `row` of crossbar `xbar` in tile
//                 `tile`, starting at column `col`
//   OP_START      start the controller on the configured layer group
//   OP_RD_STATUS  answer {error, done-since-last-start, busy} in bits 2:0
// A command waits (cmd_ready low) while its target cannot take it: an eDRAM
// write while the previous tile writes that eDRAM, a read while the tile
// fetches, a start or register write while the controller is busy. A read
// answer arrives the cycle after the tile returns the data. The document
// only names this block; the command set and handshake are this
// implementation's own.
module io_interface
  import rfsm_pkg::*;
#(
  parameter int unsigned NT = NUM_TILES
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              cmd_valid,
  input  host_cmd_t         cmd,
  output logic              cmd_ready,
  output logic              rsp_valid,
  output logic [63:0]       rsp_data,
  // controller
  output logic              reg_we,
  output logic [3:0]        reg_addr,
  output logic [63:0]       reg_data,
  output logic              start,
  input  logic              ctrl_busy,
  input  logic              ctrl_done,
  input  logic              ctrl_error,
  // tiles
  output logic [NT-1:0]     w_we,
  output logic [NT-1:0]     h_wr_valid,
  input  logic [NT-1:0]     h_wr_ready,
  output logic [NT-1:0]     h_rd_valid,
  input  logic [NT-1:0]     h_rd_ready,
  input  logic [NT-1:0]     h_rd_rvalid,
  input  bus_t              h_rd_data [NT]
);
  logic done_seen_q;
  logic tile_ok;
  assign tile_ok = 32'(cmd.tile) < NT;

  always_comb begin
    reg_we     = 1'b0;
    start      = 1'b0;
    w_we       = '0;
    h_wr_valid = '0;
    h_rd_valid = '0;
    cmd_ready  = 1'b1;
    reg_addr   = cmd.addr[3:0];
    reg_data   = cmd.data;
    if (cmd_valid) begin
      unique case (cmd.op)
        OP_WR_REG: begin
          cmd_ready = !ctrl_busy;
          reg_we    = !ctrl_busy;
        end
        OP_WR_EDRAM: if (tile_ok) begin
          h_wr_valid[cmd.tile] = 1'b1;
          cmd_ready = h_wr_ready[cmd.tile];
        end
        OP_RD_EDRAM: if (tile_ok) begin
          h_rd_valid[cmd.tile] = 1'b1;
          cmd_ready = h_rd_ready[cmd.tile];
        end
        OP_WR_WEIGHT: if (tile_ok) w_we[cmd.tile] = 1'b1;
        OP_START: begin
          cmd_ready = !ctrl_busy;
          start     = !ctrl_busy;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_seen_q <= 1'b0;
      rsp_valid   <= 1'b0;
      rsp_data    <= '0;
    end else begin
      if (start) done_seen_q <= 1'b0;
      else if (ctrl_done) done_seen_q <= 1'b1;
      rsp_valid <= 1'b0;
      for (int t = 0; t < NT; t++) begin
        if (h_rd_rvalid[t]) begin
          rsp_valid <= 1'b1;
          rsp_data  <= h_rd_data[t];
        end
      end
      if (cmd_valid && cmd.op == OP_RD_STATUS) begin
        rsp_valid <= 1'b1;
        rsp_data  <= {61'd0, ctrl_error, done_seen_q, ctrl_busy};
      end
    end
  end
endmodule
