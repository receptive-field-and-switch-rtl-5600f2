// lane_buffer: byte-addressed staging buffer used for a tile's input
// buffers (IB0/IB1), digital-to-analog registers (DAR0/DAR1), analog-to-
// digital register (ADR) and output buffer (OB).
//
// Each of these holds one receptive field's input vector or one output
// vector and is filled and drained BUS bytes per cycle, so a transfer of
// n bytes takes ceil(n/BUS) cycles. Writes are synchronous (wr_n lanes from
// wr_off); the read is combinational (BUS lanes from rd_off, lanes past
// DEPTH read as zero) so a copy between two buffers moves BUS bytes in one
// cycle. The buffers' roles come from the design; their byte-lane ports
// and flop-array implementation are this implementation's choice. Nothing is
// reset: a buffer is always written before it is read.
module lane_buffer
  import rfsm_pkg::*;
#(
  parameter int unsigned DEPTH = 108,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH + BUS) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_off,
  input  bus_n_t        wr_n,
  input  bus_t          wr_data,
  input  logic [AW-1:0] rd_off,
  output bus_t          rd_data
);
  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int i = 0; i < BUS; i++) begin
        if (i < int'(wr_n) && (int'(wr_off) + i) < DEPTH) mem[int'(wr_off) + i] <= wr_data[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < BUS; i++) begin
      rd_data[i] = ((int'(rd_off) + i) < DEPTH) ? mem[int'(rd_off) + i] : '0;
    end
  end
endmodule
