// edram_buffer: the tile's 50 KB eDRAM buffer.
//
// It holds the feature maps a tile reads and the outputs the previous tile
// sends it. The memory is split into BUS byte-wide banks interleaved on the
// low address bits, so one access reaches BUS consecutive bytes starting at
// any byte address: lane i of an access is byte addr+i, which lives in bank
// (addr+i) mod BUS. One write port (wr_n lanes, synchronous) and one read
// port (BUS lanes, data valid the cycle after rd_en, held otherwise). Size
// and role follow the design; the banked organisation, the bus width and
// the one-cycle read latency are this implementation's choices. Lanes past
// the end of the memory are dropped on write and read as zero.
module edram_buffer
  import rfsm_pkg::*;
#(
  parameter int unsigned BYTES = EDRAM_BYTES,
  localparam int unsigned ROWS = (BYTES + BUS - 1) / BUS,
  localparam int unsigned LB   = $clog2(BUS)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  bus_n_t            wr_n,
  input  bus_t              wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output bus_t              rd_data
);
  logic [LB-1:0]   rd_rot_q;
  logic [BUS-1:0]  rd_ok_q;
  bus_t            bank_q;

  for (genvar b = 0; b < BUS; b++) begin : g_bank
    byte_t mem [ROWS];
    // lane that maps to this bank, and the bank row it addresses
    logic [LB-1:0]   wl, rl;
    logic [ADDR_W:0] wa, ra;
    always_comb begin
      wl = LB'(b) - wr_addr[LB-1:0];
      rl = LB'(b) - rd_addr[LB-1:0];
      wa = ({1'b0, wr_addr} + (ADDR_W+1)'(wl)) >> LB;
      ra = ({1'b0, rd_addr} + (ADDR_W+1)'(rl)) >> LB;
    end
    always_ff @(posedge clk) begin
      if (wr_en && (32'(wl) < 32'(wr_n)) && (32'(wa) < ROWS)) mem[wa[ADDR_W-1:0]] <= wr_data[wl];
      if (rd_en) begin
        bank_q[b] <= (32'(ra) < ROWS) ? mem[ra[ADDR_W-1:0]] : '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      rd_rot_q <= rd_addr[LB-1:0];
      for (int i = 0; i < BUS; i++) rd_ok_q[i] <= (32'(rd_addr) + 32'(i)) < BYTES;
    end
  end

  // lane i comes from bank (rot + i) mod BUS
  always_comb begin
    for (int i = 0; i < BUS; i++) begin
      rd_data[i] = rd_ok_q[i] ? bank_q[LB'(rd_rot_q + LB'(i))] : '0;
    end
  end
endmodule
