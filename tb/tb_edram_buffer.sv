// tb_edram_buffer: random unaligned writes of 1..BUS bytes and unaligned
// BUS-byte reads against a byte-array model of a small eDRAM; checks the
// one-cycle read latency and that lanes past the end read as zero.
module tb_edram_buffer;
  import rfsm_pkg::*;
  localparam int BYTES = 203;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  bus_n_t wr_n = '0;
  bus_t wr_data = '0, rd_data;
  byte_t model [BYTES];
  int checks = 0, failures = 0;

  edram_buffer #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < BYTES; a += BUS) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 16'(a); wr_n = bus_n_t'(BUS);
      for (int i = 0; i < BUS; i++) begin
        wr_data[i] = 8'($urandom);
        if (a + i < BYTES) model[a + i] = wr_data[i];
      end
    end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(0, 1) == 1);
      wr_addr = 16'($urandom_range(0, BYTES - 1));
      wr_n    = bus_n_t'($urandom_range(1, BUS));
      for (int i = 0; i < BUS; i++) wr_data[i] = 8'($urandom);
      if (wr_en)
        for (int i = 0; i < int'(wr_n); i++) if (int'(wr_addr) + i < BYTES) model[int'(wr_addr) + i] = wr_data[i];
      @(negedge clk);
      wr_en = 0;
      rd_en = 1;
      rd_addr = 16'($urandom_range(0, BYTES - 1));
      @(negedge clk);
      rd_en = 0;
      for (int i = 0; i < BUS; i++) begin
        checks++;
        if (rd_data[i] != ((int'(rd_addr) + i < BYTES) ? model[int'(rd_addr) + i] : 8'h00)) begin
          failures++;
          $display("FAIL addr %0d lane %0d: %h", rd_addr, i, rd_data[i]);
        end
      end
      // data holds while rd_en is low
      @(negedge clk);
      checks++;
      if (rd_data[0] != ((int'(rd_addr) < BYTES) ? model[int'(rd_addr)] : 8'h00)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
