// tb_lane_buffer: writes random bytes into a lane_buffer in chunks of
// random length and offset, compares every combinational read with a
// byte-array model, and checks that lanes past the depth read as zero.
module tb_lane_buffer;
  import rfsm_pkg::*;
  localparam int DEPTH = 37;
  localparam int AW = $clog2(DEPTH + BUS);
  logic clk = 0, wr_en = 0;
  logic [AW-1:0] wr_off = '0, rd_off = '0;
  bus_n_t wr_n = '0;
  bus_t wr_data = '0, rd_data;
  byte_t model [DEPTH];
  int checks = 0, failures = 0;

  lane_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill once so every byte is known
    for (int a = 0; a < DEPTH; a += BUS) begin
      @(negedge clk);
      wr_en = 1; wr_off = AW'(a); wr_n = bus_n_t'(BUS);
      for (int i = 0; i < BUS; i++) begin
        wr_data[i] = 8'($urandom);
        if (a + i < DEPTH) model[a + i] = wr_data[i];
      end
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(0, 1) == 1);
      wr_off = AW'($urandom_range(0, DEPTH - 1));
      wr_n   = bus_n_t'($urandom_range(1, BUS));
      for (int i = 0; i < BUS; i++) wr_data[i] = 8'($urandom);
      if (wr_en)
        for (int i = 0; i < int'(wr_n); i++) if (int'(wr_off) + i < DEPTH) model[int'(wr_off) + i] = wr_data[i];
      @(posedge clk);
      #1;
      wr_en = 0;
      rd_off = AW'($urandom_range(0, DEPTH - 1));
      #1;
      for (int i = 0; i < BUS; i++) begin
        checks++;
        if (rd_data[i] != ((int'(rd_off) + i < DEPTH) ? model[int'(rd_off) + i] : 8'h00)) begin
          failures++;
          $display("FAIL off %0d lane %0d: %h", rd_off, i, rd_data[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
