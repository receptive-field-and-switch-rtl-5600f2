// tb_dac_bank: loads the DAC latches in random chunks, checks each lane's
// analog level equals the loaded code, that unloaded lanes hold, and that
// reset clears every latch.
module tb_dac_bank;
  import rfsm_pkg::*;
  localparam int N = 21;
  localparam int AW = $clog2(N + BUS);
  logic clk = 0, rst_n = 0, ld_en = 0;
  logic [AW-1:0] ld_off = '0;
  bus_n_t ld_n = '0;
  bus_t ld_data = '0;
  analog_t level [N];
  int model [N];
  int checks = 0, failures = 0;

  dac_bank #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < N; i++) model[i] = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (level[i] != 0) failures++;
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      ld_en  = 1;
      ld_off = AW'($urandom_range(0, N - 1));
      ld_n   = bus_n_t'($urandom_range(1, BUS));
      for (int i = 0; i < BUS; i++) ld_data[i] = 8'($urandom);
      for (int i = 0; i < int'(ld_n); i++) if (int'(ld_off) + i < N) model[int'(ld_off) + i] = int'(ld_data[i]);
      @(negedge clk);
      ld_en = 0;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (level[i] != model[i]) begin
          failures++;
          $display("FAIL lane %0d: %0d vs %0d", i, level[i], model[i]);
        end
      end
    end
    rst_n = 0;
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (level[i] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
