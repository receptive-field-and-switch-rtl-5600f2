// tb_adc_bank: drives random analog levels (negative, in range and above
// range), samples them, and reads the latches back BUS lanes at a time:
// codes must saturate to 0..255 and hold until the next sample.
module tb_adc_bank;
  import rfsm_pkg::*;
  localparam int N = 19;
  localparam int AW = $clog2(N + BUS);
  logic clk = 0, rst_n = 0, sample = 0;
  analog_t ain [N];
  logic [AW-1:0] rd_off = '0;
  bus_t rd_data;
  int model [N];
  int checks = 0, failures = 0;

  adc_bank #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int o = 0; o < N; o += BUS) begin
      rd_off = AW'(o);
      #1;
      for (int i = 0; i < BUS; i++) begin
        checks++;
        if (rd_data[i] != ((o + i < N) ? 8'(model[o + i]) : 8'h00)) begin
          failures++;
          $display("FAIL lane %0d: %0d vs %0d", o + i, rd_data[i], model[o + i]);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin ain[i] = 0; model[i] = 0; end
    #12 rst_n = 1;
    read_all();
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        ain[i] = int'($urandom_range(0, 700)) - 200;
        model[i] = ain[i] < 0 ? 0 : ain[i] > 255 ? 255 : ain[i];
      end
      sample = 1;
      @(negedge clk);
      sample = 0;
      for (int i = 0; i < N; i++) ain[i] = 77;     // must not be taken
      @(negedge clk);
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
