// tb_analog_maxpool: random four-input windows, including negative and
// equal values; output must be the maximum, or input 0 when bypassed.
module tb_analog_maxpool;
  import rfsm_pkg::*;
  localparam int LANES = 9;
  logic bypass = 0;
  analog_t in [LANES][4];
  analog_t out [LANES];
  int checks = 0, failures = 0;

  analog_maxpool #(.LANES(LANES)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 400; t++) begin
      bypass = (t % 5 == 4);
      for (int j = 0; j < LANES; j++)
        for (int p = 0; p < 4; p++) in[j][p] = int'($urandom_range(0, 600)) - 300;
      #1;
      for (int j = 0; j < LANES; j++) begin
        automatic int m = in[j][0];
        if (!bypass) for (int p = 1; p < 4; p++) if (in[j][p] > m) m = in[j][p];
        checks++;
        if (out[j] != m) begin
          failures++;
          $display("FAIL lane %0d: %0d vs %0d", j, out[j], m);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
