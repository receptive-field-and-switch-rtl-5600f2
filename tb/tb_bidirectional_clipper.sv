// tb_bidirectional_clipper: values below, inside and above the window
// [0, 255], plus the two bounds themselves.
module tb_bidirectional_clipper;
  import rfsm_pkg::*;
  localparam int LANES = 7;
  analog_t in [LANES];
  analog_t out [LANES];
  int checks = 0, failures = 0;

  bidirectional_clipper #(.LANES(LANES)) dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < LANES; j++) in[j] = int'($urandom_range(0, 1000)) - 400;
      if (t == 0) begin in[0] = 0; in[1] = 255; in[2] = 256; in[3] = -1; end
      #1;
      for (int j = 0; j < LANES; j++) begin
        automatic int e = in[j] < 0 ? 0 : in[j] > 255 ? 255 : in[j];
        checks++;
        if (out[j] != e) begin
          failures++;
          $display("FAIL %0d -> %0d", in[j], out[j]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
