// adc_bank: behavioural model of a tile's analog-to-digital converters.
//
// This is not synthesizable hardware: an ADC is a mixed-signal circuit.
// On a clock edge with `sample` high (the end of the D-C-A pipeline cycle)
// every lane quantises its analog input to 8 bits, saturating outside
// 0..255, and holds the code in its output latch. The "AA" stage reads the
// latches BUS lanes per cycle through the combinational rd port (lanes past
// N read as zero). Lane count and resolution follow the design's parameter
// table; the ideal saturating quantiser is this model's assumption.
module adc_bank
  import rfsm_pkg::*;
#(
  parameter int unsigned N = 64,
  localparam int unsigned AW = $clog2(N + BUS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample,
  input  analog_t       ain [N],
  input  logic [AW-1:0] rd_off,
  output bus_t          rd_data
);
  byte_t latch_q [N];

  function automatic byte_t quantise(analog_t a);
    if (a < 0) return '0;
    if (a > 255) return 8'hFF;
    return byte_t'(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) latch_q[i] <= '0;
    end else if (sample) begin
      for (int i = 0; i < N; i++) latch_q[i] <= quantise(ain[i]);
    end
  end

  always_comb begin
    for (int i = 0; i < BUS; i++) begin
      rd_data[i] = ((int'(rd_off) + i) < N) ? latch_q[int'(rd_off) + i] : '0;
    end
  end
endmodule
