// dac_bank: behavioural model of a tile's digital-to-analog converters.
//
// This is not synthesizable hardware: a DAC is a mixed-signal circuit, so
// the model only reproduces its digital face and an idealised transfer
// function. Each of the N lanes has an 8-bit input latch, loaded BUS lanes
// per cycle from a DA register (the "DD" pipeline stage); the lane's analog
// output level is the latched code, in units of one LSB, held until the next
// load. Latches clear on reset. The lane count and resolution follow the
// design's parameter table; the linear unsigned transfer function is this
// model's assumption.
module dac_bank
  import rfsm_pkg::*;
#(
  parameter int unsigned N = 108,
  localparam int unsigned AW = $clog2(N + BUS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_en,
  input  logic [AW-1:0] ld_off,
  input  bus_n_t        ld_n,
  input  bus_t          ld_data,
  output analog_t       level [N]
);
  byte_t latch_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) latch_q[i] <= '0;
    end else if (ld_en) begin
      for (int i = 0; i < BUS; i++) begin
        if (i < int'(ld_n) && (int'(ld_off) + i) < N) latch_q[int'(ld_off) + i] <= ld_data[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) level[i] = analog_t'({24'd0, latch_q[i]});
  end
endmodule
