// analog_maxpool: behavioural model of the analog max-pooling circuits
// (AMC) at the output of a crossbar array set.
//
// This is not synthesizable hardware: each AMC is a diode-OR of four analog
// inputs followed by a buffer amplifier, so its output follows the largest
// input. The model has LANES such circuits; lane j gets the four values of
// one 2x2 pooling window (in[j][0..3]). With `bypass` high the circuit
// passes input 0 through, which is how a layer group without pooling uses
// it. Four inputs per circuit follow the design's circuit drawing; the
// bypass is this model's own addition.
module analog_maxpool
  import rfsm_pkg::*;
#(
  parameter int unsigned LANES = 64
) (
  input  logic    bypass,
  input  analog_t in  [LANES][4],
  output analog_t out [LANES]
);
  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      out[j] = in[j][0];
      if (!bypass) begin
        for (int p = 1; p < 4; p++) if (in[j][p] > out[j]) out[j] = in[j][p];
      end
    end
  end
endmodule
