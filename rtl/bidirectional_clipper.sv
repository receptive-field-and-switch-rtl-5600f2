// bidirectional_clipper: behavioural model of the bidirectional clippers
// (BC) between the max-pooling circuits and the ADCs.
//
// This is not synthesizable hardware: a clipper is an analog limiter. Each
// of the LANES outputs follows its input but is limited to the window
// [LO, HI], both bounds applied, so the ADC never sees a level outside its
// conversion range. The design places one BC per output; the bounds
// (0 and 255, the 8-bit ADC range) are this model's assumption.
module bidirectional_clipper
  import rfsm_pkg::*;
#(
  parameter int unsigned LANES = 64,
  parameter int          LO    = 0,
  parameter int          HI    = 255
) (
  input  analog_t in  [LANES],
  output analog_t out [LANES]
);
  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      out[j] = (in[j] < LO) ? LO : (in[j] > HI) ? HI : in[j];
    end
  end
endmodule
