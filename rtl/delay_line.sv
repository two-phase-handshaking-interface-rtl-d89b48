// delay_line: behavioural model of a matched delay element. The delay is a
// simulation delay only; synthesis sees a plain wire.
//
// OUT follows IN after DELAY_PS, as the inertial delay of a continuous
// assignment. The events it carries are much further apart than DELAY_PS,
// so none is swallowed. In bundled-data asynchronous circuits such delays
// are buffer chains sized so that an event never overtakes the data or
// latch action it stands for. The micropipeline uses two per stage, as the
// capture-done and pass-done delays of its latch. There is no reset: OUT
// settles DELAY_PS after IN, well within any reset pulse. The element and
// its 100 ps default are this design's choice.
module delay_line #(
  parameter int unsigned DELAY_PS = 100
) (
  input  logic in,
  output logic out
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(DELAY_PS) out = in;
endmodule
