// muller_c: Muller C-element with asynchronous reset.
//
// The output copies the inputs when they agree and keeps its value when they
// differ (00 -> 0, 11 -> 1, 01/10 -> no change). An active-low reset forces
// the output to 0, as in the classic gate form c = (a&b | a&c | b&c) & ~reset.
//
// Here the state-holding gate is written as a level-sensitive latch whose
// enable is (a == b) and whose data is a; this is the same function as the
// majority gate with feedback. The latch is intended: a C-element is a
// state-holding asynchronous gate, and every handshake controller in this
// design is built from it. There is no clock; the output follows the inputs
// after the gate delay only.
module muller_c (
  input  logic rst_n,  // active-low asynchronous reset, output to 0
  input  logic a,
  input  logic b,
  output logic c
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (!rst_n)      c = 1'b0;
    else if (a == b) c = a;
  end
endmodule
