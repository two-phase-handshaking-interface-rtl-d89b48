// cp_latch: capture-pass event controlled latch, WIDTH bits wide.
//
// The latch has two control wires, C (capture) and P (pass). It is
// transparent while C equals P and holds its data while they differ:
// {C,P} = 00 pass, 10 capture, 11 pass, 01 capture. In use the controls step
// 00 -> 10 -> 11 -> 01 -> 00, so a transition on C captures and the next
// transition on P passes, which is what a two-phase (transition-signalling)
// channel needs. After reset both controls are 0 and the latch is
// transparent.
//
// The function is written as a level latch with enable (C == P); the latch is
// the intended storage element, not an inference accident. No reset: the
// latch is transparent whenever its controls agree, which is the reset
// state of every channel in this design.
module cp_latch #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             c,  // capture event wire
  input  logic             p,  // pass event wire
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (c == p) q = d;
  end
endmodule
