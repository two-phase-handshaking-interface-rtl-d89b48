// output_port_2ph: two-phase Output Port of an asynchronous wrapper.
//
// Inputs are DEN from the LS module and ACK from the receiver; outputs are
// STRETCH to the clock generator and REQ to the receiver. A DEN transition
// means the LS output word is valid: STRETCH rises, holding the local clock
// low, and REQ makes the same transition, offering the word. When ACK has
// made the matching transition the handshake is complete, STRETCH falls and
// the clock may resume. The LS module cannot move DEN again until the clock
// runs, so a second request cannot overtake the acknowledge.
//
// Implementation (this design's own, derived from the signal order of the
// port): REQ is DEN itself, and STRETCH = DEN xor ACK is high while a request
// is outstanding. Right after reset DEN = ACK = 0 and the port is idle.
module output_port_2ph (
  input  logic den,      // from LS module, transition signalling
  input  logic ack,      // Ao from the receiver
  output logic req,      // Ro to the receiver
  output logic stretch   // to the stretchable clock generator
);
  timeunit 1ps;
  timeprecision 1ps;

  assign req     = den;
  assign stretch = den ^ ack;
endmodule
