// input_port_2ph: two-phase Input Port of an asynchronous wrapper.
//
// Inputs are DEN from the LS module (transition signalling: each transition
// means "ready for the next word") and REQ from the sender; outputs are
// STRETCH to the clock generator and ACK to the sender. A DEN transition
// raises STRETCH, so the local clock stays in its low phase. When REQ has
// made the matching transition, ACK follows it, which completes the two-phase
// handshake and opens the channel's C-P latch; STRETCH then falls and the
// clock resumes, so the next rising edge of the local clock loads the word.
// The next DEN transition (the other direction) repeats this with REQ-/ACK-.
//
// Implementation (this design's own, derived from the signal order of the
// port): ACK is a C-element of REQ and DEN, so it moves only when both have
// moved, and STRETCH = DEN xor ACK is high exactly while the LS module waits.
// If the request arrives before DEN, ACK moves at DEN and STRETCH only
// pulses; the clock is then not held at all. Reset clears ACK.
module input_port_2ph (
  input  logic rst_n,
  input  logic den,      // from LS module, transition signalling
  input  logic req,      // Ri from the sender
  output logic ack,      // Ai to the sender
  output logic stretch   // to the stretchable clock generator
);
  timeunit 1ps;
  timeprecision 1ps;

  muller_c u_ack (.rst_n(rst_n), .a(req), .b(den), .c(ack));

  assign stretch = den ^ ack;
endmodule
