// channel_storage: storage element at the receiving end of a two-phase
// bundled-data channel (DET-FF followed by a C-P latch).
//
// The sender places data on D and then toggles REQ. The DET-FF is clocked by
// REQ, so D is sampled on every request transition and nothing the sender
// does between requests reaches the latch. The C-P latch has C = REQ and
// P = ACK: the request transition closes it (the previous word stays on Q)
// and the receiver's acknowledge transition opens it, so the new word
// reaches Q only once the receiver has acknowledged, that is, once the
// receiving wrapper has stopped its local clock and is ready for it. Q then
// stays stable until the next request.
//
// The pairing of the two elements, and REQ/ACK as their controls, follow the
// description of the two-phase wrapper; the reset (DET-FF cleared, so Q is 0
// after reset) is this design's choice. Simulation-only check flags a
// second request transition made before the previous acknowledge.
module channel_storage #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             rst_n,
  input  logic             req,  // two-phase request from the sender
  input  logic             ack,  // two-phase acknowledge from the receiver
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] sampled;

  det_ff #(.WIDTH(WIDTH)) u_det_ff (
    .rst_n(rst_n), .clk(req), .din(d), .dout(sampled)
  );

  cp_latch #(.WIDTH(WIDTH)) u_cp_latch (
    .c(req), .p(ack), .d(sampled), .q(q)
  );

endmodule
