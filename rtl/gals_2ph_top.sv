// gals_2ph_top: two asynchronous wrappers in a row, joined by two-phase
// bundled-data channels (two-phase handshaking, stretchable clocking GALS).
//
// Data flow: DIN --(RI/AI)--> wrapper 1 (accumulator LS1) --> wrapper 2
// (accumulator LS2) --(RO/AO)--> DOUT. Every channel ends in a storage stage
// of a DET-FF clocked by the request and a C-P latch controlled by request
// and acknowledge: wrapper 1 and wrapper 2 each hold one on their input, and
// one more sits on DOUT. Each wrapper has its own stretchable clock, with
// the half periods HALF_PERIOD1_PS and HALF_PERIOD2_PS, so the two LS modules
// may run at unrelated frequencies. With FIFO_STAGES > 0 a micropipeline of
// that depth sits between the wrappers to absorb bursts when wrapper 1 is
// the faster one; 0 (the default) joins them directly.
//
// Handshake order after reset: both LS modules make their first DEN
// transition on the first falling edge of their clocks. Wrapper 1's output
// and wrapper 2's input then handshake at once (LS1 offers 0), while
// wrapper 1 waits for the first word on RI. Per word, each wrapper does one
// input and one output handshake and one accumulate step; DOUT therefore
// carries the running sum of LS1's outputs, two words behind the input.
//
// The two-phase ports and the DET-FF + C-P latch storage follow the
// design; the storage on DOUT, the reset values and the lumped clock
// generator delay are this design's choices.
// Lint reports the local clock output as circular combinational logic:
// that loop is the ring oscillator inside the clock generator and is
// intended.
module gals_2ph_top #(
  parameter int unsigned WIDTH           = gals_pkg::LS_WIDTH,
  parameter int unsigned HALF_PERIOD1_PS = gals_pkg::FAST_HALF_PERIOD_PS,
  parameter int unsigned HALF_PERIOD2_PS = gals_pkg::FAST_HALF_PERIOD_PS,
  parameter int unsigned FIFO_STAGES     = 0
) (
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             ri,
  output logic             ai,
  output logic [WIDTH-1:0] dout,
  output logic             ro,
  input  logic             ao,
  output logic             lclk1,
  output logic             lclk2,
  output logic [1:0]       stretch_w1,  // {Stretch2, Stretch1} of wrapper 1
  output logic [1:0]       stretch_w2   // {Stretch2, Stretch1} of wrapper 2
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] ls1_out, ls2_out, mid_d;
  logic             ro1, ao1, mid_r, mid_a;

  async_wrapper #(.WIDTH(WIDTH), .HALF_PERIOD_PS(HALF_PERIOD1_PS)) u_wra1 (
    .rst_n(rst_n), .din(din), .ri(ri), .ai(ai),
    .dout(ls1_out), .ro(ro1), .ao(ao1), .lclk(lclk1),
    .stretch1(stretch_w1[0]), .stretch2(stretch_w1[1])
  );

  if (FIFO_STAGES == 0) begin : g_direct
    assign mid_r = ro1;
    assign mid_d = ls1_out;
    assign ao1   = mid_a;
  end else begin : g_fifo
    micropipeline #(.WIDTH(WIDTH), .STAGES(FIFO_STAGES)) u_fifo (
      .rst_n(rst_n), .req_in(ro1), .ack_out(ao1), .d_in(ls1_out),
      .req_out(mid_r), .ack_in(mid_a), .d_out(mid_d)
    );
  end

  async_wrapper #(.WIDTH(WIDTH), .HALF_PERIOD_PS(HALF_PERIOD2_PS)) u_wra2 (
    .rst_n(rst_n), .din(mid_d), .ri(mid_r), .ai(mid_a),
    .dout(ls2_out), .ro(ro), .ao(ao), .lclk(lclk2),
    .stretch1(stretch_w2[0]), .stretch2(stretch_w2[1])
  );

  channel_storage #(.WIDTH(WIDTH)) u_out_store (
    .rst_n(rst_n), .req(ro), .ack(ao), .d(ls2_out), .q(dout)
  );
endmodule
