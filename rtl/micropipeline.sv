// micropipeline: two-phase bundled-data FIFO (micropipeline), STAGES deep.
//
// Each stage has a C-element, a C-P latch and two latch delays. The
// C-element of stage i (1..STAGES) takes the request from stage i-1 and the
// inverted pass-done of its own latch; its output event captures the word in
// latch i (C input). After the capture-done delay the same event becomes
// the request to stage i+1 and the acknowledge to stage i-1, where it is
// the pass event (P input) of latch i-1; the pass-done delay returns that
// pass event to C-element i-1. So a word is held in a stage exactly while
// the stage ahead has not yet taken it, and a stage accepts a new word only
// after its latch has let the old one go. Stage 0 is REQ_IN, stage
// STAGES+1 is ACK_IN. The FIFO holds up to STAGES words; an empty FIFO has
// every latch transparent.
//
// Interface: REQ_IN/ACK_OUT/D_IN from the sender, REQ_OUT/ACK_IN/D_OUT to
// the receiver, all two-phase. The capture-done and pass-done delays are
// behavioural delay_line elements (DELAY_PS); they order capture before the
// next pass and pass before the next capture, as the latch delays of a real
// micropipeline do. Forward latency is about DELAY_PS per stage.
// Placing such a FIFO between two wrappers to absorb bursts follows the
// design; the stage count is a parameter of this design's choice.
module micropipeline #(
  parameter int unsigned WIDTH  = gals_pkg::LS_WIDTH,
  parameter int unsigned STAGES = 4,
  parameter int unsigned DELAY_PS = 100
) (
  input  logic             rst_n,
  input  logic             req_in,
  output logic             ack_out,
  input  logic [WIDTH-1:0] d_in,
  output logic             req_out,
  input  logic             ack_in,
  output logic [WIDTH-1:0] d_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [STAGES:1]   ev;              // ev[i]: C-element output of stage i
  logic [STAGES+1:0] cd;              // cd[i]: capture-done of stage i
  logic [STAGES:1]   pd;              // pd[i]: pass-done of stage i
  logic [WIDTH-1:0]  data [STAGES+1];  // data[i]: output of stage i latch

  assign cd[0]        = req_in;
  assign cd[STAGES+1] = ack_in;
  assign data[0]      = d_in;

  for (genvar i = 1; i <= STAGES; i++) begin : g_stage
    muller_c u_c (.rst_n(rst_n), .a(cd[i-1]), .b(~pd[i]), .c(ev[i]));
    cp_latch #(.WIDTH(WIDTH)) u_latch (
      .c(ev[i]), .p(cd[i+1]), .d(data[i-1]), .q(data[i])
    );
    delay_line #(.DELAY_PS(DELAY_PS)) u_cd (.in(ev[i]), .out(cd[i]));
    delay_line #(.DELAY_PS(DELAY_PS)) u_pd (.in(cd[i+1]), .out(pd[i]));
  end

  assign ack_out = cd[1];
  assign req_out = cd[STAGES];
  assign d_out   = data[STAGES];
endmodule
