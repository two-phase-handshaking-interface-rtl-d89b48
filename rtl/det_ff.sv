// det_ff: double edge triggered flip-flop (DET-FF), WIDTH bits wide.
//
// DOUT takes the value of DIN at every rising and every falling edge of CLK.
// It is built from ordinary single-edge flip-flops so that it synthesizes:
// one flip-flop clocked on the rising edge stores DIN xor (the other
// flip-flop), one clocked on the falling edge stores DIN xor (the first one),
// and DOUT is the xor of the two. After either edge the xor of the two
// registers equals the DIN sampled at that edge. That is two flip-flops and
// three XOR gates per bit.
//
// In a two-phase channel CLK is the request wire: every request transition,
// whichever its direction, samples the bundled data. The active-low reset,
// which clears both registers so that DOUT starts at 0, is an addition of
// this design; the textbook circuit has none.
module det_ff #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             rst_n,
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] q_rise, q_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_rise <= '0;
    else        q_rise <= din ^ q_fall;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) q_fall <= '0;
    else        q_fall <= din ^ q_rise;
  end

  assign dout = q_rise ^ q_fall;
endmodule
