// stretch_clock_gen: behavioural model of the stretchable clock generator
// (ring oscillator with stretch control). Not synthesizable: the ring delay
// is a simulation delay standing in for a chain of inverters.
//
// Structure: LCLK is the output of a C-element. One C-element input is
// NOR(LCLK, OR of all STRETCH inputs); the other is LCLK inverted and delayed
// by the inverter chain, HALF_PERIOD_PS. With no stretch both inputs follow
// ~LCLK and the loop oscillates with a period of 2*HALF_PERIOD_PS. While
// any STRETCH input is high the NOR output stays 0: a high phase still ends
// on time, but a low phase lasts until every STRETCH input is low again, and
// then LCLK rises at once. More stretch inputs are simply ORed together.
// LCLK -> NOR -> C-element -> LCLK is a combinational loop on purpose: it
// is the oscillator, and lint tools report it as circular logic.
//
// The structure follows the stretchable-clocking circuit of the design; the
// two lumped delays (HALF_PERIOD_PS for the inverter chain, GATE_DELAY_PS
// for the stretch gates, which must stay well below the half period) and the
// reset, which holds LCLK low through the C-element's reset, are this model's
// choices. The default half period gives the
// wrapper's maximum frequency of 213.95 MHz.
module stretch_clock_gen #(
  parameter int unsigned N_STRETCH      = 2,
  parameter int unsigned HALF_PERIOD_PS = gals_pkg::FAST_HALF_PERIOD_PS,
  parameter int unsigned GATE_DELAY_PS  = 100
) (
  input  logic                 rst_n,
  input  logic [N_STRETCH-1:0] stretch,
  output logic                 lclk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic stretch_any;
  logic nor_out;
  logic chain_out;

  // OR of the stretch inputs, with the delay of the OR and NOR gates: a
  // released stretch lets LCLK rise GATE_DELAY_PS later, after the word that
  // released it has settled through the input latch.
  always @(stretch or rst_n) stretch_any <= #(GATE_DELAY_PS) (|stretch);

  assign nor_out = ~(stretch_any | lclk);

  // Inverter chain of the ring oscillator, lumped into one delay.
  always @(lclk or rst_n) chain_out <= #(HALF_PERIOD_PS) ~lclk;

  muller_c u_c (.rst_n(rst_n), .a(nor_out), .b(chain_out), .c(lclk));
endmodule
