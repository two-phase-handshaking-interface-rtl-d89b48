// gals_pkg: constants shared by the two-phase GALS wrapper design.
//
// The locally synchronous (LS) modules are 10-bit accumulators. The local
// clock of a wrapper runs at up to 213.95 MHz; the slower clock used to show
// wrappers at different frequencies is 73.55 MHz. Both are given here as the
// half period, in picoseconds, of the stretchable clock generator.
package gals_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Data width of the LS accumulators and of every channel.
  localparam int unsigned LS_WIDTH = 10;

  // 213.95 MHz -> 4674 ps period -> 2337 ps half period.
  localparam int unsigned FAST_HALF_PERIOD_PS = 2337;
  // 73.55 MHz -> 13596 ps period -> 6798 ps half period.
  localparam int unsigned SLOW_HALF_PERIOD_PS = 6798;
endpackage
