// ls_accumulator: locally synchronous module, a WIDTH-bit accumulator.
//
// On every rising edge of the local clock LCLK the accumulator adds DIN
// (modulo 2**WIDTH); DOUT is the accumulator register. On every falling edge
// it toggles DEN, the transition-signalled "data enable": one transition per
// cycle tells both ports of the wrapper that DOUT is ready to be sent and
// that the LS module is ready for the next DIN. DEN moves on the falling edge
// so that the ports can stretch the low phase before the next rising edge.
// Reset clears the accumulator and DEN.
//
// The accumulator as LS module, its 10-bit width and DEN on the falling edge
// follow the design; one transfer per clock cycle is this design's choice.
module ls_accumulator #(
  parameter int unsigned WIDTH = gals_pkg::LS_WIDTH
) (
  input  logic             rst_n,
  input  logic             lclk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             den
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= dout + din;
  end

  always_ff @(negedge lclk or negedge rst_n) begin
    if (!rst_n) den <= 1'b0;
    else        den <= ~den;
  end
endmodule
