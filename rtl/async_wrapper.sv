// async_wrapper: asynchronous wrapper around one LS module, with two-phase
// handshaking and stretchable clocking.
//
// Parts: a channel_storage stage on the input (DET-FF clocked by RI, C-P
// latch controlled by RI/AI), the LS accumulator, the two-phase Input and
// Output Ports, and the stretchable clock generator that produces LCLK.
// One DEN transition per clock cycle (on the falling edge) starts both
// handshakes: the Input Port raises Stretch1 until the sender's word has
// been acknowledged, the Output Port raises Stretch2 and toggles RO until the
// receiver acknowledges on AO. The low phase of LCLK lasts until both
// stretches have fallen; the following rising edge adds the new word.
//
// Interface: DIN/RI/AI is the incoming two-phase bundled-data channel,
// DOUT/RO/AO the outgoing one. DOUT is the accumulator register, stable from
// a rising edge of LCLK until after the RO transition that offers it; the
// receiving side samples it with its own storage stage. Reset puts every
// channel in its idle state ({C,P} = {0,0}) and the LS outputs at zero.
// Lint reports the local clock output as circular combinational logic:
// that loop is the ring oscillator inside the clock generator and is
// intended.
module async_wrapper #(
  parameter int unsigned WIDTH          = gals_pkg::LS_WIDTH,
  parameter int unsigned HALF_PERIOD_PS = gals_pkg::FAST_HALF_PERIOD_PS
) (
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             ri,
  output logic             ai,
  output logic [WIDTH-1:0] dout,
  output logic             ro,
  input  logic             ao,
  output logic             lclk,
  output logic             stretch1,  // from the Input Port
  output logic             stretch2   // from the Output Port
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [WIDTH-1:0] ls_din;
  logic             den;

  channel_storage #(.WIDTH(WIDTH)) u_in_store (
    .rst_n(rst_n), .req(ri), .ack(ai), .d(din), .q(ls_din)
  );

  ls_accumulator #(.WIDTH(WIDTH)) u_ls (
    .rst_n(rst_n), .lclk(lclk), .din(ls_din), .dout(dout), .den(den)
  );

  input_port_2ph u_in_port (
    .rst_n(rst_n), .den(den), .req(ri), .ack(ai), .stretch(stretch1)
  );

  output_port_2ph u_out_port (
    .den(den), .ack(ao), .req(ro), .stretch(stretch2)
  );

  stretch_clock_gen #(.N_STRETCH(2), .HALF_PERIOD_PS(HALF_PERIOD_PS)) u_clk (
    .rst_n(rst_n), .stretch({stretch2, stretch1}), .lclk(lclk)
  );
endmodule
