// tb_det_ff: self-checking test of the double edge triggered flip-flop.
//
// Toggles CLK at irregular intervals and changes DIN between edges; after
// every rising and every falling edge DOUT must equal the DIN value present
// at that edge, and it must not move between edges. Also checks the reset
// value 0.
module tb_det_ff;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;
  logic         rst_n, clk;
  logic [W-1:0] din, dout, sampled;
  int checks = 0, failures = 0;

  det_ff #(.WIDTH(W)) dut (.rst_n(rst_n), .clk(clk), .din(din), .dout(dout));

  initial begin
    rst_n = 1; clk = 0; din = '1;
    #1 rst_n = 0;
    #10;
    checks++;
    if (dout !== '0) begin failures++; $display("reset: dout=%0d", dout); end
    rst_n = 1;
    #10;
    for (int k = 0; k < 300; k++) begin
      din = W'($urandom);
      #($urandom_range(20, 1));
      sampled = din;
      clk = ~clk;                   // either edge samples DIN
      #5;
      checks++;
      if (dout !== sampled) begin
        failures++; $display("edge %0d: dout=%0d expected %0d", k, dout, sampled);
      end
      din = W'($urandom);           // changes between edges are ignored
      #5;
      checks++;
      if (dout !== sampled) begin
        failures++; $display("between edges %0d: dout=%0d expected %0d", k, dout, sampled);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
