// tb_ls_accumulator: self-checking test of the 10-bit accumulator LS module.
//
// Clocks the module with random inputs and checks, after every rising edge,
// DOUT against a reference sum modulo 1024, and after every falling edge
// that DEN has toggled exactly once. Checks the reset values.
module tb_ls_accumulator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;
  logic         rst_n, lclk, den, den_prev;
  logic [W-1:0] din, dout, sum;
  int checks = 0, failures = 0;

  ls_accumulator #(.WIDTH(W)) dut (.rst_n(rst_n), .lclk(lclk), .din(din), .dout(dout), .den(den));

  initial begin
    rst_n = 1; lclk = 0; din = '1;
    #1 rst_n = 0;
    #10;
    checks++;
    if (dout !== '0 || den !== 1'b0) begin failures++; $display("reset: dout=%0d den=%0d", dout, den); end
    rst_n = 1;
    sum = '0;
    for (int k = 0; k < 300; k++) begin
      din = W'($urandom);
      #10 lclk = 1;
      sum = sum + din;
      #1;
      checks++;
      if (dout !== sum) begin failures++; $display("cycle %0d: dout=%0d expected %0d", k, dout, sum); end
      den_prev = den;
      #10 lclk = 0;
      #1;
      checks++;
      if (den !== ~den_prev) begin failures++; $display("cycle %0d: DEN did not toggle", k); end
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
