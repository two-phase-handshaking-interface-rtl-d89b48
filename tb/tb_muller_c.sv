// tb_muller_c: self-checking test of the Muller C-element.
//
// Drives random input sequences and compares the output with a reference
// C-element kept in the test bench (copy the inputs when they agree, keep
// the last value otherwise, 0 under reset). Reset is applied again midway.
module tb_muller_c;
  timeunit 1ps;
  timeprecision 1ps;

  logic rst_n, a, b, c;
  logic expected;
  int checks = 0, failures = 0;

  muller_c dut (.rst_n(rst_n), .a(a), .b(b), .c(c));

  task automatic step(input logic na, input logic nb, input logic nrst);
    a = na; b = nb; rst_n = nrst;
    if (!nrst)        expected = 1'b0;
    else if (na == nb) expected = na;
    #10;
    checks++;
    if (c !== expected) begin
      failures++;
      $display("a=%0d b=%0d rst_n=%0d: c=%0d expected %0d", na, nb, nrst, c, expected);
    end
  endtask

  initial begin
    rst_n = 1; a = 1; b = 1; #1;
    step(1, 1, 0);
    // table: 00 -> 0, 01/10 hold, 11 -> 1
    step(0, 0, 1); step(0, 1, 1); step(1, 0, 1); step(1, 1, 1);
    step(0, 1, 1); step(1, 0, 1); step(0, 0, 1); step(1, 0, 1);
    for (int k = 0; k < 200; k++) step(1'($urandom), 1'($urandom), (k % 97) != 50);
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
