// tb_cp_latch: self-checking test of the capture-pass event controlled latch.
//
// Walks the control pair {C,P} through random sequences (including the
// normal cycle 00 -> 10 -> 11 -> 01) with new data at every step and
// compares Q with a reference: Q follows D while C == P and keeps the last
// passed value while C != P.
module tb_cp_latch;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;
  logic         c, p;
  logic [W-1:0] d, q, expected;
  int checks = 0, failures = 0;

  cp_latch #(.WIDTH(W)) dut (.c(c), .p(p), .d(d), .q(q));

  task automatic step(input logic nc, input logic np);
    c = nc; p = np;
    #2;
    d = W'($urandom);
    #3;
    if (nc == np) expected = d;
    checks++;
    if (q !== expected) begin
      failures++; $display("C=%0d P=%0d: q=%0d expected %0d", nc, np, q, expected);
    end
  endtask

  initial begin
    c = 0; p = 0; d = '0; expected = '0;
    #5;
    for (int k = 0; k < 20; k++) begin
      step(1, 0); step(1, 1); step(0, 1); step(0, 0);
    end
    for (int k = 0; k < 200; k++) step(1'($urandom), 1'($urandom));
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
