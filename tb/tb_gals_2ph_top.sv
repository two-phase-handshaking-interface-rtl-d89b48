// tb_gals_2ph_top: end-to-end test of the two-wrapper GALS chain.
//
// Four configurations run side by side, each in its own harness: both local
// clocks at 213.95 MHz; wrapper 1 at 213.95 MHz and wrapper 2 at 73.55 MHz;
// the reverse; and the fast-to-slow case with a 4-stage micropipeline FIFO
// between the wrappers. Each harness streams random words through, checks
// every DOUT word against a reference running-sum model, checks one clock
// cycle per word in each wrapper, and requires stretched clock phases, words
// held by the C-P latch and (with the FIFO) buffering to have happened.
module tb_gals_2ph_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned FAST = 2337;
  localparam int unsigned SLOW = 6798;

  logic done [4];
  int   chk [4];
  int   fail [4];

  gals_harness #(.HP1(FAST), .HP2(FAST), .SEED(11)) h_eq (
    .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  gals_harness #(.HP1(FAST), .HP2(SLOW), .SEED(12)) h_fs (
    .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  gals_harness #(.HP1(SLOW), .HP2(FAST), .SEED(13)) h_sf (
    .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  gals_harness #(.HP1(FAST), .HP2(SLOW), .FIFO_STAGES(4), .SEED(14), .MAX_GAP_PS(3000)) h_fifo (
    .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  int checks, failures;

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = chk[0] + chk[1] + chk[2] + chk[3];
    failures = fail[0] + fail[1] + fail[2] + fail[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    checks = chk[0] + chk[1] + chk[2] + chk[3];
    failures = fail[0] + fail[1] + fail[2] + fail[3] + 1;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
