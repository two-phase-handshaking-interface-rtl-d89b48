// tb_input_port_2ph: self-checking test of the two-phase Input Port.
//
// Runs handshakes in both orders: the LS module's DEN transition first
// (STRETCH must rise and stay high, ACK must stay, until REQ makes the
// matching transition; then ACK follows and STRETCH falls), and the
// request first (ACK must wait for DEN; STRETCH must end low). Both
// directions of DEN/REQ/ACK transitions are covered.
module tb_input_port_2ph;
  timeunit 1ps;
  timeprecision 1ps;

  logic rst_n, den, req, ack, stretch, old;
  int checks = 0, failures = 0;

  input_port_2ph dut (.rst_n(rst_n), .den(den), .req(req), .ack(ack), .stretch(stretch));

  task automatic expect_state(input logic e_ack, input logic e_stretch, input string what);
    checks++;
    if (ack !== e_ack || stretch !== e_stretch) begin
      failures++;
      $display("%s: ack=%0d stretch=%0d expected ack=%0d stretch=%0d", what, ack, stretch, e_ack, e_stretch);
    end
  endtask

  initial begin
    rst_n = 1; den = 0; req = 0;
    #1 rst_n = 0;
    #10;
    expect_state(0, 0, "reset");
    rst_n = 1;
    #10;
    for (int k = 0; k < 100; k++) begin
      old = ack;
      if ($urandom_range(1)) begin
        // DEN first: the LS module waits for the word
        den = ~den; #5;
        expect_state(old, 1, "DEN moved, waiting for REQ");
        #($urandom_range(20, 1));
        expect_state(old, 1, "still waiting for REQ");
        req = ~req; #5;
        expect_state(~old, 0, "REQ arrived");
      end else begin
        // REQ first: the word waits for the LS module
        req = ~req; #5;
        expect_state(old, 0, "REQ early, LS busy");
        #($urandom_range(20, 1));
        den = ~den; #5;
        expect_state(~old, 0, "DEN after early REQ");
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
