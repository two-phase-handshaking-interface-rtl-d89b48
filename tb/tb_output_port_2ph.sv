// tb_output_port_2ph: self-checking test of the two-phase Output Port.
//
// Each DEN transition must make REQ take the same transition and raise
// STRETCH; STRETCH must stay high however long the receiver waits, and fall
// when ACK makes the matching transition. Both transition directions are
// covered, with random waits.
module tb_output_port_2ph;
  timeunit 1ps;
  timeprecision 1ps;

  logic den, ack, req, stretch;
  int checks = 0, failures = 0;

  output_port_2ph dut (.den(den), .ack(ack), .req(req), .stretch(stretch));

  task automatic expect_state(input logic e_req, input logic e_stretch, input string what);
    checks++;
    if (req !== e_req || stretch !== e_stretch) begin
      failures++;
      $display("%s: req=%0d stretch=%0d expected req=%0d stretch=%0d", what, req, stretch, e_req, e_stretch);
    end
  endtask

  initial begin
    den = 0; ack = 0;
    #10;
    expect_state(0, 0, "idle");
    for (int k = 0; k < 100; k++) begin
      den = ~den; #5;
      expect_state(den, 1, "DEN moved");
      #($urandom_range(30, 1));
      expect_state(den, 1, "waiting for ACK");
      ack = ~ack; #5;
      expect_state(den, 0, "ACK arrived");
      #($urandom_range(10, 1));
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
