// tb_channel_storage: self-checking test of the DET-FF + C-P latch channel
// storage.
//
// A two-phase sender puts a word on D and toggles REQ; it then scribbles on D
// (which the storage must ignore). Q must keep the previously accepted word
// until the receiver toggles ACK, and show the new word after it. Words and
// delays are random; both REQ directions are exercised.
module tb_channel_storage;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;
  logic         rst_n, req, ack;
  logic [W-1:0] d, q, held, word;
  int checks = 0, failures = 0;

  channel_storage #(.WIDTH(W)) dut (.rst_n(rst_n), .req(req), .ack(ack), .d(d), .q(q));

  initial begin
    rst_n = 1; req = 0; ack = 0; d = '1;
    #1 rst_n = 0;
    #20 rst_n = 1;
    #10;
    checks++;
    if (q !== '0) begin failures++; $display("after reset q=%0d", q); end
    held = '0;
    for (int k = 0; k < 200; k++) begin
      word = W'($urandom);
      d = word;
      #($urandom_range(10, 1)) req = ~req;
      #2 d = W'($urandom);              // sender changes data after the request
      #($urandom_range(30, 1));
      checks++;
      if (q !== held) begin failures++; $display("word %0d leaked before ack: q=%0d held=%0d", k, q, held); end
      ack = ~ack;
      #3;
      checks++;
      if (q !== word) begin failures++; $display("word %0d after ack: q=%0d expected %0d", k, q, word); end
      held = word;
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
