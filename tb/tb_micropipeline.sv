// tb_micropipeline: self-checking test of the two-phase micropipeline FIFO.
//
// A two-phase sender pushes random words and a two-phase receiver takes
// them, each with random gaps; the receiver checks that the words come out
// complete and in order. A first phase lets the sender fill the FIFO while
// the receiver is idle and checks that exactly STAGES words are accepted
// before the sender is blocked.
module tb_micropipeline;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;
  localparam int unsigned STAGES = 4;
  localparam int unsigned N = 60;

  logic         rst_n, req_in, ack_out, req_out, ack_in;
  logic [W-1:0] d_in, d_out;
  logic [W-1:0] words [N];
  int checks = 0, failures = 0;
  int accepted;

  micropipeline #(.WIDTH(W), .STAGES(STAGES)) dut (
    .rst_n(rst_n), .req_in(req_in), .ack_out(ack_out), .d_in(d_in),
    .req_out(req_out), .ack_in(ack_in), .d_out(d_out)
  );

  bit fill_phase;

  initial begin
    void'($urandom(7));
    for (int k = 0; k < N; k++) words[k] = W'($urandom);
    rst_n = 1; req_in = 0; ack_in = 0; d_in = '0; fill_phase = 1;
    #1 rst_n = 0;
    #1000 rst_n = 1;
    #1000;
    // sender
    accepted = 0;
    for (int k = 0; k < N; k++) begin
      d_in = words[k];
      #50 req_in = ~req_in;
      wait (ack_out == req_in);
      accepted++;
      d_in = ~words[k];          // the sender may change the data after the acknowledge
      if (!fill_phase) #($urandom_range(3000));
    end
  end

  initial begin
    @(posedge rst_n);
    #20000;
    // FIFO full: exactly STAGES words accepted, the next one is blocked
    checks++;
    if (accepted != STAGES || ack_out == req_in) begin
      failures++; $display("fill: %0d words accepted, expected %0d", accepted, STAGES);
    end
    fill_phase = 0;
    for (int k = 0; k < N; k++) begin
      wait (req_out != ack_in);
      #50;
      checks++;
      if (d_out !== words[k]) begin
        failures++; $display("word %0d: got %0d expected %0d", k, d_out, words[k]);
      end
      #($urandom_range(3000));
      ack_in = ~ack_in;
    end
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
