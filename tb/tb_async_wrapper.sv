// tb_async_wrapper: self-checking test of one asynchronous wrapper.
//
// A two-phase source feeds random words on DIN/RI/AI and a two-phase sink
// takes DOUT on RO/AO, both with random delays so that both ports have to
// stretch the local clock. The LS accumulator's outputs must be 0, x1,
// x1+x2, ... (modulo 1024), one per handshake; the wrapper must make exactly
// one local clock cycle per word; and both the input-side and the output-side
// stretch must have held the clock at least once.
module tb_async_wrapper;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;
  localparam int unsigned HP = gals_pkg::FAST_HALF_PERIOD_PS;
  localparam int unsigned N = 50;

  logic         rst_n, ri, ai, ro, ao, lclk, st1, st2;
  logic [W-1:0] din, dout, expected;
  logic [W-1:0] x [N+1];
  int checks = 0, failures = 0;
  int rises = 0, held_in = 0, held_out = 0;
  bit src_done = 0, snk_done = 0;

  async_wrapper #(.WIDTH(W), .HALF_PERIOD_PS(HP)) dut (
    .rst_n(rst_n), .din(din), .ri(ri), .ai(ai), .dout(dout), .ro(ro), .ao(ao),
    .lclk(lclk), .stretch1(st1), .stretch2(st2)
  );

  initial begin
    for (int k = 1; k <= N; k++) x[k] = W'($urandom);
    rst_n = 1; ri = 0; ao = 0; din = '0;
    #1 rst_n = 0;
    #20000 rst_n = 1;
  end

  initial begin
    @(posedge rst_n);
    for (int k = 1; k <= N; k++) begin
      #($urandom_range(15000));
      din = x[k];
      #100 ri = ~ri;
      wait (ai == ri);
    end
    src_done = 1;
  end

  initial begin
    @(posedge rst_n);
    expected = '0;
    for (int k = 1; k <= N + 1; k++) begin
      wait (ro != ao);
      #10;
      checks++;
      if (dout !== expected) begin
        failures++; $display("output %0d: got %0d expected %0d", k, dout, expected);
      end
      if (k <= N) expected = expected + x[k];
      #($urandom_range(15000));
      ao = ~ao;
    end
    snk_done = 1;
  end

  always @(posedge lclk) if (rst_n) rises++;
  realtime t_fall;
  bit in_held, out_held;
  always @(negedge lclk) begin t_fall = $realtime; in_held = 0; out_held = 0; end
  always @(posedge st1) #(HP + 1) if (st1 && !lclk) in_held = 1;
  always @(posedge st2) #(HP + 1) if (st2 && !lclk) out_held = 1;
  always @(posedge lclk) if (rst_n) begin
    if (in_held) held_in++;
    if (out_held) held_out++;
  end

  initial begin
    #1;
    wait (src_done && snk_done);
    #(20 * HP);
    checks++;
    if (rises != N + 1) begin failures++; $display("%0d clock cycles, expected %0d", rises, N + 1); end
    checks++;
    if (held_in == 0 || held_out == 0) begin
      failures++; $display("clock held by input port %0d times, by output port %0d times", held_in, held_out);
    end
    $display("words=%0d cycles=%0d held by input=%0d by output=%0d", N, rises, held_in, held_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
