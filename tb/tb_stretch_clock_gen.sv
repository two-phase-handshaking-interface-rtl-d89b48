// tb_stretch_clock_gen: self-checking test of the stretchable clock model.
//
// Checks that LCLK is held low in reset; that free running, every high and
// low phase lasts HALF_PERIOD_PS (213.95 MHz at the default); that a stretch
// raised in a low phase holds LCLK low until the last stretch input falls,
// after which LCLK rises GATE_DELAY_PS later; and that a stretch raised in a
// high phase does not shorten or lengthen that high phase.
module tb_stretch_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned HP = 2337;
  localparam int unsigned GD = 100;
  logic       rst_n, lclk;
  logic [1:0] stretch;
  int checks = 0, failures = 0;
  realtime t_edge, t_rel;

  stretch_clock_gen #(.N_STRETCH(2), .HALF_PERIOD_PS(HP), .GATE_DELAY_PS(GD)) dut (
    .rst_n(rst_n), .stretch(stretch), .lclk(lclk)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s (t=%0t)", what, $realtime); end
  endtask

  initial begin
    rst_n = 1; stretch = 2'b00;
    #1 rst_n = 0;
    #10000;
    check(lclk == 0, "LCLK not low in reset");
    rst_n = 1;
    @(posedge lclk);
    // free running
    for (int k = 0; k < 10; k++) begin
      t_edge = $realtime;
      @(negedge lclk);
      check($realtime - t_edge == HP, "high phase length");
      t_edge = $realtime;
      @(posedge lclk);
      check($realtime - t_edge == HP, "low phase length");
    end
    // stretch in the low phase, two inputs released at different times
    for (int k = 0; k < 10; k++) begin
      @(negedge lclk);
      #200 stretch = 2'b11;
      #(HP + $urandom_range(5000)) stretch = 2'b10;
      #($urandom_range(3000));
      check(lclk == 0, "LCLK rose while one stretch input was high");
      stretch = 2'b00;
      t_rel = $realtime;
      @(posedge lclk);
      check($realtime - t_rel == GD, "rise after release");
    end
    // stretch raised in the high phase must not change it
    @(posedge lclk);
    t_edge = $realtime;
    #500 stretch = 2'b01;
    @(negedge lclk);
    check($realtime - t_edge == HP, "high phase changed by stretch");
    #(3 * HP);
    check(lclk == 0, "LCLK not held low by stretch raised in high phase");
    stretch = 2'b00;
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
