// gals_harness: end-to-end test bench harness for gals_2ph_top.
//
// A two-phase source feeds N_WORDS random words into DIN/RI/AI with random
// gaps, and a two-phase sink acknowledges on RO/AO after random delays and
// reads DOUT once its acknowledge has opened the output latch. The expected
// DOUT stream is computed here from the words sent: wrapper 1 outputs
// y(1) = 0, y(j) = x(1) + ... + x(j-1); wrapper 2 outputs the running sum of
// the y's in the same way (all modulo 2**WIDTH). The harness also checks that
// each wrapper made exactly one clock cycle per word (rising edges of its
// local clock), that an unstretched high phase of each local clock lasts the
// configured half period, and it counts the mechanisms of the design: low
// phases stretched by a waiting port, words that arrived before the LS
// module asked for them (held by the C-P latch while the previous word was
// used), and, with a FIFO, more than one word buffered between the wrappers.
module gals_harness #(
  parameter int unsigned HP1         = 2337,
  parameter int unsigned HP2         = 2337,
  parameter int unsigned FIFO_STAGES = 0,
  parameter int unsigned N_WORDS     = 40,
  parameter int unsigned SEED        = 1,
  parameter int unsigned MAX_GAP_PS  = 20000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 10;

  logic         rst_n;
  logic [W-1:0] din, dout;
  logic         ri, ai, ro, ao, lclk1, lclk2;
  logic [1:0]   st1, st2;

  gals_2ph_top #(
    .WIDTH(W), .HALF_PERIOD1_PS(HP1), .HALF_PERIOD2_PS(HP2), .FIFO_STAGES(FIFO_STAGES)
  ) dut (
    .rst_n(rst_n), .din(din), .ri(ri), .ai(ai), .dout(dout), .ro(ro), .ao(ao),
    .lclk1(lclk1), .lclk2(lclk2), .stretch_w1(st1), .stretch_w2(st2)
  );

  logic [W-1:0] x [N_WORDS+1];
  logic [W-1:0] z [N_WORDS+3];
  int rises1, rises2, stretched1, stretched2, early_words, fifo_max;
  int fifo_in, fifo_out;
  bit src_done, snk_done;

  initial begin
    logic [W-1:0] ysum, zsum;
    void'($urandom(SEED));
    checks = 0; failures = 0; done = 0;
    rises1 = 0; rises2 = 0; stretched1 = 0; stretched2 = 0;
    early_words = 0; fifo_max = 0; fifo_in = 0; fifo_out = 0;
    src_done = 0; snk_done = 0;
    for (int k = 1; k <= N_WORDS; k++) x[k] = W'($urandom);
    // reference model
    ysum = '0; zsum = '0;
    for (int k = 1; k <= N_WORDS + 2; k++) begin
      z[k] = zsum;              // wrapper 2 sends its sum before adding
      zsum = zsum + ysum;       // ... then adds y(k)
      if (k <= N_WORDS) ysum = ysum + x[k];
    end
  end

  // reset
  initial begin
    rst_n = 1; din = '0; ri = 0; ao = 0;
    #1 rst_n = 0;
    #20000 rst_n = 1;
  end

  // source
  initial begin
    @(posedge rst_n);
    for (int k = 1; k <= N_WORDS; k++) begin
      #($urandom_range(MAX_GAP_PS));
      din = x[k];
      #100 ri = ~ri;
      wait (ai == ri);
    end
    src_done = 1;
  end

  // sink
  initial begin
    @(posedge rst_n);
    for (int k = 1; k <= N_WORDS + 2; k++) begin
      wait (ro != ao);
      #($urandom_range(MAX_GAP_PS));
      ao = ~ao;
      #100;
      checks++;
      if (dout !== z[k]) begin
        failures++;
        $display("dout word %0d: got %0d expected %0d (HP1=%0d HP2=%0d FIFO=%0d)",
                 k, dout, z[k], HP1, HP2, FIFO_STAGES);
      end
    end
    snk_done = 1;
  end

  // clock cycle counting and phase measurement
  realtime t_rise1, t_fall1, t_rise2, t_fall2;
  bit hp_bad1, hp_bad2;
  initial begin hp_bad1 = 0; hp_bad2 = 0; end
  always @(posedge lclk1) if (rst_n) begin
    rises1++;
    if ($realtime - t_fall1 > HP1 + 1) stretched1++;
    if (ri != ai) early_words++;   // next word already waiting behind the latch
    t_rise1 = $realtime;
  end
  always @(negedge lclk1) if (rst_n) begin
    if ($realtime - t_rise1 != HP1) hp_bad1 = 1;
    t_fall1 = $realtime;
  end
  always @(posedge lclk2) if (rst_n) begin
    rises2++;
    if ($realtime - t_fall2 > HP2 + 1) stretched2++;
    t_rise2 = $realtime;
  end
  always @(negedge lclk2) if (rst_n) begin
    if ($realtime - t_rise2 != HP2) hp_bad2 = 1;
    t_fall2 = $realtime;
  end

  // two-phase protocol on the output channel: the design may not make a
  // second RO transition before the sink's acknowledge
  int n_ro, n_ao;
  always @(posedge ao or negedge ao or negedge rst_n) n_ao = rst_n ? n_ao + 1 : 0;
  always @(posedge ro or negedge ro or negedge rst_n) begin
    if (!rst_n) n_ro = 0;
    else begin
      if (n_ro + 1 - n_ao > 1) begin failures++; $display("RO moved twice without AO"); end
      n_ro = n_ro + 1;
    end
  end

  // FIFO occupancy between the wrappers
  if (FIFO_STAGES > 0) begin : g_fifo_mon
    always @(dut.ao1)   fifo_in++;
    always @(dut.mid_a) fifo_out++;
    always @(fifo_in or fifo_out) if (fifo_in - fifo_out > fifo_max) fifo_max = fifo_in - fifo_out;
  end

  initial begin
    wait (src_done && snk_done);
    #(20 * (HP1 + HP2));   // let the clocks settle into their stall
    checks++;
    if (rises1 != N_WORDS + 1) begin
      failures++; $display("wrapper 1 made %0d clock cycles, expected %0d", rises1, N_WORDS + 1);
    end
    checks++;
    if (rises2 != N_WORDS + 2) begin
      failures++; $display("wrapper 2 made %0d clock cycles, expected %0d", rises2, N_WORDS + 2);
    end
    checks++;
    if (hp_bad1 || hp_bad2) begin failures++; $display("high phase differs from the half period"); end
    checks++;
    if (stretched1 == 0 || stretched2 == 0) begin
      failures++; $display("no stretched low phase: w1=%0d w2=%0d", stretched1, stretched2);
    end
    checks++;
    if (early_words == 0) begin failures++; $display("no word waited behind the C-P latch"); end
    if (FIFO_STAGES > 0) begin
      checks++;
      if (fifo_max < 2) begin failures++; $display("FIFO never held two words"); end
    end
    $display("harness HP1=%0d HP2=%0d FIFO=%0d: words=%0d cycles w1=%0d w2=%0d stretched w1=%0d w2=%0d early=%0d fifo_max=%0d",
             HP1, HP2, FIFO_STAGES, N_WORDS, rises1, rises2, stretched1, stretched2, early_words, fifo_max);
    done = 1;
  end
endmodule
