// tb_delayed_pulse_gen -- checks the delayed pulsed clock generator: per rising
// clock edge exactly one pulse on each of the K+1 outputs, in the order
// CLK_pulse<T>, <K>, ..., <1>, never two high at once, at the times the delay
// chain predicts, all finished before the next edge at 100 MHz.
`timescale 1ps / 1ps
module tb_delayed_pulse_gen;
  localparam int unsigned K = 4;
  localparam int unsigned TD = 300, TI = 100, TA = 50, TB = 50;
  localparam int unsigned PERIOD = 10_000;
  localparam int CYCLES = 40;

  logic         clk = 0;
  logic         pt;
  logic [K-1:0] p;
  int checks = 0, failures = 0;

  delayed_pulse_gen #(.K(K)) dut (.clk(clk), .clk_pulse_t(pt), .clk_pulse(p));

  // All K+1 pulses, index 0 = T, index s = CLK_pulse<K+1-s>: firing order.
  logic [K:0] ordered;
  always_comb begin
    ordered[0] = pt;
    for (int s = 1; s <= K; s++) ordered[s] = p[K - s];
  end

  task automatic fail(string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  initial begin
    #(PERIOD * (CYCLES + 5));
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Never two pulses high at once.
  int overlap_samples = 0;
  initial forever begin
    #10;
    if (started && $countones(ordered) > 1) overlap_samples++;
  end

  // Monitors start at the first clock edge; power-up settling is ignored.
  time t_edge;
  int  next_stage;
  int  rises_in_cycle;
  bit  started = 0;
  always @(posedge clk) begin
    started = 1;
    t_edge = $time;
    next_stage = 0;
    rises_in_cycle = 0;
  end

  for (genvar s = 0; s <= K; s++) begin : g_mon
    always @(posedge ordered[s]) if (started) begin
      checks++;
      if (s != next_stage) fail($sformatf("stage %0d fired, expected stage %0d", s, next_stage));
      next_stage = s + 1;
      rises_in_cycle++;
      checks++;
      if ($time - t_edge != s * (TD + 2 * TI) + TA + TB)
        fail($sformatf("stage %0d at %0t after edge", s, $time - t_edge));
    end
    always @(negedge ordered[s]) if (started) begin
      checks++;
      if ($time - t_edge != s * (TD + 2 * TI) + TA + TB + TD + TI)
        fail($sformatf("stage %0d ended at %0t after edge", s, $time - t_edge));
    end
  end

  initial begin
    #(PERIOD / 2);
    for (int c = 0; c < CYCLES; c++) begin
      clk = 1;
      #(PERIOD / 2);
      clk = 0;
      #(PERIOD / 2 - 1);
      checks++;
      if (rises_in_cycle != K + 1) fail($sformatf("cycle %0d: %0d pulses", c, rises_in_cycle));
      checks++;
      if (ordered != 0) fail("pulse still high at end of cycle");
      #1;
    end
    checks++;
    if (overlap_samples != 0) fail($sformatf("%0d samples with overlapping pulses", overlap_samples));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
