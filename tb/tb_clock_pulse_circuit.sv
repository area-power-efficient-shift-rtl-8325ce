// tb_clock_pulse_circuit -- checks one clock-pulse circuit against its delay
// equations: one pulse per rising clock edge, starting T_AND after the edge,
// T_DELAY + T_INV wide, none on the falling edge, and clk_out equal to clk_in
// delayed by T_DELAY + 2*T_INV.
`timescale 1ps / 1ps
module tb_clock_pulse_circuit;
  localparam int unsigned TD = 300, TI = 100, TA = 50;
  localparam int unsigned PERIOD = 10_000;   // 100 MHz
  localparam int CYCLES = 50;

  logic clk = 0, pulse, clk_out;
  int   checks = 0, failures = 0;
  int   rises = 0;
  time  t_edge, t_rise;

  clock_pulse_circuit #(.T_DELAY_PS(TD), .T_INV_PS(TI), .T_AND_PS(TA)) dut (
    .clk_in(clk), .pulse(pulse), .clk_out(clk_out));

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #(PERIOD * (CYCLES + 5));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) t_edge = $time;
  always @(posedge pulse) begin
    rises++;
    t_rise = $time;
    expect_eq(t_rise - t_edge, TA, "pulse start after clk edge");
  end
  always @(negedge pulse) expect_eq($time - t_rise, TD + TI, "pulse width");
  always @(posedge clk_out) expect_eq($time - t_edge, TD + 2 * TI, "clk_out rise delay");

  initial begin
    #(PERIOD / 2);
    for (int c = 0; c < CYCLES; c++) begin
      clk = 1;
      #(PERIOD / 2);
      // Pulse is over well before the falling edge.
      checks++; if (pulse !== 0) begin failures++; $display("FAIL pulse still high at falling edge"); end
      clk = 0;
      #(PERIOD / 2);
      checks++; if (pulse !== 0) begin failures++; $display("FAIL pulse high while clk low"); end
    end
    expect_eq(rises, CYCLES, "one pulse per rising edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
