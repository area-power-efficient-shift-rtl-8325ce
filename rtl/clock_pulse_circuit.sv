// clock_pulse_circuit -- behavioural model of one clock-pulse circuit of the
// delayed pulsed clock generator (an analog delay chain; not synthesizable).
//
// The input clock goes through a delay cell and two inverters. The node after
// the first inverter is the delayed, inverted clock; an AND gate of the input
// clock and that node gives a pulse that starts at each rising edge of clk_in
// and ends when the inverted delayed clock falls, so its width is the delay
// cell plus one inverter. The node after the second inverter is the delayed
// clock that drives the next clock-pulse circuit of the chain.
//
// Interface: clk_in (clock), pulse (one pulse per rising edge of clk_in),
// clk_out (clk_in delayed by T_DELAY_PS + 2*T_INV_PS).
// Timing (from a rising edge of clk_in): pulse rises after T_AND_PS, falls
// after T_DELAY_PS + T_INV_PS + T_AND_PS. A falling edge of clk_in gives no
// pulse. Consecutive circuits therefore give pulses T_DELAY_PS + 2*T_INV_PS
// apart, with a gap of T_INV_PS between them.
//
// The structure (delay, two inverters, AND of the clock with the first
// inverter's output) follows the source; the delay values are this model's own,
// as the source gives none. Each delay must stay shorter than the time between
// two changes of the signal it delays (so T_DELAY_PS below half the clock
// period): simulators may drop an edge that arrives while an older one is
// still pending.
`timescale 1ps / 1ps
module clock_pulse_circuit #(
  parameter int unsigned T_DELAY_PS = 300,
  parameter int unsigned T_INV_PS   = 100,
  parameter int unsigned T_AND_PS   = 50
) (
  input  logic clk_in,
  output logic pulse,
  output logic clk_out
);
  logic clk_dly, clk_dly_n, clk_o, pls;

  // Power-up state: clock low, so the delayed clock is low and the inverted
  // delayed clock high.
  initial begin
    clk_dly   = 1'b0;
    clk_dly_n = 1'b1;
    clk_o     = 1'b0;
    pls       = 1'b0;
  end

  always @(clk_in) clk_dly <= #(T_DELAY_PS) clk_in;
  always @(clk_dly) clk_dly_n <= #(T_INV_PS) ~clk_dly;
  always @(clk_dly_n) clk_o <= #(T_INV_PS) ~clk_dly_n;
  always @(clk_in or clk_dly_n) pls <= #(T_AND_PS) clk_in & clk_dly_n;

  assign pulse   = pls;
  assign clk_out = clk_o;
endmodule
