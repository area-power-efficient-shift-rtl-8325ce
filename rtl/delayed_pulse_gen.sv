// delayed_pulse_gen -- behavioural model of the delayed pulsed clock generator
// (analog delay chain; not synthesizable).
//
// K+1 clock-pulse circuits are chained: the first takes the system clock CLK,
// each following one takes the delayed clock of the one before. Each circuit's
// pulse goes through a clock buffer. The first circuit drives CLK_pulse<T>, the
// next ones CLK_pulse<K>, CLK_pulse<K-1>, ... CLK_pulse<1>. On each rising edge
// of clk there is thus one pulse on every output, in the order T, K, ..., 1,
// never two at once. That order is what lets the pulsed-latch shift register
// work: each latch is written only after the latch it feeds has been written.
//
// Interface: clk (system clock), clk_pulse_t (CLK_pulse<T>), clk_pulse[i-1]
// (CLK_pulse<i>, i = 1..K).
// Timing: stage s (s = 0 for T, s = 1 for K, ..., s = K for 1) pulses
// s*(T_DELAY_PS + 2*T_INV_PS) + T_AND_PS + T_BUF_PS after the rising edge of
// clk, for T_DELAY_PS + T_INV_PS. With the defaults and K = 4 the five pulses
// are 500 ps apart, 400 ps wide and done 2.5 ns after the edge, well inside the
// 10 ns period of a 100 MHz clock. The clock period must exceed
// (K+1)*(T_DELAY_PS + 2*T_INV_PS) so that the chain has finished before the
// next edge.
//
// The chain, the AND-based pulse circuits and the pulse order follow the
// source; all delay values are this model's own.
`timescale 1ps / 1ps
module delayed_pulse_gen #(
  parameter int unsigned K          = 4,
  parameter int unsigned T_DELAY_PS = 300,
  parameter int unsigned T_INV_PS   = 100,
  parameter int unsigned T_AND_PS   = 50,
  parameter int unsigned T_BUF_PS   = 50
) (
  input  logic         clk,
  output logic         clk_pulse_t,
  output logic [K-1:0] clk_pulse
);
  // chain[s] is the clock entering stage s; raw[s] is that stage's pulse.
  logic [K:0] chain;
  logic [K:0] raw;
  logic [K:0] buffered;

  initial buffered = '0;

  assign chain[0] = clk;

  for (genvar s = 0; s <= K; s++) begin : g_stage
    logic next_clk;
    clock_pulse_circuit #(
      .T_DELAY_PS(T_DELAY_PS),
      .T_INV_PS  (T_INV_PS),
      .T_AND_PS  (T_AND_PS)
    ) u_cpc (
      .clk_in (chain[s]),
      .pulse  (raw[s]),
      .clk_out(next_clk)
    );
    // The delayed clock of the last stage drives nothing.
    if (s < K) begin : g_link
      assign chain[s+1] = next_clk;
    end
    // Clock buffer.
    always @(raw[s]) buffered[s] <= #(T_BUF_PS) raw[s];
  end

  // Stage 0 is CLK_pulse<T>; stage s (1..K) is CLK_pulse<K+1-s>.
  assign clk_pulse_t = buffered[0];
  for (genvar i = 1; i <= K; i++) begin : g_out
    assign clk_pulse[i-1] = buffered[K+1-i];
  end
endmodule
