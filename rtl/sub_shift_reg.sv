// sub_shift_reg -- K-bit sub shift register built from K+1 pulsed latches.
//
// K data latches Q1..QK form a chain: Q1 takes the serial input, Qj takes
// Q(j-1). A (K+1)-th latch, the temporary storage latch T, takes QK. Each latch
// is written by its own pulsed clock: Qj by CLK_pulse<j>, T by CLK_pulse<T>.
// The pulses arrive one after another in the order T, K, K-1, ..., 1, so every
// latch is written after the latch it feeds has already been written: T saves
// QK before QK is overwritten, QK takes Q(K-1) before Q(K-1) changes, and so on.
// No latch sees its input change while its pulse is high. T then holds the bit
// that left this sub shift register, for Q1 of the next one, which is written
// by CLK_pulse<1> at the end of the sequence.
//
// Latches pass their data differentially (q/qb into d/db), as the latch cell
// needs. One shift per pulse sequence, i.e. one per system clock cycle.
//
// Interface: sin/sin_b serial input and complement; clk_pulse_t (CLK_pulse<T>);
// clk_pulse[j-1] (CLK_pulse<j>); q[j-1] is Qj; t/t_b the temporary latch.
//
// Structure and pulse assignment follow the source. Latch warnings are expected:
// the latches are the storage of this design.
`timescale 1ps / 1ps
module sub_shift_reg #(
  parameter int unsigned K = 4
) (
  input  logic         sin,
  input  logic         sin_b,
  input  logic         clk_pulse_t,
  input  logic [K-1:0] clk_pulse,
  output logic [K-1:0] q,
  output logic         t,
  output logic         t_b
);
  logic [K:0] d_chain;    // d_chain[j] is the input of latch Q(j+1)
  logic [K:0] db_chain;
  logic [K-1:0] qb;

  assign d_chain[0]  = sin;
  assign db_chain[0] = sin_b;

  for (genvar j = 0; j < K; j++) begin : g_lat
    ssaspl u_lat (
      .clk_pulse(clk_pulse[j]),
      .d        (d_chain[j]),
      .db       (db_chain[j]),
      .q        (q[j]),
      .qb       (qb[j])
    );
    assign d_chain[j+1]  = q[j];
    assign db_chain[j+1] = qb[j];
  end

  // Temporary storage latch.
  ssaspl u_tmp (
    .clk_pulse(clk_pulse_t),
    .d        (d_chain[K]),
    .db       (db_chain[K]),
    .q        (t),
    .qb       (t_b)
  );
endmodule
