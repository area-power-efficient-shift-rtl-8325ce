// pulsed_latch_shift_reg -- N-bit shift register of pulsed latches, divided
// into M = N/K sub shift registers of K bits each.
//
// Sub shift register #1 takes the serial input; sub shift register #m (m > 1)
// takes the temporary storage latch of #(m-1). All sub shift registers share
// the same K+1 pulsed clocks (CLK_pulse<T>, CLK_pulse<1..K>), so the design
// needs only K+1 pulse circuits however long it is, at the price of N/K extra
// latches: N + N/K latches in all (320 for N = 256, K = 4).
//
// Why the boundary is safe: in one clock cycle CLK_pulse<T> comes first, so
// every T latch saves the last bit of its sub shift register before anything
// else changes; CLK_pulse<1> comes last, so Q1 of the next sub shift register
// reads that T only after it has settled. The first and last pulses are the
// farthest apart, which also tolerates skew between distant sub shift
// registers.
//
// Interface: din (serial input IN); clk_pulse_t, clk_pulse[K-1:0] from the
// pulse generator; q[i-1] is Q(i), i = 1..N; dout is Q(N); tout is the
// temporary storage latch of the last sub shift register.
// Timing: after each complete pulse sequence (one per system clock), Q1 holds
// the din value present during CLK_pulse<1>, and Q(i) the previous Q(i-1).
// A bit stored into Q1 on one clock edge reaches dout N-1 edges later; tout
// holds the bit that dout showed in the cycle before (the bit that has just
// left the register).
//
// Structure follows the source. Own choices: the complement of the serial input
// is made with an inverter at the input; the serial output is taken from Q(N),
// and the last temporary latch, which has no successor, is brought out as tout.
// N must be a multiple of K.
`timescale 1ps / 1ps
module pulsed_latch_shift_reg #(
  parameter int unsigned N = 256,
  parameter int unsigned K = 4
) (
  input  logic         din,
  input  logic         clk_pulse_t,
  input  logic [K-1:0] clk_pulse,
  output logic [N-1:0] q,
  output logic         dout,
  output logic         tout
);
  localparam int unsigned M = N / K;

  // link[m] / link_b[m] is the serial input of sub shift register m (0-based).
  logic [M:0] link;
  logic [M:0] link_b;   // link_b[M] is only the complement of tout

  assign link[0]   = din;
  assign link_b[0] = ~din;

  for (genvar m = 0; m < M; m++) begin : g_sub
    sub_shift_reg #(.K(K)) u_sub (
      .sin        (link[m]),
      .sin_b      (link_b[m]),
      .clk_pulse_t(clk_pulse_t),
      .clk_pulse  (clk_pulse),
      .q          (q[m*K +: K]),
      .t          (link[m+1]),
      .t_b        (link_b[m+1])
    );
  end

  assign dout = q[N-1];
  assign tout = link[M];

  initial begin
    assert (N % K == 0 && N >= K)
      else $error("pulsed_latch_shift_reg: N (%0d) must be a positive multiple of K (%0d)", N, K);
  end
endmodule
