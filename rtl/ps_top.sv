// ps_top -- the pulsed-latch shift register system, with the universal shift
// register beside it.
//
// Design 1, the proposed shift register: the delayed pulsed clock generator
// turns every rising edge of clk into K+1 non-overlapping pulses (CLK_pulse<T>
// first, then CLK_pulse<K> down to CLK_pulse<1>), which all N/K sub shift
// registers of the N-bit pulsed-latch shift register share. Each clk cycle
// shifts din in by one bit; q shows all N bits, dout the last one and tout the
// bit that has just left the register (the last temporary storage latch).
// Timing: din must be stable from the rising edge of clk until the pulse chain
// has finished (2.5 ns with the default delays); q and dout are settled by
// then and hold until the next rising edge. Default size N = 256, K = 4
// (320 latches, 5 pulsed clocks).
//
// Design 2, the universal shift register (application example, USR_WIDTH
// bits): independent clock and ports, see universal_shift_reg.
//
// The generator is a behavioural timing model (delays), so this top simulates
// with a timing-capable simulator; the latch arrays and the universal shift
// register are synthesizable.
`timescale 1ps / 1ps
module ps_top #(
  parameter int unsigned N         = 256,
  parameter int unsigned K         = 4,
  parameter int unsigned USR_WIDTH = 4
) (
  input  logic                 clk,
  input  logic                 din,
  output logic [N-1:0]         q,
  output logic                 dout,
  output logic                 tout,
  input  logic                 usr_clk,
  input  logic                 usr_s1,
  input  logic                 usr_s0,
  input  logic                 usr_sr,
  input  logic                 usr_sl,
  input  logic [USR_WIDTH-1:0] usr_pin,
  output logic [USR_WIDTH-1:0] usr_pout
);
  logic         clk_pulse_t;
  logic [K-1:0] clk_pulse;

  delayed_pulse_gen #(.K(K)) u_pgen (
    .clk        (clk),
    .clk_pulse_t(clk_pulse_t),
    .clk_pulse  (clk_pulse)
  );

  pulsed_latch_shift_reg #(.N(N), .K(K)) u_sr (
    .din        (din),
    .clk_pulse_t(clk_pulse_t),
    .clk_pulse  (clk_pulse),
    .q          (q),
    .dout       (dout),
    .tout       (tout)
  );

  universal_shift_reg #(.WIDTH(USR_WIDTH)) u_usr (
    .clk (usr_clk),
    .s1  (usr_s1),
    .s0  (usr_s0),
    .sr  (usr_sr),
    .sl  (usr_sl),
    .pin (usr_pin),
    .pout(usr_pout)
  );
endmodule
