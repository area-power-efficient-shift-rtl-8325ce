// ssaspl -- one-bit static differential sense-amp shared pulsed latch (SSASPL).
//
// The transistor cell is a pair of cross-coupled inverters (the storage
// node Q and its complement Qb) with two NMOS pull-downs, M2 on Qb gated by
// D and M3 on Q gated by Db, that share one foot transistor M1 gated by the
// pulsed clock. While clk_pulse is high the side whose data input is high is
// pulled to ground, so Q takes the value of D; while clk_pulse is low the
// inverters hold the bit. This model keeps that function as a level-sensitive
// latch.
//
// Interface: clk_pulse (write enable, a short pulse), d/db (differential data),
// q/qb (stored bit and its complement).
// Timing: transparent while clk_pulse is high, so d/db must be stable for the
// whole pulse (the shift registers built from it guarantee this by the order of
// their pulses).
//
// Follows the source cell: write only from a differential pair, write while
// the pulse is high, hold otherwise. Own choice: when d and db are equal (not a
// valid differential input; the cell would fight both sides) the stored bit is
// left unchanged.
//
// The latch inferred here is the intended storage element, so a latch warning
// from a lint or synthesis tool on q is expected.
`timescale 1ps / 1ps
module ssaspl (
  input  logic clk_pulse,
  input  logic d,
  input  logic db,
  output logic q,
  output logic qb
);
  logic stored;   // the node Q of the cross-coupled pair

  always_latch begin
    if (clk_pulse && (d != db)) stored = d;
  end

  assign q  = stored;
  assign qb = ~stored;
endmodule
