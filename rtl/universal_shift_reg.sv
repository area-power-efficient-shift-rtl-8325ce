// universal_shift_reg -- WIDTH-bit universal shift register (default 4 bits,
// inputs a..d and outputs oa..od).
//
// Each bit has a storage element and a 4-to-1 selector in front of it. The
// selectors, all driven by {S1,S0}, choose the bit's next value:
//   00 locked        the bit keeps its value
//   01 shift right   oa <- sr, ob <- oa, oc <- ob, od <- oc
//   10 shift left    od <- sl, oc <- od, ob <- oc, oa <- ob
//   11 parallel load oa..od <- a..d
// The outputs oa..od are always available in parallel, so the register can
// load serially and read in parallel, or load in parallel and read serially
// (oa after shifting left, od after shifting right).
//
// Interface: clk; s1, s0 mode select; sr, sl serial inputs; pin[WIDTH-1] is a,
// pin[0] is the last parallel input (d for WIDTH = 4); pout in the same order.
// Timing: the selected value is stored on each rising clk edge; outputs change
// right after the edge. There is no reset: load the register (mode 11) first.
//
// The four modes, their encoding, the mux-per-bit structure and the port set
// follow the source. Own choices: the storage elements are edge-triggered
// flip-flops, and which end each serial input enters (sr at oa, sl at the far
// end) follows the usual convention for such registers.
`timescale 1ps / 1ps
module universal_shift_reg
  import usr_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             s1,
  input  logic             s0,
  input  logic             sr,
  input  logic             sl,
  input  logic [WIDTH-1:0] pin,
  output logic [WIDTH-1:0] pout
);
  usr_mode_e        mode;
  logic [WIDTH-1:0] nxt;

  assign mode = usr_mode_e'({s1, s0});

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // Right neighbour is the bit above (towards oa); the top bit takes sr.
    // Left neighbour is the bit below; the bottom bit takes sl.
    logic from_right, from_left;
    if (i == WIDTH - 1) begin : g_top
      assign from_right = sr;
    end else begin : g_mid_r
      assign from_right = pout[i+1];
    end
    if (i == 0) begin : g_bot
      assign from_left = sl;
    end else begin : g_mid_l
      assign from_left = pout[i-1];
    end

    usr_mux4 u_mux (
      .sel(mode),
      .in0(pout[i]),
      .in1(from_right),
      .in2(from_left),
      .in3(pin[i]),
      .y  (nxt[i])
    );
  end

  always_ff @(posedge clk) pout <= nxt;
endmodule
