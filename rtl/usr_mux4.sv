// usr_mux4 -- 4-to-1 selector feeding one bit of the universal shift register.
//
// sel = {S1,S0} picks the next value of the bit: 0 keeps it (in0, the bit's
// own output), 1 takes the shift-right source (in1), 2 the shift-left source
// (in2), 3 the parallel input (in3). The mode numbering is the source's mode
// table; the mux itself is the plain combinational form of it.
`timescale 1ps / 1ps
module usr_mux4 (
  input  logic [1:0] sel,
  input  logic       in0,
  input  logic       in1,
  input  logic       in2,
  input  logic       in3,
  output logic       y
);
  always_comb begin
    unique case (sel)
      2'd0:    y = in0;
      2'd1:    y = in1;
      2'd2:    y = in2;
      default: y = in3;
    endcase
  end
endmodule
