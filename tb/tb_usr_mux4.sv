// tb_usr_mux4 -- exhaustive test of the 4-to-1 mode selector.
`timescale 1ps / 1ps
module tb_usr_mux4;
  logic [1:0] sel;
  logic [3:0] in;
  logic       y;
  int checks = 0, failures = 0;

  usr_mux4 dut (.sel(sel), .in0(in[0]), .in1(in[1]), .in2(in[2]), .in3(in[3]), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 16; v++) begin
        sel = 2'(s); in = 4'(v);
        #10;
        checks++;
        if (y !== in[s]) begin
          failures++;
          $display("FAIL sel=%0d in=%b y=%b", s, in, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
