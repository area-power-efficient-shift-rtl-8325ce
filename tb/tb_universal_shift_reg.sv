// tb_universal_shift_reg -- random mode sequence against a reference model of
// the four modes (locked, shift right, shift left, parallel load); every mode
// must occur and the outputs must match after every clock edge.
`timescale 1ps / 1ps
module tb_universal_shift_reg;
  import usr_pkg::*;
  localparam int unsigned W = 4;
  localparam int CYCLES = 400;

  logic clk = 0, s1, s0, sr, sl;
  logic [W-1:0] pin, pout, ref_q;
  int checks = 0, failures = 0;
  int mode_count [4];

  universal_shift_reg #(.WIDTH(W)) dut (.clk(clk), .s1(s1), .s0(s0), .sr(sr), .sl(sl),
                                        .pin(pin), .pout(pout));

  initial begin
    #((CYCLES + 10) * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {s1, s0} = USR_LOAD; sr = 0; sl = 0; pin = 4'b1010;
    #500 clk = 1; #500 clk = 0;
    ref_q = 4'b1010;
    for (int c = 0; c < CYCLES; c++) begin
      usr_mode_e m;
      m = usr_mode_e'($urandom % 4);
      {s1, s0} = m; sr = 1'($urandom); sl = 1'($urandom); pin = W'($urandom);
      mode_count[m]++;
      unique case (m)
        USR_LOCKED:      ref_q = ref_q;
        USR_SHIFT_RIGHT: ref_q = {sr, ref_q[W-1:1]};
        USR_SHIFT_LEFT:  ref_q = {ref_q[W-2:0], sl};
        USR_LOAD:        ref_q = pin;
      endcase
      #500 clk = 1; #100;
      checks++;
      if (pout !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d mode %s: pout=%b expected %b", c, m.name(), pout, ref_q);
      end
      #400 clk = 0;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (mode_count[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
