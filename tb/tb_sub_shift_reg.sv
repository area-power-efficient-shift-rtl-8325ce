// tb_sub_shift_reg -- drives one K-bit sub shift register with the pulse
// sequence T, K, ..., 1 (non-overlapping, as the generator makes it) and
// compares Q1..QK and T with a reference after every sequence: T takes the old
// QK, the Q chain moves one place, Q1 takes the serial input.
// Finally it shows why the order matters: with one common pulse for all
// latches the input runs through the whole open chain in a single pulse.
`timescale 1ps / 1ps
module tb_sub_shift_reg;
  localparam int unsigned K = 4;
  localparam int unsigned WIDTH = 300, GAP = 100;
  localparam int CYCLES = 300;

  logic         sin, pt;
  logic [K-1:0] p, q;
  logic         t, t_b;
  int checks = 0, failures = 0;
  logic [K-1:0] ref_q;
  logic         ref_t;

  sub_shift_reg #(.K(K)) dut (.sin(sin), .sin_b(~sin), .clk_pulse_t(pt), .clk_pulse(p),
                              .q(q), .t(t), .t_b(t_b));

  initial begin
    #(CYCLES * 10_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_sequence();
    pt = 1; #(WIDTH); pt = 0; #(GAP);
    for (int j = K; j >= 1; j--) begin
      p[j-1] = 1; #(WIDTH); p[j-1] = 0; #(GAP);
    end
  endtask

  initial begin
    pt = 0; p = '0; sin = 0;
    // Fill with known data: K+1 sequences.
    for (int c = 0; c < K + 1; c++) begin
      sin = 1'($urandom); #100;
      ref_t = ref_q[K-1]; ref_q = {ref_q[K-2:0], sin};
      pulse_sequence();
    end
    for (int c = 0; c < CYCLES; c++) begin
      sin = 1'($urandom); #100;
      ref_t = ref_q[K-1]; ref_q = {ref_q[K-2:0], sin};
      pulse_sequence();
      checks++;
      if (q !== ref_q || t !== ref_t || t_b !== ~ref_t) begin
        failures++;
        $display("FAIL cycle %0d: q=%b t=%b expected q=%b t=%b", c, q, t, ref_q, ref_t);
      end
    end
    // One common pulse on every latch: the timing problem the pulse order
    // avoids. All latches are open together, so the input reaches QK and T.
    sin = ~q[K-1]; #100;
    pt = 1; p = '1; #(WIDTH); pt = 0; p = '0; #(GAP);
    checks++;
    if (q !== {K{sin}} || t !== sin) begin
      failures++;
      $display("FAIL common pulse: expected the input to run through, q=%b t=%b", q, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
