// tb_pulse_skew -- the pulsed clocks reach distant sub shift registers late.
// This test builds a chain of M sub shift registers and gives each the pulse
// sequence of the generator (same order, widths and spacing), delayed for sub
// shift register m by m*skew_ps, as a long clock wire would. All pulses of
// one sub shift register keep their order, and the boundary between two neighbours is written first (T) and read
// last (Q1), so the shift must stay correct even when the total skew exceeds
// the spacing between pulses. The test checks every bit against a reference
// each cycle at 100 MHz, for several skews up to 2.1 ns across the chain.
`timescale 1ps / 1ps
module tb_pulse_skew;
  localparam int unsigned K = 4, M = 8, N = K * M;
  localparam int unsigned PERIOD = 10_000;
  localparam int CYCLES = 4 * N;
  localparam int NSKEW = 4;
  localparam int unsigned SKEWS [NSKEW] = '{0, 100, 250, 300};

  logic         clk = 0, din = 0;
  int checks = 0, failures = 0;
  int unsigned skew_ps = 0;

  // Pulses as seen by each sub shift register; the skew is set at run time
  // so that one build covers several values.
  logic [M-1:0]         pt_d;
  logic [M-1:0][K-1:0]  p_d;
  initial begin
    pt_d = '0;
    p_d  = '0;
  end
  // Each sub shift register's pulse sequence: the generator's timing (pulse s
  // starts s*500 + 100 ps after the edge, 400 ps wide), shifted by m*skew_ps.
  for (genvar m = 0; m < M; m++) begin : g_wire
    always @(posedge clk) begin
      #(m * skew_ps + 100);
      pt_d[m] = 1'b1; #400; pt_d[m] = 1'b0; #100;
      for (int j = K; j >= 1; j--) begin
        p_d[m][j-1] = 1'b1; #400; p_d[m][j-1] = 1'b0; #100;
      end
    end
  end

  logic [M:0] link, link_b;
  logic [N-1:0] q, ref_q;
  assign link[0]   = din;
  assign link_b[0] = ~din;
  for (genvar m = 0; m < M; m++) begin : g_sub
    sub_shift_reg #(.K(K)) u_sub (
      .sin(link[m]), .sin_b(link_b[m]), .clk_pulse_t(pt_d[m]), .clk_pulse(p_d[m]),
      .q(q[m*K +: K]), .t(link[m+1]), .t_b(link_b[m+1]));
  end

  initial begin
    #(PERIOD * (NSKEW * CYCLES + 20));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD / 2);
    for (int s = 0; s < NSKEW; s++) begin
      int bad;
      skew_ps = SKEWS[s];
      bad = 0;
      for (int c = 0; c < CYCLES; c++) begin
        din = 1'($urandom);
        ref_q = {ref_q[N-2:0], din};
        #(PERIOD / 2) clk = 1;
        // Sample at the end of the high phase: the most delayed pulse ends
        // 2.5 ns + (M-1)*skew = 4.6 ns after the edge at the largest skew.
        #(PERIOD / 2 - 100);
        if (c >= N) begin
          checks++;
          if (q !== ref_q) begin
            failures++;
            bad++;
            if (bad < 5) $display("FAIL skew %0d ps, cycle %0d: q=%h expected %h", skew_ps, c, q, ref_q);
          end
        end
        #100 clk = 0;
      end
      $display("skew %0d ps per sub shift register (%0d ps end to end): %0d mismatches",
               skew_ps, (M - 1) * skew_ps, bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
