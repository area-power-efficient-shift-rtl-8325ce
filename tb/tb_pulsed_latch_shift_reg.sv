// tb_pulsed_latch_shift_reg -- drives the full N-bit pulsed-latch shift
// register with the non-overlapping pulse sequence T, K, ..., 1 per cycle and
// compares all N bits with a reference shift register each cycle. Also checks
// that the serial output repeats the input N cycles later and that bits cross
// every sub shift register boundary through the temporary latches, the last
// of which (tout) holds the bit that has just left the register.
`timescale 1ps / 1ps
module tb_pulsed_latch_shift_reg;
  localparam int unsigned N = 256, K = 4;
  localparam int unsigned WIDTH = 300, GAP = 100;
  localparam int CYCLES = 3 * N;

  logic         din, pt, dout, tout;
  logic [K-1:0] p;
  logic [N-1:0] q, ref_q;
  logic         hist [$];
  int checks = 0, failures = 0;

  pulsed_latch_shift_reg #(.N(N), .K(K)) dut (.din(din), .clk_pulse_t(pt), .clk_pulse(p),
                                              .q(q), .dout(dout),
                                              .tout(tout));

  initial begin
    #((CYCLES + 10) * 3_000);
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
    pt = 0; p = '0; din = 0;
    for (int c = 0; c < CYCLES; c++) begin
      din = 1'($urandom); #100;
      hist.push_back(din);
      ref_q = {ref_q[N-2:0], din};
      pulse_sequence();
      if (c >= N - 1) begin
        checks++;
        if (q !== ref_q) begin
          failures++;
          $display("FAIL cycle %0d: q differs from reference", c);
        end
        // Serial latency: dout is the input of N-1 cycles before this one.
        checks++;
        if (dout !== hist[c - (N - 1)]) begin
          failures++;
          $display("FAIL cycle %0d: dout=%b expected %b", c, dout, hist[c - (N - 1)]);
        end
      end
      if (c >= N) begin
        // The last temporary latch holds the bit that has just left.
        checks++;
        if (tout !== hist[c - N]) begin
          failures++;
          $display("FAIL cycle %0d: tout=%b expected %b", c, tout, hist[c - N]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
