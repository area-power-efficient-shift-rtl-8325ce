// tb_ps_top -- end-to-end test of the whole design at its default size
// (N = 256, K = 4, 4-bit universal shift register), at a 100 MHz clock.
//
// Shift register: random serial data is shifted in for 3*N cycles. Before each
// rising edge all N bits are compared with a reference shift register, and the
// serial output with the input of N cycles earlier (one bit per cycle, N cycles
// latency). The pulses seen inside the top are checked to come once per cycle
// in the order T, K, ..., 1 without overlap, and the temporary storage latch of
// the first sub shift register is checked to hand the last bit on to the next
// sub shift register.
// Universal shift register: a random mode sequence runs on its own clock
// beside it, compared with a reference; each of the four modes must occur.
// Every mechanism counted here must happen at least once.
`timescale 1ps / 1ps
module tb_ps_top;
  import usr_pkg::*;
  localparam int unsigned N = 256, K = 4, W = 4;
  localparam int unsigned PERIOD = 10_000;   // 100 MHz
  localparam int CYCLES = 3 * N;

  logic         clk = 0, din = 0, dout, tout;
  logic [N-1:0] q, ref_q;
  logic         usr_clk = 0, s1 = 0, s0 = 0, sr = 0, sl = 0;
  logic [W-1:0] usr_pin = '0, usr_pout, usr_ref;
  logic         hist [$];
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_shift_ok = 0, n_pulse_seq_ok = 0, n_handoff = 0, n_serial_out = 0;
  int mode_count [4];

  ps_top dut (
    .clk(clk), .din(din), .q(q), .dout(dout), .tout(tout),
    .usr_clk(usr_clk), .usr_s1(s1), .usr_s0(s0), .usr_sr(sr), .usr_sl(sl),
    .usr_pin(usr_pin), .usr_pout(usr_pout)
  );

  task automatic fail(string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  initial begin
    #(PERIOD * (CYCLES + 20));
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- pulse order inside the top: T first, then K ... 1, one at a time ----
  logic [K:0] ordered;   // ordered[0] = CLK_pulse<T>, ordered[s] = CLK_pulse<K+1-s>
  always_comb begin
    ordered[0] = dut.clk_pulse_t;
    for (int s = 1; s <= K; s++) ordered[s] = dut.clk_pulse[K - s];
  end
  bit started = 0;
  int next_stage = 0;
  bit seq_bad = 0;
  for (genvar s = 0; s <= K; s++) begin : g_mon
    always @(posedge ordered[s]) if (started) begin
      if (s != next_stage || $countones(ordered) != 1) seq_bad = 1;
      next_stage = s + 1;
    end
  end

  // ---- shift register stimulus and checks ----
  initial begin
    #(PERIOD / 2);
    for (int c = 0; c < CYCLES; c++) begin
      logic q_last_before;
      // din is set half a period before the edge and held until after the
      // pulse chain has finished.
      din = 1'($urandom);
      hist.push_back(din);
      ref_q = {ref_q[N-2:0], din};
      q_last_before = q[K-1];
      next_stage = 0; seq_bad = 0; started = 1;
      #(PERIOD / 2) clk = 1;
      #(PERIOD / 2 - 100);
      // End of the high phase: pulses must be over, data settled.
      checks++;
      if (seq_bad || next_stage != K + 1 || ordered != 0)
        fail($sformatf("cycle %0d: pulse sequence wrong (last stage %0d)", c, next_stage));
      else n_pulse_seq_ok++;
      checks++;
      if (dut.u_sr.g_sub[0].u_sub.t !== q_last_before)
        fail($sformatf("cycle %0d: temporary latch did not take Q%0d", c, K));
      else if (c > 0) begin
        n_handoff++;
        // CLK_pulse<1> comes last, so the next sub shift register's Q1 has
        // already taken the new T value within the same cycle.
        checks++;
        if (q[K] !== dut.u_sr.g_sub[0].u_sub.t) fail($sformatf("cycle %0d: Q%0d did not take T1", c, K + 1));
      end
      if (c >= N - 1) begin
        checks++;
        if (q !== ref_q) fail($sformatf("cycle %0d: q differs from reference", c));
        else n_shift_ok++;
        checks++;
        if (dout !== hist[c - (N - 1)]) fail($sformatf("cycle %0d: dout wrong", c));
        else n_serial_out++;
      end
      if (c >= N) begin
        checks++;
        if (tout !== hist[c - N]) fail($sformatf("cycle %0d: tout wrong", c));
      end
      #100 clk = 0;
    end

    // Every mechanism must have happened.
    checks++; if (n_pulse_seq_ok == 0) fail("no correct pulse sequence");
    checks++; if (n_handoff == 0) fail("no temporary-latch hand-off");
    checks++; if (n_shift_ok == 0) fail("no full-register comparison passed");
    checks++; if (n_serial_out == 0) fail("no serial output bit checked");
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (mode_count[i] == 0) fail($sformatf("universal shift register mode %0d never used", i));
    end
    $display("pulse sequences %0d, hand-offs %0d, register compares %0d, serial bits %0d",
             n_pulse_seq_ok, n_handoff, n_shift_ok, n_serial_out);
    $display("usr modes: locked %0d, right %0d, left %0d, load %0d",
             mode_count[0], mode_count[1], mode_count[2], mode_count[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- universal shift register, on its own clock ----
  initial begin
    {s1, s0} = USR_LOAD; usr_pin = 4'b0110;
    #3000 usr_clk = 1; #3000 usr_clk = 0;
    usr_ref = 4'b0110;
    mode_count[USR_LOAD]++;
    for (int c = 0; c < 200; c++) begin
      usr_mode_e m;
      m = usr_mode_e'($urandom % 4);
      {s1, s0} = m; sr = 1'($urandom); sl = 1'($urandom); usr_pin = W'($urandom);
      mode_count[m]++;
      unique case (m)
        USR_LOCKED:      usr_ref = usr_ref;
        USR_SHIFT_RIGHT: usr_ref = {sr, usr_ref[W-1:1]};
        USR_SHIFT_LEFT:  usr_ref = {usr_ref[W-2:0], sl};
        USR_LOAD:        usr_ref = usr_pin;
      endcase
      #3000 usr_clk = 1; #500;
      checks++;
      if (usr_pout !== usr_ref)
        fail($sformatf("usr cycle %0d mode %s: pout=%b expected %b", c, m.name(), usr_pout, usr_ref));
      #2500 usr_clk = 0;
    end
  end
endmodule
