// tb_ssaspl -- self-checking test of the pulsed latch cell.
// Drives random differential data with and without a write pulse and compares
// q/qb with a reference bit: the bit follows d while the pulse is high and d/db
// are complementary, and holds otherwise (also for the invalid d == db).
`timescale 1ps / 1ps
module tb_ssaspl;
  logic clk_pulse, d, db, q, qb;
  int   checks = 0, failures = 0;
  logic ref_q;

  ssaspl dut (.clk_pulse(clk_pulse), .d(d), .db(db), .q(q), .qb(qb));

  task automatic check(string what);
    checks++;
    if (q !== ref_q || qb !== ~ref_q) begin
      failures++;
      $display("FAIL %s: q=%b qb=%b expected q=%b", what, q, qb, ref_q);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_pulse = 0; d = 0; db = 1;
    // Write a known value first.
    #100 clk_pulse = 1; #200 clk_pulse = 0; ref_q = 0; #50 check("init write 0");
    d = 1; db = 0;
    #100 check("hold 0 while d=1 without pulse");
    #100 clk_pulse = 1; #50 ref_q = 1; check("write 1 during pulse");
    d = 0; db = 1; #50 ref_q = 0; check("transparent during pulse");
    #50 clk_pulse = 0; #50 d = 1; db = 0; #50 check("hold 0 after pulse");
    for (int i = 0; i < 400; i++) begin
      logic nd, ndb, np;
      nd = 1'($urandom); ndb = ($urandom % 8 == 0) ? nd : ~nd; np = 1'($urandom);
      d = nd; db = ndb; #50;
      clk_pulse = np; #100;
      if (np && (nd != ndb)) ref_q = nd;
      check($sformatf("random step %0d (pulse=%b d=%b db=%b)", i, np, nd, ndb));
      clk_pulse = 0; #50;
      check($sformatf("after step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
