// rev_d_latch_tb: random stimulus for the reversible gated D latch.
// Enable and data change at random, one at a time, 10 time units apart.  A
// reference bit is updated with the latch rule (follow d while e is 1, hold
// while e is 0) and compared with q after every change.  The enable
// pass-through and the garbage line (e xor d xor state) are checked too.
// The counts of transparent updates and of holds across a data change are
// required to be non-zero.
module rev_d_latch_tb;
  import rev_pkg::*;

  logic e, d, q, e_o, g;
  logic ref_q;
  int   checks = 0, failures = 0;
  int   n_follow = 0, n_hold = 0;

  rev_d_latch dut (.e(e), .d(d), .q(q), .e_o(e_o), .g(g));

  task automatic check();
    checks++;
    if (q !== ref_q || e_o !== e || g !== (e ^ d ^ ref_q)) begin
      failures++;
      $display("FAIL t=%0t e=%b d=%b q=%b (exp %b) e_o=%b g=%b", $time, e, d, q, ref_q, e_o, g);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load a known value
    e = 1'b1; d = 1'b0; ref_q = 1'b0;
    #10 check();
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(1) != 0) e = ~e;
      else begin
        d = ~d;
        if (!e && d != ref_q) n_hold++;
      end
      if (e) begin
        if (d != ref_q) n_follow++;
        ref_q = d;
      end
      #10 check();
    end
    checks++;
    if (n_follow == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage follow=%0d hold=%0d", n_follow, n_hold);
    end
    $display("follow=%0d hold=%0d", n_follow, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
