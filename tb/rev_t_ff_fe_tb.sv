// rev_t_ff_fe_tb: self-checking test of the reversible falling-edge T flip-flop.
// A clock of period 100 runs for CYCLES cycles while t changes at random,
// both while clk is high (the value present at the falling edge must count)
// and while clk is low (it must be ignored).  A reference bit toggles at each
// falling edge with t = 1.  q is compared with it after every edge and every
// t change; the clock copies on the garbage lines are checked as well.  As
// the flip-flop has no reset, the reference starts from the power-up value
// of q.  Each mechanism (toggle, hold, rising edge, t change in either clock
// phase) must occur at least once.
module rev_t_ff_fe_tb;

  localparam int unsigned CYCLES = 4000;
  localparam time         HALF   = 50;

  logic       clk, t, q;
  logic [3:0] garbage;
  logic       ref_q;
  int         checks = 0, failures = 0;
  int         n_toggle = 0, n_hold = 0, n_rise = 0, n_t_low = 0, n_t_high = 0;

  rev_t_ff_fe dut (.clk(clk), .t(t), .q(q), .garbage(garbage));

  task automatic check(string what);
    checks++;
    if (q !== ref_q || garbage[1] !== clk || garbage[3] !== ~clk) begin
      failures++;
      $display("FAIL %s t=%0t clk=%b t=%b q=%b exp %b garbage=%b", what, $time, clk, t, q, ref_q, garbage);
    end
  endtask

  initial begin
    #(HALF * 2 * (CYCLES + 20));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    t   = 1'b0;
    #(HALF);
    // no reset exists: take the power-up state as the reference
    ref_q = q;
    check("power-up");
    for (int unsigned i = 0; i < CYCLES; i++) begin
      // rising edge: q must not move
      clk = 1'b1;
      #(HALF / 4);
      n_rise++;
      check("after rising edge");
      // t may change while clk is high; the last value before the fall counts
      if ($urandom_range(1) != 0) begin
        t = ~t;
        n_t_high++;
        #(HALF / 4);
        check("t changed while clk high");
      end else begin
        #(HALF / 4);
      end
      #(HALF / 2);
      // falling edge: toggle if t is 1
      clk = 1'b0;
      if (t) begin
        ref_q = ~ref_q;
        n_toggle++;
      end else begin
        n_hold++;
      end
      #(HALF / 4);
      check("after falling edge");
      // t changes while clk is low must be ignored
      if ($urandom_range(1) != 0) begin
        t = ~t;
        n_t_low++;
        #(HALF / 4);
        check("t changed while clk low");
        #(HALF / 2);
      end else begin
        #(HALF * 3 / 4);
      end
    end
    checks++;
    if (n_toggle == 0 || n_hold == 0 || n_rise == 0 || n_t_low == 0 || n_t_high == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("toggles=%0d holds=%0d rising_edges=%0d t_changes_clk_high=%0d t_changes_clk_low=%0d",
             n_toggle, n_hold, n_rise, n_t_high, n_t_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
