// rev_async_top_tb: end-to-end test of the top level at its default (and
// only) configuration.  Drives clk and t of the reversible falling-edge T
// flip-flop for CYCLES clock cycles with t changing at random in both clock
// phases, and compares q with a reference that toggles at every falling
// edge with t = 1, starting from the power-up value of q (there is no
// reset).  It counts toggles, holds, rising edges and t changes in each
// clock phase and fails if any of them never happened.
module rev_async_top_tb;

  localparam int unsigned CYCLES = 4000;
  localparam time         HALF   = 50;

  logic       clk, t, q;
  logic [3:0] garbage;
  logic       ref_q;
  int         checks = 0, failures = 0;
  int         n_toggle = 0, n_hold = 0, n_rise = 0, n_t_low = 0, n_t_high = 0;

  rev_async_top dut (.clk(clk), .t(t), .q(q), .garbage(garbage));

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
