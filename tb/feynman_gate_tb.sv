// feynman_gate_tb: exhaustive check of the Feynman gate.
// All four input vectors are applied; P and Q are compared with the gate's
// definition (P = A, Q = A xor B), the four outputs are checked to be
// distinct (the mapping is a bijection).
module feynman_gate_tb;
  import rev_pkg::*;

  logic a, b, p, q;
  int   checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL mapping is not a bijection: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
