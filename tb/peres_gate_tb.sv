// peres_gate_tb: exhaustive check of the Peres gate.
// All eight input vectors are applied; P, Q and R are compared with the
// truth table written out below (P = A, Q = A xor B, R = AB xor C), and the
// eight outputs are checked to be distinct (reversibility).
module peres_gate_tb;
  import rev_pkg::*;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen;
  // expected {p,q,r} for input {a,b,c} = 0..7
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b110, 3'b111, 3'b101, 3'b100};

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TABLE[v]) begin
        failures++;
        $display("FAIL abc=%b -> pqr=%b expected %b", {a, b, c}, {p, q, r}, TABLE[v]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping is not a bijection: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
