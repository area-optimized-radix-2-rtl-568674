// peres_gate_tb: exhaustive self-checking test of peres_gate.
//
// Applies all 8 input patterns, compares each output with the gate's
// defining equations (written here independently of the RTL as P = A, Q = A xor B, R = AB xor C),
// and checks that the gate is reversible: the 8 output patterns must all
// differ. A free-running clock paces the test; a watchdog ends it with a
// failure if it runs too long.
module peres_gate_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;
  logic [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      logic ep, eq, er;
      {a, b, c} = 3'(v);
      @(posedge clk);
      ep = a; eq = (a != b); er = ((a == 1 && b == 1) != (c == 1));
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%b%b%b got pqr=%b%b%b expected %b%b%b", a, b, c, p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated: gate not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
