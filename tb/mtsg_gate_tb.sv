// mtsg_gate_tb: exhaustive self-checking test of mtsg_gate.
//
// Applies all 16 input patterns and compares the outputs with the gate's
// equations worked out arithmetically here: with D = 0, {S, R} must be the
// two-bit sum A + B + C (full adder); with D = 1, S is that carry inverted.
// P = A and Q = A xor B. It also checks that the 16 output patterns are all
// distinct (the gate is reversible). A watchdog bounds the run.
module mtsg_gate_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, d, p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  logic [15:0] seen;

  mtsg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      int   sum;
      logic ep, eq, er, es;
      {a, b, c, d} = 4'(v);
      @(posedge clk);
      sum = int'(a) + int'(b) + int'(c);
      ep = a;
      eq = (a != b);
      er = sum[0];
      es = sum[1] ^ d;
      checks++;
      if ({p, q, r, s} !== {ep, eq, er, es}) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b got pqrs=%b%b%b%b expected %b%b%b%b",
                 a, b, c, d, p, q, r, s, ep, eq, er, es);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated: gate not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
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
