// booth_multiplier_n4_tb: the reversible Booth array built at 4 x 4.
//
// Checks the small worked example, multiplicand -3 (1101) times multiplier
// 5 (0101) = -15, 7-bit pattern 1110001, with rows recoded subtract, add,
// subtract, add from the top; then all 256 operand pairs against the
// signed product truncated to 2N-1 = 7 bits, plus the H and D lines of every
// row against the Booth digit. Exactly one pair (-8 x -8) must wrap.
// A watchdog bounds the run.
module booth_multiplier_n4_tb;

  localparam int N = 4;
  localparam int W = 2 * N - 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] x, y, h, d;
  logic [W-1:0] p;
  int checks = 0;
  int failures = 0;
  int n_wrap = 0;

  booth_multiplier #(.N(N)) dut (.x(x), .y(y), .p(p), .h(h), .d(d));

  initial begin
    x = 4'b0101;
    y = 4'b1101;
    @(posedge clk);
    checks++;
    if (p !== 7'b1110001 || h !== 4'b1111 || d !== 4'b0101) begin
      failures++;
      $display("FAIL 4x4 example: p=%b h=%b d=%b", p, h, d);
    end
    for (int xv = 0; xv < (1 << N); xv++) begin
      for (int yv = 0; yv < (1 << N); yv++) begin
        int full;
        x = N'(xv);
        y = N'(yv);
        @(posedge clk);
        full = $signed(x) * $signed(y);
        checks++;
        if (p !== W'(full)) begin
          failures++;
          $display("FAIL x=%0d y=%0d: p=%b", $signed(x), $signed(y), p);
        end
        if (full != int'($signed(p))) n_wrap++;
        for (int i = 0; i < N; i++) begin
          logic prev;
          prev = (i == 0) ? 1'b0 : x[(i == 0) ? 0 : i - 1];
          checks++;
          if (h[i] !== (x[i] ^ prev) || (h[i] && d[i] !== x[i])) begin
            failures++;
            $display("FAIL x=%b row %0d: HD=%b%b", x, i, h[i], d[i]);
          end
        end
      end
    end
    checks++;
    if (n_wrap != 1) begin
      failures++;
      $display("FAIL expected one wrapping pair, saw %0d", n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
