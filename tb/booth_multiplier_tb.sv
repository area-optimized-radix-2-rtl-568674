// booth_multiplier_tb: end-to-end test of the 8 x 8 reversible Booth array
// at its default size.
//
// 1. The worked example: multiplicand -67 (1011 1101), multiplier 42
//    (0010 1010) must give -2814, 15-bit pattern 111010100000010, with the
//    rows recoded as skip, subtract, add, subtract, add, subtract, add, skip.
// 2. The simulation waveform: multiplier -67 with multiplicand 42, then
//    multiplier 4 with multiplicand 4, 5, 6, 7, 8 giving 16, 20, 24, 28, 32,
//    including the row control words shown there, and the small unsigned
//    sequence 5 x 2, 4, 6, 8 = 10, 20, 30, 40.
// 3. Every one of the 65536 operand pairs. The expected product is the
//    signed product formed with the simulator's own multiplier, truncated
//    to 2N-1 bits; the H and D lines of every row are checked against the
//    Booth digit x_(i-1) - x_i.
// It counts how often each mechanism of the array was exercised (row skip,
// row add, row subtract, negative multiplicand sign extension, negative
// multiplier, the single wrapping pair -128 x -128) and counts a failure
// for any that never happened. Vectors are applied once per cycle of a
// local clock; a watchdog bounds the run.
module booth_multiplier_tb;

  localparam int N = 8;
  localparam int W = 2 * N - 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] x, y, h, d;
  logic [W-1:0] p;
  int checks = 0;
  int failures = 0;
  int n_skip = 0, n_add = 0, n_sub = 0, n_yneg = 0, n_xneg = 0, n_wrap = 0;

  booth_multiplier dut (.x(x), .y(y), .p(p), .h(h), .d(d));

  task automatic apply(input int xv, input int yv);
    int full;
    logic [W-1:0] want;
    x = N'(xv);
    y = N'(yv);
    @(posedge clk);
    full = $signed(x) * $signed(y);
    want = W'(full);
    checks++;
    if (p !== want) begin
      failures++;
      $display("FAIL x=%0d y=%0d: p=%b expected %b", $signed(x), $signed(y), p, want);
    end
    if (full != int'($signed(p))) n_wrap++;
    if (y[N-1]) n_yneg++;
    if (x[N-1]) n_xneg++;
    for (int i = 0; i < N; i++) begin
      int dig;
      dig = ((i == 0) ? 0 : int'(x[(i == 0) ? 0 : i - 1])) - int'(x[i]);
      checks++;
      case (dig)
        0: begin
          n_skip++;
          if (h[i] !== 1'b0) begin
            failures++;
            $display("FAIL x=%b row %0d: expected skip, HD=%b%b", x, i, h[i], d[i]);
          end
        end
        1: begin
          n_add++;
          if ({h[i], d[i]} !== 2'b10) begin
            failures++;
            $display("FAIL x=%b row %0d: expected add, HD=%b%b", x, i, h[i], d[i]);
          end
        end
        default: begin
          n_sub++;
          if ({h[i], d[i]} !== 2'b11) begin
            failures++;
            $display("FAIL x=%b row %0d: expected subtract, HD=%b%b", x, i, h[i], d[i]);
          end
        end
      endcase
    end
  endtask

  task automatic tally(input string what, input int count);
    checks++;
    $display("  %s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    // Worked example.
    apply(42, -67);
    checks++;
    if (p !== 15'b111010100000010) begin
      failures++;
      $display("FAIL worked example: p=%b", p);
    end
    // h and d are listed row 7 .. row 0.
    checks++;
    if (h !== 8'b0111_1110 || d !== 8'b0010_1010) begin
      failures++;
      $display("FAIL worked example recoding: h=%b d=%b", h, d);
    end
    // The same operands with the roles exchanged, as in the waveform: the
    // waveform shows H and D as numbers with row 0 as the most significant
    // bit, so they appear bit-reversed here (227 and 161).
    apply(-67, 42);
    checks++;
    if (int'($signed(p)) != -2814 || {<<{h}} !== 8'd227 || {<<{d}} !== 8'd161) begin
      failures++;
      $display("FAIL -67 x 42: p=%0d h=%b d=%b", $signed(p), h, d);
    end
    // Waveform sequence; H and D read 48 and 32 there.
    for (int k = 4; k <= 8; k++) begin
      apply(4, k);
      checks++;
      if (int'($signed(p)) != 4 * k || {<<{h}} !== 8'd48 || {<<{d}} !== 8'd32) begin
        failures++;
        $display("FAIL 4 x %0d gave %0d h=%b d=%b", k, $signed(p), h, d);
      end
    end
    // Unsigned small-operand sequence 5 x {2, 4, 6, 8} = {10, 20, 30, 40}.
    for (int k = 2; k <= 8; k += 2) begin
      apply(5, k);
      checks++;
      if (int'(p) != 5 * k) begin
        failures++;
        $display("FAIL 5 x %0d gave %0d", k, p);
      end
    end
    // Every operand pair.
    for (int xv = 0; xv < (1 << N); xv++)
      for (int yv = 0; yv < (1 << N); yv++)
        apply(xv, yv);
    checks++;
    if (n_wrap != 1) begin
      failures++;
      $display("FAIL expected exactly one wrapping pair, saw %0d", n_wrap);
    end
    $display("mechanism counts:");
    tally("row skip", n_skip);
    tally("row add", n_add);
    tally("row subtract", n_sub);
    tally("negative multiplicand", n_yneg);
    tally("negative multiplier", n_xneg);
    tally("wrapping pair", n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
