// b_cell_tb: exhaustive self-checking test of the add / subtract / skip cell.
//
// Applies all 32 combinations of a, b, c, H, D. The expected results are
// computed arithmetically, independently of the cell's logic equations:
//   H = 0        : Z = a (carry output not checked, it plays no role)
//   H = 1, D = 0 : {Cout, Z} = a + b + c
//   H = 1, D = 1 : Z = (a - b - c) mod 2, Cout = 1 when a - b - c < 0
// and in every case H, D and b must be handed on unchanged. A watchdog
// bounds the run.
module b_cell_tb;
  import rev_booth_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        a, b, c, z, cout, b_o;
  booth_ctrl_t ctrl_i, ctrl_o;
  logic [1:0]  garbage;
  int checks = 0;
  int failures = 0;
  int n_skip = 0, n_add = 0, n_sub = 0;

  b_cell dut (
    .a(a), .b(b), .c(c), .ctrl_i(ctrl_i),
    .z(z), .cout(cout), .b_o(b_o), .ctrl_o(ctrl_o), .garbage(garbage)
  );

  initial begin
    for (int v = 0; v < 32; v++) begin
      int r;
      {a, b, c, ctrl_i.h, ctrl_i.d} = 5'(v);
      @(posedge clk);
      checks++;
      if (!ctrl_i.h) begin
        n_skip++;
        if (z !== a) begin
          failures++;
          $display("FAIL skip a=%b b=%b c=%b: z=%b", a, b, c, z);
        end
      end else if (!ctrl_i.d) begin
        n_add++;
        r = int'(a) + int'(b) + int'(c);
        if ({cout, z} !== r[1:0]) begin
          failures++;
          $display("FAIL add a=%b b=%b c=%b: cout,z=%b%b want %0d", a, b, c, cout, z, r);
        end
      end else begin
        n_sub++;
        r = int'(a) - int'(b) - int'(c);
        if (z !== r[0] || cout !== (r < 0)) begin
          failures++;
          $display("FAIL sub a=%b b=%b c=%b: borrow,z=%b%b want %0d", a, b, c, cout, z, r);
        end
      end
      checks++;
      if (b_o !== b || ctrl_o !== ctrl_i) begin
        failures++;
        $display("FAIL pass-through: b_o=%b ctrl_o=%b", b_o, ctrl_o);
      end
    end
    checks++;
    if (n_skip != 16 || n_add != 8 || n_sub != 8) begin
      failures++;
      $display("FAIL operation coverage skip=%0d add=%0d sub=%0d", n_skip, n_add, n_sub);
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
