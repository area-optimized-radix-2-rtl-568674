// c_cell_tb: exhaustive self-checking test of the Booth control cell.
//
// For each of the four multiplier bit pairs (x_i, x_(i-1)) the expected
// row operation follows the radix-2 Booth rule: 00 and 11 skip (H = 0),
// 01 adds (H = 1, D = 0), 10 subtracts (H = 1, D = 1). The two garbage lines
// must be x_(i-1) and x_i AND x_(i-1). A watchdog bounds the run.
module c_cell_tb;
  import rev_booth_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        x_i, x_im1;
  booth_ctrl_t ctrl;
  logic [1:0]  garbage;
  int checks = 0;
  int failures = 0;

  c_cell dut (.x_i(x_i), .x_im1(x_im1), .ctrl(ctrl), .garbage(garbage));

  initial begin
    for (int v = 0; v < 4; v++) begin
      int weight;   // Booth digit x_(i-1) - x_i
      {x_i, x_im1} = 2'(v);
      @(posedge clk);
      weight = int'(x_im1) - int'(x_i);
      checks++;
      if (weight == 0) begin
        if (ctrl.h !== 1'b0) begin
          failures++;
          $display("FAIL pair %b%b: expected skip, got HD=%b%b", x_i, x_im1, ctrl.h, ctrl.d);
        end
      end else if (weight == 1) begin
        if ({ctrl.h, ctrl.d} !== 2'b10) begin
          failures++;
          $display("FAIL pair %b%b: expected add (HD=10), got %b%b", x_i, x_im1, ctrl.h, ctrl.d);
        end
      end else begin
        if ({ctrl.h, ctrl.d} !== 2'b11) begin
          failures++;
          $display("FAIL pair %b%b: expected subtract (HD=11), got %b%b", x_i, x_im1, ctrl.h, ctrl.d);
        end
      end
      checks++;
      if (garbage !== {x_im1, x_i & x_im1}) begin
        failures++;
        $display("FAIL pair %b%b: garbage %b", x_i, x_im1, garbage);
      end
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
