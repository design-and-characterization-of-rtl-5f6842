// tb_gray_cell: exhaustive self-checking testbench for gray_cell.
//
// Applies all 8 combinations of (gL,pL,gR) and compares g_out with the
// carry into the next bit worked out case by case: the left span generates,
// or it propagates the carry that the right span produced.
module tb_gray_cell;

  import prefix_pkg::*;

  gp_t  left;
  logic g_right, g_out;
  int checks = 0;
  int failures = 0;

  gray_cell dut (.left(left), .g_right(g_right), .g_out(g_out));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g;
    for (int v = 0; v < 8; v++) begin
      {left.g, left.p, g_right} = 3'(v);
      #1;
      exp_g = left.g ? 1'b1 : (left.p ? g_right : 1'b0);
      checks++;
      if (g_out !== exp_g) begin
        failures++;
        $display("FAIL L=(%0d,%0d) gR=%0d g_out=%0d", left.g, left.p, g_right, g_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
