// tb_black_cell: exhaustive self-checking testbench for black_cell.
//
// Applies all 16 combinations of (gL,pL,gR,pR) and compares the result with
// the carry operator worked out from a truth table: the span generates when
// the left part generates, or propagates while the right part generates; it
// propagates only when both parts propagate.
module tb_black_cell;

  import prefix_pkg::*;

  gp_t left, right, out;
  int checks = 0;
  int failures = 0;

  black_cell dut (.left(left), .right(right), .out(out));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {left.g, left.p, right.g, right.p} = 4'(v);
      #1;
      // Case analysis, independent of the cell's equation.
      if (left.g)      exp_g = 1'b1;
      else if (left.p) exp_g = right.g;
      else             exp_g = 1'b0;
      exp_p = (left.p && right.p);
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL L=(%0d,%0d) R=(%0d,%0d) out=(%0d,%0d)",
                 left.g, left.p, right.g, right.p, out.g, out.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
