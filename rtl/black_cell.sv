// black_cell: the fundamental carry operator of a parallel-prefix tree.
//
//   (gL, pL) o (gR, pR) = (gL + pL*gR, pL*pR)
//
// `left` describes the more significant span, `right` the adjacent less
// significant one; `out` describes the two spans joined. The operator is
// associative, which is what lets a prefix tree regroup it. Purely
// combinational, one level of logic (one LUT on an FPGA). The operator and the
// name "black cell" follow the published adder description.
module black_cell
  import prefix_pkg::*;
(
  input  gp_t left,
  input  gp_t right,
  output gp_t out
);

  always_comb begin
    out.g = left.g | (left.p & right.g);
    out.p = left.p & right.p;
  end

endmodule
