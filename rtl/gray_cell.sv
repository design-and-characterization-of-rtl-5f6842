// gray_cell: the carry operator reduced to its generate half.
//
//   g_out = gL + pL*gR
//
// Used where the joined span already reaches bit 0 (or the carry-in), so its
// group generate is the carry itself and no group propagate is needed any
// more. Combinational, one level of logic. The name "gray cell" and its role
// follow the published Kogge-Stone description.
module gray_cell
  import prefix_pkg::*;
(
  input  gp_t  left,
  input  logic g_right,
  output logic g_out
);

  assign g_out = left.g | (left.p & g_right);

endmodule
