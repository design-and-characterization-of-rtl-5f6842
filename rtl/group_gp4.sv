// group_gp4: (G,P) of one 4-bit group from its four bit (g,p) pairs.
//
// Two levels of black cells: bits 3:2 and 1:0 are joined first, then the two
// halves, giving G[3:0] and P[3:0]. Combinational. This is the first part of
// the sparse Kogge-Stone and spanning-tree carry networks, which both only
// need the carry into every fourth bit; the two-level grouping is this
// design's reading of those networks.
module group_gp4
  import prefix_pkg::*;
(
  input  gp_t [3:0] bit_gp,
  output gp_t       grp
);

  gp_t hi, lo;

  black_cell u_hi  (.left(bit_gp[3]), .right(bit_gp[2]), .out(hi));
  black_cell u_lo  (.left(bit_gp[1]), .right(bit_gp[0]), .out(lo));
  black_cell u_grp (.left(hi),        .right(lo),        .out(grp));

endmodule
