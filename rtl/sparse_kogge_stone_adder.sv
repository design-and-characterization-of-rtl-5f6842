// sparse_kogge_stone_adder: hybrid adder, sparse Kogge-Stone carry tree plus
// 4-bit ripple-carry blocks.
//
// The tree computes carries only at 4-bit group boundaries:
//   1. pg_gen gives bit (g,p), carry-in folded into bit 0;
//   2. group_gp4 joins each 4-bit group into (G,P) (two cell levels);
//   3. a Kogge-Stone tree over the NG = WIDTH/4 groups (log2(NG) levels, gray
//      cells where the span reaches bit 0, black cells elsewhere) gives
//      G[4j+3:0], the carry into group j+1;
//   4. each group's ripple_carry_adder adds its 4 bits with that carry.
// cout is the carry out of the top ripple-carry block. The tree is a quarter
// the size of the full Kogge-Stone tree, at the price of a 4-bit ripple at the
// end.
//
// Combinational: a, b, cin in; sum, cout out. WIDTH a power of two, at least
// 4. The hybrid structure (sparse tree finished by 4-bit RCAs) follows the
// published design; the exact cell placement inside the tree is this design's
// sparsity-4 construction.
module sparse_kogge_stone_adder
  import prefix_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG     = WIDTH / 4;
  localparam int unsigned LEVELS = $clog2(NG);

  if (!is_pow2_at_least(WIDTH, 4)) begin : g_width_check
    $error("sparse_kogge_stone_adder: WIDTH must be a power of two >= 4");
  end

  gp_t  [WIDTH-1:0] bit_gp;
  gp_t  [NG-1:0]    lvl [LEVELS+1];   // group (g,p) after k tree levels
  logic [NG-1:0]    gcin;             // carry into each group
  logic [NG-1:0]    gcout;            // carry out of each ripple block

  pg_gen #(.WIDTH(WIDTH)) u_pg (
    .a(a), .b(b), .cin(cin), .gp(bit_gp)
  );

  for (genvar j = 0; j < NG; j++) begin : g_group
    group_gp4 u_grp (.bit_gp(bit_gp[4*j +: 4]), .grp(lvl[0][j]));
  end

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    for (genvar j = 0; j < NG; j++) begin : g_pos
      if (j < D) begin : g_pass
        assign lvl[k+1][j] = lvl[k][j];
      end else if (j < 2 * D) begin : g_gray
        gray_cell u_gc (
          .left(lvl[k][j]), .g_right(lvl[k][j-D].g), .g_out(lvl[k+1][j].g)
        );
        assign lvl[k+1][j].p = 1'b0;
      end else begin : g_black
        black_cell u_bc (
          .left(lvl[k][j]), .right(lvl[k][j-D]), .out(lvl[k+1][j])
        );
      end
    end
  end

  for (genvar j = 0; j < NG; j++) begin : g_rca
    if (j == 0) begin : g_first
      assign gcin[j] = cin;
    end else begin : g_rest
      assign gcin[j] = lvl[LEVELS][j-1].g;
    end
    ripple_carry_adder #(.WIDTH(4)) u_rca (
      .a(a[4*j +: 4]), .b(b[4*j +: 4]), .cin(gcin[j]),
      .sum(sum[4*j +: 4]), .cout(gcout[j])
    );
  end

  assign cout = gcout[NG-1];

endmodule
