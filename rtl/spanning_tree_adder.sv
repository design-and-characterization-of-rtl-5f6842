// spanning_tree_adder: spanning-tree carry-lookahead adder with 4-bit
// ripple-carry blocks.
//
// Like the sparse Kogge-Stone adder it only computes the carry into every
// 4-bit group and lets 4-bit ripple-carry blocks finish the sums, but the
// carry tree over the NG = WIDTH/4 groups is a spanning (Brent-Kung) tree
// instead of a Kogge-Stone tree:
//   up-sweep, level k (d = 2^k), k = 0 .. log2(NG)-1: group j with
//     (j+1) mod 2d == 0 joins group j-d (gray cell when the span reaches
//     bit 0, black cell otherwise);
//   down-sweep, d = NG/4 .. 1: group j with (j+1) mod 2d == d, j > d,
//     joins the completed prefix at j-d (gray cell).
// The tree uses about 2*NG cells instead of NG*log2(NG), but the groups
// completed in the down-sweep pass through extra cell levels, so some
// outputs are a logic stage (or more) slower than in the Kogge-Stone adder.
//
// Combinational: a, b, cin in; sum, cout out. WIDTH a power of two, at least
// 4. The spanning-tree-plus-4-bit-RCA structure follows the published design;
// the Brent-Kung form of the spanning tree is this design's construction.
module spanning_tree_adder
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
  localparam int unsigned LUP    = $clog2(NG);
  localparam int unsigned LDOWN  = (LUP > 0) ? LUP - 1 : 0;
  localparam int unsigned STAGES = LUP + LDOWN;

  if (!is_pow2_at_least(WIDTH, 4)) begin : g_width_check
    $error("spanning_tree_adder: WIDTH must be a power of two >= 4");
  end

  gp_t  [WIDTH-1:0] bit_gp;
  gp_t  [NG-1:0]    st [STAGES+1];    // group (g,p) after each tree stage
  logic [NG-1:0]    gcin;
  logic [NG-1:0]    gcout;

  pg_gen #(.WIDTH(WIDTH)) u_pg (
    .a(a), .b(b), .cin(cin), .gp(bit_gp)
  );

  for (genvar j = 0; j < NG; j++) begin : g_group
    group_gp4 u_grp (.bit_gp(bit_gp[4*j +: 4]), .grp(st[0][j]));
  end

  // Up-sweep.
  for (genvar k = 0; k < LUP; k++) begin : g_up
    localparam int unsigned D = 1 << k;
    for (genvar j = 0; j < NG; j++) begin : g_pos
      if (((j + 1) % (2 * D)) != 0) begin : g_pass
        assign st[k+1][j] = st[k][j];
      end else if (j + 1 == 2 * D) begin : g_gray
        gray_cell u_gc (
          .left(st[k][j]), .g_right(st[k][j-D].g), .g_out(st[k+1][j].g)
        );
        assign st[k+1][j].p = 1'b0;
      end else begin : g_black
        black_cell u_bc (
          .left(st[k][j]), .right(st[k][j-D]), .out(st[k+1][j])
        );
      end
    end
  end

  // Down-sweep.
  for (genvar m = 0; m < LDOWN; m++) begin : g_down
    localparam int unsigned D = 1 << (LDOWN - 1 - m);
    localparam int unsigned S = LUP + m;
    for (genvar j = 0; j < NG; j++) begin : g_pos
      if ((((j + 1) % (2 * D)) == D) && (j > D)) begin : g_gray
        gray_cell u_gc (
          .left(st[S][j]), .g_right(st[S][j-D].g), .g_out(st[S+1][j].g)
        );
        assign st[S+1][j].p = 1'b0;
      end else begin : g_pass
        assign st[S+1][j] = st[S][j];
      end
    end
  end

  for (genvar j = 0; j < NG; j++) begin : g_rca
    if (j == 0) begin : g_first
      assign gcin[j] = cin;
    end else begin : g_rest
      assign gcin[j] = st[STAGES][j-1].g;
    end
    ripple_carry_adder #(.WIDTH(4)) u_rca (
      .a(a[4*j +: 4]), .b(b[4*j +: 4]), .cin(gcin[j]),
      .sum(sum[4*j +: 4]), .cout(gcout[j])
    );
  end

  assign cout = gcout[NG-1];

endmodule
