// kogge_stone_adder: WIDTH-bit parallel-prefix adder with a Kogge-Stone tree.
//
// Bit (g,p) pairs come from pg_gen (carry-in folded into bit 0). The tree has
// log2(WIDTH) levels; at level k (distance d = 2^k) position i joins itself
// with position i-d:
//   i <  d      : passes through, its prefix is already complete;
//   d <= i < 2d : gray cell, the joined span reaches bit 0, only G is kept;
//   i >= 2d     : black cell, (G,P) of the span [i : i-2d+1].
// After the last level every position holds G[i:0], the carry into bit i+1,
// so sum[i] = (a[i]^b[i]) ^ c[i] with c[0] = cin, and cout = G[WIDTH-1:0].
// Logic depth is log2(WIDTH)+2 cells and each cell drives at most two others,
// the minimal depth and fan-out that give Kogge-Stone its name.
//
// Combinational: a, b, cin in; sum, cout out. WIDTH must be a power of two
// (at least 2). The tree follows the published 16-bit Kogge-Stone figure and
// its black/gray cell split; the carry-in handling is this design's choice.
module kogge_stone_adder
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

  localparam int unsigned LEVELS = $clog2(WIDTH);

  if (!is_pow2_at_least(WIDTH, 2)) begin : g_width_check
    $error("kogge_stone_adder: WIDTH must be a power of two >= 2");
  end

  // lvl[k][i]: (g,p) at position i after k tree levels.
  gp_t  [WIDTH-1:0] lvl [LEVELS+1];
  logic [WIDTH:0]   c;

  pg_gen #(.WIDTH(WIDTH)) u_pg (
    .a(a), .b(b), .cin(cin), .gp(lvl[0])
  );

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    for (genvar i = 0; i < WIDTH; i++) begin : g_pos
      if (i < D) begin : g_pass
        assign lvl[k+1][i] = lvl[k][i];
      end else if (i < 2 * D) begin : g_gray
        gray_cell u_gc (
          .left(lvl[k][i]), .g_right(lvl[k][i-D].g), .g_out(lvl[k+1][i].g)
        );
        assign lvl[k+1][i].p = 1'b0;  // span reaches bit 0: P no longer used
      end else begin : g_black
        black_cell u_bc (
          .left(lvl[k][i]), .right(lvl[k][i-D]), .out(lvl[k+1][i])
        );
      end
    end
  end

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < WIDTH; i++) begin
      c[i+1] = lvl[LEVELS][i].g;
      sum[i] = lvl[0][i].p ^ c[i];
    end
  end

  assign cout = c[WIDTH];

endmodule
