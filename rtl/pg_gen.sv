// pg_gen: bitwise generate/propagate for a WIDTH-bit adder.
//
// g[i] = a[i] & b[i], p[i] = a[i] ^ b[i]. The carry-in is folded into bit 0:
// g[0] = a[0]b[0] + p[0]cin, so every prefix network downstream sees an
// ordinary WIDTH-bit problem and the group generate G[i:0] is the carry into
// bit i+1; gp[i].p is a[i] ^ b[i] for every bit, bit 0 included, and is also
// the half-sum used by the final sum XORs. Combinational.
// Folding the carry-in into bit 0 is this design's choice.
module pg_gen
  import prefix_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output gp_t  [WIDTH-1:0] gp
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      gp[i].g = a[i] & b[i];
      gp[i].p = a[i] ^ b[i];
    end
    gp[0].g = (a[0] & b[0]) | ((a[0] ^ b[0]) & cin);
  end

endmodule
