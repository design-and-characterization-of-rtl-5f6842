// pattern_rom: read-only store of the input vectors applied to the adders.
//
// Each word holds one test vector {cin, b, a}. Reads are synchronous: the
// vector addressed in cycle t appears on a, b, cin after the clock edge, as
// with an FPGA block RAM. The contents are computed when the design is
// elaborated, so no data file is needed:
//   addresses 0 .. DEPTH/2-1, the worst-case toggle pattern:
//     even address: a = b = all ones, cin = 1   -> every bit generates (1,0)
//     odd address:  a = all ones, b = 0, cin = 0 -> every bit propagates (0,1)
//   Alternating the two makes every prefix cell in every adder change state
//   on every vector, so the slowest path through the carry tree is exercised.
//   addresses DEPTH/2 .. DEPTH-1: pseudo-random words from a 32-bit xorshift
//   generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) seeded with
//   32'h2545F491 ^ address; a, b and cin take successive outputs, 32 bits at a
//   time from the least significant end.
// The worst-case pattern follows the published test scheme; the ROM depth,
// the random half and the read timing are this design's choices.
module pattern_rom #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned WW   = 2 * WIDTH + 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] b,
  output logic             cin
);

  function automatic logic [31:0] xorshift32(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  // Word layout: [WW-1] = cin, [2*WIDTH-1:WIDTH] = b, [WIDTH-1:0] = a.
  function automatic logic [WW-1:0] rom_word(int unsigned idx);
    logic [WW-1:0] w;
    logic [31:0]   x;
    if (idx < DEPTH / 2) begin
      if (idx % 2 == 0) w = {1'b1, {WIDTH{1'b1}}, {WIDTH{1'b1}}};
      else              w = {1'b0, {WIDTH{1'b0}}, {WIDTH{1'b1}}};
    end else begin
      x = 32'h2545F491 ^ idx;
      w = '0;
      for (int unsigned i = 0; i < WW; i += 32) begin
        x = xorshift32(x);
        for (int unsigned j = 0; j < 32; j++)
          if (i + j < WW) w[i+j] = x[j];
      end
    end
    return w;
  endfunction

  logic [WW-1:0] mem [DEPTH];
  logic [WW-1:0] rd;

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = rom_word(i);
  end

  always_ff @(posedge clk) rd <= mem[addr];

  assign a   = rd[WIDTH-1:0];
  assign b   = rd[2*WIDTH-1:WIDTH];
  assign cin = rd[WW-1];

endmodule
