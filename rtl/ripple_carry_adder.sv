// ripple_carry_adder: WIDTH-bit ripple-carry adder.
//
// A chain of full adders: c[0] = cin, s[i] = a[i]^b[i]^c[i],
// c[i+1] = a[i]b[i] + c[i](a[i]^b[i]), cout = c[WIDTH]. Delay grows linearly
// with WIDTH; on an FPGA synthesis maps the chain onto the dedicated fast
// carry logic. Combinational.
//
// In this design it is the 4-bit block that finishes the sum inside the
// sparse Kogge-Stone and spanning-tree adders, each block taking its carry-in
// from the prefix tree. Its full-adder form is the textbook one.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1]   = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[WIDTH];

endmodule
