// bypass_mux: output multiplexer placed after each adder under test.
//
// out = include_adder ? adder_word : bypass_word. With the select at 1 the
// measured path is ROM -> adder -> multiplexer -> pin; at 0 it is
// ROM -> multiplexer -> pin, so subtracting the two delays leaves the adder's
// own delay. The select comes from a board switch. Combinational. The
// multiplexer and its purpose follow the published test circuit; the select
// polarity is this design's choice.
module bypass_mux #(
  parameter int unsigned WIDTH = 17
) (
  input  logic             include_adder,
  input  logic [WIDTH-1:0] adder_word,
  input  logic [WIDTH-1:0] bypass_word,
  output logic [WIDTH-1:0] out
);

  always_comb out = include_adder ? adder_word : bypass_word;

endmodule
