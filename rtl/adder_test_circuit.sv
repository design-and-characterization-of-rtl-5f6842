// adder_test_circuit: on-chip circuit for measuring carry-tree adder delay.
//
// A free-running address counter steps through pattern_rom, one vector
// {cin, b, a} per clock. The registered ROM output drives three adders side
// by side: the Kogge-Stone adder, the sparse Kogge-Stone adder and the
// spanning-tree carry-lookahead adder. Behind each adder a bypass_mux,
// selected by one board switch (include_adder), sends either the adder's
// {cout, sum} or the ROM word {cin, a} to that adder's output pins. A logic
// analyser on the pins measures the delay from the clock edge to the outputs
// with and without the adder; the difference is the adder delay, free of the
// ROM, multiplexer and interconnect delays.
//
// Timing: on the first rising edge with rst_n high the counter leaves 0; the
// vector at address vec_addr is on the adder inputs during the cycle after it
// was addressed, and the outputs are a combinational function of it.
// vec_addr is that vector's address, for triggering the analyser.
// rst_n is an active-low synchronous reset of the counter.
//
// The ROM, adders, per-adder multiplexers and shared switch follow the
// published test circuit; the counter, reset, ROM depth and bypass word are
// this design's choices. WIDTH defaults to 128, the widest carry-tree adders
// built in the study.
module adder_test_circuit #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             include_adder,
  output logic [AW-1:0]    vec_addr,
  output logic [WIDTH:0]   ks_out,
  output logic [WIDTH:0]   sks_out,
  output logic [WIDTH:0]   st_out
);

  logic [AW-1:0]    addr_q;
  logic [WIDTH-1:0] op_a, op_b;
  logic             op_cin;
  logic [WIDTH-1:0] ks_sum, sks_sum, st_sum;
  logic             ks_cout, sks_cout, st_cout;
  logic [WIDTH:0]   bypass_word;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_q   <= '0;
      vec_addr <= '0;
    end else begin
      addr_q   <= (addr_q == AW'(DEPTH - 1)) ? '0 : addr_q + 1'b1;
      vec_addr <= addr_q;
    end
  end

  pattern_rom #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_rom (
    .clk(clk), .addr(addr_q), .a(op_a), .b(op_b), .cin(op_cin)
  );

  kogge_stone_adder #(.WIDTH(WIDTH)) u_ks (
    .a(op_a), .b(op_b), .cin(op_cin), .sum(ks_sum), .cout(ks_cout)
  );

  sparse_kogge_stone_adder #(.WIDTH(WIDTH)) u_sks (
    .a(op_a), .b(op_b), .cin(op_cin), .sum(sks_sum), .cout(sks_cout)
  );

  spanning_tree_adder #(.WIDTH(WIDTH)) u_st (
    .a(op_a), .b(op_b), .cin(op_cin), .sum(st_sum), .cout(st_cout)
  );

  assign bypass_word = {op_cin, op_a};

  bypass_mux #(.WIDTH(WIDTH + 1)) u_mux_ks (
    .include_adder(include_adder), .adder_word({ks_cout, ks_sum}),
    .bypass_word(bypass_word), .out(ks_out)
  );

  bypass_mux #(.WIDTH(WIDTH + 1)) u_mux_sks (
    .include_adder(include_adder), .adder_word({sks_cout, sks_sum}),
    .bypass_word(bypass_word), .out(sks_out)
  );

  bypass_mux #(.WIDTH(WIDTH + 1)) u_mux_st (
    .include_adder(include_adder), .adder_word({st_cout, st_sum}),
    .bypass_word(bypass_word), .out(st_out)
  );

endmodule
