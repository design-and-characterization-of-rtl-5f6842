// tb_sparse_kogge_stone_adder: self-checking testbench for sparse_kogge_stone_adder.
//
// Instantiates sparse_kogge_stone_adder at widths 4, 8, 16, 32, 64, 128 (the default 16 among them) on
// the low bits of one 128-bit stimulus, and compares every {cout, sum} with
// the sum a + b + cin computed here in (W+1)-bit arithmetic. Stimulus:
// directed vectors (zero, full carry propagation from the carry-in, all
// generate, a carry started at each bit k that ripples to the top, and the
// alternating generate/propagate worst-case pair) followed by random vectors.
// Everything is combinational: each vector settles for one time unit before checking.
module tb_sparse_kogge_stone_adder;

  localparam int NW = 6;
  localparam int WS [NW] = '{4, 8, 16, 32, 64, 128};

  logic [127:0] a, b;
  logic         cin;
  logic [NW-1:0] ok;
  int checks = 0;
  int failures = 0;

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int W = WS[w];
    logic [W-1:0] s;
    logic         co;
    logic [W:0]   expv;
    sparse_kogge_stone_adder #(.WIDTH(W)) dut (
      .a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .sum(s), .cout(co)
    );
    assign expv  = {1'b0, a[W-1:0]} + {1'b0, b[W-1:0]} + {{W{1'b0}}, cin};
    assign ok[w] = ({co, s} == expv);
  end

  task automatic apply(input logic [127:0] va, input logic [127:0] vb, input logic vc);
    a = va; b = vb; cin = vc;
    #1;
    for (int w = 0; w < NW; w++) begin
      checks++;
      if (!ok[w]) begin
        failures++;
        if (failures <= 10)
          $display("FAIL width=%0d a=%h b=%h cin=%0d", WS[w], va, vb, vc);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);          // carry-in ripples through every bit
    apply('1, '1, 1'b1);          // every bit generates
    apply('1, '1, 1'b0);
    apply('1, '0, 1'b0);          // every bit propagates, no carry
    for (int k = 0; k < 128; k++) begin
      apply('1, 128'(1) << k, 1'b0); // carry born at bit k, propagates up
      apply(~(128'(1) << k), 128'(1) << k, 1'b1);
    end
    for (int r = 0; r < 8; r++) begin
      apply('1, '1, 1'b1);          // worst-case pair, alternated
      apply('1, '0, 1'b0);
    end
    for (int r = 0; r < 3000; r++)
      apply({$urandom, $urandom, $urandom, $urandom},
            {$urandom, $urandom, $urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
