// tb_pattern_rom: self-checking testbench for pattern_rom.
//
// Reads every address of a 16-word ROM, 40 bits wide (so the pseudo-random
// words span three generator outputs), in a shuffled order, and checks:
//   - one clock of read latency;
//   - the worst-case half: even words a = b = all ones, cin = 1; odd words
//     a = all ones, b = 0, cin = 0; and that between neighbours every bit's
//     (g,p) = (a&b, a^b) flips between (1,0) and (0,1);
//   - the random half against a separately written xorshift32 reference.
module tb_pattern_rom;


  localparam int W = 40;
  localparam int D = 16;

  logic         clk;
  logic [3:0]   addr;
  logic [W-1:0] a, b;
  logic         cin;
  int checks = 0;
  int failures = 0;

  pattern_rom #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .addr(addr), .a(a), .b(b), .cin(cin)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_next(logic [31:0] s);
    logic [31:0] t;
    t = s ^ {s[18:0], 13'b0};
    t = t ^ {17'b0, t[31:17]};
    t = t ^ {t[26:0], 5'b0};
    return t;
  endfunction

  function automatic logic [2*W:0] ref_word(int idx);
    logic [95:0] bits;
    logic [31:0] s;
    if (idx < D / 2)
      return (idx % 2 == 0) ? {1'b1, {2*W{1'b1}}} : {1'b0, {W{1'b0}}, {W{1'b1}}};
    s = 32'h2545F491 ^ 32'(idx);
    for (int k = 0; k < 3; k++) begin
      s = ref_next(s);
      bits[32*k +: 32] = s;
    end
    return bits[2*W:0];
  endfunction

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s addr=%0d a=%h b=%h cin=%0d", what, addr, a, b, cin);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev_g, prev_p;
    int order [D];
    for (int i = 0; i < D; i++) order[i] = (i * 7 + 3) % D;
    addr = '0;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      addr = 4'(order[i]);
      @(posedge clk);
      #1;
      check("word", {cin, b, a} == ref_word(order[i]));
    end
    // Walk the worst-case half in order: (g,p) of every bit must flip.
    for (int i = 0; i < D / 2; i++) begin
      @(negedge clk);
      addr = 4'(i);
      @(posedge clk);
      #1;
      if (i > 0) check("toggle", ((a & b) == ~prev_g) && ((a ^ b) == ~prev_p)
                                 && ((a & b) != (a ^ b)));
      prev_g = a & b;
      prev_p = a ^ b;
    end
    // Latency: the new word appears only at the clock edge.
    @(negedge clk);
    addr = 4'(D - 1);
    #2;
    check("latency-hold", {cin, b, a} == ref_word(D / 2 - 1));
    @(posedge clk);
    #1;
    check("latency-update", {cin, b, a} == ref_word(D - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
