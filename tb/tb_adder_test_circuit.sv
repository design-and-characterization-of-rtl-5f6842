// tb_adder_test_circuit: end-to-end testbench for adder_test_circuit at its
// default parameters (128-bit adders, 16-word pattern ROM).
//
// Holds reset for three clocks, then runs the circuit for eight passes over
// the ROM. The board switch is on for the first four passes, off for the
// fifth and toggled every clock afterwards. On every cycle it predicts,
// independently of the design:
//   - which ROM address is on the adder inputs (one clock after the counter
//     addressed it, counting from the first edge after reset);
//   - that word, from its own xorshift32 reference of the ROM contents;
//   - each output: {cout, sum} = a + b + cin when the adders are included,
//     {cin, a} when they are bypassed.
// It counts how often each mechanism of the test circuit was exercised:
// adder path, bypass path, a worst-case generate/propagate toggle on the
// adder path, a pseudo-random vector, a carry out of the top bit and an
// address wrap. One that never happened counts as a failure.
module tb_adder_test_circuit;

  localparam int W  = 128;
  localparam int D  = 16;
  localparam int WW = 2 * W + 1;

  logic         clk;
  logic         rst_n;
  logic         include_adder;
  logic [3:0]   vec_addr;
  logic [W:0]   ks_out, sks_out, st_out;

  int checks = 0;
  int failures = 0;
  int n_adder = 0, n_bypass = 0, n_toggle = 0, n_random = 0, n_cout = 0, n_wrap = 0;

  adder_test_circuit dut (
    .clk(clk), .rst_n(rst_n), .include_adder(include_adder),
    .vec_addr(vec_addr), .ks_out(ks_out), .sks_out(sks_out), .st_out(st_out)
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

  function automatic logic [WW-1:0] ref_word(int idx);
    logic [287:0] bits;
    logic [31:0]  s;
    if (idx < D / 2)
      return (idx % 2 == 0) ? {1'b1, {2*W{1'b1}}} : {1'b0, {W{1'b0}}, {W{1'b1}}};
    s = 32'h2545F491 ^ 32'(idx);
    for (int k = 0; k < 9; k++) begin
      s = ref_next(s);
      bits[32*k +: 32] = s;
    end
    return bits[WW-1:0];
  endfunction

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WW-1:0] v, prev_v;
    logic [W-1:0]  va, vb;
    logic          vc;
    logic [W:0]    exp_out;
    int            exp_addr;

    rst_n = 1'b0;
    include_adder = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    prev_v = '0;
    for (int cyc = 0; cyc < 8 * D; cyc++) begin
      // Switch setting for the coming cycle.
      if (cyc < 4 * D)      include_adder = 1'b1;
      else if (cyc < 5 * D) include_adder = 1'b0;
      else                  include_adder = cyc[0];
      @(posedge clk);
      #1;
      exp_addr = cyc % D;
      v  = ref_word(exp_addr);
      va = v[W-1:0];
      vb = v[2*W-1:W];
      vc = v[WW-1];
      check("vec_addr", vec_addr == 4'(exp_addr));
      if (cyc > 0 && exp_addr == 0) n_wrap++;
      if (include_adder) begin
        exp_out = {1'b0, va} + {1'b0, vb} + {{W{1'b0}}, vc};
        n_adder++;
        if (exp_addr >= D / 2) n_random++;
        if (cyc > 0 && exp_addr > 0 && exp_addr < D / 2 &&
            (va & vb) == ~(prev_v[W-1:0] & prev_v[2*W-1:W])) n_toggle++;
        if (exp_out[W]) n_cout++;
      end else begin
        exp_out = {vc, va};
        n_bypass++;
      end
      check("ks_out",  ks_out  == exp_out);
      check("sks_out", sks_out == exp_out);
      check("st_out",  st_out  == exp_out);
      prev_v = v;
      @(negedge clk);
    end
    $display("mechanisms: adder=%0d bypass=%0d worst_case_toggle=%0d random=%0d carry_out=%0d wrap=%0d",
             n_adder, n_bypass, n_toggle, n_random, n_cout, n_wrap);
    check("adder path used",       n_adder  > 0);
    check("bypass path used",      n_bypass > 0);
    check("worst-case toggle",     n_toggle > 0);
    check("random vectors",        n_random > 0);
    check("carry out seen",        n_cout   > 0);
    check("address wrap",          n_wrap   > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
