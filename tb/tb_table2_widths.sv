// tb_table2_widths: runs adder_test_circuit at every adder width of the
// published FPGA delay study (4, 16, 32, 64 and 128 bits) side by side.
//
// All five circuits share the clock, reset and board switch. For each width
// the testbench predicts, every cycle, the vector on the adder inputs (its own
// xorshift32 reference of the ROM: the words are filled from the least
// significant end, so every width uses the low 2W+1 bits of one bit stream)
// and checks the three adder outputs, with the adders included for two ROM
// passes and bypassed for one. It also counts, per width, the worst-case
// generate/propagate toggles that reached the outputs; a width that saw none
// counts as a failure.
module tb_table2_widths;

  localparam int NW = 5;
  localparam int WS [NW] = '{4, 16, 32, 64, 128};
  localparam int D  = 16;

  logic clk;
  logic rst_n;
  logic include_adder;
  logic running;
  int   cyc;
  int   checks = 0;
  int   failures = 0;
  int   toggles [NW];

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic [31:0] ref_next(logic [31:0] s);
    logic [31:0] t;
    t = s ^ {s[18:0], 13'b0};
    t = t ^ {17'b0, t[31:17]};
    t = t ^ {t[26:0], 5'b0};
    return t;
  endfunction

  // Random ROM word `idx` as a 288-bit stream; a width-W ROM keeps 2W+1 bits.
  function automatic logic [287:0] ref_stream(int idx);
    logic [287:0] bits;
    logic [31:0]  s;
    s = 32'h2545F491 ^ 32'(idx);
    for (int k = 0; k < 9; k++) begin
      s = ref_next(s);
      bits[32*k +: 32] = s;
    end
    return bits;
  endfunction

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int W = WS[w];
    logic [3:0] vec_addr;
    logic [W:0] ks_out, sks_out, st_out;

    adder_test_circuit #(.WIDTH(W), .DEPTH(D)) dut (
      .clk(clk), .rst_n(rst_n), .include_adder(include_adder),
      .vec_addr(vec_addr), .ks_out(ks_out), .sks_out(sks_out), .st_out(st_out)
    );

    initial forever begin : check_cycle
      logic [2*W:0] v;
      logic [W:0]   exp_out;
      int           idx;
      @(posedge clk);
      #1;
      if (running) begin
        idx = cyc % D;
        if (idx < D / 2)
          v = (idx % 2 == 0) ? {1'b1, {2*W{1'b1}}} : {1'b0, {W{1'b0}}, {W{1'b1}}};
        else
          v = ref_stream(idx)[2*W:0];
        exp_out = include_adder
                ? ({1'b0, v[W-1:0]} + {1'b0, v[2*W-1:W]} + {{W{1'b0}}, v[2*W]})
                : {v[2*W], v[W-1:0]};
        checks += 4;
        if (vec_addr != 4'(idx)) failures++;
        if (ks_out  != exp_out)  failures++;
        if (sks_out != exp_out)  failures++;
        if (st_out  != exp_out)  failures++;
        if (include_adder && idx > 0 && idx < D / 2 && ks_out == exp_out) toggles[w]++;
      end
    end
  end

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NW; w++) toggles[w] = 0;
    running = 1'b0;
    cyc = 0;
    rst_n = 1'b0;
    include_adder = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    running = 1'b1;
    for (int c = 0; c < 3 * D; c++) begin
      cyc = c;
      include_adder = (c < 2 * D);
      @(negedge clk);
    end
    running = 1'b0;
    for (int w = 0; w < NW; w++) begin
      $display("width %0d: worst-case toggles checked %0d", WS[w], toggles[w]);
      checks++;
      if (toggles[w] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
