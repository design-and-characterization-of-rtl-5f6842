// tb_bypass_mux: self-checking testbench for bypass_mux.
//
// Drives random adder and bypass words with the select at both values and
// checks that the output follows the selected word.
module tb_bypass_mux;


  localparam int W = 17;

  logic         include_adder;
  logic [W-1:0] adder_word, bypass_word, out;
  int checks = 0;
  int failures = 0;

  bypass_mux #(.WIDTH(W)) dut (
    .include_adder(include_adder), .adder_word(adder_word),
    .bypass_word(bypass_word), .out(out)
  );

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      adder_word    = W'($urandom);
      bypass_word   = W'($urandom);
      include_adder = r[0];
      #1;
      checks++;
      if (out !== (r[0] ? adder_word : bypass_word)) begin
        failures++;
        $display("FAIL sel=%0d adder=%h bypass=%h out=%h", include_adder,
                 adder_word, bypass_word, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
