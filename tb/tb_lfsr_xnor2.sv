// Self-checking testbench for lfsr_xnor2.
//
// Applies all four input combinations several times in a shuffled order and
// compares c with the XNOR truth table (high exactly when a equals b),
// written out here as a constant rather than computed from an operator.
module tb_lfsr_xnor2;

  logic a, b, c;
  int   checks   = 0;
  int   failures = 0;

  // Expected output indexed by {a, b}: 00 -> 1, 01 -> 0, 10 -> 0, 11 -> 1.
  localparam logic [3:0] TRUTH = 4'b1001;

  lfsr_xnor2 dut (.a(a), .b(b), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      logic [1:0] sel;
      sel = (n < 4) ? 2'(n) : 2'($urandom_range(0, 3));
      {a, b} = sel;
      #1;
      checks++;
      if (c !== TRUTH[sel]) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b expected %b", a, b, c, TRUTH[sel]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
