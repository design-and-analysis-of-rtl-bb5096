// Self-checking testbench for lfsr_dff.
//
// Drives random data on d and checks that q equals the d sampled at the
// previous rising edge, that q does not change between edges, and that
// raising reset clears q at once, without waiting for a clock edge, and
// holds it cleared across edges until reset falls.
module tb_lfsr_dff;

  logic clk = 1'b0;
  logic reset, d, q;
  logic expected;
  int   checks   = 0;
  int   failures = 0;
  int   async_resets = 0;

  lfsr_dff dut (.clk(clk), .reset(reset), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    d     = 1'b1;
    #2;
    check(1'b0, "reset at start");
    @(posedge clk); #1;
    check(1'b0, "reset holds over an edge with d=1");
    @(negedge clk);
    reset = 1'b0;
    expected = 1'b0;
    for (int n = 0; n < 200; n++) begin
      d = 1'($urandom);
      @(posedge clk);
      expected = d;
      #1;
      check(expected, "q follows d");
      d = ~d;              // change d between edges: q must hold
      #3;
      check(expected, "q holds between edges");
      if (n % 25 == 24 && q == 1'b1) begin
        reset = 1'b1;      // asynchronous: takes effect before the next edge
        #1;
        async_resets++;
        check(1'b0, "asynchronous clear");
        @(negedge clk);
        reset = 1'b0;
      end
    end
    checks++;
    if (async_resets == 0) begin
      failures++;
      $display("FAIL asynchronous reset was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
