// End-to-end, full-size testbench for lfsr5 at its default parameters.
//
// A reference model kept in the testbench (shift every bit up one place and
// load XNOR of bits 1 and 4 into bit 0) predicts each state; the testbench
// compares the parallel output against it on every clock. It also checks:
//   - reset clears the register at once, and again in the middle of a run;
//   - exactly one new state per clock, the start state recurring after
//     exactly 31 clocks, with 31 different states in between and the
//     all-ones word never among them;
//   - the published 31-entry transition table. That table lists its states
//     with the bits in the order {q[1], q[2], q[3], q[4], q[0]} and its
//     transitions in the opposite direction to the register's stepping, so
//     each state is relabelled and the table is walked backwards;
//   - that reset, both feedback values, and the wrap of the cycle all
//     happened at least once.
module tb_lfsr5;
  import lfsr_pkg::*;

  localparam int unsigned W = LFSR_WIDTH;

  logic         clk = 1'b0;
  logic         reset;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int           checks   = 0;
  int           failures = 0;

  // Mechanism counters.
  int n_reset    = 0;
  int n_fb_one   = 0;
  int n_fb_zero  = 0;
  int n_wrap     = 0;
  int n_table    = 0;

  // Published transition table: entry k is a "present state", entry k+1
  // (cyclically) its "next state", in the table's bit labelling.
  localparam logic [4:0] TABLE2 [31] = '{
    5'h06, 5'h0E, 5'h1C, 5'h19, 5'h13, 5'h05, 5'h08, 5'h10,
    5'h03, 5'h04, 5'h0A, 5'h14, 5'h0B, 5'h16, 5'h0F, 5'h1E,
    5'h1D, 5'h1B, 5'h17, 5'h0D, 5'h1A, 5'h15, 5'h09, 5'h12,
    5'h07, 5'h0C, 5'h18, 5'h11, 5'h01, 5'h00, 5'h02
  };

  lfsr5 dut (.clk(clk), .reset(reset), .q(q));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_next(input logic [W-1:0] s);
    logic fb;
    fb = (s[1] == s[4]);   // XNOR written as equality
    return {s[3:0], fb};
  endfunction

  function automatic logic [4:0] relabel(input logic [4:0] s);
    return {s[1], s[2], s[3], s[4], s[0]};
  endfunction

  function automatic int table_index(input logic [4:0] v);
    for (int k = 0; k < 31; k++) if (TABLE2[k] == v) return k;
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%h model=%h at %0t", what, q, model, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] start;
    bit           seen [2**W];
    int           tidx, prev_tidx;

    // Reset once, then clock.
    reset = 1'b1;
    #2;
    n_reset++;
    check(q == '0, "asynchronous reset clears the register");
    @(posedge clk); #1;
    check(q == '0, "register stays clear while reset is high");
    @(negedge clk);
    reset = 1'b0;
    model = '0;

    // Three full periods, checking every step against the model.
    start = q;
    foreach (seen[i]) seen[i] = 1'b0;
    prev_tidx = table_index(relabel(q));
    check(prev_tidx >= 0, "reset state appears in the published table");
    for (int n = 1; n <= 3 * LFSR_PERIOD; n++) begin
      if (model[1] == model[4]) n_fb_one++; else n_fb_zero++;
      model = ref_next(model);
      @(posedge clk); #1;
      check(q == model, "next state matches the reference model");
      check(q != '1, "all-ones lock-up state never reached");
      // Walking the register forward walks the table backwards.
      tidx = table_index(relabel(q));
      check(tidx == (prev_tidx + 30) % 31, "step agrees with the published table");
      if (tidx == (prev_tidx + 30) % 31) n_table++;
      prev_tidx = tidx;
      if (n <= LFSR_PERIOD) begin
        check(!seen[q], "state not repeated within one period");
        seen[q] = 1'b1;
      end
      if (n % LFSR_PERIOD == 0) begin
        check(q == start, "start state recurs after exactly 31 clocks");
        n_wrap++;
      end else begin
        check(q != start, "start state does not recur early");
      end
    end
    begin
      automatic int distinct = 0;
      foreach (seen[i]) distinct += int'(seen[i]);
      check(distinct == LFSR_PERIOD, "31 distinct states in one period");
    end

    // Reset in the middle of a run, between clock edges.
    repeat (7) @(posedge clk);
    @(negedge clk);
    check(q != '0, "register is away from the cleared state before reset");
    reset = 1'b1;
    #1;
    n_reset++;
    check(q == '0, "mid-run asynchronous reset clears the register");
    @(negedge clk);
    reset = 1'b0;
    model = '0;
    for (int n = 0; n < 10; n++) begin
      model = ref_next(model);
      @(posedge clk); #1;
      check(q == model, "sequence restarts from the cleared state");
    end

    check(n_reset >= 2, "reset exercised");
    check(n_fb_one > 0 && n_fb_zero > 0, "feedback produced both values");
    check(n_wrap == 3, "cycle wrapped three times");
    check(n_table == 3 * LFSR_PERIOD, "every step matched the published table");
    $display("mechanisms: reset=%0d feedback_one=%0d feedback_zero=%0d wrap=%0d table_steps=%0d",
             n_reset, n_fb_one, n_fb_zero, n_wrap, n_table);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
