// Self-checking testbench for rev_dff, the level-sensitive carry storage
// cell.
//
// Part 1 drives clk and d with random levels and compares the cell with a
// reference kept in the testbench: while clk is 1 the stored bit follows d,
// while clk is 0 it keeps its value. Every step also checks qbar == !q and
// the garbage lines (Fredkin P = clk; Fredkin Q = d at rest). Part 2 uses
// the cell the way the serial adder does, with a 10-time-unit clock: d
// changes only while clk is 0, and q must change only in the high phase,
// holding its value through every low phase in which d differs from it.
// Counts loads, holds against a different d, and transparent updates, and
// fails if any of them never happened. Ends with the TB_RESULT line; a
// watchdog stops a hung run.
module rev_dff_tb;
  logic       clk, d, q, qbar;
  logic [1:0] garbage;
  logic       model;
  int checks = 0, failures = 0;
  int n_load = 0, n_hold_diff = 0, n_follow = 0;

  rev_dff dut (.clk(clk), .d(d), .q(q), .qbar(qbar), .garbage(garbage));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (clk=%0b d=%0b q=%0b qbar=%0b g=%b model=%0b)",
               $time, what, clk, d, q, qbar, garbage, model);
    end
  endtask

  task automatic check_outputs();
    check(q == model, "stored bit matches reference");
    check(qbar == !q, "qbar is the complement of q");
    check(garbage[0] == clk, "Fredkin P passes clk");
    check(garbage[1] == d, "Fredkin Q equals d at rest");
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load a known value first
    clk = 1'b1; d = 1'b0; #1;
    model = 1'b0;
    check_outputs();

    // Part 1: random levels
    for (int i = 0; i < 2000; i++) begin
      clk = 1'($urandom_range(1));
      d   = 1'($urandom_range(1));
      #1;
      if (clk) begin
        if (model != d) n_follow++;
        model = d;
        n_load++;
      end else if (d != model) begin
        n_hold_diff++;
      end
      check_outputs();
    end

    // Part 2: clocked use, d changes in the low phase only
    clk = 1'b0; #5;
    for (int cyc = 0; cyc < 500; cyc++) begin
      logic q_prev;
      q_prev = q;
      d = 1'($urandom_range(1));
      #4;
      check(q == q_prev, "q holds through the low phase");
      if (d != q_prev) n_hold_diff++;
      clk = 1'b1; #1;
      model = d;
      n_load++;
      check_outputs();
      #4;
      clk = 1'b0; #1;
      check_outputs();
    end

    // printed cursor values of the cell's waveform: e(clk)=1 d=1 -> q=1 qb=0
    clk = 1'b1; d = 1'b1; #1;
    check(q == 1'b1 && qbar == 1'b0, "waveform cursor vector");

    check(n_load > 0, "a load happened");
    check(n_hold_diff > 0, "a hold against a different d happened");
    check(n_follow > 0, "a transparent update happened");
    $display("loads=%0d holds_against_d=%0d transparent_updates=%0d",
             n_load, n_hold_diff, n_follow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
