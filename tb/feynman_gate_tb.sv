// Self-checking testbench for feynman_gate.
//
// Applies all four input combinations and compares (p, q) with a truth table
// written out by hand (P = A, Q = A xor B), checks that the four output
// pairs are all different (the gate is reversible), and checks the two uses
// the storage cell relies on: B = 0 copies A, B = 1 gives A and its
// complement. Ends with the TB_RESULT line; a watchdog stops a hung run.
module feynman_gate_tb;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  // expected {p, q} indexed by {a, b}
  localparam logic [1:0] EXPECTED [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (a=%0b b=%0b p=%0b q=%0b)", what, a, b, p, q);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] seen;
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check({p, q} == EXPECTED[i], "truth table");
      seen[{p, q}] = 1'b1;
      if (b == 1'b0) check(p == a && q == a, "copy with B=0");
      else           check(p == a && q == !a, "complement with B=1");
    end
    check(seen == 4'hF, "outputs form a permutation of the inputs");
    // printed cursor values of the gate's waveform: a=1, b=0 -> p=1, q=1
    a = 1'b1; b = 1'b0; #1;
    check(p == 1'b1 && q == 1'b1, "waveform cursor vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
