// Self-checking testbench for peres_gate.
//
// Applies all eight input combinations and compares (p, q, r) with a truth
// table written out by hand (P = A, Q = A xor B, R = AB xor C), checks that
// the outputs are a permutation of the inputs (reversible), and checks the
// half-adder use (C = 0: Q + 2R = A + B). Ends with the TB_RESULT line; a
// watchdog stops a hung run.
module peres_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  // expected {p, q, r} indexed by {a, b, c}
  localparam logic [2:0] EXPECTED [8] =
    '{3'b000, 3'b001, 3'b010, 3'b011, 3'b110, 3'b111, 3'b101, 3'b100};

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (abc=%0b%0b%0b pqr=%0b%0b%0b)", what, a, b, c, p, q, r);
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
    logic [7:0] seen;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check({p, q, r} == EXPECTED[i], "truth table");
      if (c == 1'b0)
        check(2 * int'(r) + int'(q) == int'(a) + int'(b), "half adder with C=0");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "outputs form a permutation of the inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
