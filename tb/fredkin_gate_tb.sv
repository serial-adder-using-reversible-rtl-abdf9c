// Self-checking testbench for fredkin_gate.
//
// Applies all eight input combinations and compares (p, q, r) with a truth
// table written out by hand (swap B and C when A is 1), checks that the
// outputs are a permutation of the inputs (reversible), that the number of
// ones is preserved (conservative), and that R selects B when A is 1 and C
// when A is 0, which is how the storage cell uses it. Ends with the
// TB_RESULT line; a watchdog stops a hung run.
module fredkin_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  // expected {p, q, r} indexed by {a, b, c}
  localparam logic [2:0] EXPECTED [8] =
    '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111};

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      check(32'(a) + 32'(b) + 32'(c) == 32'(p) + 32'(q) + 32'(r), "ones preserved");
      check(r == (a ? b : c), "R selects B when A=1, C when A=0");
      seen[{p, q, r}] = 1'b1;
    end
    check(seen == 8'hFF, "outputs form a permutation of the inputs");
    // printed cursor values of the gate's waveform: a=1 b=0 c=1 -> p=1 q=1 r=0
    {a, b, c} = 3'b101; #1;
    check({p, q, r} == 3'b110, "waveform cursor vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
