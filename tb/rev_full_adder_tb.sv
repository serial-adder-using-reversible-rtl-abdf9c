// Self-checking testbench for rev_full_adder.
//
// Applies all eight (a, b, cin) combinations, repeated in random order, and
// compares {cout, sum} with the integer a + b + cin. It also checks the two
// garbage lines (a, and a xor b) and the vector printed at the cursor of the
// full adder's waveform (a = b = cin = 1 gives sum = cout = 1). Ends with the
// TB_RESULT line; a watchdog stops a hung run.
module rev_full_adder_tb;
  logic       a, b, cin, sum, cout;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  rev_full_adder dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage)
  );

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (a=%0b b=%0b cin=%0b sum=%0b cout=%0b g=%b)",
               what, a, b, cin, sum, cout, garbage);
    end
  endtask

  task automatic apply(input logic [2:0] v);
    int total;
    {a, b, cin} = v;
    #1;
    total = int'(a) + int'(b) + int'(cin);
    check({cout, sum} == 2'(total), "sum and carry equal a + b + cin");
    check(garbage == {a ^ b, a}, "garbage lines are a and a xor b");
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) apply(3'(i));
    for (int i = 0; i < 200; i++) apply(3'($urandom_range(7)));
    apply(3'b111);
    check(sum == 1'b1 && cout == 1'b1, "waveform cursor vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
