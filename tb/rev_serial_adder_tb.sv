// End-to-end self-checking testbench for rev_serial_adder (the top).
//
// Adds random pairs of words of random length (1 to 64 bits), streamed LSB
// first, one bit per clock, and compares the collected sum bits and the
// final carry with the integer sum computed in the testbench. Clock period
// is 10 time units. Each word is preceded by one clock with a = b = 0, which
// clears the carry. Operand bits change just after clk falls; the sum bit
// is sampled just before clk rises, in the same cycle its operand bits were
// applied (one sum bit per clock, no extra latency). Every bit also checks
// q against the expected carry in, qbar == !q, and, in the high phase, that
// the stored carry equals cout.
//
// The run counts each mechanism of the design and fails if one never
// happened: carry generate (a = b = 1), carry propagate (a != b with a
// stored 1), carry kill (a = b = 0 with a stored 1), a clear by the zero
// bit, and a word that overflows into the final carry. It also checks the
// vector printed at the cursor of the serial adder's waveform (a = b = 1
// with a stored carry: s = q = cout = 1, qb = 0). Ends with the TB_RESULT
// line; a watchdog stops a hung run. The top has no parameters, so this is
// also the full-size test.
module rev_serial_adder_tb;
  logic       clk = 1'b0;
  logic       a = 1'b0, b = 1'b0;
  logic       sum, cout, q, qbar;
  logic [3:0] garbage;
  int checks = 0, failures = 0;
  int n_gen = 0, n_prop = 0, n_kill = 0, n_clear = 0, n_overflow = 0;
  int n_bits = 0, n_cycles = 0;
  logic fig_vector_seen = 1'b0;

  localparam int NUM_WORDS = 400;
  localparam int MAX_BITS  = 64;

  rev_serial_adder dut (
    .clk(clk), .a(a), .b(b), .sum(sum), .cout(cout),
    .q(q), .qbar(qbar), .garbage(garbage)
  );

  always #5 clk = ~clk;
  always @(posedge clk) n_cycles++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (a=%0b b=%0b sum=%0b cout=%0b q=%0b qbar=%0b)",
               $time, what, a, b, sum, cout, q, qbar);
    end
  endtask

  // Present one bit pair for one clock cycle. Called right after a falling
  // edge; returns right after the next falling edge. `carry` is the
  // testbench's own carry, updated here.
  task automatic one_bit(input logic ai, input logic bi, inout logic carry,
                         output logic s);
    logic next;
    a = ai;
    b = bi;
    next = (ai & bi) | (ai & carry) | (bi & carry);
    #3;  // low phase, before the rising edge
    check(q == carry, "stored carry is the expected carry in");
    check(qbar == !q, "qbar is the complement of q");
    check(sum == (ai ^ bi ^ carry), "sum bit");
    check(cout == next, "carry out");
    check(garbage[1:0] == {ai ^ bi, ai}, "full adder garbage");
    s = sum;
    if (ai & bi & !carry) n_gen++;
    if ((ai ^ bi) & carry) n_prop++;
    if (!ai & !bi & carry) n_kill++;
    if (ai & bi & carry & sum & q & !qbar & cout) fig_vector_seen = 1'b1;
    @(posedge clk);
    #2;  // high phase: the cell is transparent
    check(q == next && cout == next, "carry settles in the high phase");
    @(negedge clk);
    #1;
    carry = next;
    n_bits++;
  endtask

  initial begin : watchdog
    #(10 * (NUM_WORDS * (MAX_BITS + 2) + 100));
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    #1;
    for (int w = 0; w < NUM_WORDS; w++) begin
      int          len;
      logic [63:0] opa, opb, res;
      logic [64:0] expected;
      logic        carry, s;
      int          start_cycles;

      len = (w < 8) ? 64 : $urandom_range(MAX_BITS, 1);
      opa = {$urandom, $urandom};
      opb = {$urandom, $urandom};
      if (w % 5 == 0) opb = ~opa;            // long propagate chains
      if (len < 64) begin
        opa &= (64'd1 << len) - 64'd1;
        opb &= (64'd1 << len) - 64'd1;
      end
      expected = {1'b0, opa} + {1'b0, opb};

      // clearing bit: a = b = 0 for one clock
      carry = q;           // whatever the cell holds now
      begin
        logic was_set;
        was_set = q;
        one_bit(1'b0, 1'b0, carry, s);
        check(q == 1'b0, "zero bit clears the carry");
        if (was_set) n_clear++;
      end

      start_cycles = n_cycles;
      res = '0;
      for (int i = 0; i < len; i++) begin
        one_bit(opa[i], opb[i], carry, s);
        res[i] = s;
      end
      check(n_cycles - start_cycles == len, "one bit per clock");
      check(res == (len == 64 ? expected[63:0] : expected[63:0] & ((64'd1 << len) - 64'd1)),
            "word sum bits");
      check(q == expected[len], "final carry");
      if (q) n_overflow++;
    end

    check(n_gen > 0, "carry generate happened");
    check(n_prop > 0, "carry propagate happened");
    check(n_kill > 0, "carry kill happened");
    check(n_clear > 0, "carry clear by a zero bit happened");
    check(n_overflow > 0, "word overflow into the final carry happened");
    check(fig_vector_seen, "waveform cursor vector seen");
    $display("bits=%0d generate=%0d propagate=%0d kill=%0d clear=%0d overflow=%0d",
             n_bits, n_gen, n_prop, n_kill, n_clear, n_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
