// Reversible 1-bit serial adder: a two-Peres-gate full adder whose carry out
// is stored in a Fredkin/Feynman storage cell and fed back as the next carry
// in. Two operands of any length are added one bit per clock, least
// significant bit first; the sum leaves one bit per clock on `sum`.
//
// Cost (whole circuit): 5 reversible gates, 3 constant inputs, 4 garbage
// outputs. The garbage lines are brought out on `garbage`: [0] = a,
// [1] = a xor b (full adder), [2] = clk, [3] = Fredkin Q (storage cell).
//
// Timing. The storage cell is level-sensitive (transparent while clk is 1),
// so the operands follow a two-phase discipline:
//   * change a and b while clk is 0, and hold them stable until clk falls;
//   * sample `sum` (and `cout`) before clk rises: in the low phase `q` still
//     holds the carry from the previous bit, so sum = a ^ b ^ q;
//   * while clk is 1 the carry loop full adder -> cell -> full adder is
//     closed and settles to cout = majority(a, b, q_old): when a == b the
//     carry is a regardless of the loop, when a != b the loop recirculates
//     the old carry. When clk falls the new carry is held for the next bit.
// The carry is cleared by presenting a = b = 0 for one clock (carry out of
// 0 + 0 + c is 0); there is no reset pin.
//
// The structure (full adder plus carry cell, five gates) follows the
// document. The operand discipline, the LSB-first order and clearing the
// carry with a zero bit are this design's choices; the document gives no
// timing beyond its waveforms. The latch inside the cell and the
// combinational loop through it while clk is 1 are intended, as explained
// above and in rev_dff.
//
// Interface: clk, a, b in; sum, cout, q (stored carry), qbar, garbage out.
module rev_serial_adder (
  input  logic       clk,
  input  logic       a,
  input  logic       b,
  output logic       sum,
  output logic       cout,
  output logic       q,
  output logic       qbar,
  output logic [3:0] garbage
);
  rev_full_adder u_fa (
    .a       (a),
    .b       (b),
    .cin     (q),
    .sum     (sum),
    .cout    (cout),
    .garbage (garbage[1:0])
  );

  rev_dff u_dff (
    .clk     (clk),
    .d       (cout),
    .q       (q),
    .qbar    (qbar),
    .garbage (garbage[3:2])
  );
endmodule
