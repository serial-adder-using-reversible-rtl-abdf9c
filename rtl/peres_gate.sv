// Peres gate: a 3x3 reversible gate equal to a Toffoli gate followed by a
// Feynman gate on the first two lines.
//
// P = A, Q = A xor B, R = AB xor C. With C = 0 a single Peres gate is a half
// adder (Q is the sum, R the carry); two of them make the full adder. Its
// quantum cost of 4 is the lowest of the gates that produce an AND term,
// which is why it is the adder's building block.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
// Equations follow the document; nothing here is a design choice.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
