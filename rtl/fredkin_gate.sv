// Fredkin gate: the 3x3 reversible controlled-swap gate.
//
// The control A passes through to P. When A is 0, B goes to Q and C goes to
// R; when A is 1 the two are swapped, so Q = A'B xor AC and R = A'C xor AB.
// Because it only routes bits it is conservative (the number of ones is
// preserved) as well as reversible. In the carry storage element the R output
// acts as a 2:1 selector: R = A ? B : C.
//
// Interface: a, b, c in; p, q, r out. Purely combinational, no clock.
// Equations follow the document; nothing here is a design choice.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
