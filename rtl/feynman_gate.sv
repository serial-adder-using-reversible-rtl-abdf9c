// Feynman gate: the 2x2 reversible controlled-NOT gate.
//
// P passes the control input A through unchanged; Q is the target input B
// flipped whenever A is 1 (Q = A xor B). The mapping is one-to-one, so the
// inputs can always be recovered from the outputs. Two uses matter in this
// design: with B tied to 0 the gate copies A onto two wires (reversible
// fan-out), and with B tied to 1 it produces A and its complement.
//
// Interface: a, b in; p, q out. Purely combinational, no clock.
// Equations follow the document; nothing here is a design choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
