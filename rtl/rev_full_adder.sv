// Reversible full adder made of two Peres gates.
//
// The first gate takes (a, b, 0) and acts as a half adder: its Q output is
// a xor b and its R output is ab. The second gate takes (a xor b, cin, ab):
// its Q output is a xor b xor cin, the sum, and its R output is
// (a xor b)cin xor ab, the carry out. The two terms of the carry can never be
// 1 together, so the xor is the usual or of generate and propagate.
// Cost: 2 gates, 1 constant input (the 0), 2 garbage outputs (the P outputs
// of the two gates, a and a xor b), which are brought out on `garbage`.
//
// Interface: a, b, cin in; sum, cout, garbage[1:0] out. Purely
// combinational. The gate wiring follows the document; bringing the garbage
// lines out as a port is this design's choice.
module rev_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [1:0] garbage
);
  logic ha_sum;    // a xor b
  logic ha_carry;  // ab

  peres_gate u_half (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (garbage[0]),
    .q (ha_sum),
    .r (ha_carry)
  );

  peres_gate u_full (
    .a (ha_sum),
    .b (cin),
    .c (ha_carry),
    .p (garbage[1]),
    .q (sum),
    .r (cout)
  );
endmodule
