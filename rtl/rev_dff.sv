// Reversible carry storage element ("D-FF"): one Fredkin gate and two
// Feynman gates with a feedback loop.
//
// The Fredkin gate is controlled by clk. Its R output equals d while clk is
// 1 and equals the fed-back stored bit while clk is 0, so the loop either
// loads d or recirculates what it holds. The first Feynman gate (B = 0)
// copies R onto two wires, because a reversible circuit may not fan out
// directly: one copy returns to the Fredkin C input and closes the loop, the
// other goes to the second Feynman gate (B = 1), whose outputs are q and its
// complement qbar. Cost: 3 gates, 2 constant inputs (0 and 1), 2 garbage
// outputs (Fredkin P and Q), which are brought out on `garbage`.
//
// Timing: the cell is level-sensitive, exactly as drawn. While clk is 1 it is
// transparent (q follows d combinationally); when clk falls it keeps the last
// value of d until clk rises again. It has no reset: the first clk-high phase
// defines its contents.
//
// The gate structure and its level-sensitive behaviour follow the document.
// In a netlist the recirculating loop is a zero-delay combinational cycle,
// so this model holds the bit on the feedback wire with a latch enabled by
// the same clk that steers the Fredkin gate. The latch and the loop it sits
// on are therefore intended: tools report a latch on `fb_state`, and a
// combinational path fb_state -> Fredkin R -> copy -> fb_state that is only
// open while clk is 1, when the Fredkin gate selects d and ignores fb_state.
//
// Interface: clk, d in; q, qbar, garbage[1:0] out.
module rev_dff (
  input  logic       clk,
  input  logic       d,
  output logic       q,
  output logic       qbar,
  output logic [1:0] garbage
);
  logic fb_state;   // bit held on the feedback wire (Fredkin C input)
  logic sel;        // Fredkin R: clk ? d : fb_state
  logic copy_fwd;   // copy of sel towards the output gate
  logic copy_fb;    // copy of sel returning on the feedback wire

  fredkin_gate u_fredkin (
    .a (clk),
    .b (d),
    .c (fb_state),
    .p (garbage[0]),
    .q (garbage[1]),
    .r (sel)
  );

  feynman_gate u_copy (
    .a (sel),
    .b (1'b0),
    .p (copy_fwd),
    .q (copy_fb)
  );

  feynman_gate u_out (
    .a (copy_fwd),
    .b (1'b1),
    .p (q),
    .q (qbar)
  );

  always_latch begin
    if (clk) fb_state = copy_fb;
  end
endmodule
