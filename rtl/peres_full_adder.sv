// Peres full adder (PFA): a reversible one-bit full adder made of two
// cascaded Peres gates.
//
// The first gate takes (A, B, zero) and yields (A, A ^ B, (A & B) ^ zero).
// The second gate takes (A ^ B, Cin, (A & B) ^ zero) and yields
// (A ^ B, A ^ B ^ Cin, ((A ^ B) & Cin) ^ (A & B) ^ zero). With the ancilla
// input `zero` held at 0 the last two outputs are the sum and the carry of a
// full adder; A and A ^ B leave as garbage. The four inputs map one-to-one
// onto the four outputs, so the block is reversible whatever the ancilla
// holds; a 1 on the ancilla simply inverts the carry output. Quantum cost: 8.
// The two-gate structure and the garbage assignment follow the reference
// design; packing the garbage into a struct is a choice of this design.
//
// Interface: operand bits a and b, carry in cin, ancilla bit zero (tie to 0
// for addition); sum s, carry out cout, garbage bits g.a (G1) and g.a_xor_b
// (G2). Timing: purely combinational.
module peres_full_adder
  import rev_adder_pkg::*;
(
  input  logic         a,
  input  logic         b,
  input  logic         cin,
  input  logic         zero,
  output logic         s,
  output logic         cout,
  output pfa_garbage_t g
);

  logic a_xor_b;  // propagate term, passed from gate 1 to gate 2
  logic ab;       // generate term xor ancilla

  peres_gate u_gate1 (
    .a (a),
    .b (b),
    .c (zero),
    .p (g.a),
    .q (a_xor_b),
    .r (ab)
  );

  peres_gate u_gate2 (
    .a (a_xor_b),
    .b (cin),
    .c (ab),
    .p (g.a_xor_b),
    .q (s),
    .r (cout)
  );

endmodule
