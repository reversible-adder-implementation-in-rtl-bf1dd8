// Peres gate: a 3-input, 3-output reversible logic gate.
//
// The gate maps (A, B, C) to (P, Q, R) = (A, A ^ B, (A & B) ^ C). The map is a
// bijection on the eight input patterns, so no information is lost: this is
// what makes the gate usable in reversible logic. It is a Toffoli gate
// followed by a CNOT (controlled-NOT) and costs four elementary quantum
// operations, the least of the common universal gates, which is why the adder
// is built from it. The function is the standard Peres gate used by the
// reference adder; giving it a module of its own is a choice of this design.
//
// Interface: three single-bit inputs, three single-bit outputs. Timing: purely
// combinational, no clock and no state.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // = a ^ b
  output logic r    // = (a & b) ^ c
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end

endmodule
