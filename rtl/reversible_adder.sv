// Reversible N-bit ripple-carry adder built from Peres full adders.
//
// Bit i of the operands enters Peres full adder i together with the carry of
// stage i-1 (cin for stage 0) and its own ancilla bit ancilla[i]. Each stage
// hands its carry to the next; the carry of the last stage is cout. Every
// stage leaves two garbage bits, so an N-bit adder returns 2N garbage bits
// besides the N-bit sum and the carry: with 2N+1 data inputs and N ancillas
// in, and N+1 result bits and 2N garbage bits out, input and output counts
// match and the whole map is reversible. Default width 4 as in the reference
// design; the chain itself is written for any N >= 1.
//
// Interface: a, b operands; cin carry in; ancilla must be all zeros for the
// outputs to be a sum (an assertion reports any other value); sum, cout
// result; garbage[i] holds stage i's {a[i], a[i]^b[i]}. In the reference the
// garbage leaves as G1..G8 in the order G(2i+1) = a[i], G(2i+2) = a[i]^b[i],
// which is garbage[i].a and garbage[i].a_xor_b here. The sum and the carry
// are given as separate ports (the reference packs them as a 5-bit S).
// Timing: purely combinational; the carry ripples through N stages.
// The chain, its ancilla per stage and the garbage numbering follow the
// reference design; the width parameter, the bundled ports and the ancilla
// assertion are choices of this design.
module reversible_adder
  import rev_adder_pkg::*;
#(
  parameter int unsigned N = ADDER_WIDTH_DEFAULT
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  input  logic [N-1:0]  ancilla,
  output logic [N-1:0]  sum,
  output logic          cout,
  output pfa_garbage_t  garbage [N]
);

  logic [N:0] carry;  // carry[i] enters stage i; carry[N] leaves the adder

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    peres_full_adder u_pfa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (carry[i]),
      .zero (ancilla[i]),
      .s    (sum[i]),
      .cout (carry[i+1]),
      .g    (garbage[i])
    );
  end

  assign cout = carry[N];

  // The ancilla bits are constants of the reversible circuit, not data.
  ancilla_zero : assert final (ancilla == '0)
    else $error("reversible_adder: ancilla bits must be zero, got %b", ancilla);

endmodule
