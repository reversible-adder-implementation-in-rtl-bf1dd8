// Shared types and constants of the reversible (Peres-gate) adder.
//
// A Peres full adder leaves two garbage bits behind for every bit position:
// the untouched operand bit A and the partial sum A xor B. They are bundled
// here as one struct so that the adder's garbage vector reads as an array of
// per-bit records. The default width of four bits is that of the reference
// design.
package rev_adder_pkg;

  // Default operand width of the ripple adder.
  parameter int unsigned ADDER_WIDTH_DEFAULT = 4;

  // Garbage left by one Peres full adder.
  typedef struct packed {
    logic a;        // G1: copy of operand bit A
    logic a_xor_b;  // G2: A xor B, the propagate term
  } pfa_garbage_t;

endpackage
