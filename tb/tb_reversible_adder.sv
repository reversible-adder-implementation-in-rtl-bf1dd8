// End-to-end, self-checking testbench of the reversible ripple adder at its
// default width (four bits).
//
// Applies every combination of the operands a, b and the carry in, with all
// ancilla bits at zero, and checks that:
//   * {cout, sum} equals the integer a + b + cin;
//   * garbage[i] holds a[i] and (a[i] + b[i]) mod 2;
//   * a, b and cin can be recovered from the outputs alone, and no two input
//     patterns give the same output pattern (the circuit is reversible).
// It also counts how often the adder produced a carry out, rippled a carry
// from cin through every stage, and produced no carry at all; each of these
// must happen at least once. A watchdog ends the run if it stalls.
module tb_reversible_adder;
  import rev_adder_pkg::*;

  localparam int unsigned N     = ADDER_WIDTH_DEFAULT;
  localparam int unsigned OUT_W = 3 * N + 1;  // sum, cout, 2N garbage bits

  logic [N-1:0] a, b, ancilla, sum;
  logic         cin, cout;
  pfa_garbage_t garbage [N];

  int checks   = 0;
  int failures = 0;
  int n_carry_out    = 0;  // vectors with cout = 1
  int n_full_ripple  = 0;  // carry from cin propagated through all N stages
  int n_no_carry     = 0;  // vectors with no carry out of any stage
  bit seen [2**OUT_W];

  reversible_adder dut (
    .a(a), .b(b), .cin(cin), .ancilla(ancilla),
    .sum(sum), .cout(cout), .garbage(garbage)
  );

  // Carry out of every stage, worked out bit by bit as generate/propagate.
  function automatic logic [N-1:0] stage_carries(logic [N-1:0] x, logic [N-1:0] y, logic c);
    logic [N-1:0] out;
    for (int i = 0; i < N; i++) begin
      c      = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
      out[i] = c;
    end
    return out;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d cin=%0b -> sum=%0d cout=%0b", what, a, b, cin, sum, cout);
    end
  endtask

  initial begin
    ancilla = '0;
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 2**(2*N+1); v++) begin
      logic [N:0] expected;
      logic [N-1:0] ga, gp, ra, rb;
      logic         rc;
      logic [OUT_W-1:0] pattern;
      {a, b, cin} = (2*N+1)'(v);
      #1;
      expected = (N+1)'(int'(a) + int'(b) + int'(cin));
      check({cout, sum} == expected, "sum/carry");
      for (int i = 0; i < N; i++) begin
        ga[i] = garbage[i].a;
        gp[i] = garbage[i].a_xor_b;
        check(int'(ga[i]) == int'(a[i]),                     "garbage a");
        check(int'(gp[i]) == (int'(a[i]) + int'(b[i])) % 2, "garbage a^b");
      end
      // Undo the computation from the outputs only.
      ra = ga;
      rb = ga ^ gp;
      rc = sum[0] ^ gp[0];
      check(ra == a && rb == b && rc == cin, "inputs not recoverable from outputs");
      pattern = {sum, cout, ga, gp};
      check(!seen[pattern], "output pattern repeats (not reversible)");
      seen[pattern] = 1'b1;
      if (cout) n_carry_out++;
      if (cin && ((a ^ b) == '1)) n_full_ripple++;
      if (stage_carries(a, b, cin) == '0) n_no_carry++;
    end
    check(n_carry_out   > 0, "no vector produced a carry out");
    check(n_full_ripple > 0, "no vector rippled a carry through every stage");
    check(n_no_carry    > 0, "no vector was carry-free");
    $display("carry out: %0d, full ripple: %0d, carry-free: %0d",
             n_carry_out, n_full_ripple, n_no_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
