// Self-checking testbench of the Peres full adder.
//
// Applies all sixteen patterns of (a, b, cin, zero). With the ancilla at 0 the
// sum and carry are compared with the integer sum a + b + cin; with the
// ancilla at 1 the carry must come out inverted. The garbage bits are
// compared with a and with (a + b) mod 2, and the sixteen output patterns
// must all differ, which shows that the block is reversible. A watchdog ends
// the run if it stalls.
module tb_peres_full_adder;
  import rev_adder_pkg::*;

  logic         a, b, cin, zero;
  logic         s, cout;
  pfa_garbage_t g;
  int           checks   = 0;
  int           failures = 0;
  bit           seen [16];

  peres_full_adder dut (
    .a(a), .b(b), .cin(cin), .zero(zero), .s(s), .cout(cout), .g(g)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b cin=%0b zero=%0b -> s=%0b cout=%0b g=%b",
               what, a, b, cin, zero, s, cout, g);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      int total, carry;
      {a, b, cin, zero} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      carry = (total >= 2) ? 1 : 0;
      check(int'(s) == total % 2,                     "sum");
      check(int'(cout) == (zero ? 1 - carry : carry), "carry");
      check(g.a == a,                                 "garbage G1");
      check(int'(g.a_xor_b) == (int'(a) + int'(b)) % 2, "garbage G2");
      check(!seen[{g.a, g.a_xor_b, s, cout}], "output pattern repeats (not reversible)");
      seen[{g.a, g.a_xor_b, s, cout}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
