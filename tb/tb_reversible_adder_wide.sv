// Self-checking testbench of the reversible ripple adder widened to 16 bits,
// the n-bit generalisation of the four-bit chain.
//
// Drives directed corner cases (all zeros, all ones, a carry rippling from
// cin through all sixteen stages) and 20000 random operand pairs, with the
// ancilla bits at zero. It compares {cout, sum} with the integer sum, the
// garbage with a and a ^ b worked out bit by bit, and recovers a, b and cin
// from the outputs. It counts carry-outs and full-length ripples, each of
// which must occur. A watchdog ends the run if it stalls.
module tb_reversible_adder_wide;
  import rev_adder_pkg::*;

  localparam int unsigned N = 16;

  logic [N-1:0] a, b, ancilla, sum;
  logic         cin, cout;
  pfa_garbage_t garbage [N];

  int checks   = 0;
  int failures = 0;
  int n_carry_out   = 0;
  int n_full_ripple = 0;

  reversible_adder #(.N(N)) dut (
    .a(a), .b(b), .cin(cin), .ancilla(ancilla),
    .sum(sum), .cout(cout), .garbage(garbage)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h cin=%0b -> sum=%h cout=%0b", what, a, b, cin, sum, cout);
    end
  endtask

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N:0] expected;
    logic [N-1:0] ga, gp;
    a   = x;
    b   = y;
    cin = c;
    #1;
    expected = (N+1)'(longint'(x) + longint'(y) + longint'(c));
    check({cout, sum} == expected, "sum/carry");
    for (int i = 0; i < N; i++) begin
      ga[i] = garbage[i].a;
      gp[i] = garbage[i].a_xor_b;
      check(ga[i] == x[i] && gp[i] == (x[i] != y[i]), "garbage");
    end
    check(ga == x && (ga ^ gp) == y && (sum[0] ^ gp[0]) == c,
          "inputs not recoverable from outputs");
    if (cout) n_carry_out++;
    if (c && ((x ^ y) == '1)) n_full_ripple++;
  endtask

  initial begin
    ancilla = '0;
    apply('0, '0, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);        // carry from cin through every stage
    apply(16'h5555, 16'hAAAA, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k < 20000; k++)
      apply(N'($urandom), N'($urandom), 1'($urandom));
    check(n_carry_out   > 0, "no vector produced a carry out");
    check(n_full_ripple > 0, "no vector rippled a carry through every stage");
    $display("carry out: %0d, full ripple: %0d", n_carry_out, n_full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
