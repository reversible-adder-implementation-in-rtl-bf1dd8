// Self-checking testbench of the Peres gate.
//
// Applies all eight input patterns. Each output is compared with the gate's
// equations evaluated arithmetically here (sums and products taken modulo 2),
// and the eight output patterns are checked to be all different, which is the
// gate's reversibility. A watchdog ends the run if it stalls.
module tb_peres_gate;

  logic a, b, c;
  logic p, q, r;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      int ia, ib, ic;
      ia = (v >> 2) & 1;
      ib = (v >> 1) & 1;
      ic = v & 1;
      {a, b, c} = 3'(v);
      #1;
      check(int'(p) == ia,                   "p");
      check(int'(q) == (ia + ib) % 2,        "q");
      check(int'(r) == (ia * ib + ic) % 2,   "r");
      check(!seen[{p, q, r}],                "output pattern repeats (not reversible)");
      seen[{p, q, r}] = 1'b1;
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
