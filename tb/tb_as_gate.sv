// Self-checking test of the AS reversible gate.
// Applies all 16 input vectors, compares P, Q, R, S with the gate's equations
// worked out bit by bit (Q as a mux: B when A=1, C when A=0), and checks that
// the 16 output vectors are all different (the gate is one-to-one). Also
// checks the three reduced uses: A=0 (copy/XOR), B=1 (OR/NOT), C=0 (AND).
module tb_as_gate;
  logic a, b, c, d;
  logic p, q, r, s;
  int   checks = 0;
  int   failures = 0;
  logic [15:0] seen;

  as_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: abcd=%b%b%b%b got %b expected %b", what, a, b, c, d, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      logic eq;
      {a, b, c, d} = 4'(v);
      #1;
      eq = (a == 1'b1) ? b : c;
      check("P", p, !a);
      check("Q", q, eq);
      check("R", r, (d != eq));
      check("S", s, (b != c));
      // reduced uses of the gate
      if (!a)      check("copy C on Q when A=0", q, c);
      if (b)       check("Q = A or C when B=1", q, a | c);
      if (b)       check("S = not C when B=1", s, !c);
      if (!c)      check("Q = A and B when C=0", q, a & b);
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output vector %b repeated", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen != 16'hFFFF) begin
      failures++;
      $display("FAIL gate is not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
