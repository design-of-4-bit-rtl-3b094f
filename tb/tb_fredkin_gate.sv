// Self-checking test of the Fredkin gate: all eight input vectors. With A = 0
// the gate passes B to Q and C to R, with A = 1 it swaps them; the number of
// ones is preserved.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int   checks = 0;
  int   failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp;
      {a, b, c} = 3'(v);
      #1;
      exp = a ? {a, c, b} : {a, b, c};
      checks += 2;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL abc=%b%b%b got %b%b%b expected %b", a, b, c, p, q, r, exp);
      end
      if ((32'(p) + 32'(q) + 32'(r)) != (32'(a) + 32'(b) + 32'(c))) begin
        failures++;
        $display("FAIL ones count abc=%b%b%b", a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
