// Self-checking test of the Feynman gate: all four input vectors, P = A and
// Q = A xor B, and the copy/complement use with B = 1.
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0;
  int   failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (p !== a)       begin failures++; $display("FAIL P ab=%b%b", a, b); end
      if (q !== (a != b)) begin failures++; $display("FAIL Q ab=%b%b", a, b); end
      if (b) begin
        checks++;
        if (q !== !a) begin failures++; $display("FAIL complement a=%b", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
