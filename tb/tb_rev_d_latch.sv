// Self-checking test of the reversible D latch (rev_d_latch).
// Drives the enable and the data with random values at random times and keeps
// a reference bit: it follows d while clk is 1 and is held while clk is 0.
// After every change the outputs are compared with it: Q, the second output,
// P = clk' and the garbage output S = d xor Q. Counts how often the latch was
// seen transparent (d changed with clk high) and holding (d changed with clk
// low); each must happen.
module tb_rev_d_latch;
  logic clk, d;
  logic clk_n, q, qbar, garbage;
  logic exp_q;
  int   checks = 0;
  int   failures = 0;
  int   n_transparent = 0;
  int   n_hold = 0;

  rev_d_latch dut (.clk(clk), .d(d), .clk_n(clk_n), .q(q), .qbar(qbar), .garbage(garbage));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: clk=%b d=%b got %b expected %b", what, $time, clk, d, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b1;
    d   = 1'b0;
    #1;
    exp_q = d;
    for (int i = 0; i < 400; i++) begin
      logic old_q;
      old_q = exp_q;
      if ($urandom_range(1, 0) == 1) clk = !clk;
      else                           d   = !d;
      #1;
      if (clk) exp_q = d;
      if (clk && d != old_q) n_transparent++;
      if (!clk && d != exp_q) n_hold++;
      check("Q", q, exp_q);
      check("Qbar", qbar, !exp_q);
      check("P = clk'", clk_n, !clk);
      check("S = d xor Q", garbage, d ^ exp_q);
    end
    checks++;
    if (n_transparent == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL transparent=%0d hold=%0d", n_transparent, n_hold);
    end
    $display("transparent=%0d hold=%0d", n_transparent, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
