// Self-checking test of the reversible master-slave D flip-flop.
// A 10-unit clock; d takes a random value in the middle of each high and low
// phase. The reference is the value of d just before each falling edge. q and
// qbar are checked one unit after every falling edge (one-edge latency) and
// just before every rising edge (nothing happens on the rising edge, unlike a
// rising-edge flip-flop); clk_out must equal clk and g2 must be d_slave xor Q.
module tb_rev_dff;
  logic clk = 1'b1;
  logic d   = 1'b0;
  logic clk_out, q, qbar, g1, g2;
  logic exp_q;
  int   checks = 0;
  int   failures = 0;
  int   n_edges = 0;
  int   n_changes = 0;

  rev_dff dut (.clk(clk), .d(d), .clk_out(clk_out), .q(q), .qbar(qbar), .g1(g1), .g2(g2));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      #2 d = 1'($urandom_range(1, 0));   // change while clk is high
      #3 if (i > 0 && d != exp_q) n_changes++;
      exp_q = d;                         // value sampled at the falling edge
      clk = 1'b0;
      n_edges++;
      #1;
      check("Q after falling edge", q, exp_q);
      check("Qbar after falling edge", qbar, !exp_q);
      check("clk_out", clk_out, clk);
      check("g2 = D xor Q of slave", g2, 1'b0);  // slave transparent: its D equals its Q
      #1 d = 1'($urandom_range(1, 0));   // change while clk is low: no effect
      #3;
      check("Q held while clk low", q, exp_q);
      clk = 1'b1;
      #1;
      check("Q held after rising edge", q, exp_q);
      check("clk_out", clk_out, clk);
      check("g1 = D xor Q of master", g1, 1'b0);  // master transparent: Q = d
    end
    checks++;
    if (n_changes == 0) begin
      failures++;
      $display("FAIL q never changed");
    end
    $display("falling edges=%0d output changes=%0d", n_edges, n_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
