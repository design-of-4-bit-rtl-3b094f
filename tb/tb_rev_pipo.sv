// Self-checking test of the reversible parallel-in parallel-out register.
// Applies the words 1010, 0110, 1100 and then random words, changing d while
// clk is high. The word must appear on q, and its complement on qbar, one unit
// after the next falling edge (one-edge latency) and must not appear before it.
module tb_rev_pipo;
  localparam int unsigned N = 4;   // the register's default width, used by the model
  logic           clk = 1'b1;
  logic [N-1:0]   d = '0;
  logic [N-1:0]   q, qbar;
  logic [2*N-1:0] garbage;
  logic [N-1:0]   ref_q;
  int             checks = 0;
  int             failures = 0;
  logic [N-1:0]   words [3] = '{N'(4'b1010), N'(4'b0110), N'(4'b1100)};

  rev_pipo dut (.clk(clk), .d(d), .q(q), .qbar(qbar), .garbage(garbage));

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic cycle(input logic [N-1:0] din, input bit check_hold);
    #2 d = din;
    #2;
    if (check_hold) check("q before the edge", q, ref_q);
    #1 clk = 1'b0;
    ref_q = din;
    #1;
    check("q", q, ref_q);
    check("qbar", qbar, ~ref_q);
    #4 clk = 1'b1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    cycle(words[0], 1'b0);
    cycle(words[1], 1'b1);
    cycle(words[2], 1'b1);
    for (int i = 0; i < 200; i++) cycle(N'($urandom), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
