// Self-checking test of the reversible serial-in parallel-out shift register.
// First the serial sequence 0, 1, 0, 1 is applied: the low bits of q must read
// ...0, ..01, .010 and then 0101 after the fourth falling edge. Then random
// serial data is compared, edge by edge, with a reference shift register, and
// qbar with its complement. d changes only while clk is high.
module tb_rev_sipo;
  localparam int unsigned N = 4;   // the register's default width, used by the model
  logic           clk = 1'b1;
  logic           d = 1'b0;
  logic [N-1:0]   q, qbar;
  logic [2*N-1:0] garbage;
  logic [N-1:0]   ref_q;
  int             checks = 0;
  int             failures = 0;
  logic [3:0]     pattern = 4'b0101;   // applied first bit first: 0, 1, 0, 1

  rev_sipo dut (.clk(clk), .d(d), .q(q), .qbar(qbar), .garbage(garbage));

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic cycle(input logic din);
    #2 d = din;
    #3 clk = 1'b0;
    ref_q = {ref_q[N-2:0], din};
    #1;
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
    for (int k = 0; k < 4; k++) begin
      cycle(pattern[3-k]);
      checks++;
      // after k+1 edges the low k+1 bits hold the bits applied so far
      if ((q & N'((1 << (k + 1)) - 1)) !== N'(pattern >> (3 - k))) begin
        failures++;
        $display("FAIL pattern step %0d: q=%b", k, q);
      end
    end
    check("0101 after the fourth edge", q, N'(4'b0101));
    check("qbar after the fourth edge", qbar, N'(4'b1010));
    for (int i = 0; i < 200; i++) begin
      cycle(1'($urandom_range(1, 0)));
      if (i >= N) begin
        check("q", q, ref_q);
        check("qbar", qbar, ~ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
