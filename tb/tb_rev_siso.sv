// Self-checking test of the reversible serial-in serial-out shift register.
// d changes while clk is high; a reference shift register of N bits is
// updated at every falling edge. One unit after each edge q, qbar and every
// stage output are compared with it. A latency test then flushes the register
// with zeros, applies a single 1 and counts the falling edges until it reaches
// q: it must be N (the first input bit appears at the output on the fourth
// falling edge of a 4-bit register).
module tb_rev_siso;
  localparam int unsigned N = 4;   // the register's default width, used by the model
  logic           clk = 1'b1;
  logic           d = 1'b0;
  logic           q, qbar;
  logic [N-1:0]   stage_q;
  logic [2*N-1:0] garbage;
  logic [N-1:0]   ref_q;
  int             checks = 0;
  int             failures = 0;
  int             latency;

  rev_siso dut (.clk(clk), .d(d), .q(q), .qbar(qbar), .stage_q(stage_q), .garbage(garbage));

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // one clock period: d set while clk high, falling edge, check, rising edge
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
    for (int i = 0; i < N; i++) cycle(1'b0);   // flush the unknown start state
    for (int i = 0; i < 200; i++) begin
      cycle(1'($urandom_range(1, 0)));
      check("stage outputs", stage_q, ref_q);
      check("q", N'(q), N'(ref_q[N-1]));
      check("qbar", N'(qbar), N'(!ref_q[N-1]));
    end
    // latency of a single bit
    for (int i = 0; i < N; i++) cycle(1'b0);
    latency = 0;
    cycle(1'b1);
    latency++;
    while (q !== 1'b1 && latency < 3 * N) begin
      cycle(1'b0);
      latency++;
    end
    check("latency in falling edges", N'(latency), N'(N));
    $display("latency=%0d falling edges", latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
