// Self-checking test of the reversible parallel-in serial-out shift register.
// Writes a word with ws = 1 for one falling edge, then shifts with ws = 0 and
// checks the serial output edge by edge: d[N-1] right after the write edge,
// then d[N-2] .. d[0]. The words 1010 and 0011 go first, then random words
// with random numbers of shift edges, some written while ws stays high for
// several edges. A reference model (stage 0 always takes d[0]; with ws = 1
// stage i takes d[i], with ws = 0 it takes stage i-1) is compared after every
// edge. Counts write edges and shift edges; both must happen.
module tb_rev_piso;
  localparam int unsigned N = 4;   // the register's default width, used by the model
  logic           clk = 1'b1;
  logic           ws = 1'b0;
  logic [N-1:0]   d = '0;
  logic           q, qbar;
  logic [3*N-2:0] garbage;
  logic [N-1:0]   ref_st;
  int             checks = 0;
  int             failures = 0;
  int             n_write = 0;
  int             n_shift = 0;

  rev_piso dut (.clk(clk), .ws(ws), .d(d), .q(q), .qbar(qbar), .garbage(garbage));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic cycle(input logic wsin, input logic [N-1:0] din);
    #2 ws = wsin;
    d = din;
    #3 clk = 1'b0;
    if (wsin) begin
      ref_st = din;
      n_write++;
    end else begin
      ref_st = {ref_st[N-2:0], din[0]};
      n_shift++;
    end
    #1;
    check("q", q, ref_st[N-1]);
    check("qbar", qbar, !ref_st[N-1]);
    #4 clk = 1'b1;
  endtask

  // write a word, then shift it out and check the bit order directly
  task automatic send(input logic [N-1:0] word);
    cycle(1'b1, word);
    check("first serial bit = d[N-1]", q, word[N-1]);
    for (int k = N - 2; k >= 0; k--) begin
      cycle(1'b0, N'($urandom));
      check("serial bit order", q, word[k]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_st = '0;
    send(N'(4'b1010));
    send(N'(4'b0011));
    for (int i = 0; i < 60; i++) begin
      automatic int unsigned n_ws = $urandom_range(3, 1);
      automatic int unsigned n_sh = $urandom_range(2 * N, 0);
      for (int unsigned k = 0; k < n_ws; k++) cycle(1'b1, N'($urandom));
      for (int unsigned k = 0; k < n_sh; k++) cycle(1'b0, N'($urandom));
    end
    for (int i = 0; i < 10; i++) send(N'($urandom));
    checks++;
    if (n_write == 0 || n_shift == 0) begin
      failures++;
      $display("FAIL writes=%0d shifts=%0d", n_write, n_shift);
    end
    $display("write edges=%0d shift edges=%0d", n_write, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
