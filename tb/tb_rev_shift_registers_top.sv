// End-to-end test of the whole register family at its default size.
// All registers share clk. Each clock period every input is given a random
// value while clk is high (the latch's enable is toggled at random times in
// both phases), reference models are updated at the falling edge, and every
// output is compared one unit later:
//   flip-flop  : Q = d before the edge
//   SISO       : q = the serial input of N edges ago
//   SIPO       : q = the last N serial inputs, newest in bit 0
//   PIPO       : q = the word before the edge
//   PISO       : ws = 1 writes d, ws = 0 shifts; stage 0 always takes d[0]
//   latch      : follows latch_d while latch_clk = 1, holds otherwise
// Counts each mechanism: flip-flop capture of a new value, serial shifts,
// parallel loads, PISO writes and shifts, latch transparent and hold phases.
// Any that never happens is a failure.
module tb_rev_shift_registers_top;
  localparam int unsigned N = 4;   // the top's default width, used by the models

  logic         clk = 1'b1;
  logic         latch_clk = 1'b0, latch_d = 1'b0;
  logic         latch_q, latch_qbar;
  logic         dff_d = 1'b0, dff_q, dff_qbar;
  logic         siso_d = 1'b0, siso_q, siso_qbar;
  logic         sipo_d = 1'b0;
  logic [N-1:0] sipo_q, sipo_qbar;
  logic [N-1:0] pipo_d = '0, pipo_q, pipo_qbar;
  logic         piso_ws = 1'b1;
  logic [N-1:0] piso_d = '0;
  logic         piso_q, piso_qbar;

  logic [N-1:0] m_siso, m_sipo, m_pipo, m_piso;
  logic         m_dff, m_latch;
  int checks = 0, failures = 0;
  int n_dff_new = 0, n_shift = 0, n_pload = 0, n_write = 0, n_piso_shift = 0;
  int n_transparent = 0, n_hold = 0;

  rev_shift_registers_top dut (
    .clk, .latch_clk, .latch_d, .latch_q, .latch_qbar,
    .dff_d, .dff_q, .dff_qbar,
    .siso_d, .siso_q, .siso_qbar,
    .sipo_d, .sipo_q, .sipo_qbar,
    .pipo_d, .pipo_q, .pipo_qbar,
    .piso_ws, .piso_d, .piso_q, .piso_qbar
  );

  task automatic check(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // random latch activity for `t` time units, one unit per step
  task automatic latch_steps(input int t);
    for (int k = 0; k < t; k++) begin
      if ($urandom_range(1, 0) == 1) latch_clk = !latch_clk;
      else                           latch_d   = !latch_d;
      #1;
      if (latch_clk) begin
        if (m_latch != latch_d) n_transparent++;
        m_latch = latch_d;
      end else if (latch_d != m_latch) begin
        n_hold++;
      end
      check("latch q", N'(latch_q), N'(m_latch));
      check("latch qbar", N'(latch_qbar), N'(!m_latch));
    end
  endtask

  task automatic cycle(input int i);
    latch_steps(2);
    dff_d   = 1'($urandom);
    siso_d  = 1'($urandom);
    sipo_d  = 1'($urandom);
    pipo_d  = N'($urandom);
    piso_ws = ($urandom_range(3, 0) == 0);
    piso_d  = N'($urandom);
    latch_steps(3);
    clk = 1'b0;
    if (dff_d != m_dff) n_dff_new++;
    m_dff  = dff_d;
    m_siso = {m_siso[N-2:0], siso_d};
    m_sipo = {m_sipo[N-2:0], sipo_d};
    n_shift++;
    if (pipo_d != m_pipo) n_pload++;
    m_pipo = pipo_d;
    if (piso_ws) begin
      m_piso = piso_d;
      n_write++;
    end else begin
      m_piso = {m_piso[N-2:0], piso_d[0]};
      n_piso_shift++;
    end
    latch_steps(1);
    if (i >= N) begin   // registers hold unknown state until filled
      check("dff q", N'(dff_q), N'(m_dff));
      check("dff qbar", N'(dff_qbar), N'(!m_dff));
      check("siso q", N'(siso_q), N'(m_siso[N-1]));
      check("siso qbar", N'(siso_qbar), N'(!m_siso[N-1]));
      check("sipo q", sipo_q, m_sipo);
      check("sipo qbar", sipo_qbar, ~m_sipo);
      check("pipo q", pipo_q, m_pipo);
      check("pipo qbar", pipo_qbar, ~m_pipo);
      check("piso q", N'(piso_q), N'(m_piso[N-1]));
      check("piso qbar", N'(piso_qbar), N'(!m_piso[N-1]));
    end
    latch_steps(4);
    clk = 1'b1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_siso = '0; m_sipo = '0; m_pipo = '0; m_piso = '0; m_dff = 1'b0;
    latch_clk = 1'b1;
    #1 m_latch = latch_d;
    for (int i = 0; i < 1000; i++) cycle(i);
    begin : mechanisms
      automatic int counts [7] = '{n_dff_new, n_shift, n_pload, n_write, n_piso_shift, n_transparent, n_hold};
      foreach (counts[k]) begin
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", k);
        end
      end
    end
    $display("dff captures of a new value=%0d serial shifts=%0d parallel loads=%0d", n_dff_new, n_shift, n_pload);
    $display("piso writes=%0d piso shifts=%0d latch transparent=%0d latch hold=%0d",
             n_write, n_piso_shift, n_transparent, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
