// Reversible master-slave D flip-flop, falling-edge triggered, with Q and Q'.
//
// Two AS latches and one Feynman gate. The master latch has A = clk and is
// transparent while clk = 1. Its P output (clk') drives the slave's A input and
// its Q output drives the slave's data input, so the slave is transparent
// while clk = 0. Q therefore takes the value d had just before clk falls and
// keeps it for the whole following cycle. The slave's P output equals clk again
// and is brought out as clk_out: a register chains its stages by passing the
// clock from one flip-flop's clk_out to the next flip-flop's clk. A Feynman gate
// with its second input tied to 1 gives q and qbar. The S outputs of the two
// AS gates (d xor Q of each latch) are garbage outputs g1 and g2.
// Three gates, three constant inputs (0, 0, 1), two garbage outputs.
//
// Interface: clk, d in; clk_out, q, qbar, g1, g2 out.
// Timing: q and qbar change only after a falling edge of clk. No reset: the
// state is unknown until the first falling edge.
// The gates, their wiring and the falling-edge behaviour follow the original
// flip-flop; having no reset follows it too (none is described).
module rev_dff (
  input  logic clk,
  input  logic d,
  output logic clk_out,
  output logic q,
  output logic qbar,
  output logic g1,
  output logic g2
);
  logic clk_n;       // master P = clk'
  logic m_q;         // master Q
  logic s_q;         // slave Q
  logic m_r_unused;  // R outputs: latch-internal feedback only
  logic s_r_unused;

  as_latch u_master (
    .clk     (clk),
    .d       (d),
    .clk_n   (clk_n),
    .q       (m_q),
    .r       (m_r_unused),
    .garbage (g1)
  );

  as_latch u_slave (
    .clk     (clk_n),
    .d       (m_q),
    .clk_n   (clk_out),
    .q       (s_q),
    .r       (s_r_unused),
    .garbage (g2)
  );

  feynman_gate u_fg (
    .a (s_q),
    .b (1'b1),
    .p (q),
    .q (qbar)
  );
endmodule
