// Reversible D latch with both Q and Q': an AS latch followed by a Feynman gate.
//
// The AS latch (A = clk, B = d, C = fed-back Q, D = 0) gives Q = clk d + clk' Q.
// A Feynman gate with its second input tied to 1 turns that Q into a copy
// (P = Q) and a complement (Q = Q xor 1 = Q'). Two reversible gates, two
// constant inputs (the 0 on the AS gate and the 1 on the Feynman gate) and one
// garbage output (S = d xor Q of the AS gate).
//
// Interface: clk (enable), d (data); clk_n (AS output P = clk'), q, qbar,
// garbage. Timing: transparent while clk = 1, holds while clk = 0, no reset.
// Structure and constant inputs follow the original circuit.
module rev_d_latch (
  input  logic clk,
  input  logic d,
  output logic clk_n,
  output logic q,
  output logic qbar,
  output logic garbage
);
  logic q_as;
  logic r_unused;  // R = Q is only the latch's internal feedback

  as_latch u_latch (
    .clk     (clk),
    .d       (d),
    .clk_n   (clk_n),
    .q       (q_as),
    .r       (r_unused),
    .garbage (garbage)
  );

  feynman_gate u_fg (
    .a (q_as),
    .b (1'b1),
    .p (q),
    .q (qbar)
  );
endmodule
