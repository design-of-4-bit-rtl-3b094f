// Reversible parallel-in parallel-out register, N bits (4 by default).
//
// N reversible D flip-flops side by side: stage i takes D(i+1) and gives
// Q(i+1) and Q(i+1)'. As in the shift registers the clock enters stage 0 and
// is handed from each stage's clk_out to the next stage's clk.
// 3N gates and 2N garbage outputs (12 and 8 for N = 4).
//
// Interface: clk, d (bit 0 = D1) in; q, qbar (bit 0 = Q1), garbage out.
// Timing: the word on d appears on q after one falling edge of clk. No reset.
// Structure follows the original register; the parameter N is added here.
module rev_pipo #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic [N-1:0]   d,
  output logic [N-1:0]   q,
  output logic [N-1:0]   qbar,
  output logic [2*N-1:0] garbage
);
  logic [N:0] clk_chain;

  assign clk_chain[0] = clk;

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_dff u_ff (
      .clk     (clk_chain[i]),
      .d       (d[i]),
      .clk_out (clk_chain[i+1]),
      .q       (q[i]),
      .qbar    (qbar[i]),
      .g1      (garbage[2*i]),
      .g2      (garbage[2*i+1])
    );
  end
endmodule
