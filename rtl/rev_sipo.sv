// Reversible serial-in parallel-out shift register, N stages (4 by default).
//
// The same chain as the serial-in serial-out register: N reversible D
// flip-flops, stage 0 fed by the serial input, each later stage by the previous
// Q, the clock handed from each stage's clk_out to the next. Every stage's Q and
// Q' is an output. On each falling edge the word moves one position towards the
// high bits and d enters at bit 0, so after N falling edges the last N serial
// bits are all present: q[0] is the newest, q[N-1] the oldest.
// 3N gates and 2N garbage outputs (12 and 8 for N = 4).
//
// Interface: clk, d in; q, qbar = Q1..QN (bit 0 = Q1, first stage); garbage.
// Timing: falling-edge; a serial bit reaches q[k] after k+1 falling edges.
// Structure and bit order follow the original register (its simulation shows
// 0, 1, 0, 1 entering as 0101); the parameter N is an addition made here.
module rev_sipo #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           d,
  output logic [N-1:0]   q,
  output logic [N-1:0]   qbar,
  output logic [2*N-1:0] garbage
);
  logic [N:0] clk_chain;
  logic [N:0] d_chain;

  assign clk_chain[0] = clk;
  assign d_chain[0]   = d;

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_dff u_ff (
      .clk     (clk_chain[i]),
      .d       (d_chain[i]),
      .clk_out (clk_chain[i+1]),
      .q       (d_chain[i+1]),
      .qbar    (qbar[i]),
      .g1      (garbage[2*i]),
      .g2      (garbage[2*i+1])
    );
  end

  assign q = d_chain[N:1];
endmodule
