// Reversible serial-in serial-out shift register, N stages (4 by default).
//
// N reversible D flip-flops in cascade: stage 0 takes the serial input d, every
// later stage takes the previous stage's Q, and each stage's clk_out (its
// slave AS gate's P output, equal to clk) clocks the next stage, so the clock
// travels down the chain together with the data. On each falling edge of clk
// every bit moves one stage on; the bit applied to d appears on q after N
// falling edges. 3N gates and 2N garbage outputs (12 and 8 for N = 4).
//
// Interface: clk, d in; q/qbar = last stage; stage_q = every stage's Q
// (bit 0 = first stage); garbage = G1..G2N (bit 2i, 2i+1 = stage i's g1, g2).
// Timing: falling-edge, latency N edges from d to q. No reset.
// The chain, the clock hand-over and N = 4 follow the original register;
// the stage_q output and making N a parameter are additions made here.
module rev_siso #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           d,
  output logic           q,
  output logic           qbar,
  output logic [N-1:0]   stage_q,
  output logic [2*N-1:0] garbage
);
  logic [N:0]   clk_chain;
  logic [N:0]   d_chain;
  logic [N-1:0] stage_qbar;

  assign clk_chain[0] = clk;
  assign d_chain[0]   = d;

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_dff u_ff (
      .clk     (clk_chain[i]),
      .d       (d_chain[i]),
      .clk_out (clk_chain[i+1]),
      .q       (d_chain[i+1]),
      .qbar    (stage_qbar[i]),
      .g1      (garbage[2*i]),
      .g2      (garbage[2*i+1])
    );
  end

  assign stage_q = d_chain[N:1];
  assign q       = d_chain[N];
  assign qbar    = stage_qbar[N-1];
endmodule
