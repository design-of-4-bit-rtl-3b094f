// Reversible parallel-in serial-out shift register, N bits (4 by default).
//
// N reversible D flip-flops in a chain, clock handed from each stage's clk_out
// to the next. In front of stages 1..N-1 a Fredkin gate acts as the write/shift
// multiplexer: A = ws, B = previous stage's Q, C = the parallel bit. Its Q
// output (ws' Qprev + ws D) feeds the stage, its P output passes ws on to the
// next Fredkin gate, and its R output is a garbage output. Stage 0 takes D1
// directly, with no multiplexer, so it reloads D1 on every edge.
// ws = 1 (write): the next falling edge loads D1..DN into the stages.
// ws = 0 (shift): each falling edge moves the word one stage on.
// The serial output is the last stage: DN right after a write edge, then
// D(N-1), ..., D1 on the following N-1 falling edges.
// 4N-1 gates and 3N-1 garbage outputs (15 and 11 for N = 4).
//
// Interface: clk, ws, d (bit 0 = D1) in; q, qbar (last stage) out; garbage =
// the 2N flip-flop garbage bits, then the N-1 Fredkin garbage bits.
// Timing: falling-edge; a written word leaves in N falling edges counting the
// write edge. No reset.
// The Fredkin multiplexers, the W/S polarity and the direct D1 input of the
// first stage follow the original register. Which end of d is D1 (bit 0) is a
// choice made here, kept consistent with the serial-in parallel-out register.
module rev_piso #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           ws,
  input  logic [N-1:0]   d,
  output logic           q,
  output logic           qbar,
  output logic [3*N-2:0] garbage
);
  logic [N:0]   clk_chain;
  logic [N-1:0] ws_chain;    // ws handed along the Fredkin gates' P outputs;
                             // the last one's P is unused
  logic [N-1:0] stage_d;
  logic [N-1:0] stage_q;
  logic [N-1:0] stage_qbar;

  assign clk_chain[0] = clk;
  assign ws_chain[0]  = ws;
  assign stage_d[0]   = d[0];

  for (genvar i = 1; i < N; i++) begin : g_mux
    fredkin_gate u_frg (
      .a (ws_chain[i-1]),
      .b (stage_q[i-1]),
      .c (d[i]),
      .p (ws_chain[i]),
      .q (stage_d[i]),
      .r (garbage[2*N+i-1])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_dff u_ff (
      .clk     (clk_chain[i]),
      .d       (stage_d[i]),
      .clk_out (clk_chain[i+1]),
      .q       (stage_q[i]),
      .qbar    (stage_qbar[i]),
      .g1      (garbage[2*i]),
      .g2      (garbage[2*i+1])
    );
  end

  assign q    = stage_q[N-1];
  assign qbar = stage_qbar[N-1];
endmodule
