// Reversible register family: latch, flip-flop and four N-bit shift registers.
//
// Every storage element here is the reversible D flip-flop (two AS-gate
// latches in master-slave and a Feynman gate), and the four register
// organisations built from it are placed side by side, each with its own
// data ports:
//   - serial in, serial out   (siso_*)
//   - serial in, parallel out (sipo_*)
//   - parallel in, parallel out (pipo_*)
//   - parallel in, serial out with a write/shift select (piso_*)
// A stand-alone flip-flop (dff_*) and a stand-alone latch (latch_*) are
// brought out as well. All flip-flops share clk and act on its falling edge;
// the latch has its own enable, latch_clk, and is transparent while it is high.
// Sharing one clock is this design's choice. The gates' garbage outputs carry
// no information anyone needs and are not brought out.
//
// Timing: dff_q follows dff_d by one falling edge; siso_q follows siso_d by N;
// sipo_q[k] holds the serial bit of k+1 edges ago; pipo_q follows pipo_d by
// one edge; after a falling edge with piso_ws = 1 piso_q shows piso_d[N-1],
// and with piso_ws = 0 the following edges bring piso_d[N-2] .. piso_d[0].
module rev_shift_registers_top #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  // stand-alone latch
  input  logic         latch_clk,
  input  logic         latch_d,
  output logic         latch_q,
  output logic         latch_qbar,
  // stand-alone flip-flop
  input  logic         dff_d,
  output logic         dff_q,
  output logic         dff_qbar,
  // serial in, serial out
  input  logic         siso_d,
  output logic         siso_q,
  output logic         siso_qbar,
  // serial in, parallel out
  input  logic         sipo_d,
  output logic [N-1:0] sipo_q,
  output logic [N-1:0] sipo_qbar,
  // parallel in, parallel out
  input  logic [N-1:0] pipo_d,
  output logic [N-1:0] pipo_q,
  output logic [N-1:0] pipo_qbar,
  // parallel in, serial out
  input  logic         piso_ws,
  input  logic [N-1:0] piso_d,
  output logic         piso_q,
  output logic         piso_qbar
);
  logic           latch_clk_n_unused;
  logic           latch_g_unused;
  logic           dff_clk_out_unused;
  logic           dff_g1_unused;
  logic           dff_g2_unused;
  logic [N-1:0]   siso_stage_unused;
  logic [2*N-1:0] siso_g_unused;
  logic [2*N-1:0] sipo_g_unused;
  logic [2*N-1:0] pipo_g_unused;
  logic [3*N-2:0] piso_g_unused;

  rev_d_latch u_latch (
    .clk     (latch_clk),
    .d       (latch_d),
    .clk_n   (latch_clk_n_unused),
    .q       (latch_q),
    .qbar    (latch_qbar),
    .garbage (latch_g_unused)
  );

  rev_dff u_dff (
    .clk     (clk),
    .d       (dff_d),
    .clk_out (dff_clk_out_unused),
    .q       (dff_q),
    .qbar    (dff_qbar),
    .g1      (dff_g1_unused),
    .g2      (dff_g2_unused)
  );

  rev_siso #(.N(N)) u_siso (
    .clk     (clk),
    .d       (siso_d),
    .q       (siso_q),
    .qbar    (siso_qbar),
    .stage_q (siso_stage_unused),
    .garbage (siso_g_unused)
  );

  rev_sipo #(.N(N)) u_sipo (
    .clk     (clk),
    .d       (sipo_d),
    .q       (sipo_q),
    .qbar    (sipo_qbar),
    .garbage (sipo_g_unused)
  );

  rev_pipo #(.N(N)) u_pipo (
    .clk     (clk),
    .d       (pipo_d),
    .q       (pipo_q),
    .qbar    (pipo_qbar),
    .garbage (pipo_g_unused)
  );

  rev_piso #(.N(N)) u_piso (
    .clk     (clk),
    .ws      (piso_ws),
    .d       (piso_d),
    .q       (piso_q),
    .qbar    (piso_qbar),
    .garbage (piso_g_unused)
  );
endmodule
