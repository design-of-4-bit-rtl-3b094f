// Reversible D latch with a single Q output, built from one AS gate.
//
// The AS gate is tied as A = clk, B = d, C = Q fed back, D = 0. Its outputs
// are then P = clk' (handed on so a second latch can run on the opposite
// phase), Q = clk d + clk' Q (the latch equation), R = 0 xor Q = Q (the copy
// that is fed back to C) and S = d xor Q (a garbage output, of no further use).
// While clk = 1 the latch is transparent (Q follows d); while clk = 0 it holds.
//
// The feedback wire R -> C is the latch's only storage. Wiring it as a plain
// continuous assignment would give a zero-delay combinational loop, so here it
// is written as a level-sensitive always_latch that samples R while clk = 1
// and keeps it while clk = 0; the AS gate then reads that stored bit on C.
// The latch this infers is intended: it is the circuit. There is no reset; the
// stored bit is unknown until clk is first high.
// The gate, its input ties and the R -> C feedback follow the original latch;
// expressing the feedback as an always_latch is a modelling choice made here.
//
// Interface: clk (enable), d (data); clk_n = P, q = Q, r = R, garbage = S.
// Timing: level-sensitive, transparent while clk is high.
module as_latch (
  input  logic clk,
  input  logic d,
  output logic clk_n,
  output logic q,
  output logic r,
  output logic garbage
);
  logic fb;      // the fed-back Q on input C

  as_gate u_as (
    .a (clk),
    .b (d),
    .c (fb),
    .d (1'b0),
    .p (clk_n),
    .q (q),
    .r (r),
    .s (garbage)
  );

  // Feedback R -> C, held while the gate's select (clk) is low.
  always_latch begin
    if (clk) fb = d;
  end
endmodule
