// Fredkin (controlled-swap) reversible gate, 3 inputs and 3 outputs.
//
// Function: P = A, Q = A'B + AC, R = AB + A'C. A=0 passes B to Q and C to R,
// A=1 swaps them. Q on its own is a 2:1 multiplexer selecting C when A=1 and
// B when A=0; the parallel-in serial-out register uses it that way to choose
// between loading a parallel bit and shifting, and passes the select on P.
//
// Interface: inputs a (control), b, c; outputs p, q, r. Timing: combinational.
// This is the standard Fredkin gate, unchanged.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end
endmodule
