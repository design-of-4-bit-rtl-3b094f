// Feynman (controlled-NOT) reversible gate, 2 inputs and 2 outputs.
//
// Function: P = A, Q = A xor B. With B tied to 1 it delivers a copy of A on P
// and its complement on Q, which is how the latches and flip-flops of this
// design produce Q and Q' together.
//
// Interface: inputs a, b; outputs p, q. Timing: combinational.
// This is the standard Feynman gate, unchanged.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
