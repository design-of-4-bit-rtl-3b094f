// AS reversible gate: a 4-input, 4-output reversible (one-to-one) logic gate.
//
// Function:  P = A'
//            Q = A B + A' C         (A selects between B and C)
//            R = D xor (A B + A' C)
//            S = B xor C
// The input vector (A,B,C,D) can always be recovered from (P,Q,R,S): P gives A,
// Q then gives B (A=1) or C (A=0), S gives the other one and R gives D.
// With A=0 the gate copies C and forms XORs, with B=1 it forms A+C and C',
// with C=0 it forms AB; tied as A=clk, B=d, C=fed-back Q, D=0 it is a D latch.
//
// Interface: four single-bit inputs a..d, four single-bit outputs p..s.
// Timing: purely combinational.
// The equations and the pin names are those of the original gate; writing it
// as one always_comb block is the only choice made here.
module as_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic sel;

  always_comb begin
    sel = (a & b) | (~a & c);
    p   = ~a;
    q   = sel;
    r   = d ^ sel;
    s   = b ^ c;
  end
endmodule
