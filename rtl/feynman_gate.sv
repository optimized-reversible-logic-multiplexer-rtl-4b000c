// Feynman gate (2x2 reversible controlled-NOT).
// P passes A through and Q is A xor B. With B tied to 0 the gate makes a
// copy of A on both outputs, which is how the multiplexers below reuse a
// select line; with B tied to 1, Q is the complement of A.
// Interface: one-bit inputs a, b; one-bit outputs p, q. Purely
// combinational, no clock. The equations are the published ones for this
// gate; nothing here is a local choice.
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
