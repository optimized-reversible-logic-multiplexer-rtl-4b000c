// Fredkin gate (3x3 reversible controlled swap).
// A is the control and passes through on P. When A is 0, B appears on Q and
// C on R; when A is 1 the two are swapped (C on Q, B on R). Used as a 2:1
// multiplexer, Q selects B (A=0) or C (A=1) and P supplies a copy of the
// select for the next gate.
// Interface: one-bit inputs a, b, c; one-bit outputs p, q, r.
// Combinational, no clock. Equations P = A, Q = A'B xor AC, R = A'C xor AB
// are the standard ones for this gate.
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
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule
