// SJ gate (4x4), the building block of the Design 2 multiplexers.
// P = A'C + AD is a 2:1 multiplexer with A as select, C chosen when A is 0
// and D when A is 1. The other outputs are Q = D, R = A.D and S = B.D; in a
// multiplexer they are garbage and input B is an auxiliary (ancilla) input.
// These four equations and the 16-row truth table they produce are taken as
// published for this gate.
// Interface: one-bit inputs a, b, c, d; one-bit outputs p, q, r, s.
// Combinational, no clock.
module sj_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = (~a & c) | (a & d);
    q = d;
    r = a & d;
    s = b & d;
  end
endmodule
