// TWIN SJ gate (5x5), the building block of the Design 1 multiplexers.
// P = A'C + AD is a 2:1 multiplexer with A as select (C when A is 0, D when
// A is 1), as in the SJ gate. The remaining outputs are
//   Q = ((A+B).(C+D)) xor E,  R = B xor E,  S = A+E,  T = B+E
// where '+' is OR. With E tied to 0, S and T are copies of A and B, so a
// chain of these gates can hand the select lines on without fan-out.
// The equations are the published ones for this gate; reading '+' as OR in
// S and T is this design's reading of the printed equations.
// Interface: one-bit inputs a..e; one-bit outputs p..t. Combinational.
module twinsj_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  always_comb begin
    p = (~a & c) | (a & d);
    q = ((a | b) & (c | d)) ^ e;
    r = b ^ e;
    s = a | e;
    t = b | e;
  end
endmodule
