// Design 1 4:1 multiplexer: two TWIN SJ gates and three AJ gates.
// TWIN SJ gate 1 takes S0 on A, S1 on B and Vin1/Vin2 on C/D; with E = 0 its
// P output is S0'.Vin1 + S0.Vin2 and its S and T outputs repeat S0 and S1.
// TWIN SJ gate 2 takes those copies and Vin3/Vin4 and gives
// S0'.Vin3 + S0.Vin4. The AJ gates merge the halves:
//   AJ1 = P1 AND S1',  AJ2 = P2 AND S1,  Muxout = AJ1 OR AJ2 (AJ3)
// so Muxout = S1'(S0'.Vin1 + S0.Vin2) + S1(S0'.Vin3 + S0.Vin4).
// Two TWIN SJ and three AJ gates are the published design's; S1' is made by a
// Feynman gate with B = 1 (it also returns S1 on P), which is this design's
// addition because AND/OR alone cannot complement S1. Tying E and the other
// unused inputs to 0 is likewise this design's choice.
// Interface: sel = {S1,S0}; vin[0] = Vin1 .. vin[3] = Vin4; muxout;
// garbage = TWIN SJ 1 Q,R; TWIN SJ 2 Q,R,S; AJ1 OR; AJ2 OR; AJ3 AND.
// Combinational, no clock.
module mux4_d1
  import rmux_pkg::*;
(
  input  logic [1:0]                 sel,
  input  logic [3:0]                 vin,
  output logic                       muxout,
  output logic [D1_MUX4_GARBAGE-1:0] garbage
);
  logic p_lo, p_hi;           // half results of TWIN SJ gates 1 and 2
  logic s0_c1, s1_c1;         // select copies from TWIN SJ gate 1 (S, T)
  logic s1_c2;                // S1 copy from TWIN SJ gate 2 (T)
  logic s1_pos, s1_neg;       // S1 and S1' from the Feynman gate
  logic aj1_and, aj2_and;

  twinsj_gate u_tsj1 (
    .a(sel[0]), .b(sel[1]), .c(vin[0]), .d(vin[1]), .e(1'b0),
    .p(p_lo), .q(garbage[0]), .r(garbage[1]), .s(s0_c1), .t(s1_c1)
  );
  twinsj_gate u_tsj2 (
    .a(s0_c1), .b(s1_c1), .c(vin[2]), .d(vin[3]), .e(1'b0),
    .p(p_hi), .q(garbage[2]), .r(garbage[3]), .s(garbage[4]), .t(s1_c2)
  );
  feynman_gate u_inv (.a(s1_c2), .b(1'b1), .p(s1_pos), .q(s1_neg));

  aj_gate u_aj1 (.a(p_lo),    .b(s1_neg),  .p(aj1_and), .q(garbage[5]));
  aj_gate u_aj2 (.a(p_hi),    .b(s1_pos),  .p(aj2_and), .q(garbage[6]));
  aj_gate u_aj3 (.a(aj1_and), .b(aj2_and), .p(garbage[7]), .q(muxout));
endmodule
