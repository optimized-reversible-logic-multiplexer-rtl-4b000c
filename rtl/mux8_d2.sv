// Design 2 8:1 multiplexer: five SJ gates, two Fredkin gates and one
// Feynman gate.
//   Level 1: a Feynman gate with B = 0 copies SEL0; each copy drives two SJ
//            gates, which select the pairs V_IN1/2, V_IN3/4, V_IN5/6 and
//            V_IN7/8.
//   Level 2: Fredkin gate 1, controlled by SEL1, selects between the 5/6 and
//            7/8 results on Q and passes SEL1 on its P output to SJ gate 5,
//            which selects between the 1/2 and 3/4 results.
//   Level 3: Fredkin gate 2, controlled by SEL2, picks the final muxoutput
//            (Q: SJ 5 result when SEL2 = 0, Fredkin 1 result when SEL2 = 1).
// The gate mix, the Feynman copy of the selects and the final Fredkin
// selection follow the published design; the exact wiring between the gates is
// this design's choice, as is tying every ancilla input to 0.
// Interface: sel = {SEL2,SEL1,SEL0}; vin[i] = V_IN(i+1); muxout selects
// vin[sel]; garbage holds the unused gate outputs (SJ 1..5 Q,R,S, then
// Fredkin 1 R, Fredkin 2 P and R). Combinational, no clock.
module mux8_d2
  import rmux_pkg::*;
(
  input  logic [2:0]                 sel,
  input  logic [7:0]                 vin,
  output logic                       muxout,
  output logic [D2_MUX8_GARBAGE-1:0] garbage
);
  logic       sel0_a, sel0_b;   // two copies of SEL0
  logic       sel1_copy;        // SEL1 passed through Fredkin gate 1
  logic [3:0] pair;             // level-1 results, pair[k] from vin[2k+1:2k]
  logic       quad_lo, quad_hi; // level-2 results

  feynman_gate u_fg (.a(sel[0]), .b(1'b0), .p(sel0_a), .q(sel0_b));

  sj_gate u_sj1 (.a(sel0_a), .b(1'b0), .c(vin[0]), .d(vin[1]),
                 .p(pair[0]), .q(garbage[0]),  .r(garbage[1]),  .s(garbage[2]));
  sj_gate u_sj2 (.a(sel0_a), .b(1'b0), .c(vin[2]), .d(vin[3]),
                 .p(pair[1]), .q(garbage[3]),  .r(garbage[4]),  .s(garbage[5]));
  sj_gate u_sj3 (.a(sel0_b), .b(1'b0), .c(vin[4]), .d(vin[5]),
                 .p(pair[2]), .q(garbage[6]),  .r(garbage[7]),  .s(garbage[8]));
  sj_gate u_sj4 (.a(sel0_b), .b(1'b0), .c(vin[6]), .d(vin[7]),
                 .p(pair[3]), .q(garbage[9]),  .r(garbage[10]), .s(garbage[11]));

  fredkin_gate u_fr1 (.a(sel[1]), .b(pair[2]), .c(pair[3]),
                      .p(sel1_copy), .q(quad_hi), .r(garbage[15]));
  sj_gate u_sj5 (.a(sel1_copy), .b(1'b0), .c(pair[0]), .d(pair[1]),
                 .p(quad_lo), .q(garbage[12]), .r(garbage[13]), .s(garbage[14]));

  fredkin_gate u_fr2 (.a(sel[2]), .b(quad_lo), .c(quad_hi),
                      .p(garbage[16]), .q(muxout), .r(garbage[17]));
endmodule
