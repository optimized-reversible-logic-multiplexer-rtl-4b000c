// Design 2 4:1 multiplexer: three SJ gates in two levels.
// SJ gates 1 and 2 select Vin1/Vin2 and Vin3/Vin4 with S0 (first level);
// SJ gate 3 selects between their P outputs with S1, giving
//   Muxout = (S0'.Vin1 + S0.Vin2).S1' + (S0'.Vin3 + S0.Vin4).S1.
// The three-gate structure and the equation follow the published design. S0 is
// fanned out to the two first-level gates as a wire and every auxiliary
// input B is tied to 0; both are this design's choices.
// Interface: sel = {S1,S0}, vin[0] = Vin1 .. vin[3] = Vin4, muxout,
// garbage = Q, R, S of gates 1..3 (gate 1 in the low bits).
// Combinational, no clock.
module mux4_d2
  import rmux_pkg::*;
(
  input  logic [1:0]                 sel,
  input  logic [3:0]                 vin,
  output logic                       muxout,
  output logic [D2_MUX4_GARBAGE-1:0] garbage
);
  logic p_lo, p_hi;

  sj_gate u_sj1 (
    .a(sel[0]), .b(1'b0), .c(vin[0]), .d(vin[1]),
    .p(p_lo), .q(garbage[0]), .r(garbage[1]), .s(garbage[2])
  );
  sj_gate u_sj2 (
    .a(sel[0]), .b(1'b0), .c(vin[2]), .d(vin[3]),
    .p(p_hi), .q(garbage[3]), .r(garbage[4]), .s(garbage[5])
  );
  sj_gate u_sj3 (
    .a(sel[1]), .b(1'b0), .c(p_lo), .d(p_hi),
    .p(muxout), .q(garbage[6]), .r(garbage[7]), .s(garbage[8])
  );
endmodule
