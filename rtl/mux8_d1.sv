// Design 1 8:1 multiplexer: two Design 1 4:1 multiplexers, a TWIN SJ gate
// as the final 2:1 stage and two Feynman gates that clone the selects.
// Feynman gates with B = 0 copy S0 and S1 so that each 4:1 multiplexer gets
// its own pair; the lower 4:1 handles inputs 1..4, the upper one inputs
// 5..8, and the TWIN SJ gate (A = S2, C = lower, D = upper, B = E = 0)
// passes one of them to its P output. This structure follows the
// document; tying the spare inputs to 0 is this design's choice.
// Interface: sel = {S2,S1,S0}; vin[i] = input i+1; muxout = vin[sel];
// garbage = lower 4:1 garbage, upper 4:1 garbage, TWIN SJ Q,R,S,T.
// Combinational, no clock.
module mux8_d1
  import rmux_pkg::*;
(
  input  logic [2:0]                 sel,
  input  logic [7:0]                 vin,
  output logic                       muxout,
  output logic [D1_MUX8_GARBAGE-1:0] garbage
);
  logic [1:0] sel_lo, sel_hi;  // select copies for the two 4:1 halves
  logic       half_lo, half_hi;

  feynman_gate u_fg0 (.a(sel[0]), .b(1'b0), .p(sel_lo[0]), .q(sel_hi[0]));
  feynman_gate u_fg1 (.a(sel[1]), .b(1'b0), .p(sel_lo[1]), .q(sel_hi[1]));

  mux4_d1 u_lo (.sel(sel_lo), .vin(vin[3:0]), .muxout(half_lo),
                .garbage(garbage[D1_MUX4_GARBAGE-1:0]));
  mux4_d1 u_hi (.sel(sel_hi), .vin(vin[7:4]), .muxout(half_hi),
                .garbage(garbage[2*D1_MUX4_GARBAGE-1:D1_MUX4_GARBAGE]));

  twinsj_gate u_tsj (
    .a(sel[2]), .b(1'b0), .c(half_lo), .d(half_hi), .e(1'b0),
    .p(muxout),
    .q(garbage[2*D1_MUX4_GARBAGE]),   .r(garbage[2*D1_MUX4_GARBAGE+1]),
    .s(garbage[2*D1_MUX4_GARBAGE+2]), .t(garbage[2*D1_MUX4_GARBAGE+3])
  );
endmodule
