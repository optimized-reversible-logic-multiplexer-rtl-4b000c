// Design 2 2:1 multiplexer: a single SJ gate.
// The select drives SJ input A, vin[0] drives C and vin[1] drives D, so
// P = A'C + AD is the multiplexer output. Input B is the auxiliary input
// and is tied to 0; Q, R and S are the three garbage outputs. Mapping the
// SJ gate this way is the published design's; tying the auxiliary input to 0 is
// this design's choice.
// Interface: sel (1 bit), vin[1:0], muxout, garbage = {S, R, Q}.
// Combinational, no clock; output follows the inputs after gate delay.
module mux2_d2
  import rmux_pkg::*;
(
  input  logic                       sel,
  input  logic [1:0]                 vin,
  output logic                       muxout,
  output logic [D2_MUX2_GARBAGE-1:0] garbage
);
  sj_gate u_sj (
    .a(sel), .b(1'b0), .c(vin[0]), .d(vin[1]),
    .p(muxout), .q(garbage[0]), .r(garbage[1]), .s(garbage[2])
  );
endmodule
