// Design 1 2:1 multiplexer: a single TWIN SJ gate.
// The select drives A, vin[0] drives C and vin[1] drives D; the gate's P
// output, P = A'C + AD, is the multiplexer output. The supplementary inputs
// B and E are tied to 0 (this design's choice), leaving Q, R, S and T as
// garbage. Using P of a TWIN SJ gate as the 2:1 output follows the published design.
// Interface: sel, vin[1:0], muxout, garbage = {T, S, R, Q}.
// Combinational, no clock.
module mux2_d1
  import rmux_pkg::*;
(
  input  logic                       sel,
  input  logic [1:0]                 vin,
  output logic                       muxout,
  output logic [D1_MUX2_GARBAGE-1:0] garbage
);
  twinsj_gate u_tsj (
    .a(sel), .b(1'b0), .c(vin[0]), .d(vin[1]), .e(1'b0),
    .p(muxout), .q(garbage[0]), .r(garbage[1]), .s(garbage[2]), .t(garbage[3])
  );
endmodule
