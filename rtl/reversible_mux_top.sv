// Reversible multiplexer library, both proposed families side by side.
// Design 1 builds its 2:1, 4:1 and 8:1 multiplexers from TWIN SJ gates
// (with AJ and Feynman gates); Design 2 builds them from SJ gates (with
// Fredkin and Feynman gates for the 8:1). The six multiplexers share
// nothing: each has its own select, data and output ports, and all garbage
// outputs are collected in one struct so that every gate output stays
// observable. Placing both families in one top is this design's choice.
// Interface: <family>_<size>_sel / _vin / _out per multiplexer, vin bit 0 is
// input 1; garbage is an rmux_pkg::rmux_garbage_t. Combinational, no clock.
module reversible_mux_top
  import rmux_pkg::*;
(
  input  logic          d1_mux2_sel,
  input  logic [1:0]    d1_mux2_vin,
  output logic          d1_mux2_out,
  input  logic [1:0]    d1_mux4_sel,
  input  logic [3:0]    d1_mux4_vin,
  output logic          d1_mux4_out,
  input  logic [2:0]    d1_mux8_sel,
  input  logic [7:0]    d1_mux8_vin,
  output logic          d1_mux8_out,
  input  logic          d2_mux2_sel,
  input  logic [1:0]    d2_mux2_vin,
  output logic          d2_mux2_out,
  input  logic [1:0]    d2_mux4_sel,
  input  logic [3:0]    d2_mux4_vin,
  output logic          d2_mux4_out,
  input  logic [2:0]    d2_mux8_sel,
  input  logic [7:0]    d2_mux8_vin,
  output logic          d2_mux8_out,
  output rmux_garbage_t garbage
);
  mux2_d1 u_d1_mux2 (.sel(d1_mux2_sel), .vin(d1_mux2_vin), .muxout(d1_mux2_out), .garbage(garbage.d1_mux2));
  mux4_d1 u_d1_mux4 (.sel(d1_mux4_sel), .vin(d1_mux4_vin), .muxout(d1_mux4_out), .garbage(garbage.d1_mux4));
  mux8_d1 u_d1_mux8 (.sel(d1_mux8_sel), .vin(d1_mux8_vin), .muxout(d1_mux8_out), .garbage(garbage.d1_mux8));
  mux2_d2 u_d2_mux2 (.sel(d2_mux2_sel), .vin(d2_mux2_vin), .muxout(d2_mux2_out), .garbage(garbage.d2_mux2));
  mux4_d2 u_d2_mux4 (.sel(d2_mux4_sel), .vin(d2_mux4_vin), .muxout(d2_mux4_out), .garbage(garbage.d2_mux4));
  mux8_d2 u_d2_mux8 (.sel(d2_mux8_sel), .vin(d2_mux8_vin), .muxout(d2_mux8_out), .garbage(garbage.d2_mux8));
endmodule
