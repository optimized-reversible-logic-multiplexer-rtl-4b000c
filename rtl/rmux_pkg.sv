// Shared constants and types for the reversible multiplexer library.
// Each multiplexer brings out the gate outputs it does not use (its garbage
// outputs) as one packed vector; the widths below are set by the gate
// networks in the mux2_/mux4_/mux8_ modules and must be changed with them.
// rmux_garbage_t collects the garbage of all six multiplexers for the top.
package rmux_pkg;
  localparam int unsigned D1_MUX2_GARBAGE = 4;   // TWIN SJ: Q, R, S, T
  localparam int unsigned D1_MUX4_GARBAGE = 8;   // 2 TWIN SJ + 3 AJ
  localparam int unsigned D1_MUX8_GARBAGE = 20;  // 2 x 4:1 + final TWIN SJ
  localparam int unsigned D2_MUX2_GARBAGE = 3;   // SJ: Q, R, S
  localparam int unsigned D2_MUX4_GARBAGE = 9;   // 3 SJ
  localparam int unsigned D2_MUX8_GARBAGE = 18;  // 5 SJ + 2 Fredkin

  typedef struct packed {
    logic [D1_MUX2_GARBAGE-1:0] d1_mux2;
    logic [D1_MUX4_GARBAGE-1:0] d1_mux4;
    logic [D1_MUX8_GARBAGE-1:0] d1_mux8;
    logic [D2_MUX2_GARBAGE-1:0] d2_mux2;
    logic [D2_MUX4_GARBAGE-1:0] d2_mux4;
    logic [D2_MUX8_GARBAGE-1:0] d2_mux8;
  } rmux_garbage_t;
endpackage
