// End-to-end testbench for reversible_mux_top at its default (and only)
// configuration. For each of the six multiplexers it applies every select
// value with every data pattern (2:1 and 4:1 exhaustively, 8:1 with all
// 256 data patterns), all six at once with unrelated stimulus, and compares
// each output with the addressed input bit. It counts, per multiplexer, how
// often each select value routed its input to the output while that input
// differed from all other inputs' majority (a "distinct" route), and fails
// if any select value never did. It also checks that the two families give
// the same output for the same stimulus. Ends with a TB_RESULT line; has a
// watchdog.
`timescale 1ns/1ps
module tb_reversible_mux_top;
  import rmux_pkg::*;

  logic       d1_mux2_sel, d2_mux2_sel;
  logic [1:0] d1_mux2_vin, d2_mux2_vin;
  logic [1:0] d1_mux4_sel, d2_mux4_sel;
  logic [3:0] d1_mux4_vin, d2_mux4_vin;
  logic [2:0] d1_mux8_sel, d2_mux8_sel;
  logic [7:0] d1_mux8_vin, d2_mux8_vin;
  logic       d1_mux2_out, d1_mux4_out, d1_mux8_out;
  logic       d2_mux2_out, d2_mux4_out, d2_mux8_out;
  rmux_garbage_t garbage;

  int checks = 0, failures = 0;
  // routes[m][s]: times multiplexer m (0..5 = d1 2/4/8, d2 2/4/8) passed
  // input s while it was the only input at its value
  int routes [6][8];
  localparam int NSEL [6] = '{1, 2, 3, 1, 2, 3};

  reversible_mux_top dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int m, int s, logic [7:0] v, logic y, string name);
    int n = 1 << NSEL[m];
    int ones = 0;
    checks++;
    if (y !== v[s]) begin
      failures++;
      if (failures < 20) $display("FAIL %s sel=%0d vin=%b got %b", name, s, v, y);
    end
    for (int k = 0; k < n; k++) ones += int'(v[k]);
    // the addressed input is the lone 1 or the lone 0
    if ((v[s] && ones == 1) || (!v[s] && ones == n - 1)) routes[m][s]++;
  endtask

  initial begin
    logic [7:0] v8a, v8b;
    foreach (routes[m, s]) routes[m][s] = 0;
    for (int s = 0; s < 8; s++) begin
      for (int v = 0; v < 256; v++) begin
        v8a = 8'(v);
        v8b = 8'(v ^ 8'hA5);
        d1_mux8_sel = 3'(s);      d1_mux8_vin = v8a;
        d2_mux8_sel = 3'(7 - s);  d2_mux8_vin = v8b;
        d1_mux4_sel = 2'(s);      d1_mux4_vin = v8a[3:0];
        d2_mux4_sel = 2'(s >> 1); d2_mux4_vin = v8b[7:4];
        d1_mux2_sel = s[0];       d1_mux2_vin = v8a[5:4];
        d2_mux2_sel = s[1];       d2_mux2_vin = v8b[1:0];
        #1;
        check_one(0, int'(d1_mux2_sel), {6'b0, d1_mux2_vin}, d1_mux2_out, "d1_mux2");
        check_one(1, int'(d1_mux4_sel), {4'b0, d1_mux4_vin}, d1_mux4_out, "d1_mux4");
        check_one(2, int'(d1_mux8_sel), d1_mux8_vin,         d1_mux8_out, "d1_mux8");
        check_one(3, int'(d2_mux2_sel), {6'b0, d2_mux2_vin}, d2_mux2_out, "d2_mux2");
        check_one(4, int'(d2_mux4_sel), {4'b0, d2_mux4_vin}, d2_mux4_out, "d2_mux4");
        check_one(5, int'(d2_mux8_sel), d2_mux8_vin,         d2_mux8_out, "d2_mux8");
        // same stimulus on both 8:1 families must agree
        d2_mux8_sel = d1_mux8_sel; d2_mux8_vin = d1_mux8_vin;
        #1;
        checks++;
        if (d1_mux8_out !== d2_mux8_out) begin
          failures++;
          $display("FAIL families differ sel=%0d vin=%b", d1_mux8_sel, d1_mux8_vin);
        end
      end
    end
    for (int m = 0; m < 6; m++)
      for (int s = 0; s < (1 << NSEL[m]); s++) begin
        checks++;
        if (routes[m][s] == 0) begin
          failures++;
          $display("FAIL mux %0d never routed input %0d", m, s);
        end
      end
    $display("distinct routes per select value, d1 8:1: %p", routes[2]);
    $display("distinct routes per select value, d2 8:1: %p", routes[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
