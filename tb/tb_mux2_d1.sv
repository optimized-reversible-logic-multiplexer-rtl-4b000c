// Self-checking testbench for mux2_d1: applies every combination of the
// select bit and both data inputs and compares muxout with a
// sum-of-products reference, one product term per input (all select bits
// must match that input's index), written independently of the gate
// network. Counts how often each select value was applied and fails if any
// was never used. Ends with a TB_RESULT line; has a watchdog.
`timescale 1ns/1ps
module tb_mux2_d1;
  import rmux_pkg::*;
  localparam int NSEL = 1;
  localparam int NVIN = 2;
  logic [NSEL-1:0] sel;
  logic [NVIN-1:0] vin;
  logic            muxout;
  logic [D1_MUX2_GARBAGE-1:0] garbage;
  int checks = 0, failures = 0;
  int hits [NVIN];

  mux2_d1 dut (.sel(sel), .vin(vin), .muxout(muxout), .garbage(garbage));

  function automatic logic ref_mux(logic [NSEL-1:0] s, logic [NVIN-1:0] v);
    logic y = 1'b0;
    for (int k = 0; k < NVIN; k++) begin
      logic term = v[k];
      for (int j = 0; j < NSEL; j++)
        term = term & (((k >> j) & 1) != 0 ? s[j] : ~s[j]);
      y = y | term;
    end
    return y;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits[k]) hits[k] = 0;
    for (int s = 0; s < NVIN; s++) begin
      for (int v = 0; v < (1 << NVIN); v++) begin
        sel = NSEL'(s);
        vin = NVIN'(v);
        #1;
        checks++;
        hits[s]++;
        if (muxout !== ref_mux(sel, vin)) begin
          failures++;
          if (failures < 10)
            $display("FAIL sel=%0d vin=%b got %b exp %b", sel, vin, muxout, ref_mux(sel, vin));
        end
        // TWIN SJ garbage with B = E = 0: Q = A.(C+D), R = 0, S = A, T = 0
        checks++;
        if (garbage !== {1'b0, sel[0], 1'b0, sel[0] & (vin[0] | vin[1])}) begin
          failures++;
          $display("FAIL garbage=%b", garbage);
        end
      end
    end
    foreach (hits[k]) begin
      checks++;
      if (hits[k] == 0) begin
        failures++;
        $display("FAIL select value %0d never applied", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
