// Waveform test of the two 4:1 multiplexers (both families, through
// reversible_mux_top). Four free-running square waves drive Vin1..Vin4:
//   Vin1 100 ns on / 100 ns off, Vin2 100 ns on / 20 ns off,
//   Vin3  20 ns on / 100 ns off, Vin4  40 ns on / 200 ns off.
// The selects {S1,S0} step through 00, 01, 10, 11, holding each for 500 ns.
// Every 5 ns (offset 1 ns from the edges) Muxout is compared with the wave
// the testbench itself generated for the addressed input. Also checks that
// Muxout toggled during every select window. Ends with a TB_RESULT line;
// has a watchdog.
`timescale 1ns/1ps
module tb_wl_mux4_waveforms;
  import rmux_pkg::*;

  logic       d1_mux2_sel = 1'b0, d2_mux2_sel = 1'b0;
  logic [1:0] d1_mux2_vin = '0,   d2_mux2_vin = '0;
  logic [2:0] d1_mux8_sel = '0,   d2_mux8_sel = '0;
  logic [7:0] d1_mux8_vin = '0,   d2_mux8_vin = '0;
  logic [1:0] d1_mux4_sel, d2_mux4_sel;
  logic [3:0] d1_mux4_vin, d2_mux4_vin;
  logic       d1_mux2_out, d1_mux4_out, d1_mux8_out;
  logic       d2_mux2_out, d2_mux4_out, d2_mux8_out;
  rmux_garbage_t garbage;

  logic [3:0] vin;     // the four reference waves
  logic [1:0] sel;
  int checks = 0, failures = 0;
  int toggles [4];
  localparam int ON_NS  [4] = '{100, 100, 20, 40};
  localparam int OFF_NS [4] = '{100, 20, 100, 200};

  reversible_mux_top dut (.*);

  assign d1_mux4_vin = vin;
  assign d2_mux4_vin = vin;
  assign d1_mux4_sel = sel;
  assign d2_mux4_sel = sel;

  for (genvar k = 0; k < 4; k++) begin : g_wave
    initial begin
      vin[k] = 1'b1;
      forever begin
        #(ON_NS[k])  vin[k] = 1'b0;
        #(OFF_NS[k]) vin[k] = 1'b1;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    foreach (toggles[k]) toggles[k] = 0;
    sel = 2'b00;
    #1;
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      prev = d2_mux4_out;
      for (int t = 0; t < 100; t++) begin
        #5;
        checks += 2;
        if (d1_mux4_out !== vin[sel]) begin
          failures++;
          $display("FAIL d1 t=%0t sel=%b got %b exp %b", $time, sel, d1_mux4_out, vin[sel]);
        end
        if (d2_mux4_out !== vin[sel]) begin
          failures++;
          $display("FAIL d2 t=%0t sel=%b got %b exp %b", $time, sel, d2_mux4_out, vin[sel]);
        end
        if (d2_mux4_out != prev) toggles[s]++;
        prev = d2_mux4_out;
      end
    end
    foreach (toggles[k]) begin
      checks++;
      if (toggles[k] == 0) begin
        failures++;
        $display("FAIL no output activity with sel=%0d", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
