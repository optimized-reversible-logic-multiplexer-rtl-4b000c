// Select sweep of the two 8:1 multiplexers (both families, through
// reversible_mux_top). The data inputs V_IN1..V_IN8 are square waves with
// half-periods of 30, 50, 70, 90, 110, 130, 150 and 170 ns. The selects
// {SEL2,SEL1,SEL0} follow this timeline:
//   0 us: 000 (V_IN1), 0.12 us: 001 (V_IN2), 2.5 us: 010 (V_IN3),
//   3.5 us: 011 (V_IN4), 4.5 us: 100, 5.5 us: 101, 6.5 us: 110,
//   7.5 us: 111 (V_IN8), end at 8.5 us.
// Every 10 ns both outputs are compared with the wave of the addressed
// input, and each select value must have been exercised. Ends with a
// TB_RESULT line; has a watchdog.
`timescale 1ns/1ps
module tb_wl_mux8_sweep;
  import rmux_pkg::*;

  logic       d1_mux2_sel = 1'b0, d2_mux2_sel = 1'b0;
  logic [1:0] d1_mux2_vin = '0,   d2_mux2_vin = '0;
  logic [1:0] d1_mux4_sel = '0,   d2_mux4_sel = '0;
  logic [3:0] d1_mux4_vin = '0,   d2_mux4_vin = '0;
  logic [2:0] d1_mux8_sel, d2_mux8_sel;
  logic [7:0] d1_mux8_vin, d2_mux8_vin;
  logic       d1_mux2_out, d1_mux4_out, d1_mux8_out;
  logic       d2_mux2_out, d2_mux4_out, d2_mux8_out;
  rmux_garbage_t garbage;

  logic [7:0] vin;
  logic [2:0] sel;
  int checks = 0, failures = 0;
  int samples [8];
  // time (ns) at which each select value starts; the last entry is the end
  localparam int START_NS [9] = '{0, 120, 2500, 3500, 4500, 5500, 6500, 7500, 8500};

  reversible_mux_top dut (.*);

  assign d1_mux8_vin = vin;
  assign d2_mux8_vin = vin;
  assign d1_mux8_sel = sel;
  assign d2_mux8_sel = sel;

  for (genvar k = 0; k < 8; k++) begin : g_wave
    initial begin
      vin[k] = 1'b0;
      forever #(30 + 20 * k) vin[k] = ~vin[k];
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (samples[k]) samples[k] = 0;
    sel = 3'd0;
    #5;
    for (int t = 5; t < START_NS[8]; t += 10) begin
      for (int s = 0; s < 8; s++)
        if (t >= START_NS[s] && t < START_NS[s+1]) sel = 3'(s);
      #1;
      checks += 2;
      samples[sel]++;
      if (d1_mux8_out !== vin[sel]) begin
        failures++;
        $display("FAIL d1 t=%0t sel=%b got %b exp %b", $time, sel, d1_mux8_out, vin[sel]);
      end
      if (d2_mux8_out !== vin[sel]) begin
        failures++;
        $display("FAIL d2 t=%0t sel=%b got %b exp %b", $time, sel, d2_mux8_out, vin[sel]);
      end
      #9;
    end
    foreach (samples[k]) begin
      checks++;
      if (samples[k] == 0) begin
        failures++;
        $display("FAIL select value %0d never applied", k);
      end
    end
    $display("samples per select value: %p", samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
