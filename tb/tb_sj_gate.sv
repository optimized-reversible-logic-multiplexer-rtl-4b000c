// Self-checking testbench for sj_gate: applies all 16 inputs and compares
// {P,Q,R,S} with the gate's 16-row truth table, typed in below row by row
// (row index = {A,B,C,D}). Ends with a TB_RESULT line; has a watchdog.
`timescale 1ns/1ps
module tb_sj_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  localparam logic [3:0] TABLE_PQRS [16] = '{
    4'b0000, 4'b0100, 4'b1000, 4'b1100,   // A B = 0 0
    4'b0000, 4'b0101, 4'b1000, 4'b1101,   // A B = 0 1
    4'b0000, 4'b1110, 4'b0000, 4'b1110,   // A B = 1 0
    4'b0000, 4'b1111, 4'b0000, 4'b1111    // A B = 1 1
  };

  sj_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if ({p, q, r, s} !== TABLE_PQRS[i]) begin
        failures++;
        $display("FAIL abcd=%04b got pqrs=%b%b%b%b exp=%04b", 4'(i), p, q, r, s, TABLE_PQRS[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
