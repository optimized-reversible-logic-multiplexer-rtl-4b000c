// Self-checking testbench for aj_gate: all four inputs against a typed
// truth table ({P,Q} = {AND, OR}). Ends with a TB_RESULT line; watchdog.
`timescale 1ns/1ps
module tb_aj_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b01, 2'b11};

  aj_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL ab=%b%b got pq=%b%b exp=%b", a, b, p, q, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
