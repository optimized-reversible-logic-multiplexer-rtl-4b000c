// Self-checking testbench for feynman_gate: applies all four input pairs
// and compares P and Q with a truth table written out by hand
// (A B -> P Q: 00->00, 01->01, 10->11, 11->10). Ends with a TB_RESULT line;
// a watchdog ends the run with a failure if it hangs.
`timescale 1ns/1ps
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  // expected {p,q} indexed by {a,b}
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

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
        $display("FAIL a=%b b=%b got pq=%b%b exp=%b", a, b, p, q, EXP[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
