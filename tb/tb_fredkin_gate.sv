// Self-checking testbench for fredkin_gate: all eight inputs. The expected
// outputs come from the controlled-swap behaviour (A passes through; B and
// C pass straight when A is 0 and are exchanged when A is 1), not from the
// gate's equations. Also checks that the gate is a permutation of the
// eight input patterns. Ends with a TB_RESULT line; has a watchdog.
`timescale 1ns/1ps
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL abc=%b%b%b got pqr=%b%b%b exp=%b", a, b, c, p, q, r, exp);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL output patterns not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
