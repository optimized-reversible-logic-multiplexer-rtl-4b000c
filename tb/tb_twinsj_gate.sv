// Self-checking testbench for twinsj_gate: all 32 inputs. Expected values
// are worked out per output in a different form from the RTL: P as a
// select (A ? D : C), Q as "at least one of A,B and at least one of C,D",
// toggled by E, R as B toggled by E, S and T as "either input is 1".
// Ends with a TB_RESULT line; has a watchdog.
`timescale 1ns/1ps
module tb_twinsj_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;

  twinsj_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e),
                   .p(p), .q(q), .r(r), .s(s), .t(t));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq, er, es, et;
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, e} = 5'(i);
      #1;
      ep = (a == 1'b1) ? d : c;
      eq = ((a + b) > 0 && (c + d) > 0) ? ~e : e;
      er = (b != e);
      es = (a + e) > 0;
      et = (b + e) > 0;
      checks++;
      if ({p, q, r, s, t} !== {ep, eq, er, es, et}) begin
        failures++;
        $display("FAIL abcde=%05b got %b%b%b%b%b exp %b%b%b%b%b",
                 5'(i), p, q, r, s, t, ep, eq, er, es, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
