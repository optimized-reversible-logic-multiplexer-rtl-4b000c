// AJ gate: a two-input gate that provides both the AND and the OR of its
// inputs. The Design 1 4:1 multiplexer uses three of them, two as AND gates
// that gate each half's result with its S1 condition and one as the OR that
// merges the halves. Only the gate's function (AND and OR operations) is
// known; its exact equations and size are this design's choice: P = A.B and
// Q = A+B, the simplest gate that offers both.
// Interface: one-bit inputs a, b; one-bit outputs p (AND), q (OR).
// Combinational, no clock.
module aj_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a & b;
    q = a | b;
  end
endmodule
