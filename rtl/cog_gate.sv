// COG (Controlled Operation Gate): a 3x3 reversible gate.
//
// Outputs, from the gate's truth table:
//   P = A
//   Q = (B xor C)'          (XNOR of the two data inputs)
//   R = A'B + AC            (A selects C when 1, B when 0)
// The map (A,B,C) -> (P,Q,R) is a bijection, so no information is lost.
// Purely combinational, no clock. The equations follow the document's truth
// table; the R output is the one used as a 2:1 multiplexer elsewhere in the
// design.
module cog_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = ~(b ^ c);
  assign r = (~a & b) | (a & c);

endmodule
