// Toffoli gate: a 3x3 reversible gate, P = A, Q = B, R = AB xor C.
//
// With C tied to 0, R is the AND of A and B. Purely combinational. The
// equations are the document's.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;

endmodule
