// Fredkin gate: a 3x3 reversible controlled swap.
//   P = A
//   Q = A'B xor AC   (B when A = 0, C when A = 1)
//   R = AB xor A'C   (C when A = 0, B when A = 1)
// A = 1 swaps B and C. Purely combinational. The equations are the document's.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (a & b) ^ (~a & c);

endmodule
