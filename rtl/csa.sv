// Reversible 4x4 carry-save adder cell.
//   P = A
//   Q = B
//   R = A xor B xor C                    (full-adder sum)
//   S = (BC xor D) xor ((B xor C) A)     (full-adder carry when D = 0)
// With D = 0, S is the majority of A, B and C, so for C = 0 it is A.B and
// for C = 1 it is A+B, and R is A xor B or its complement. Purely
// combinational.
//
// The output equations are the document's; it does not show the gates inside
// the cell, so the equations are written directly.
module csa (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((b & c) ^ d) ^ ((b ^ c) & a);

endmodule
