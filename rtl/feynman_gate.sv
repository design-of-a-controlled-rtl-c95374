// Feynman gate (CNOT): a 2x2 reversible gate, P = A, Q = A xor B.
//
// With B tied to 0 it copies A (fan-out); with B tied to 1 it gives A and A'.
// In the ALU it serves as the CNOT gate. Purely combinational. The equations
// are the document's.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
