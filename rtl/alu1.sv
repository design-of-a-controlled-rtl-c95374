// One-bit reversible ALU: carry-save adder, NOT, Toffoli, Fredkin and CNOT.
//
// Data flow:
//   csa (A, B, C, D=0)        -> R = A^B^C leaves as q,
//                                S = carry (majority of A,B,C) to the Fredkin,
//                                B to the Toffoli; A goes through a NOT gate.
//   toffoli (B, A', 0)        -> B leaves as r (garbage), A' to the CNOT,
//                                A'B (borrow of A-B) to the Fredkin.
//   fredkin (ctrl, carry, A'B) -> ctrl to the CNOT, t = ctrl ? A'B : carry,
//                                 p = ctrl ? carry : A'B.
//   cnot (ctrl, A')           -> u = ctrl, s = ctrl ^ A'.
// Operations (ctrl, c):
//   ctrl=0, c=cin : add       q = sum,        t = carry out
//   ctrl=1, c=0   : subtract  q = difference, t = borrow (A'B)
//   ctrl=0, c=0   : logic     q = A xor B,    t = A and B
//   ctrl=0, c=1   : logic     q = A xnor B,   t = A or B
//   s = A (buffer) when ctrl = 1, A' (complement) when ctrl = 0.
// Two constant inputs and one garbage output (r). Purely combinational.
//
// The gates and their wiring follow the document's ALU diagram and the output
// names are the diagram's. The subtractor is a half subtractor (borrow in not
// used), as the document's table gives subtraction only for C = 0.
module alu1
  import rev_pkg::*;
(
  input  logic      a,
  input  logic      b,
  input  logic      c,
  input  alu_ctrl_e ctrl,
  output logic      q,
  output logic      r,
  output logic      t,
  output logic      p,
  output logic      s,
  output logic      u
);

  logic csa_a, csa_b, carry;
  logic a_n;
  logic tof_an, borrow;
  logic fr_ctrl;

  csa u_csa (
    .a (a),
    .b (b),
    .c (c),
    .d (1'b0),
    .p (csa_a),
    .q (csa_b),
    .r (q),
    .s (carry)
  );

  assign a_n = ~csa_a;   // NOT gate

  toffoli_gate u_toffoli (
    .a (csa_b),
    .b (a_n),
    .c (1'b0),
    .p (r),
    .q (tof_an),
    .r (borrow)
  );

  fredkin_gate u_fredkin (
    .a (ctrl),
    .b (carry),
    .c (borrow),
    .p (fr_ctrl),
    .q (t),
    .r (p)
  );

  feynman_gate u_cnot (
    .a (fr_ctrl),
    .b (tof_an),
    .p (u),
    .q (s)
  );

endmodule
