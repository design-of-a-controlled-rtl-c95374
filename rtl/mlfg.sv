// Multi-logic function generator: eight functions of A and B at once.
//
// Seven COG gates and one Feynman gate, fed with seven constant inputs, carry
// A and B down a chain; each COG adds one function on its R (or Q) output
// while passing A and B (or B') on to the next gate:
//   COG1 (A, 0, B)  -> A, B',  A.B        (AND)
//   COG2 (A, B', 0) -> A, B,   (A+B)'     (NOR)
//   FG   (B, 1)     -> B, B'
//   COG3 (A, B, 1)  -> A, B,   A+B        (OR)
//   COG4 (A, 1, B') -> A, B',  (A.B)'     (NAND)
//   COG5 (0, A, B)  -> 0, (A^B)', A       (XNOR)
//   COG6 (0, A, B') -> G0, A^B, A         (XOR)
//   COG7 (A, 0, B)  -> A, B',  G1         (copy A, NOT B)
// Only G0 and G1 are garbage. f[k] carries function rev_pkg::func_e'(k).
// Purely combinational.
//
// The gate count, the gate producing each function, the places of the
// constants and of the two garbage outputs follow the document. The wiring
// between gates listed above is this design's reading: it is the netlist that
// fits those points given the COG equations. Input B feeds COG1 and COG7.
module mlfg
  import rev_pkg::*;
(
  input  logic                 a,
  input  logic                 b,
  output logic [(2**$bits(func_e))-1:0] f,
  output logic [1:0]           g
);

  logic a1, nb1;             // COG1 -> COG2
  logic a2, b2;              // COG2 -> COG3 / FG
  logic b_fg, nb_fg;         // FG   -> COG3 / COG4
  logic a3, b3;              // COG3 -> COG4 / COG5
  logic a4, nb4;             // COG4 -> COG5 / COG6
  logic zero5, a5;           // COG5 -> COG6
  logic a6;                  // COG6 -> COG7

  cog_gate u_cog1 (.a(a),     .b(1'b0), .c(b),     .p(a1),    .q(nb1),         .r(f[FN_AND]));
  cog_gate u_cog2 (.a(a1),    .b(nb1),  .c(1'b0),  .p(a2),    .q(b2),          .r(f[FN_NOR]));
  feynman_gate u_fg (.a(b2),  .b(1'b1),            .p(b_fg),  .q(nb_fg));
  cog_gate u_cog3 (.a(a2),    .b(b_fg), .c(1'b1),  .p(a3),    .q(b3),          .r(f[FN_OR]));
  cog_gate u_cog4 (.a(a3),    .b(1'b1), .c(nb_fg), .p(a4),    .q(nb4),         .r(f[FN_NAND]));
  cog_gate u_cog5 (.a(1'b0),  .b(a4),   .c(b3),    .p(zero5), .q(f[FN_XNOR]),  .r(a5));
  cog_gate u_cog6 (.a(zero5), .b(a5),   .c(nb4),   .p(g[0]),  .q(f[FN_XOR]),   .r(a6));
  cog_gate u_cog7 (.a(a6),    .b(1'b0), .c(b),     .p(f[FN_COPY]), .q(f[FN_NOTB]), .r(g[1]));

endmodule
