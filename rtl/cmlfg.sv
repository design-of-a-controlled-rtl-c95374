// Controlled multi-logic function generator.
//
// The eight outputs of the multi-logic function generator (mlfg) drive the
// data inputs of the 8:1 COG multiplexer (rev_mux), so the three select lines
// choose which function of a and b appears on y:
//   sel 000 AND, 001 NOR, 010 OR, 011 NAND, 100 XNOR, 101 XOR, 110 A, 111 B'
// (rev_pkg::func_e). 15 gates in all (8 in the generator, 7 in the
// multiplexer); the generator's 2 garbage outputs and the multiplexer's 10
// leave on garbage[1:0] and garbage[11:2]. Purely combinational: y settles
// one generator depth plus three multiplexer levels after a, b or sel change.
//
// The structure and the select table follow the document.
module cmlfg
  import rev_pkg::*;
(
  input  logic        a,
  input  logic        b,
  input  func_e       sel,
  output logic        y,
  output logic [11:0] garbage
);

  logic [(2**$bits(func_e))-1:0] funcs;

  mlfg u_gen (
    .a (a),
    .b (b),
    .f (funcs),
    .g (garbage[1:0])
  );

  rev_mux #(.N_SEL(3)) u_mux (
    .sel     (sel),
    .din     (funcs),
    .y       (y),
    .garbage (garbage[11:2])
  );

endmodule
