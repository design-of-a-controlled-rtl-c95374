// Reversible 2:1 multiplexer made of one COG gate.
//
// The select s0 drives the COG control input A, i0 input B and i1 input C.
// The COG's R output is the multiplexer output: y = i0 when s0 = 0 and
// y = i1 when s0 = 1. The COG's P output returns the select unchanged on
// s_out so that a tree of these multiplexers can pass one select line from
// gate to gate without fan-out; its Q output (i0 xnor i1) is garbage.
// Purely combinational.
//
// The input order follows the document's figure of the COG multiplexer. Which
// data input s0 = 0 chooses follows the COG truth table (the figure's printed
// formula has the two inputs the other way round).
module rev_mux2 (
  input  logic s0,
  input  logic i0,
  input  logic i1,
  output logic s_out,
  output logic y,
  output logic g
);

  cog_gate u_cog (
    .a (s0),
    .b (i0),
    .c (i1),
    .p (s_out),
    .q (g),
    .r (y)
  );

endmodule
