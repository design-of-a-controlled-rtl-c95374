// Shared definitions for the reversible-logic function generator and ALU.
//
// func_e is the function-select code of the controlled multi-logic function
// generator: the value on the 8:1 multiplexer's select lines {S3,S2,S1} and
// the index of the function on the generator's output bus. The encoding is
// the document's select table. alu_ctrl_e names the two values of the ALU's
// control line; the names are this design's own.
package rev_pkg;

  typedef enum logic [2:0] {
    FN_AND  = 3'd0,  // A.B
    FN_NOR  = 3'd1,  // (A+B)'
    FN_OR   = 3'd2,  // A+B
    FN_NAND = 3'd3,  // (A.B)'
    FN_XNOR = 3'd4,  // AB + A'B'
    FN_XOR  = 3'd5,  // A'B + AB'
    FN_COPY = 3'd6,  // A
    FN_NOTB = 3'd7   // B'
  } func_e;

  // ctrl = 0: add (with c as carry in) or logic (c picks AND/XOR or OR/XNOR),
  //           A complemented on S.
  // ctrl = 1: subtract (c = 0), A buffered on S.
  typedef enum logic {
    ALU_ADD_LOGIC = 1'b0,
    ALU_SUB       = 1'b1
  } alu_ctrl_e;

endpackage
