// Top level: the controlled multi-logic function generator and the one-bit
// reversible ALU side by side.
//
// The two circuits share no signals. The function generator takes operands
// fg_a, fg_b and a function select fg_sel (rev_pkg::func_e) and returns the
// selected function on fg_y plus its 12 garbage outputs. The ALU takes
// alu_a, alu_b, alu_c and alu_ctrl and returns the six outputs of its
// diagram (q, r, t, p, s, u). Everything is combinational; there is no clock
// or reset. Placing both in one top is this design's choice; each circuit
// follows the document.
module rev_logic_top
  import rev_pkg::*;
(
  // controlled multi-logic function generator
  input  logic        fg_a,
  input  logic        fg_b,
  input  func_e       fg_sel,
  output logic        fg_y,
  output logic [11:0] fg_garbage,
  // one-bit ALU
  input  logic        alu_a,
  input  logic        alu_b,
  input  logic        alu_c,
  input  alu_ctrl_e   alu_ctrl,
  output logic        alu_q,
  output logic        alu_r,
  output logic        alu_t,
  output logic        alu_p,
  output logic        alu_s,
  output logic        alu_u
);

  cmlfg u_cmlfg (
    .a       (fg_a),
    .b       (fg_b),
    .sel     (fg_sel),
    .y       (fg_y),
    .garbage (fg_garbage)
  );

  alu1 u_alu (
    .a    (alu_a),
    .b    (alu_b),
    .c    (alu_c),
    .ctrl (alu_ctrl),
    .q    (alu_q),
    .r    (alu_r),
    .t    (alu_t),
    .p    (alu_p),
    .s    (alu_s),
    .u    (alu_u)
  );

endmodule
