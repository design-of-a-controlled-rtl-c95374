// Reversible 2^N_SEL:1 multiplexer built as a tree of COG 2:1 multiplexers.
//
// Level 0 has 2^(N_SEL-1) rev_mux2 cells that pair up the data inputs, each
// later level halves the number of candidates, and the single cell of the
// last level drives y. Level l is steered by sel[l], so sel = k puts din[k] on
// y. A select line is not fanned out: it enters the first cell of its level
// and each cell hands it to the next through its pass-through output. The
// tree uses 2^N_SEL - 1 COG gates and leaves 2^N_SEL + N_SEL - 1 garbage
// outputs (every cell's XNOR output plus the pass-through of the last cell of
// each level); for the default 8:1 size that is 7 gates and 10 garbage bits.
// Purely combinational.
//
// The tree, the select chaining and the gate and garbage counts follow the
// document. The bit order of the garbage bus is this design's own: garbage[k]
// for k < 2^N_SEL - 1 is the XNOR output of cell k (cells numbered level by
// level from the input side), garbage[2^N_SEL - 1 + l] is the select passed
// out of the last cell of level l.
module rev_mux #(
  parameter int unsigned N_SEL = 3
) (
  input  logic [N_SEL-1:0]          sel,
  input  logic [(2**N_SEL)-1:0]     din,
  output logic                      y,
  output logic [(2**N_SEL)+N_SEL-2:0] garbage
);

  localparam int unsigned N_IN    = 2 ** N_SEL;
  localparam int unsigned N_CELLS = N_IN - 1;

  // node[0 .. N_IN-1] are the data inputs; node[N_IN + k] is the output of
  // cell k. Level l reads from node[IN_OFF(l) ..] and writes node[OUT_OFF(l) ..]
  // with IN_OFF(l) = 2^(N+1) - 2^(N+1-l) and OUT_OFF(l) = IN_OFF(l+1).
  logic [2*N_IN-2:0]  node;
  logic [N_CELLS-1:0] cell_sel;    // select seen by each cell
  logic [N_CELLS-1:0] cell_pass;   // select passed out by each cell
  logic [N_CELLS-1:0] cell_xnor;   // garbage output of each cell

  assign node[N_IN-1:0] = din;

  for (genvar l = 0; l < N_SEL; l++) begin : g_level
    localparam int unsigned IN_OFF  = (2 ** (N_SEL + 1)) - (2 ** (N_SEL + 1 - l));
    localparam int unsigned OUT_OFF = (2 ** (N_SEL + 1)) - (2 ** (N_SEL - l));
    localparam int unsigned N_LVL   = 2 ** (N_SEL - 1 - l);
    localparam int unsigned CELL0   = OUT_OFF - N_IN;   // index of the level's first cell

    for (genvar j = 0; j < N_LVL; j++) begin : g_cell
      if (j == 0) begin : g_head
        assign cell_sel[CELL0] = sel[l];
      end else begin : g_chain
        assign cell_sel[CELL0 + j] = cell_pass[CELL0 + j - 1];
      end

      rev_mux2 u_mux (
        .s0    (cell_sel[CELL0 + j]),
        .i0    (node[IN_OFF + 2*j]),
        .i1    (node[IN_OFF + 2*j + 1]),
        .s_out (cell_pass[CELL0 + j]),
        .y     (node[OUT_OFF + j]),
        .g     (cell_xnor[CELL0 + j])
      );
    end

    assign garbage[N_CELLS + l] = cell_pass[CELL0 + N_LVL - 1];
  end

  assign garbage[N_CELLS-1:0] = cell_xnor;
  assign y = node[2*N_IN-2];

endmodule
