// Self-checking testbench for cog_gate.
// Applies all eight input vectors and compares (P,Q,R) with the COG truth
// table written out as a constant, row by row. Also checks that the eight
// output vectors are all different (the gate is reversible).
module tb_cog_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  // expected {P,Q,R} for input {A,B,C} = 0..7
  localparam logic [2:0] TRUTH [8] = '{3'b010, 3'b000, 3'b001, 3'b011,
                                       3'b110, 3'b101, 3'b100, 3'b111};

  cog_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TRUTH[v]) begin
        failures++;
        $display("FAIL in=%03b got PQR=%03b want %03b", 3'(v), {p, q, r}, TRUTH[v]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs are not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
