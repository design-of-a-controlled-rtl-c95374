// Self-checking testbench for fredkin_gate: all eight input vectors against
// the written-out truth table (B and C swapped when A = 1), plus a
// permutation check and a check that the number of ones is conserved.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  localparam logic [2:0] TRUTH [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b100, 3'b110, 3'b101, 3'b111};

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
        $display("FAIL in=%03b got %03b want %03b", 3'(v), {p, q, r}, TRUTH[v]);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(v))) begin
        failures++;
        $display("FAIL in=%03b ones not conserved", 3'(v));
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin failures++; $display("FAIL not a permutation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
