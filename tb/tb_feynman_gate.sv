// Self-checking testbench for feynman_gate: all four input vectors against
// P = A, Q = A xor B, plus a check that the map is a permutation.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  localparam logic [1:0] TRUTH [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] seen;
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== TRUTH[v]) begin
        failures++;
        $display("FAIL in=%02b got %02b want %02b", 2'(v), {p, q}, TRUTH[v]);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin failures++; $display("FAIL not a permutation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
