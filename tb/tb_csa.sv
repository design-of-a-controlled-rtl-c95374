// Self-checking testbench for csa: all sixteen (a, b, c, d) vectors. R must
// be the sum bit of a + b + c, S the carry bit of a + b + c flipped by d
// (both computed with integer addition), P = a and Q = b.
module tb_csa;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  csa dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      sum = int'(a) + int'(b) + int'(c);
      checks++;
      if (r !== sum[0]) begin failures++; $display("FAIL v=%04b r=%b", 4'(v), r); end
      checks++;
      if (s !== (sum[1] ^ d)) begin failures++; $display("FAIL v=%04b s=%b", 4'(v), s); end
      checks++;
      if ({p, q} !== {a, b}) begin failures++; $display("FAIL v=%04b p/q", 4'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
