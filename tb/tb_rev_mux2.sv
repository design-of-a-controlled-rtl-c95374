// Self-checking testbench for rev_mux2: all eight (s0, i0, i1) vectors.
// Expects y = i0 for s0 = 0 and i1 for s0 = 1, the select back on s_out and
// the XNOR of the data inputs on the garbage output.
module tb_rev_mux2;
  logic s0, i0, i1, s_out, y, g;
  int checks = 0, failures = 0;

  rev_mux2 dut (.s0(s0), .i0(i0), .i1(i1), .s_out(s_out), .y(y), .g(g));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want_y;
    for (int v = 0; v < 8; v++) begin
      {s0, i0, i1} = 3'(v);
      #1;
      want_y = s0 ? i1 : i0;
      checks++;
      if (y !== want_y) begin
        failures++;
        $display("FAIL s0=%b i0=%b i1=%b y=%b want %b", s0, i0, i1, y, want_y);
      end
      checks++;
      if (s_out !== s0) begin failures++; $display("FAIL s_out=%b s0=%b", s_out, s0); end
      checks++;
      if (g !== (i0 == i1)) begin failures++; $display("FAIL g=%b", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
