// Self-checking testbench for mlfg: all four (a, b) pairs. Each of the eight
// outputs is compared with its Boolean function written here from scratch;
// the garbage outputs must be G0 = 0 and G1 = a.b.
module tb_mlfg;
  import rev_pkg::*;
  logic a, b;
  logic [7:0] f;
  logic [1:0] g;
  int checks = 0, failures = 0;

  mlfg dut (.a(a), .b(b), .f(f), .g(g));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] want;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      want[0] = a & b;
      want[1] = ~(a | b);
      want[2] = a | b;
      want[3] = ~(a & b);
      want[4] = (a & b) | (~a & ~b);
      want[5] = (~a & b) | (a & ~b);
      want[6] = a;
      want[7] = ~b;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (f[k] !== want[k]) begin
          failures++;
          $display("FAIL a=%b b=%b %s got %b want %b", a, b, func_e'(k), f[k], want[k]);
        end
      end
      checks++;
      if (g !== {a & b, 1'b0}) begin
        failures++;
        $display("FAIL a=%b b=%b garbage=%b", a, b, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
