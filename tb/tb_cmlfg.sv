// Self-checking testbench for cmlfg: every (a, b) pair under every function
// select. The expected value comes from the select table (AND, NOR, OR, NAND,
// XNOR, XOR, A, B'), written here as a case statement.
module tb_cmlfg;
  import rev_pkg::*;
  logic a, b, y;
  func_e sel;
  logic [11:0] garbage;
  int checks = 0, failures = 0;

  cmlfg dut (.a(a), .b(b), .sel(sel), .y(y), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_fn(func_e s, logic x, logic z);
    case (s)
      FN_AND:  return x & z;
      FN_NOR:  return ~(x | z);
      FN_OR:   return x | z;
      FN_NAND: return ~(x & z);
      FN_XNOR: return x == z;
      FN_XOR:  return x != z;
      FN_COPY: return x;
      FN_NOTB: return ~z;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int v = 0; v < 4; v++) begin
        sel = func_e'(s);
        {a, b} = 2'(v);
        #1;
        checks++;
        if (y !== ref_fn(sel, a, b)) begin
          failures++;
          $display("FAIL sel=%s a=%b b=%b y=%b", sel.name(), a, b, y);
        end
        // the select lines come back on the multiplexer's last garbage bits
        checks++;
        if (garbage[11:9] !== sel) begin
          failures++;
          $display("FAIL select pass-through %b", garbage[11:9]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
