// Self-checking testbench for alu1: all sixteen (ctrl, c, a, b) vectors.
// Expected values come from integer arithmetic, not from the gate equations:
//   sum/carry   = a + b + c          (ctrl = 0)
//   difference  = a - b, borrow when a < b   (ctrl = 1, c = 0)
//   AND/XOR for c = 0, OR/XNOR for c = 1 (ctrl = 0)
//   s = a when ctrl = 1, ~a when ctrl = 0; u = ctrl; r = b.
module tb_alu1;
  import rev_pkg::*;
  logic a, b, c;
  alu_ctrl_e ctrl;
  logic q, r, t, p, s, u;
  int checks = 0, failures = 0;

  alu1 dut (.a(a), .b(b), .c(c), .ctrl(ctrl), .q(q), .r(r), .t(t), .p(p), .s(s), .u(u));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL ctrl=%b c=%b a=%b b=%b %s got %b want %b", ctrl, c, a, b, what, got, want);
    end
  endtask

  initial begin
    int sum, diff;
    logic carry, borrow;
    for (int v = 0; v < 16; v++) begin
      {ctrl, c, a, b} = 4'(v);
      #1;
      sum    = int'(a) + int'(b) + int'(c);
      diff   = int'(a) - int'(b);
      carry  = sum >= 2;
      borrow = diff < 0;
      check(q, 1'(sum), "sum bit on q");
      check(r, b, "garbage r");
      check(u, ctrl, "u");
      check(s, ctrl ? a : !a, "buffer/complement on s");
      if (ctrl == ALU_ADD_LOGIC) begin
        check(t, carry, "carry on t");
        check(p, borrow, "borrow on p");
        check(t, c ? (a | b) : (a & b), "AND/OR on t");
        check(q, c ? (a == b) : (a != b), "XOR/XNOR on q");
      end else begin
        check(t, borrow, "borrow on t");
        check(p, carry, "carry on p");
        if (!c) check(q, 1'(diff), "difference on q");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
