// End-to-end testbench for rev_logic_top at its default parameters.
// Drives both circuits through every input combination at once: the function
// generator through all 8 selects x 4 operand pairs, the ALU through all 16
// (ctrl, c, a, b) vectors, over a 32-step walk in which the two circuits see
// different stimulus each step. Results are compared with reference models
// written from the function table and from integer arithmetic. Each
// mechanism is counted (every function select, addition with and without
// carry in, subtraction with and without borrow out, the two logic modes,
// buffer and complement of A) and one that never happens counts a failure.
module tb_rev_logic_top;
  import rev_pkg::*;
  logic fg_a, fg_b, fg_y;
  func_e fg_sel;
  logic [11:0] fg_garbage;
  logic alu_a, alu_b, alu_c;
  alu_ctrl_e alu_ctrl;
  logic alu_q, alu_r, alu_t, alu_p, alu_s, alu_u;
  int checks = 0, failures = 0;

  int n_func [8];
  int n_add, n_add_cin, n_sub, n_sub_borrow, n_and_xor, n_or_xnor, n_buf, n_cmp;

  rev_logic_top dut (
    .fg_a(fg_a), .fg_b(fg_b), .fg_sel(fg_sel), .fg_y(fg_y), .fg_garbage(fg_garbage),
    .alu_a(alu_a), .alu_b(alu_b), .alu_c(alu_c), .alu_ctrl(alu_ctrl),
    .alu_q(alu_q), .alu_r(alu_r), .alu_t(alu_t), .alu_p(alu_p), .alu_s(alu_s), .alu_u(alu_u)
  );

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

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got %b want %b", what, got, want);
    end
  endtask

  initial begin
    int sum, diff;
    for (int k = 0; k < 32; k++) begin
      {fg_sel, fg_a, fg_b} = 5'(k);
      {alu_ctrl, alu_c, alu_a, alu_b} = 4'((k * 7) % 16);
      #1;
      // function generator
      check(fg_y, ref_fn(fg_sel, fg_a, fg_b), $sformatf("fg %s a=%b b=%b", fg_sel.name(), fg_a, fg_b));
      n_func[fg_sel]++;
      // ALU
      sum  = int'(alu_a) + int'(alu_b) + int'(alu_c);
      diff = int'(alu_a) - int'(alu_b);
      check(alu_u, alu_ctrl, "alu u");
      check(alu_r, alu_b, "alu r");
      if (alu_ctrl == ALU_ADD_LOGIC) begin
        check(alu_q, 1'(sum), "add sum");
        check(alu_t, sum >= 2, "add carry");
        check(alu_s, !alu_a, "complement");
        n_cmp++;
        n_add++;
        if (alu_c) begin
          n_add_cin++;
          n_or_xnor++;
          check(alu_t, alu_a | alu_b, "OR");
          check(alu_q, alu_a == alu_b, "XNOR");
        end else begin
          n_and_xor++;
          check(alu_t, alu_a & alu_b, "AND");
          check(alu_q, alu_a != alu_b, "XOR");
        end
      end else begin
        check(alu_s, alu_a, "buffer");
        check(alu_t, diff < 0, "borrow");
        n_buf++;
        if (!alu_c) begin
          check(alu_q, 1'(diff), "difference");
          n_sub++;
          if (diff < 0) n_sub_borrow++;
        end
      end
    end

    for (int s = 0; s < 8; s++) begin
      checks++;
      if (n_func[s] == 0) begin failures++; $display("FAIL select %s never used", func_e'(s)); end
    end
    begin
      int cnt [8];
      string nm [8];
      cnt = '{n_add, n_add_cin, n_sub, n_sub_borrow, n_and_xor, n_or_xnor, n_buf, n_cmp};
      nm  = '{"add", "add with carry in", "subtract", "subtract with borrow out",
              "AND/XOR", "OR/XNOR", "buffer A", "complement A"};
      for (int i = 0; i < 8; i++) begin
        $display("mechanism %-26s seen %0d times", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL %s never exercised", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
