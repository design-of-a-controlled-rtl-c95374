// Self-checking testbench for rev_mux.
// The default 8:1 instance is driven with every data pattern and every
// select value (2048 vectors); y must equal din[sel]. Its garbage bus must be
// 10 bits (2^n + n - 1), the level-0 XNOR outputs must equal the XNOR of the
// data pairs, and the last three garbage bits must return the select lines.
// A 4:1 instance (n = 2) is checked exhaustively and a 16:1 instance (n = 4)
// with random vectors, to cover the general 2^n:1 construction.
module tb_rev_mux;
  int checks = 0, failures = 0;

  logic [2:0]  sel8;
  logic [7:0]  din8;
  logic        y8;
  logic [9:0]  g8;

  logic [1:0]  sel4;
  logic [3:0]  din4;
  logic        y4;
  logic [4:0]  g4;

  logic [3:0]  sel16;
  logic [15:0] din16;
  logic        y16;
  logic [18:0] g16;

  rev_mux dut8 (.sel(sel8), .din(din8), .y(y8), .garbage(g8));
  rev_mux #(.N_SEL(2)) dut4  (.sel(sel4),  .din(din4),  .y(y4),  .garbage(g4));
  rev_mux #(.N_SEL(4)) dut16 (.sel(sel16), .din(din16), .y(y16), .garbage(g16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    check($bits(g8) == 10 && $bits(dut8.garbage) == 10, "8:1 garbage width");
    check($bits(dut16.garbage) == 19, "16:1 garbage width");

    for (int d = 0; d < 256; d++) begin
      for (int s = 0; s < 8; s++) begin
        din8 = 8'(d);
        sel8 = 3'(s);
        #1;
        check(y8 === din8[s], $sformatf("8:1 din=%02h sel=%0d y=%b", d, s, y8));
        for (int j = 0; j < 4; j++)
          check(g8[j] === (din8[2*j] ~^ din8[2*j+1]),
                $sformatf("8:1 garbage[%0d] din=%02h", j, d));
        check(g8[9:7] === sel8, $sformatf("8:1 select pass-through sel=%0d g=%b", s, g8));
      end
    end

    for (int d = 0; d < 16; d++) begin
      for (int s = 0; s < 4; s++) begin
        din4 = 4'(d);
        sel4 = 2'(s);
        #1;
        check(y4 === din4[s], $sformatf("4:1 din=%0h sel=%0d y=%b", d, s, y4));
        check(g4[4:3] === sel4, "4:1 select pass-through");
      end
    end

    for (int n = 0; n < 2000; n++) begin
      din16 = 16'($urandom);
      sel16 = 4'($urandom);
      #1;
      check(y16 === din16[sel16], $sformatf("16:1 din=%04h sel=%0d y=%b", din16, sel16, y16));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
