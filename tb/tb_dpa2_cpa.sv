// tb_dpa2_cpa: self-checking test of the 10-bit carry-propagate adder.
// All operand pairs with both carry-in values are compared with integer sums.
module tb_dpa2_cpa;
  localparam int W = 10;
  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  dpa2_cpa #(.W(W)) dut (.*);

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j += 7)
        for (int c = 0; c < 2; c++) begin
          int unsigned e;
          a = W'(i); b = W'(j); cin = 1'(c);
          #1;
          e = i + j + c;
          checks++;
          if ({cout, s} !== (W + 1)'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", i, j, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
