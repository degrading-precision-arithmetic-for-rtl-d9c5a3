// tb_dpa1_tap: self-checking test of one transposed-form FIR tap.
//
// Part 1 reproduces the 4x4-bit multiplication examples of the DPA-I analysis
// with a tap of 5-bit signed operands (so that 15 fits) and a 10-bit register:
//   exact:           15 x 15 = 225
//   forcing-to-0:    2 LSBs of both operands zeroed, 12 x 12 = 144 (error 81)
//   freezing:        x = 4 arrives while the 2 LSBs of x are frozen at those of
//                    15, so the multiplier sees 7: 7 x 15 = 105 (error 45)
// Part 2 drives random operands, partial sums and gating patterns and compares
// the delay-line register with a reference that computes a*x + zin and then
// applies freezing and clearing bit by bit.
// Part 3 sweeps all unsigned operands of the two worked examples with their
// least-significant bits forced to zero and checks the largest error against
// the closed forms: for an 8-bit addition with k = 4 disabled bits
// 2(2^k - 1) = 30, for a 4x4 multiplication with k = 2
// (2^k - 1)(2(2^n - 1) - (2^k - 1)) = 81. The addition runs on a second tap
// whose multiplier is fed a = 1, so that z = x + zin.
module tb_dpa1_tap;
  localparam int XW = 5, AW = 5, YW = 10;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic signed [AW-1:0] a = '0;
  logic signed [YW-1:0] zin = '0, z;
  logic [YW-1:0] y_hold = '0, y_clr = '0;
  logic [YW-1:0] ref_z;
  int checks = 0, failures = 0;

  dpa1_tap #(.XW(XW), .AW(AW), .YW(YW)) dut (.*);

  // second tap for the 8-bit addition example: z2 = x2 * 1 + zin2
  logic signed [8:0] x2 = '0;
  logic signed [9:0] zin2 = '0, z2;
  dpa1_tap #(.XW(9), .AW(2), .YW(10)) dut_add (
    .clk, .rst_n, .en(1'b1), .x(x2), .a(2'sd1), .zin(zin2),
    .y_hold('0), .y_clr('0), .z(z2)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_check(string what, int expect_val);
    @(negedge clk);
    checks++;
    if (int'(z) !== expect_val) begin
      failures++;
      $display("FAIL %s: z=%0d expected %0d", what, z, expect_val);
    end
  endtask

  initial begin
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    // Part 1: worked examples
    x = 5'sd15; a = 5'sd15; zin = '0;
    step_check("15x15 exact", 225);
    x = 5'sd15 & ~5'sd3; a = 5'sd15 & ~5'sd3;
    step_check("forcing 2 LSBs: 12x12", 144);
    checks++;
    if (225 - int'(z) != 81) begin failures++; $display("FAIL forcing error"); end
    // freezing: LSBs of x hold the 11 left by the last x = 15
    x = (5'sd4 & ~5'sd3) | (5'sd15 & 5'sd3); a = 5'sd15;
    step_check("freezing: 4 with frozen LSBs", 105);
    checks++;
    if (int'(z) - 60 != 45) begin failures++; $display("FAIL freezing error"); end

    // Part 2: random
    ref_z = z;
    for (int n = 0; n < 3000; n++) begin
      logic [YW-1:0] sum;
      @(negedge clk);
      en     = ($urandom_range(0, 4) != 0);
      x      = XW'($urandom());
      a      = AW'($urandom());
      zin    = YW'($urandom());
      y_hold = '0; y_clr = '0;
      case ($urandom_range(0, 2))
        0: ;
        1: for (int i = 0; i < $urandom_range(1, 6); i++) y_hold[i] = 1'b1;
        default: for (int i = 0; i < $urandom_range(1, 6); i++) y_clr[i] = 1'b1;
      endcase
      sum = YW'(int'(x) * int'(a) + int'(zin));
      @(posedge clk);
      for (int i = 0; i < YW; i++) begin
        if (y_clr[i])                 ref_z[i] = 1'b0;
        else if (en && !y_hold[i])    ref_z[i] = sum[i];
      end
      #1;
      checks++;
      if (z !== ref_z) begin
        failures++;
        if (failures < 10) $display("FAIL random: z=%h expected %h", z, ref_z);
      end
    end

    // Part 3: largest errors of the forced-to-zero examples
    begin
      int emax_add, emax_mul;
      emax_add = 0; emax_mul = 0;
      en = 1'b1; y_hold = '0; y_clr = '0; zin = '0;
      for (int i = 0; i < 256; i += 1) begin
        for (int j = 0; j < 256; j += 3) begin
          @(negedge clk);
          x2 = 9'(i & ~15); zin2 = 10'(j & ~15);
          @(negedge clk);
          if (i + j - int'(z2) > emax_add) emax_add = i + j - int'(z2);
        end
      end
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          @(negedge clk);
          x = 5'(i & ~3); a = 5'(j & ~3);
          @(negedge clk);
          if (i * j - int'(z) > emax_mul) emax_mul = i * j - int'(z);
        end
      end
      checks += 2;
      if (emax_add != 30) begin failures++; $display("FAIL addition max error %0d, expected 30", emax_add); end
      if (emax_mul != 81) begin failures++; $display("FAIL multiplication max error %0d, expected 81", emax_mul); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
