// tb_dpa1_lsb_reg: self-checking test of the per-bit freezable / clearable register.
//
// Random data, enable, hold and clear patterns are applied for many cycles. A
// bit-level reference in the testbench predicts every flip-flop: it takes d when
// enabled and not held, keeps its value when held, and reads 0 while cleared.
// Clears are also raised between clock edges to check that they act at once,
// without waiting for the clock.
module tb_dpa1_lsb_reg;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] hold = '0, clr = '0, d = '0, q;
  logic [W-1:0] ref_q;
  int checks = 0, failures = 0;

  dpa1_lsb_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%b expected %b", what, q, ref_q);
    end
  endtask

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1 check("reset");
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en   = ($urandom_range(0, 3) != 0);
      hold = W'($urandom()) & W'($urandom());
      clr  = W'($urandom()) & W'($urandom()) & W'($urandom());
      d    = W'($urandom());
      // asynchronous clear: acts before the next edge
      #1;
      for (int i = 0; i < W; i++) if (clr[i]) ref_q[i] = 1'b0;
      check("async clear");
      @(posedge clk);
      for (int i = 0; i < W; i++) begin
        if (clr[i])                ref_q[i] = 1'b0;
        else if (en && !hold[i])   ref_q[i] = d[i];
      end
      #1 check("clocked update");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
