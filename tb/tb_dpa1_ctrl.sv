// tb_dpa1_ctrl: self-checking test of the degradation level register.
//
// For every level k from 0 to 12 and both methods the level is written and the
// per-bit controls are compared with masks built here from the rule: x and a_k
// lose their k least-significant bits, the y delay line its 2k; freezing drives
// the clock-gating controls of x and y, forcing drives the clears of x and y and
// the coefficient mask. It also checks that the controls change only on a write
// and that reset gives the exact filter.
module tb_dpa1_ctrl;
  import dpa_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0;
  logic [3:0] cfg_k = '0, k;
  dpa_method_e cfg_method = DPA_FREEZE, method;
  logic [9:0] x_hold, x_clr, a_zero;
  logic [19:0] y_hold, y_clr;
  int checks = 0, failures = 0;

  dpa1_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [19:0] ones(int n);
    logic [19:0] m = '0;
    for (int i = 0; i < n && i < 20; i++) m[i] = 1'b1;
    return m;
  endfunction

  task automatic expect_cfg(int kk, dpa_method_e m);
    logic [9:0]  xm = ones(kk)[9:0];
    logic [19:0] ym = ones(2 * kk);
    logic [9:0]  ex_xh = (m == DPA_FREEZE) ? xm : '0;
    logic [9:0]  ex_xc = (m == DPA_FORCE0) ? xm : '0;
    logic [19:0] ex_yh = (m == DPA_FREEZE) ? ym : '0;
    logic [19:0] ex_yc = (m == DPA_FORCE0) ? ym : '0;
    checks++;
    if (x_hold !== ex_xh || x_clr !== ex_xc || a_zero !== ex_xc ||
        y_hold !== ex_yh || y_clr !== ex_yc || k !== 4'(kk) || method !== m) begin
      failures++;
      $display("FAIL k=%0d m=%s: xh=%b xc=%b az=%b yh=%b yc=%b", kk, m.name(),
               x_hold, x_clr, a_zero, y_hold, y_clr);
    end
  endtask

  initial begin
    @(posedge clk); #1 expect_cfg(0, DPA_FREEZE);
    @(negedge clk) rst_n = 1'b1;
    for (int kk = 0; kk <= 12; kk++) begin
      for (int mm = 0; mm < 2; mm++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_k = 4'(kk); cfg_method = dpa_method_e'(mm);
        @(negedge clk);
        cfg_we = 1'b0;
        expect_cfg(kk, dpa_method_e'(mm));
        // without a write nothing changes
        cfg_k = 4'(kk + 3); cfg_method = dpa_method_e'(1 - mm);
        @(negedge clk);
        expect_cfg(kk, dpa_method_e'(mm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
