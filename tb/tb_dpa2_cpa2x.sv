// tb_dpa2_cpa2x: self-checking test of the 20-bit adder made of two 10-bit stages.
// Random operands plus carry-chain corner cases are compared with integer sums;
// the carry between the stages is checked against the carry out of the low
// 10-bit sum computed here.
module tb_dpa2_cpa2x;
  localparam int W = 20, H = 10;
  logic [W-1:0] a, b, s;
  logic cin, c_mid, cout;
  int checks = 0, failures = 0;

  dpa2_cpa2x #(.W(W)) dut (.*);

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] ta, logic [W-1:0] tb_, logic tc);
    longint unsigned e, lo;
    a = ta; b = tb_; cin = tc;
    #1;
    e  = longint'(ta) + longint'(tb_) + longint'(tc);
    lo = longint'(ta[H-1:0]) + longint'(tb_[H-1:0]) + longint'(tc);
    checks++;
    if ({cout, s} !== (W + 1)'(e) || c_mid !== lo[H]) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%0d: got %h c_mid=%0d", ta, tb_, tc, {cout, s}, c_mid);
    end
  endtask

  initial begin
    check('1, 20'd1, 1'b0);
    check(20'h003ff, 20'd1, 1'b0);
    check(20'h003ff, 20'd0, 1'b1);
    check(20'hffc00, 20'h00400, 1'b0);
    for (int n = 0; n < 20000; n++) check(W'($urandom()), W'($urandom()), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
