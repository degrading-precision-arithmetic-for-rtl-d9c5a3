// tb_dpa2_vos_model: self-checking test of the reduced-supply adder model.
//
// The expected captured sum is worked out here in a different way from the
// model: for every bit the testbench walks down the operands to find where the
// carry into that bit was generated, adds up the delay of the path with the
// stage delays of the characterisation (CPA10b 195/245/300/400 ps, CPA2x10b
// 350/435/540/725 ps at 1.0/0.9/0.8/0.7 V), and drops the carry if it arrives
// after the 350 ps clock period. It checks
//   - hand-worked cases: 0x0FFFF + 1 gives 0x10000 at 1.0 V, 0x00000 at 0.9 V
//     (the carry dies after bit 15), 0x0E000 at 0.8 V (after bit 12) and 0x0FE00
//     at 0.7 V (after bit 8, inside the low stage); 0x003FF + 1 keeps the
//     carry into the high stage at 0.8 V and loses it at 0.7 V;
//   - that the result at 1.0 V is always exact;
//   - the one-cycle latency of the registered adder;
//   - 1,000 random operand pairs at each supply, as in the adder experiment,
//     printing the number of wrong sums and the largest and mean error.
module tb_dpa2_vos_model;
  import dpa_pkg::*;
  localparam int W = 20, H = 10, TCLK = 350;
  logic clk = 1'b0, rst_n = 1'b0, in_vld = 1'b0;
  dpa_vdd_e vdd_sel = VDD_1V0;
  logic [W-1:0] a = '0, b = '0, s;
  logic s_vld, cout, late, mid_lost;
  int checks = 0, failures = 0;

  dpa2_vos_model dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int stage_ps(int v);
    int t[4] = '{195, 245, 300, 400};
    return t[v];
  endfunction
  function automatic int total_ps(int v);
    int t[4] = '{350, 435, 540, 725};
    return t[v];
  endfunction

  // Expected captured {cout, sum}.
  function automatic logic [W:0] expected(logic [W-1:0] x, logic [W-1:0] y, int v);
    logic [W:0] r = '0;
    for (int i = 0; i <= W; i++) begin
      logic c = 1'b0;
      int src = -1;
      for (int j = i - 1; j >= 0; j--) begin
        if (x[j] & y[j]) begin src = j; break; end
        if (!(x[j] ^ y[j])) break;
      end
      if (src >= 0) begin
        int t = 0;
        for (int j = src; j < i; j++)
          t += (j < H || src >= H) ? stage_ps(v) * 1 : (total_ps(v) - stage_ps(v));
        c = (t <= TCLK * H);   // costs are per bit, scaled by H
      end
      if (i < W) r[i] = x[i] ^ y[i] ^ c;
      else       r[W] = c;
    end
    return r;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, int v, output logic [W:0] got);
    @(negedge clk);
    a = x; b = y; vdd_sel = dpa_vdd_e'(v); in_vld = 1'b1;
    @(negedge clk);
    in_vld = 1'b0;
    @(negedge clk);
    got = {cout, s};
    checks++;
    if (!s_vld) begin failures++; $display("FAIL latency: s_vld low one cycle after the operands"); end
  endtask

  task automatic expect_eq(string what, logic [W:0] got, logic [W:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    logic [W:0] got;
    @(negedge clk) rst_n = 1'b1;
    // hand-worked cases
    apply(20'h0FFFF, 20'h00001, 0, got); expect_eq("1.0V", got, 21'h10000);
    apply(20'h0FFFF, 20'h00001, 1, got); expect_eq("0.9V", got, 21'h00000);
    apply(20'h0FFFF, 20'h00001, 2, got); expect_eq("0.8V", got, 21'h0E000);
    checks++;
    if (mid_lost || !late) begin failures++; $display("FAIL flags at 0.8V"); end
    apply(20'h0FFFF, 20'h00001, 3, got); expect_eq("0.7V", got, 21'h0FE00);
    // stage-boundary carry alone: 0x003FF + 1 at 0.8 V reaches bit 10 in time
    apply(20'h003FF, 20'h00001, 2, got); expect_eq("c10 in time", got, 21'h00400);
    checks++;
    if (mid_lost || late) begin failures++; $display("FAIL flags for c10 in time"); end
    // at 0.7 V one stage is slower than the clock: c10 itself is lost
    apply(20'h003FF, 20'h00001, 3, got); expect_eq("c10 lost", got, 21'h00200);
    checks++;
    if (!mid_lost || !late) begin failures++; $display("FAIL flags for c10 lost"); end

    // random vectors at each supply
    for (int v = 0; v < 4; v++) begin
      int nerr;
      longint unsigned emax, esum;
      nerr = 0; emax = 0; esum = 0;
      for (int n = 0; n < 1000; n++) begin
        logic [W-1:0] x, y;
        longint unsigned ex, gv, e;
        x = W'($urandom());
        y = W'($urandom());
        apply(x, y, v, got);
        expect_eq("random", got, expected(x, y, v));
        if (v == 0) expect_eq("exact at 1.0V", got, {1'b0, x} + {1'b0, y});
        ex = longint'(x) + longint'(y);
        gv = longint'(got);
        e  = (ex > gv) ? ex - gv : gv - ex;
        checks++;
        if ((e != 0) != late) begin failures++; $display("FAIL late flag"); end
        if (e != 0) nerr++;
        if (e > emax) emax = e;
        esum += e;
      end
      $display("VDD %s: %0d wrong sums of 1000, max error %0d, mean error %0d",
               dpa_vdd_e'(v) == VDD_1V0 ? "1.0V" : dpa_vdd_e'(v) == VDD_0V9 ? "0.9V" :
               dpa_vdd_e'(v) == VDD_0V8 ? "0.8V" : "0.7V", nerr, emax, esum / 1000);
      if (v == 0) begin checks++; if (nerr != 0) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
