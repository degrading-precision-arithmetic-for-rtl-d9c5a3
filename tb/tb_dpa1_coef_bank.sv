// tb_dpa1_coef_bank: self-checking test of the coefficient store.
//
// Writes random coefficients to random entries, keeps a copy in the testbench,
// and compares every entry after each write, with a random force-to-0 mask
// applied. Also checks that lifting the mask gives back the full stored values.
module tb_dpa1_coef_bank;
  localparam int TAPS = 16, AW = 10;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [3:0] waddr = '0;
  logic signed [AW-1:0] wdata = '0;
  logic [AW-1:0] a_zero = '0;
  logic signed [AW-1:0] coef [TAPS];
  logic signed [AW-1:0] model [TAPS];
  int checks = 0, failures = 0;

  dpa1_coef_bank #(.TAPS(TAPS), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (coef[i] !== (model[i] & ~a_zero)) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d: %h expected %h", i, coef[i], model[i] & ~a_zero);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < TAPS; i++) model[i] = '0;
    @(posedge clk); #1 compare_all();
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'($urandom_range(0, TAPS - 1)); wdata = AW'($urandom());
      @(negedge clk);
      we = 1'b0;
      model[waddr] = wdata;
      a_zero = '0;
      for (int i = 0; i < $urandom_range(0, 7); i++) a_zero[i] = 1'b1;
      #1 compare_all();
      a_zero = '0;
      #1 compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
