// dpa1_ctrl: degradation level register of the DPA-I filter.
//
// It turns a level k and a method into the per-bit controls of the filter's
// registers. With k disabled bits, the input sample x and the coefficients a_k
// lose their k least-significant bits and the y delay line loses its YG*k
// least-significant bits (YG = 2, as in the filter experiment). Method FREEZE
// raises the clock-gating controls of x and of the delay line; the coefficients
// do not change while the filter runs, so they need none. Method FORCE0 raises
// the asynchronous clears of x and of the delay line and masks the
// coefficients to zero. k = 0 gives the exact filter.
//
// Interface: cfg_k and cfg_method are taken when cfg_we is high, and the new
// controls appear one clock later. All outputs come straight from flip-flops,
// so the clears they drive are free of glitches. Reset gives k = 0.
// The register, its write strobe and the clamping of k to the widths are this
// design's choices; the published method only says that the level is set through the
// gating and clear controls.
module dpa1_ctrl
  import dpa_pkg::*;
#(
  parameter int unsigned XW = FIR_XW,
  parameter int unsigned AW = FIR_AW,
  parameter int unsigned YW = FIR_YW,
  parameter int unsigned KW = FIR_KW,
  parameter int unsigned YG = FIR_YG
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [KW-1:0] cfg_k,
  input  dpa_method_e   cfg_method,
  output logic [KW-1:0] k,
  output dpa_method_e   method,
  output logic [XW-1:0] x_hold,
  output logic [XW-1:0] x_clr,
  output logic [AW-1:0] a_zero,
  output logic [YW-1:0] y_hold,
  output logic [YW-1:0] y_clr
);

  logic [XW-1:0] x_mask;
  logic [AW-1:0] a_mask;
  logic [YW-1:0] y_mask;

  // Thermometer masks: bit i is disabled when i < k (x, a) or i < YG*k (y).
  always_comb begin
    for (int i = 0; i < XW; i++) x_mask[i] = (i < int'(cfg_k));
    for (int i = 0; i < AW; i++) a_mask[i] = (i < int'(cfg_k));
    for (int i = 0; i < YW; i++) y_mask[i] = (i < int'(YG) * int'(cfg_k));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= '0;
      method <= DPA_FREEZE;
      x_hold <= '0;
      x_clr  <= '0;
      a_zero <= '0;
      y_hold <= '0;
      y_clr  <= '0;
    end else if (cfg_we) begin
      k      <= cfg_k;
      method <= cfg_method;
      if (cfg_method == DPA_FREEZE) begin
        x_hold <= x_mask;
        x_clr  <= '0;
        a_zero <= '0;
        y_hold <= y_mask;
        y_clr  <= '0;
      end else begin
        x_hold <= '0;
        x_clr  <= x_mask;
        a_zero <= a_mask;
        y_hold <= '0;
        y_clr  <= y_mask;
      end
    end
  end

  // A bit is either frozen or cleared, never both.
  a_one_method: assert property (@(posedge clk) disable iff (!rst_n)
    ((x_hold & x_clr) == '0) && ((y_hold & y_clr) == '0));

endmodule
