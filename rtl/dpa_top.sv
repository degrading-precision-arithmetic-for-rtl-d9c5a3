// dpa_top: the two degrading-precision arithmetic schemes side by side.
//
// DPA-I (left-hand ports fir_*): a 16-tap transposed-form FIR filter whose
// least-significant bits can be disabled at run time, by freezing them (clock
// gating) or by forcing them to zero (asynchronous clear), to cut switching
// activity. See dpa1_fir.
//
// DPA-II (ports add_*): a 20-bit adder built as two cascaded 10-bit
// carry-propagate stages and clocked at one addition per 350 ps. Lowering its
// supply saves power; the carries that then arrive too late are lost, mostly the
// carry between the two stages, so the error lands at a known weight (2^10 and
// just above). The adder is the synthesisable dpa2_cpa2x; the effect of the
// supply on its timing is supplied by the behavioural wrapper dpa2_vos_model,
// driven by add_vdd, which stands for the supply regulator outside this logic.
//
// The two schemes share only the clock and the reset. Timing is that of the two
// blocks: the filter answers two cycles after a sample, the adder one cycle
// after its operands.
module dpa_top
  import dpa_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned XW   = FIR_XW,
  parameter int unsigned AW   = FIR_AW,
  parameter int unsigned YW   = FIR_YW,
  parameter int unsigned KW   = FIR_KW,
  parameter int unsigned AddW = ADD_W,
  localparam int unsigned IW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // DPA-I filter
  input  logic                 fir_x_vld,
  input  logic signed [XW-1:0] fir_x,
  output logic                 fir_y_vld,
  output logic signed [YW-1:0] fir_y,
  input  logic                 fir_coef_we,
  input  logic [IW-1:0]        fir_coef_addr,
  input  logic signed [AW-1:0] fir_coef_data,
  input  logic                 fir_cfg_we,
  input  logic [KW-1:0]        fir_cfg_k,
  input  dpa_method_e          fir_cfg_method,
  output logic [KW-1:0]        fir_k,
  output dpa_method_e          fir_method,
  // DPA-II adder
  input  dpa_vdd_e             add_vdd,
  input  logic                 add_in_vld,
  input  logic [AddW-1:0]      add_a,
  input  logic [AddW-1:0]      add_b,
  output logic                 add_s_vld,
  output logic [AddW-1:0]      add_s,
  output logic                 add_cout,
  output logic                 add_late,
  output logic                 add_mid_lost
);

  dpa1_fir #(.TAPS(TAPS), .XW(XW), .AW(AW), .YW(YW), .KW(KW)) u_fir (
    .clk, .rst_n,
    .x_vld     (fir_x_vld),
    .x         (fir_x),
    .y_vld     (fir_y_vld),
    .y         (fir_y),
    .coef_we   (fir_coef_we),
    .coef_addr (fir_coef_addr),
    .coef_data (fir_coef_data),
    .cfg_we    (fir_cfg_we),
    .cfg_k     (fir_cfg_k),
    .cfg_method(fir_cfg_method),
    .k         (fir_k),
    .method    (fir_method)
  );

  dpa2_vos_model #(.W(AddW)) u_add (
    .clk, .rst_n,
    .vdd_sel(add_vdd),
    .in_vld (add_in_vld),
    .a      (add_a),
    .b      (add_b),
    .s_vld  (add_s_vld),
    .s      (add_s),
    .cout   (add_cout),
    .late   (add_late),
    .mid_lost(add_mid_lost)
  );

endmodule
