// dpa1_fir: 16-tap transposed-form FIR filter with degradable precision (DPA-I).
//
// y(t) = sum over j of a_j * x(t-j). In transposed form the input sample x is
// broadcast to all taps and the partial sums travel down a register chain
// z_{TAPS-1} -> ... -> z_0: z_j <= a_j*x + z_{j+1}, and y = z_0. The filter's
// precision is set by a level k and a method held in dpa1_ctrl:
//   FREEZE  the k least-significant bits of the input register and the 2k
//           least-significant bits of every delay-line register are clock
//           gated and keep their last value;
//   FORCE0  the same bits are held at zero by their asynchronous clears, and
//           the k least-significant bits of every coefficient read as zero.
// k = 0 gives the exact filter. The level can be changed while the filter runs.
//
// Interface: a sample is offered with x_vld. It is taken into the input
// register, the taps advance on the next cycle, and y_vld marks the new output
// one cycle after that: two cycles of latency, one sample per clock at most.
// Coefficients are written with coef_we / coef_addr / coef_data, the level with
// cfg_we / cfg_k / cfg_method (both take effect the next cycle).
//
// Following the published method: transposed form, 16 taps, 10-bit x and a_k, 20-bit
// delay line and output, granularity k for x and a_k and 2k for the delay line,
// clock gating for freezing and asynchronous clear for forcing. This design's
// own choices: the valid strobes and their latency, the write ports, the
// two's-complement wrap-around of the 20-bit sum, and masking the coefficients
// at the output of their store.
module dpa1_fir
  import dpa_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned XW   = FIR_XW,
  parameter int unsigned AW   = FIR_AW,
  parameter int unsigned YW   = FIR_YW,
  parameter int unsigned KW   = FIR_KW,
  parameter int unsigned YG   = FIR_YG,
  localparam int unsigned IW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // samples
  input  logic                 x_vld,
  input  logic signed [XW-1:0] x,
  output logic                 y_vld,
  output logic signed [YW-1:0] y,
  // coefficient load
  input  logic                 coef_we,
  input  logic [IW-1:0]        coef_addr,
  input  logic signed [AW-1:0] coef_data,
  // degradation level
  input  logic                 cfg_we,
  input  logic [KW-1:0]        cfg_k,
  input  dpa_method_e          cfg_method,
  output logic [KW-1:0]        k,
  output dpa_method_e          method
);

  logic [XW-1:0] x_hold, x_clr;
  logic [AW-1:0] a_zero;
  logic [YW-1:0] y_hold, y_clr;

  logic signed [AW-1:0] coef [TAPS];
  logic signed [XW-1:0] xq;
  logic signed [YW-1:0] z [TAPS+1];
  logic                 tap_en;

  dpa1_ctrl #(.XW(XW), .AW(AW), .YW(YW), .KW(KW), .YG(YG)) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_k, .cfg_method,
    .k, .method, .x_hold, .x_clr, .a_zero, .y_hold, .y_clr
  );

  dpa1_coef_bank #(.TAPS(TAPS), .AW(AW)) u_coef (
    .clk, .rst_n,
    .we    (coef_we),
    .waddr (coef_addr),
    .wdata (coef_data),
    .a_zero(a_zero),
    .coef  (coef)
  );

  // Input register x(t), with its least-significant bits gated.
  dpa1_lsb_reg #(.W(XW)) u_x (
    .clk, .rst_n,
    .en  (x_vld),
    .hold(x_hold),
    .clr (x_clr),
    .d   (x),
    .q   (xq)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap_en <= 1'b0;
      y_vld  <= 1'b0;
    end else begin
      tap_en <= x_vld;
      y_vld  <= tap_en;
    end
  end

  assign z[TAPS] = '0;

  for (genvar j = 0; j < TAPS; j++) begin : g_tap
    dpa1_tap #(.XW(XW), .AW(AW), .YW(YW)) u_tap (
      .clk, .rst_n,
      .en    (tap_en),
      .x     (xq),
      .a     (coef[j]),
      .zin   (z[j+1]),
      .y_hold(y_hold),
      .y_clr (y_clr),
      .z     (z[j])
    );
  end

  assign y = z[0];

  // Every output comes exactly two cycles after its sample.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    y_vld == $past(x_vld, 2));

endmodule
