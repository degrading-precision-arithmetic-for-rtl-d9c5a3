// dpa1_tap: one tap of the transposed-form FIR filter.
//
// The tap multiplies the broadcast input sample x by its coefficient a, adds the
// partial sum zin coming from the next tap, and stores the result in its
// delay-line register z: z <= a*x + zin. The last tap gets zin = 0 and the first
// tap's z is the filter output. The multiplier and the adder are exact; the
// precision is lowered upstream, where the k least-significant bits of x and a
// are frozen or zeroed, and in the register z, whose least-significant bits are
// frozen (y_hold) or cleared (y_clr) through dpa1_lsb_reg.
//
// Timing: z is written on the rising clock edge when en is high. Arithmetic is
// two's complement; the sum wraps at YW bits, which the published design sizes to hold
// the filter's output without error (20 bits for 10-bit x and a_k).
module dpa1_tap
  import dpa_pkg::*;
#(
  parameter int unsigned XW = FIR_XW,
  parameter int unsigned AW = FIR_AW,
  parameter int unsigned YW = FIR_YW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  input  logic signed [AW-1:0] a,
  input  logic signed [YW-1:0] zin,
  input  logic [YW-1:0]        y_hold,
  input  logic [YW-1:0]        y_clr,
  output logic signed [YW-1:0] z
);

  logic signed [XW+AW-1:0] prod;
  logic signed [YW-1:0]    prod_y;
  logic signed [YW-1:0]    sum;

  assign prod   = x * a;
  assign prod_y = YW'(prod);   // sign-extends when YW > XW+AW, wraps otherwise
  assign sum    = prod_y + zin;

  dpa1_lsb_reg #(.W(YW)) u_z (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .hold (y_hold),
    .clr  (y_clr),
    .d    (sum),
    .q    (z)
  );

endmodule
