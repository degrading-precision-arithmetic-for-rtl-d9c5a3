// dpa2_cpa2x: W-bit adder built from two cascaded W/2-bit adders (CPA2x10b).
//
// The low half adds a[W/2-1:0] + b[W/2-1:0] + cin; its carry-out c_mid (c10 at
// the default width) is the carry-in of the high half. At the nominal supply the
// result is exact. When the supply is lowered so that one half alone takes about
// a clock period, c_mid no longer reaches the high half in time and the adder
// behaves as if c_mid were disconnected: the result is short by 2^(W/2) whenever
// c_mid = 1. The split keeps that error at a known weight, which is the point of
// this structure. c_mid is brought out so that this can be observed.
//
// Purely combinational; W must be even. The structure follows the published design.
module dpa2_cpa2x #(
  parameter int unsigned W = 20,
  localparam int unsigned H = W / 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         c_mid,
  output logic         cout
);

  dpa2_cpa #(.W(H)) u_lo (
    .a   (a[H-1:0]),
    .b   (b[H-1:0]),
    .cin (cin),
    .s   (s[H-1:0]),
    .cout(c_mid)
  );

  dpa2_cpa #(.W(W - H)) u_hi (
    .a   (a[W-1:H]),
    .b   (b[W-1:H]),
    .cin (c_mid),
    .s   (s[W-1:H]),
    .cout(cout)
  );

endmodule
