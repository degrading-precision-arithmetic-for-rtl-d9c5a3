// dpa2_cpa: W-bit carry-propagate adder (CPA10b at the default width).
//
// {cout, s} = a + b + cin, unsigned. This is the building block of the DPA-II
// adder: two identical copies are cascaded to form a 20-bit adder whose carry
// chain breaks cleanly between them when the supply voltage is lowered. It is
// purely combinational. The published design synthesises it for the highest speed; the
// expression below leaves the choice of carry structure to synthesis.
module dpa2_cpa #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  assign {cout, s} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};

endmodule
