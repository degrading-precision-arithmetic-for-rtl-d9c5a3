// dpa1_lsb_reg: register whose bits can be disabled one by one.
//
// This is the storage element of DPA-I. Every bit is its own flip-flop with two
// controls. hold[i] freezes the bit: its clock is gated off, so it keeps the value
// it had when the freeze began. clr[i] forces the bit to zero through the
// flip-flop's asynchronous clear, and keeps it there while clr[i] is high. Both
// ways stop the bit from toggling, which is where the power is saved.
//
// Interface: d is captured on the rising clock edge when en is high, for the
// bits whose hold is low. clr acts at once, without a clock, and wins over hold.
// rst_n clears the whole register asynchronously.
//
// The two controls follow the published method. Clock gating is written as a per-bit
// enable, which synthesis maps onto clock-gating cells; that mapping and the
// per-bit granularity of the controls are this design's choices. hold and clr
// should come from flip-flops (dpa1_ctrl registers them) so that the
// asynchronous clears cannot glitch.
module dpa1_lsb_reg #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] hold,
  input  logic [W-1:0] clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    logic arst;
    logic q_bit;

    assign arst = ~rst_n | clr[i];

    always_ff @(posedge clk or posedge arst) begin
      if (arst)                 q_bit <= 1'b0;
      else if (en && !hold[i])  q_bit <= d[i];
    end

    assign q[i] = q_bit;
  end

endmodule
