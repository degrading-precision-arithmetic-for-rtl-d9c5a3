// dpa1_coef_bank: coefficient store of the DPA-I filter.
//
// Holds the TAPS coefficients a_k (the filter mask). A coefficient is written
// through a one-word port: on a rising clock edge with we high, wdata goes to
// entry waddr. The stored words do not change while the filter runs, so in the
// freezing method they toggle nothing and need no gating. In the force-to-0
// method the k least-significant bits of every coefficient must read as zero:
// a_zero masks them with AND gates on the way out, so the stored values survive
// and full precision comes back as soon as the level is lowered.
//
// Timing: a write shows on coef the next cycle; a_zero acts combinationally.
// Reset clears all coefficients. The write port, the reset value and masking at
// the output (rather than clearing the stored bits) are this design's choices.
module dpa1_coef_bank
  import dpa_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned AW   = FIR_AW,
  localparam int unsigned IW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we,
  input  logic [IW-1:0]        waddr,
  input  logic signed [AW-1:0] wdata,
  input  logic [AW-1:0]        a_zero,
  output logic signed [AW-1:0] coef [TAPS]
);

  logic signed [AW-1:0] mem [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < TAPS; i++) coef[i] = mem[i] & ~a_zero;
  end

endmodule
