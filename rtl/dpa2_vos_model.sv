// dpa2_vos_model: behavioural model of the CPA2x10b adder at a lowered supply.
//
// BEHAVIOURAL MODEL. It stands for the registered DPA-II adder as a circuit:
// input flip-flops, the dpa2_cpa2x adder, and output flip-flops one clock period
// T_CLK_PS (350 ps) later, with the supply set to 1.0, 0.9, 0.8 or 0.7 V. The
// electrical delays are not something logic can have, so the model works out
// which carries would still be on their way at the capturing edge and captures
// those carries as 0, which is what cutting the carry chain does. The exact sum
// comes from the dpa2_cpa2x instance; the model only flips the sum bits whose
// carry-in arrives late.
//
// Delay model. A carry is generated at some bit and ripples upward through
// propagating bits. Each bit of the low 10-bit stage adds t_stage/H (a full
// stage takes t_stage, the CPA10b delay at that supply). A carry that left the
// low stage through c_mid then ripples through the high stage at
// (t_total - t_stage)/H per bit, so that the longest path takes t_total, the
// CPA2x10b delay. A carry generated inside the high stage costs t_stage/H per
// bit. At 1.0 V the longest path is exactly 350 ps and the adder is exact. At
// 0.9 and 0.8 V c_mid gets only part of the way up the high stage, so the errors
// sit at and just above 2^10. At 0.7 V one stage alone takes longer than the
// clock period and long carries inside either stage are lost as well.
// The delays are the published SPICE characterisation of a 90 nm library; the
// per-bit spreading of the stage delays and capturing a late carry as 0 are this
// model's simplifications.
//
// Interface: a and b (and vdd_sel) are taken when in_vld is high; s, cout and
// late appear one clock later with s_vld. late is high when at least one carry
// was lost, that is when s differs from the exact sum; mid_lost is high when the
// lost carries include c_mid, the carry from the low stage into the high stage.
module dpa2_vos_model
  import dpa_pkg::*;
#(
  parameter int unsigned W        = ADD_W,
  parameter int unsigned T_CLK    = T_CLK_PS,
  localparam int unsigned H       = W / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dpa_vdd_e     vdd_sel,
  input  logic         in_vld,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         s_vld,
  output logic [W-1:0] s,
  output logic         cout,
  output logic         late,
  output logic         mid_lost
);

  logic [W-1:0] a_q, b_q;
  logic         vld_q;
  dpa_vdd_e     vdd_q;
  logic [W-1:0] s_exact;
  logic         c_mid, cout_exact;
  logic [W:0]   c_true, c_capt;   // carry into bit i, true and as captured

  dpa2_cpa2x #(.W(W)) u_add (
    .a    (a_q),
    .b    (b_q),
    .cin  (1'b0),
    .s    (s_exact),
    .c_mid(c_mid),
    .cout (cout_exact)
  );

  // Carry arrival times, scaled by H so that all arithmetic stays integer.
  always_comb begin
    int unsigned t_lo, t_hi_from_lo;
    int unsigned t_acc;
    logic        from_lo;
    t_lo         = t_stage_ps(vdd_q);
    t_hi_from_lo = t_total_ps(vdd_q) - t_stage_ps(vdd_q);
    t_acc        = 0;
    from_lo      = 1'b0;
    c_true       = '0;
    c_capt       = '0;
    for (int i = 0; i < W; i++) begin
      if (a_q[i] & b_q[i]) begin
        // a new carry starts here
        c_true[i+1] = 1'b1;
        from_lo     = (i < int'(H));
        t_acc       = t_lo;
      end else if (a_q[i] ^ b_q[i]) begin
        c_true[i+1] = c_true[i];
        if (i < int'(H) || !from_lo) t_acc = t_acc + t_lo;
        else                         t_acc = t_acc + t_hi_from_lo;
      end else begin
        c_true[i+1] = 1'b0;
        t_acc       = 0;
      end
      c_capt[i+1] = c_true[i+1] && (t_acc <= T_CLK * H);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      vld_q <= 1'b0;
      vdd_q <= VDD_1V0;
      s_vld <= 1'b0;
      s     <= '0;
      cout  <= 1'b0;
      late  <= 1'b0;
      mid_lost <= 1'b0;
    end else begin
      vld_q <= in_vld;
      s_vld <= vld_q;
      if (in_vld) begin
        a_q   <= a;
        b_q   <= b;
        vdd_q <= vdd_sel;
      end
      // the output flops capture what has settled one period after launch
      s    <= s_exact ^ (c_true[W-1:0] ^ c_capt[W-1:0]);
      cout <= cout_exact & c_capt[W];
      late <= |(c_true ^ c_capt);
      mid_lost <= c_mid & ~c_capt[H];
    end
  end

endmodule
