// dpa_pkg: types and default sizes shared by the degrading-precision datapath.
//
// Two ways of trading precision for power are built here. DPA-I disables the
// least-significant bits of the FIR filter's registers, either by freezing them
// (clock gating: the bits keep their last value) or by forcing them to zero
// (asynchronous clear). DPA-II runs a two-stage 20-bit adder at a lowered supply
// voltage so that only long carries are lost. The sizes below are the ones of the
// filter experiment (16 taps, 10-bit x and a_k, 20-bit output) and of the adder
// experiment (20 bits as two cascaded 10-bit adders, clocked every 350 ps).
// The width of the level field and the encodings of the enums are this design's
// own choices.
package dpa_pkg;

  // DPA-I: how the disabled least-significant bits behave.
  typedef enum logic {
    DPA_FREEZE = 1'b0,  // clock-gated: bits keep the value they had
    DPA_FORCE0 = 1'b1   // asynchronously cleared: bits read as zero
  } dpa_method_e;

  // DPA-II: supply voltage of the adder (the four points characterised).
  typedef enum logic [1:0] {
    VDD_1V0 = 2'd0,
    VDD_0V9 = 2'd1,
    VDD_0V8 = 2'd2,
    VDD_0V7 = 2'd3
  } dpa_vdd_e;

  // Filter experiment.
  localparam int unsigned FIR_TAPS = 16;  // taps of the low-pass filter
  localparam int unsigned FIR_XW   = 10;  // input sample width
  localparam int unsigned FIR_AW   = 10;  // coefficient width
  localparam int unsigned FIR_YW   = 20;  // delay line / output width
  localparam int unsigned FIR_KW   = 4;   // width of the level field k
  localparam int unsigned FIR_YG   = 2;   // y delay line loses YG*k bits

  // Adder experiment.
  localparam int unsigned ADD_W    = 20;   // CPA2x10b width
  localparam int unsigned T_CLK_PS = 350;  // one addition every 350 ps

  // Worst-case delays in ps of one 10-bit stage (CPA10b) and of the whole
  // cascaded adder (CPA2x10b) at 1.0, 0.9, 0.8 and 0.7 V.
  function automatic int unsigned t_stage_ps(dpa_vdd_e v);
    case (v)
      VDD_1V0: return 195;
      VDD_0V9: return 245;
      VDD_0V8: return 300;
      default: return 400;
    endcase
  endfunction

  function automatic int unsigned t_total_ps(dpa_vdd_e v);
    case (v)
      VDD_1V0: return 350;
      VDD_0V9: return 435;
      VDD_0V8: return 540;
      default: return 725;
    endcase
  endfunction

endpackage
