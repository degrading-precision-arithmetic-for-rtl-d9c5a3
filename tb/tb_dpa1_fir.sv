// tb_dpa1_fir: self-checking test of the 16-tap degradable FIR filter.
//
// The filter runs at its full size (16 taps, 10-bit samples and coefficients,
// 20-bit output) with a 16-tap low-pass filter computed here (a Hamming-windowed
// sinc with cut-off at a quarter of the sample rate, scaled so that the
// coefficients add up to 2^9) and an input of two tones plus noise.
//
// Two independent references run beside the filter:
//   - a register-level model written here, which keeps its own copy of the input
//     register and of the 16 delay-line registers and applies freezing and
//     forcing bit by bit; every output must match it exactly;
//   - the exact convolution sum a_j * x(t-j) over the accepted samples; at k = 0
//     (once the delay line has refilled) every output must equal it.
// The level goes through k = 0..7 for both methods, as in the filter
// experiment, and the mean |error| against the exact filter is printed for each.
// At every k >= 1 freezing must give a smaller mean error than forcing-to-0.
// Samples arrive with random gaps; the two-cycle latency from x_vld to y_vld is
// checked on every sample.
module tb_dpa1_fir;
  import dpa_pkg::*;
  localparam int TAPS = 16, XW = 10, AW = 10, YW = 20;
  localparam int NSAMP = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_vld = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic y_vld;
  logic signed [YW-1:0] y;
  logic coef_we = 1'b0;
  logic [3:0] coef_addr = '0;
  logic signed [AW-1:0] coef_data = '0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_k = '0, k;
  dpa_method_e cfg_method = DPA_FREEZE, method;

  int checks = 0, failures = 0;

  dpa1_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- coefficients ----------------
  int coefs [TAPS];
  initial begin
    real h [TAPS];
    real hs = 0.0;
    int  acc = 0;
    for (int n = 0; n < TAPS; n++) begin
      real m, w;
      m = n - (TAPS - 1) / 2.0;
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * n / (TAPS - 1));
      h[n] = (m == 0.0) ? 0.5 : $sin(3.14159265358979 * 0.5 * m) / (3.14159265358979 * m);
      h[n] = h[n] * w;
      hs += h[n];
    end
    for (int n = 0; n < TAPS; n++) begin
      coefs[n] = int'($rtoi(h[n] / hs * 512.0 + (h[n] >= 0 ? 0.5 : -0.5)));
      acc += coefs[n];
    end
  end

  // ---------------- register-level reference ----------------
  logic [XW-1:0] r_xq;
  logic [YW-1:0] r_z [TAPS];
  logic          r_tap_en, r_y_vld;
  logic [XW-1:0] r_xh, r_xc, r_az;
  logic [YW-1:0] r_yh, r_yc;
  int            r_coef [TAPS];   // stored coefficients

  function automatic logic [YW-1:0] gate_y(logic [YW-1:0] q, logic [YW-1:0] d, logic en,
                                           logic [YW-1:0] h, logic [YW-1:0] c);
    for (int i = 0; i < YW; i++) if (c[i]) q[i] = 1'b0; else if (en && !h[i]) q[i] = d[i];
    return q;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      logic [XW-1:0] nx;
      logic [YW-1:0] nz [TAPS];
      // registers, with the controls that were in force before this edge
      for (int j = 0; j < TAPS; j++) begin
        int a_eff, prod, nxt;
        a_eff = int'($signed(AW'(r_coef[j]) & ~r_az));
        prod  = a_eff * int'($signed(r_xq));
        nxt   = (j == TAPS - 1) ? 0 : int'($signed(r_z[j+1]));
        nz[j] = gate_y(r_z[j], YW'(prod + nxt), r_tap_en, r_yh, r_yc);
      end
      nx = r_xq;
      for (int i = 0; i < XW; i++) if (r_xc[i]) nx[i] = 1'b0; else if (x_vld && !r_xh[i]) nx[i] = x[i];
      r_xq = nx;
      for (int j = 0; j < TAPS; j++) r_z[j] = nz[j];
      r_y_vld  = r_tap_en;
      r_tap_en = x_vld;
      if (coef_we) r_coef[coef_addr] = int'(coef_data);
      if (cfg_we) begin
        logic [XW-1:0] m;
        logic [YW-1:0] my;
        m = '0; my = '0;
        for (int i = 0; i < XW; i++) m[i]  = (i < int'(cfg_k));
        for (int i = 0; i < YW; i++) my[i] = (i < 2 * int'(cfg_k));
        r_xh = (cfg_method == DPA_FREEZE) ? m : '0;
        r_xc = (cfg_method == DPA_FORCE0) ? m : '0;
        r_az = r_xc;
        r_yh = (cfg_method == DPA_FREEZE) ? my : '0;
        r_yc = (cfg_method == DPA_FORCE0) ? my : '0;
        // the new clears act at once
        r_xq = r_xq & ~r_xc;
        for (int j = 0; j < TAPS; j++) r_z[j] = r_z[j] & ~r_yc;
      end
    end
  end

  // ---------------- exact filter ----------------
  int hist [TAPS];     // accepted samples, newest first
  int exact_q [$];     // exact outputs in order
  always @(posedge clk) begin
    if (rst_n && x_vld) begin
      int acc;
      acc = 0;
      for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = int'(x);
      for (int j = 0; j < TAPS; j++) acc += coefs[j] * hist[j];
      exact_q.push_back(acc);
    end
  end

  // ---------------- output checks ----------------
  int  exact_from;     // outputs before this index may still hold old low bits
  int  out_idx = 0;
  longint err_sum;
  int  err_n;
  logic want_exact;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (y_vld !== r_y_vld || (y_vld && y !== $signed(r_z[0]))) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t: y_vld=%0d y=%0d, reference %0d / %0d",
                                    $time, y_vld, y, r_y_vld, $signed(r_z[0]));
      end
      if (y_vld) begin
        int ex, e;
        ex = exact_q.pop_front();
        e  = int'(y) - ex;
        if (want_exact && out_idx >= exact_from) begin
          checks++;
          if (e != 0) begin
            failures++;
            if (failures < 10) $display("FAIL exact: y=%0d expected %0d", y, ex);
          end
        end
        if (out_idx >= exact_from) begin
          err_sum += (e < 0) ? -e : e;
          err_n++;
        end
        out_idx++;
      end
    end
  end

  // ---------------- stimulus ----------------
  longint mean_err [2][8];
  int sample_no = 0;
  task automatic run_samples(int n);
    int sent = 0;
    while (sent < n) begin
      @(negedge clk);
      if ($urandom_range(0, 9) < 8) begin
        real v = 300.0 * $sin(2.0 * 3.14159265358979 * sample_no / 37.0)
               + 150.0 * $sin(2.0 * 3.14159265358979 * sample_no / 3.3);
        int iv = $rtoi(v) + int'($urandom_range(0, 40)) - 20;
        if (iv > 511) iv = 511;
        if (iv < -512) iv = -512;
        x_vld = 1'b1; x = XW'(iv);
        sent++; sample_no++;
      end else begin
        x_vld = 1'b0; x = XW'($urandom());
      end
    end
    @(negedge clk) x_vld = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic set_level(int kk, dpa_method_e m);
    @(negedge clk);
    cfg_we = 1'b1; cfg_k = 4'(kk); cfg_method = m;
    @(negedge clk);
    cfg_we = 1'b0;
    checks++;
    if (k !== 4'(kk) || method !== m) begin failures++; $display("FAIL level readback"); end
  endtask

  initial begin
    r_xq = '0; r_tap_en = 1'b0; r_y_vld = 1'b0;
    r_xh = '0; r_xc = '0; r_az = '0; r_yh = '0; r_yc = '0;
    for (int j = 0; j < TAPS; j++) begin r_z[j] = '0; r_coef[j] = 0; hist[j] = 0; end
    want_exact = 1'b1;
    exact_from = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < TAPS; j++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 4'(j); coef_data = AW'(coefs[j]);
    end
    @(negedge clk) coef_we = 1'b0;

    for (int mm = 0; mm < 2; mm++) begin
      for (int kk = 0; kk <= 7; kk++) begin
        set_level(kk, dpa_method_e'(mm));
        want_exact = (kk == 0);
        exact_from = out_idx + TAPS + 1;
        err_sum = 0; err_n = 0;
        run_samples(NSAMP);
        $display("%s k=%0d: mean |error| %0d over %0d outputs (full scale 2^19)",
                 mm == 0 ? "freezing   " : "forcing-to-0", kk,
                 err_n ? err_sum / err_n : 0, err_n);
        mean_err[mm][kk] = err_n ? err_sum / err_n : 0;
        if (kk == 0) begin
          checks++;
          if (err_sum != 0) failures++;
        end else begin
          checks++;   // a disabled level must change the output
          if (err_sum == 0) begin failures++; $display("FAIL k=%0d had no effect", kk); end
        end
      end
    end
    for (int kk = 1; kk <= 7; kk++) begin
      checks++;
      if (mean_err[0][kk] >= mean_err[1][kk]) begin
        failures++;
        $display("FAIL k=%0d: freezing error %0d not below forcing error %0d",
                 kk, mean_err[0][kk], mean_err[1][kk]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
