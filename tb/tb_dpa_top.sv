// tb_dpa_top: end-to-end test of both degrading-precision schemes at full size.
//
// The top is used with its default parameters. The filter half loads a 16-tap
// low-pass filter, filters a two-tone signal with random gaps between samples,
// and goes through: the exact filter (k = 0), freezing at k = 3, a switch to
// forcing-to-0 at k = 3 while samples keep flowing, forcing at k = 5, loading a
// different filter mask while running, and back to the exact filter. Exact
// outputs are compared with the convolution sum worked out here; degraded
// outputs must differ from it, and by no more than the bound of the scheme:
//   sum_j (|a_j| + 2^9) (2^k - 1)   for the disabled bits of x and a_j,
//   + 16 (2^(2k) - 1)               for the disabled bits of the delay line.
// The adder half adds random operand pairs at 1.0, 0.9, 0.8 and 0.7 V and
// compares each result with the carry-arrival rule worked out here from the
// characterised delays (see tb_dpa2_vos_model); at 1.0 V results must be exact.
// Each mechanism is counted: exact filtering, freezing, forcing, the switch of
// method on the fly, a coefficient reload, sample gaps, exact additions, carries
// lost inside the high stage, and the carry between the stages lost. A mechanism
// that never happened counts as a failure.
module tb_dpa_top;
  import dpa_pkg::*;
  localparam int TAPS = 16, XW = 10, AW = 10, YW = 20, W = 20, H = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fir_x_vld = 1'b0;
  logic signed [XW-1:0] fir_x = '0;
  logic fir_y_vld;
  logic signed [YW-1:0] fir_y;
  logic fir_coef_we = 1'b0;
  logic [3:0] fir_coef_addr = '0;
  logic signed [AW-1:0] fir_coef_data = '0;
  logic fir_cfg_we = 1'b0;
  logic [3:0] fir_cfg_k = '0, fir_k;
  dpa_method_e fir_cfg_method = DPA_FREEZE, fir_method;
  dpa_vdd_e add_vdd = VDD_1V0;
  logic add_in_vld = 1'b0;
  logic [W-1:0] add_a = '0, add_b = '0, add_s;
  logic add_s_vld, add_cout, add_late, add_mid_lost;

  int checks = 0, failures = 0;

  dpa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_exact = 0, n_freeze = 0, n_force = 0, n_switch = 0, n_reload = 0, n_gap = 0;
  int n_add_exact = 0, n_add_hi = 0, n_add_mid = 0;

  // ---------------- filter side ----------------
  int coefs [TAPS];
  int hist [TAPS];
  int exact_q [$];
  int cur_k = 0, prev_k = 0;
  dpa_method_e cur_m = DPA_FREEZE;
  int settle_until = 0;   // outputs before this index may mix two settings
  int out_idx = 0;

  task automatic lowpass();
    real h [TAPS];
    real hs;
    hs = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      real m, w;
      m = n - (TAPS - 1) / 2.0;
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * n / (TAPS - 1));
      h[n] = ((m == 0.0) ? 0.5 : $sin(3.14159265358979 * 0.5 * m) / (3.14159265358979 * m)) * w;
      hs += h[n];
    end
    for (int n = 0; n < TAPS; n++)
      coefs[n] = $rtoi(h[n] / hs * 512.0 + (h[n] >= 0 ? 0.5 : -0.5));
  endtask

  task automatic load_coefs();
    for (int j = 0; j < TAPS; j++) begin
      @(negedge clk);
      fir_coef_we = 1'b1; fir_coef_addr = 4'(j); fir_coef_data = AW'(coefs[j]);
    end
    @(negedge clk) fir_coef_we = 1'b0;
    settle_until = out_idx + TAPS + 2;
  endtask

  task automatic set_level(int kk, dpa_method_e m);
    @(negedge clk);
    fir_cfg_we = 1'b1; fir_cfg_k = 4'(kk); fir_cfg_method = m;
    @(negedge clk);
    fir_cfg_we = 1'b0;
    if (m != cur_m && kk != 0 && cur_k != 0) n_switch++;
    prev_k = cur_k; cur_k = kk; cur_m = m;
    settle_until = out_idx + TAPS + 2;
  endtask

  always @(posedge clk) begin
    if (rst_n && fir_x_vld) begin
      int acc;
      acc = 0;
      for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = int'(fir_x);
      for (int j = 0; j < TAPS; j++) acc += coefs[j] * hist[j];
      exact_q.push_back(acc);
    end
  end

  always @(negedge clk) begin
    if (rst_n && fir_y_vld) begin
      int ex, e, kk;
      longint bound;
      ex = exact_q.pop_front();
      e  = int'(fir_y) - ex;
      if (e < 0) e = -e;
      kk = (out_idx < settle_until && prev_k > cur_k) ? prev_k : cur_k;
      bound = 0;
      for (int j = 0; j < TAPS; j++)
        bound += longint'((coefs[j] < 0 ? -coefs[j] : coefs[j]) + 512) * ((1 << kk) - 1);
      bound += TAPS * ((1 << (2 * kk)) - 1);
      checks++;
      if (longint'(e) > bound) begin
        failures++;
        if (failures < 10) $display("FAIL filter output %0d: error %0d above bound %0d (k=%0d)",
                                    out_idx, e, bound, kk);
      end
      if (out_idx >= settle_until) begin
        if (cur_k == 0) begin
          checks++;
          n_exact++;
          if (e != 0) begin
            failures++;
            if (failures < 10) $display("FAIL exact filter output %0d: %0d vs %0d", out_idx, fir_y, ex);
          end
        end else if (e != 0) begin
          if (cur_m == DPA_FREEZE) n_freeze++; else n_force++;
        end
      end
      out_idx++;
    end
  end

  int sample_no = 0;
  task automatic run_samples(int n);
    int sent;
    sent = 0;
    while (sent < n) begin
      @(negedge clk);
      if ($urandom_range(0, 9) < 8) begin
        real v;
        int iv;
        v = 300.0 * $sin(2.0 * 3.14159265358979 * sample_no / 37.0)
          + 150.0 * $sin(2.0 * 3.14159265358979 * sample_no / 3.3);
        iv = $rtoi(v) + int'($urandom_range(0, 40)) - 20;
        fir_x_vld = 1'b1; fir_x = XW'(iv);
        sent++; sample_no++;
      end else begin
        if (sample_no > 0) n_gap++;
        fir_x_vld = 1'b0; fir_x = XW'($urandom());
      end
    end
    @(negedge clk) fir_x_vld = 1'b0;
  endtask

  // ---------------- adder side ----------------
  function automatic int stage_ps(int v);
    int t[4] = '{195, 245, 300, 400};
    return t[v];
  endfunction
  function automatic int total_ps(int v);
    int t[4] = '{350, 435, 540, 725};
    return t[v];
  endfunction

  function automatic logic [W:0] expected_sum(logic [W-1:0] x, logic [W-1:0] y, int v);
    logic [W:0] r;
    r = '0;
    for (int i = 0; i <= W; i++) begin
      logic c;
      int src;
      c = 1'b0; src = -1;
      for (int j = i - 1; j >= 0; j--) begin
        if (x[j] & y[j]) begin src = j; break; end
        if (!(x[j] ^ y[j])) break;
      end
      if (src >= 0) begin
        int t;
        t = 0;
        for (int j = src; j < i; j++)
          t += (j < H || src >= H) ? stage_ps(v) : (total_ps(v) - stage_ps(v));
        c = (t <= T_CLK_PS * H);
      end
      if (i < W) r[i] = x[i] ^ y[i] ^ c;
      else       r[W] = c;
    end
    return r;
  endfunction

  // operands in flight: the adder answers two clocks after in_vld
  logic [W-1:0] qa [$], qb [$];
  int           qv [$];
  always @(posedge clk) begin
    if (rst_n && add_in_vld) begin
      qa.push_back(add_a); qb.push_back(add_b); qv.push_back(int'(add_vdd));
    end
  end
  always @(negedge clk) begin
    if (rst_n && add_s_vld) begin
      logic [W-1:0] x, y;
      logic [W:0] want, exact;
      int v;
      x = qa.pop_front(); y = qb.pop_front(); v = qv.pop_front();
      want  = expected_sum(x, y, v);
      exact = {1'b0, x} + {1'b0, y};
      checks++;
      if ({add_cout, add_s} !== want || add_late !== (want != exact)) begin
        failures++;
        if (failures < 10) $display("FAIL adder %h+%h at vdd %0d: %h expected %h", x, y, v,
                                    {add_cout, add_s}, want);
      end
      if (v == 0) begin
        checks++;
        if (want != exact) failures++;
        n_add_exact++;
      end
      if (add_late && !add_mid_lost) n_add_hi++;
      if (add_mid_lost) n_add_mid++;
    end
  end

  task automatic run_adder();
    for (int v = 0; v < 4; v++) begin
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        add_in_vld = ($urandom_range(0, 5) != 0);
        add_vdd = dpa_vdd_e'(v);
        // half the pairs have long carry chains across the stage boundary
        add_a = W'($urandom());
        add_b = (n % 2) ? W'($urandom()) : (~add_a ^ W'(1 << $urandom_range(0, 12)));
      end
    end
    @(negedge clk) add_in_vld = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  // ---------------- sequence ----------------
  initial begin
    for (int j = 0; j < TAPS; j++) hist[j] = 0;
    lowpass();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin
        load_coefs();
        run_samples(100);                  // exact
        set_level(3, DPA_FREEZE);
        run_samples(100);                  // freezing
        set_level(3, DPA_FORCE0);          // switch method while running
        run_samples(100);
        set_level(5, DPA_FORCE0);
        run_samples(100);
        for (int j = 0; j < TAPS; j++)     // a different filter mask
          coefs[j] = (j % 2) ? -coefs[j] : coefs[j];
        load_coefs();
        n_reload++;
        run_samples(100);
        set_level(0, DPA_FREEZE);
        run_samples(100);                  // exact again
        repeat (4) @(negedge clk);
      end
      run_adder();
    join
    checks++;
    if (qa.size() != 0 || exact_q.size() != 0) begin
      failures++;
      $display("FAIL: results missing (%0d sums, %0d filter outputs)", qa.size(), exact_q.size());
    end
    $display("mechanisms: exact filter %0d, freezing %0d, forcing %0d, method switches %0d,",
             n_exact, n_freeze, n_force, n_switch);
    $display("            coefficient reloads %0d, sample gaps %0d,", n_reload, n_gap);
    $display("            exact additions %0d, carries lost in high stage %0d, c10 lost %0d",
             n_add_exact, n_add_hi, n_add_mid);
    checks += 9;
    if (n_exact == 0)    begin failures++; $display("FAIL never: exact filter"); end
    if (n_freeze == 0)   begin failures++; $display("FAIL never: freezing"); end
    if (n_force == 0)    begin failures++; $display("FAIL never: forcing"); end
    if (n_switch == 0)   begin failures++; $display("FAIL never: method switch"); end
    if (n_reload == 0)   begin failures++; $display("FAIL never: coefficient reload"); end
    if (n_gap == 0)      begin failures++; $display("FAIL never: sample gap"); end
    if (n_add_exact == 0) begin failures++; $display("FAIL never: exact addition"); end
    if (n_add_hi == 0)   begin failures++; $display("FAIL never: carry lost in high stage"); end
    if (n_add_mid == 0)  begin failures++; $display("FAIL never: c10 lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
