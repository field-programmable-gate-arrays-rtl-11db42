// tb_sd_estimators_top - end-to-end test of the three estimators at their default sizes.
//
// A stream of zero-mean Gaussian noise runs through four noise levels,
// sigma = 0.5, 0.8, 1.2 and 1.5, 4096 samples each, with occasional gaps in
// in_valid. Checked:
//  * median and RMS outputs on every clock against models kept here (last 32
//    magnitudes sorted / last 32 squares averaged and rooted);
//  * valid flags rise exactly with the 32nd sample;
//  * over the second half of each level the mean estimate of each method lies
//    near the true sigma (median and RMS within 8 %, P84 within 15 %);
//  * each mechanism happens: window fill, samples leaving the window, input
//    gaps, P84 frame updates that raise and that lower the estimate.
module tb_sd_estimators_top;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [14:0] x_in = '0;
  logic [15:0] sigma_median, sigma_rms, sigma_p84;
  logic        median_valid, rms_valid, p84_update;
  int checks = 0, failures = 0;
  int hist [$];
  int accepted = 0;
  // mechanism counters
  int n_fill_med = 0, n_fill_rms = 0, n_evict = 0, n_gap = 0, n_p84_up = 0, n_p84_down = 0, n_p84_upd = 0;

  sd_estimators_top dut (
    .clk, .rst_n, .in_valid, .x_in,
    .sigma_median, .median_valid, .sigma_rms, .rms_valid, .sigma_p84, .p84_update
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int med_model();
    int w [32];
    int tmp, j;
    for (int i = 0; i < 32; i++) w[i] = (i < hist.size()) ? ((hist[i] < 0) ? -hist[i] : hist[i]) : 0;
    for (int i = 1; i < 32; i++) begin
      tmp = w[i]; j = i - 1;
      while (j >= 0 && w[j] > tmp) begin w[j+1] = w[j]; j--; end
      w[j+1] = tmp;
    end
    return int'(((longint'(w[15]) + longint'(w[16])) * 24248 + 16384) >>> 15);
  endfunction

  function automatic int rms_model();
    longint s = 0, m, r;
    for (int i = 0; i < 32 && i < hist.size(); i++) s += longint'(hist[i]) * hist[i];
    m = s >> 5;
    r = longint'($sqrt(real'(m)));
    while (r * r > m) r--;
    while ((r + 1) * (r + 1) <= m) r++;
    return int'(r);
  endfunction

  initial begin
    static real level [4] = '{0.5, 0.8, 1.2, 1.5};
    real s_med, s_rms, s_p84, m_med, m_rms, m_p84;
    int  n_avg, n_p, prev_p84;
    static bit prev_mv = 0, prev_rv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev_p84 = 0;
    foreach (level[l]) begin
      s_med = 0; s_rms = 0; s_p84 = 0; n_avg = 0; n_p = 0;
      for (int t = 0; t < 4096; t++) begin
        @(negedge clk);
        in_valid = ($urandom % 64 != 0);
        x_in     = gauss_sample(level[l]);
        if (!in_valid) n_gap++;
        @(posedge clk);
        if (in_valid) begin
          hist.push_front(int'(x_in));
          if (hist.size() > 32) begin void'(hist.pop_back()); n_evict++; end
          accepted++;
        end
        #1;
        checks += 4;
        if (int'(sigma_median) != med_model()) begin
          failures++; if (failures < 10) $display("median %0d expected %0d", sigma_median, med_model());
        end
        if (int'(sigma_rms) != rms_model()) begin
          failures++; if (failures < 10) $display("rms %0d expected %0d", sigma_rms, rms_model());
        end
        if (median_valid !== (accepted >= 32)) failures++;
        if (rms_valid    !== (accepted >= 32)) failures++;
        if (median_valid && !prev_mv) n_fill_med++;
        if (rms_valid && !prev_rv) n_fill_rms++;
        prev_mv = median_valid; prev_rv = rms_valid;
        if (p84_update) begin
          n_p84_upd++;
          if (int'(sigma_p84) > prev_p84) n_p84_up++;
          if (int'(sigma_p84) < prev_p84) n_p84_down++;
          prev_p84 = int'(sigma_p84);
          if (t >= 2048) begin s_p84 += real'(sigma_p84) / 256.0; n_p++; end
        end
        if (t >= 2048) begin
          s_med += real'(sigma_median) / 256.0;
          s_rms += real'(sigma_rms) / 256.0;
          n_avg++;
        end
      end
      m_med = s_med / n_avg; m_rms = s_rms / n_avg; m_p84 = s_p84 / n_p;
      $display("sigma %0.2f: median %0.4f  rms %0.4f  p84 %0.4f", level[l], m_med, m_rms, m_p84);
      checks += 3;
      if (m_med < 0.92 * level[l] || m_med > 1.08 * level[l]) begin failures++; $display("median mean off"); end
      if (m_rms < 0.92 * level[l] || m_rms > 1.08 * level[l]) begin failures++; $display("rms mean off"); end
      if (m_p84 < 0.85 * level[l] || m_p84 > 1.15 * level[l]) begin failures++; $display("p84 mean off"); end
    end
    $display("mechanisms: median fill %0d, rms fill %0d, window evictions %0d, input gaps %0d, p84 updates %0d (up %0d, down %0d)",
             n_fill_med, n_fill_rms, n_evict, n_gap, n_p84_upd, n_p84_up, n_p84_down);
    checks += 6;
    if (n_fill_med != 1) failures++;
    if (n_fill_rms != 1) failures++;
    if (n_evict == 0)    failures++;
    if (n_gap == 0)      failures++;
    if (n_p84_up == 0)   failures++;
    if (n_p84_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
