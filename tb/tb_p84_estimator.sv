// tb_p84_estimator - self-checking test of the digital P84 estimator loop.
//
// 1. Cycle-exact check: a model of the loop kept here (frame counter, hit
//    counter, buffer, error, e - e_prev/2, saturating running sum, gain
//    1/16 with clamp, one-clock-late load) must match sigma_o and update_o
//    on every clock, with random gaps in in_valid.
// 2. Rate: with a sample every clock, updates come exactly every M = 16 clocks.
// 3. Convergence: for Gaussian noise of sigma 1.0, 0.5 and 1.5 the mean
//    estimate over the last 200 frames of each level must lie within 15 %.
module tb_p84_estimator;
  import tb_util_pkg::*;
  localparam int M = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [14:0] x_in = '0;
  logic [15:0] sigma_o;
  logic        update_o;
  int checks = 0, failures = 0;

  p84_estimator dut (.clk, .rst_n, .in_valid, .x_in, .sigma_o, .update_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- loop model ----
  int m_cnt1 = 0, m_cnt2 = 0, m_buf = 0, m_eprev = 0, m_sigma = 0;
  longint m_acc = 0;
  bit m_upd = 0;
  int ref_q8;

  function automatic int floor_half(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  task automatic model_step(bit v, int x);
    bit fe, hit;
    int cnt, err, diff;
    longint integ, p;
    fe    = v && (m_cnt1 == M - 1);
    hit   = v && (x > m_sigma);
    cnt   = m_cnt2 + int'(hit);
    err   = m_buf * 256 - ref_q8;
    diff  = err - floor_half(m_eprev);
    integ = m_acc + longint'(diff);
    if (integ > 8388607) integ = 8388607;
    if (integ < -8388608) integ = -8388608;
    if (m_upd) begin
      p = (integ * 16) >>> 8;
      m_sigma = (p < 0) ? 0 : (p > 65535) ? 65535 : int'(p);
    end
    if (v) m_cnt1 = fe ? 0 : m_cnt1 + 1;
    m_cnt2 = fe ? 0 : cnt;
    if (fe) begin
      m_buf   = cnt;
      m_eprev = err;
      m_acc   = integ;
    end
    m_upd = fe;
  endtask

  task automatic drive(bit v, logic signed [14:0] x);
    @(negedge clk);
    in_valid = v;
    x_in     = x;
    @(posedge clk);
    model_step(v, int'(x));
    #1;
    checks++;
    if (int'(sigma_o) != m_sigma || update_o !== m_upd) begin
      failures++;
      if (failures < 10) $display("sigma %0d/%0d upd %0d/%0d", sigma_o, m_sigma, update_o, m_upd);
    end
  endtask

  initial begin
    static real level [3] = '{1.0, 0.5, 1.5};
    real sum;
    int  n, last_upd, t;
    ref_q8 = $rtoi(0.159 * M * 256.0 + 0.5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. gaps in the stream
    for (int i = 0; i < 3000; i++) drive($urandom % 4 != 0, gauss_sample(0.8));
    // 2. and 3. one sample per clock
    t = 0; last_upd = -1;
    foreach (level[l]) begin
      sum = 0.0; n = 0;
      for (int f = 0; f < 400 * M; f++) begin
        drive(1'b1, gauss_sample(level[l]));
        t++;
        if (update_o) begin
          if (last_upd >= 0) begin
            checks++;
            if (t - last_upd != M) begin failures++; $display("update interval %0d", t - last_upd); end
          end
          last_upd = t;
          if (f >= 200 * M) begin sum += real'(sigma_o) / 256.0; n++; end
        end
      end
      checks++;
      $display("noise sigma %0.2f: mean estimate %0.4f over %0d frames", level[l], sum / n, n);
      if (n == 0 || sum / n < 0.85 * level[l] || sum / n > 1.15 * level[l]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
