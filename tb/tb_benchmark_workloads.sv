// tb_benchmark_workloads - the accuracy benchmark: test signals plus white noise,
// Haar detail coefficients, every window size.
//
// Four standard wavelet test signals (Blocks, Bumps, HeavySine, Doppler, in
// the Donoho-Johnstone definitions, t = i/4096, i = 0..4095) get white
// Gaussian noise of sigma 0.5, 0.8, 1.2 and 1.5. One level of the Haar
// transform is applied, d[k] = (y[2k] - y[2k+1])/sqrt(2), and the 2048 detail
// coefficients are streamed into five copies of the estimator top with all
// windows set to 16, 32, 64, 128 and 256 samples (the P84 gain left at its
// default). For each estimator the mean estimate and the mean squared error
// against the true sigma are printed, from the first full window on.
// Checked: median and RMS means within 20 % of sigma for every window and
// signal (the signal residue in the detail band biases them upward); the P84
// mean within 25 % for frames of 16 and 32 samples. With a fixed gain the
// P84 loop gain grows with the frame length, so the larger frames are
// reported but not checked.
module tb_benchmark_workloads;
  import tb_util_pkg::*;
  localparam int NW = 5;
  localparam int WIN [NW] = '{16, 32, 64, 128, 256};
  localparam int LEN = 4096;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [14:0] x_in = '0;
  logic [15:0] s_med [NW], s_rms [NW], s_p84 [NW];
  logic        v_med [NW], v_rms [NW], u_p84 [NW];
  int checks = 0, failures = 0;

  for (genvar w = 0; w < NW; w++) begin : g_w
    sd_estimators_top #(.MED_N(WIN[w]), .RMS_N(WIN[w]), .P84_M(WIN[w])) u_top (
      .clk, .rst_n, .in_valid, .x_in,
      .sigma_median(s_med[w]), .median_valid(v_med[w]),
      .sigma_rms(s_rms[w]), .rms_valid(v_rms[w]),
      .sigma_p84(s_p84[w]), .p84_update(u_p84[w])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sgn(real v);
    return (v > 0.0) ? 1.0 : (v < 0.0) ? -1.0 : 0.0;
  endfunction

  function automatic real test_signal(int kind, real t);
    real tj [11] = '{0.1, 0.13, 0.15, 0.23, 0.25, 0.40, 0.44, 0.65, 0.76, 0.78, 0.81};
    real hb [11] = '{4.0, -5.0, 3.0, -4.0, 5.0, -4.2, 2.1, 4.3, -3.1, 2.1, -4.2};
    real hu [11] = '{4.0, 5.0, 3.0, 4.0, 5.0, 4.2, 2.1, 4.3, 3.1, 5.1, 4.2};
    real wu [11] = '{0.005, 0.005, 0.006, 0.01, 0.01, 0.03, 0.01, 0.01, 0.005, 0.008, 0.005};
    real f = 0.0, a;
    case (kind)
      0: for (int j = 0; j < 11; j++) f += hb[j] * (1.0 + sgn(t - tj[j])) / 2.0;
      1: for (int j = 0; j < 11; j++) begin
           a = (t - tj[j]) / wu[j];
           if (a < 0.0) a = -a;
           f += hu[j] / ((1.0 + a) ** 4);
         end
      2: f = 4.0 * $sin(4.0 * 3.14159265358979 * t) - sgn(t - 0.3) - sgn(0.72 - t);
      default: f = $sqrt(t * (1.0 - t)) * $sin(2.0 * 3.14159265358979 * 1.05 / (t + 0.05));
    endcase
    return f;
  endfunction

  initial begin
    static string names [4] = '{"Blocks", "Bumps", "HeavySine", "Doppler"};
    static real level [4] = '{0.5, 0.8, 1.2, 1.5};
    real   y [LEN];
    real   sm [NW], ss [NW], sp [NW], em [NW], es [NW], ep [NW];
    int    nm [NW], np [NW];
    real   est;
    for (int sig = 0; sig < 4; sig++) begin
      foreach (level[l]) begin
        // fresh start for every signal and level
        rst_n = 0;
        repeat (2) @(posedge clk);
        rst_n = 1;
        for (int i = 0; i < LEN; i++) y[i] = test_signal(sig, real'(i) / LEN) + gauss(level[l]);
        for (int w = 0; w < NW; w++) begin sm[w] = 0; ss[w] = 0; sp[w] = 0; em[w] = 0; es[w] = 0; ep[w] = 0; nm[w] = 0; np[w] = 0; end
        for (int k = 0; k < LEN / 2; k++) begin
          @(negedge clk);
          in_valid = 1'b1;
          x_in     = to_sample((y[2*k] - y[2*k+1]) / $sqrt(2.0));
          @(posedge clk);
          #1;
          for (int w = 0; w < NW; w++) begin
            if (v_med[w]) begin
              est = real'(s_med[w]) / 256.0; sm[w] += est; em[w] += (est - level[l]) ** 2;
              est = real'(s_rms[w]) / 256.0; ss[w] += est; es[w] += (est - level[l]) ** 2;
              nm[w]++;
            end
            if (k >= WIN[w]) begin
              est = real'(s_p84[w]) / 256.0; sp[w] += est; ep[w] += (est - level[l]) ** 2;
              np[w]++;
            end
          end
        end
        for (int w = 0; w < NW; w++) begin
          $display("%-9s sigma %0.1f window %3d | median mean %0.4f mse %0.4f | rms mean %0.4f mse %0.4f | p84 mean %0.4f mse %0.4f",
                   names[sig], level[l], WIN[w], sm[w] / nm[w], em[w] / nm[w], ss[w] / nm[w], es[w] / nm[w],
                   sp[w] / np[w], ep[w] / np[w]);
          checks += 2;
          if (sm[w] / nm[w] < 0.8 * level[l] || sm[w] / nm[w] > 1.2 * level[l]) begin failures++; $display("  median mean out of range"); end
          if (ss[w] / nm[w] < 0.8 * level[l] || ss[w] / nm[w] > 1.2 * level[l]) begin failures++; $display("  rms mean out of range"); end
          if (WIN[w] <= 32) begin
            checks++;
            if (sp[w] / np[w] < 0.75 * level[l] || sp[w] / np[w] > 1.25 * level[l]) begin failures++; $display("  p84 mean out of range"); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
