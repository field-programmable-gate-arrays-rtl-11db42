// tb_median_estimator - self-checking test of the moving-window median estimator.
//
// Two instances, the default 32-sample window and an 8-sample one, see the
// same random stream (Gaussian noise, full-scale extremes, gaps in in_valid).
// After every clock the estimate is compared with a model kept here: the last
// N magnitudes (zeros before the first N samples), sorted, middle pair added,
// times 24248/32768 and rounded. sigma_valid must rise exactly with the N-th
// sample.
module tb_median_estimator;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [14:0] x_in = '0;
  logic [15:0] sig32, sig8;
  logic        v32, v8;
  int checks = 0, failures = 0;
  int hist [$];     // magnitudes, newest first
  int accepted = 0;

  median_estimator               dut32 (.clk, .rst_n, .in_valid, .x_in, .sigma_o(sig32), .sigma_valid(v32));
  median_estimator #(.N(8))      dut8  (.clk, .rst_n, .in_valid, .x_in, .sigma_o(sig8),  .sigma_valid(v8));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int n);
    int w [];
    int tmp, j;
    w = new[n];
    for (int i = 0; i < n; i++) w[i] = (i < hist.size()) ? hist[i] : 0;
    for (int i = 1; i < n; i++) begin
      tmp = w[i]; j = i - 1;
      while (j >= 0 && w[j] > tmp) begin w[j+1] = w[j]; j--; end
      w[j+1] = tmp;
    end
    return int'(((longint'(w[n/2-1]) + longint'(w[n/2])) * 24248 + 16384) >>> 15);
  endfunction

  task automatic compare();
    checks += 4;
    if (sig32 !== 16'(model(32))) begin
      failures++; if (failures < 10) $display("N=32 sample %0d: got %0d expected %0d", accepted, sig32, model(32));
    end
    if (sig8 !== 16'(model(8))) begin
      failures++; if (failures < 10) $display("N=8 sample %0d: got %0d expected %0d", accepted, sig8, model(8));
    end
    if (v32 !== (accepted >= 32)) begin failures++; $display("N=32 valid wrong after %0d samples", accepted); end
    if (v8  !== (accepted >= 8))  begin failures++; $display("N=8 valid wrong after %0d samples", accepted); end
  endtask

  initial begin
    int mag;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 3000; t++) begin
      in_valid = ($urandom % 5 != 0);
      case ($urandom % 20)
        0:       x_in = -15'sd16384;
        1:       x_in = 15'sd16383;
        default: x_in = gauss_sample(1.0 + (t / 1000));
      endcase
      @(posedge clk);
      if (in_valid) begin
        mag = (x_in < 0) ? -int'(x_in) : int'(x_in);
        hist.push_front(mag);
        if (hist.size() > 32) void'(hist.pop_back());
        accepted++;
      end
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
