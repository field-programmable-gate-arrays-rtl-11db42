// tb_rms_estimator - self-checking test of the moving-window RMS estimator.
//
// The default 32-sample instance and a 16-sample one see random Gaussian
// samples with extremes and gaps in in_valid. After every clock the estimate
// must equal floor(sqrt(floor(sum of the last N squares / N))), worked out
// here from a history of the accepted samples (zeros before the first N).
// sigma_valid must rise exactly with the N-th sample.
module tb_rms_estimator;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [14:0] x_in = '0;
  logic [15:0] sig32, sig16;
  logic        v32, v16;
  int checks = 0, failures = 0;
  longint hist [$];
  int accepted = 0;

  rms_estimator           dut32 (.clk, .rst_n, .in_valid, .x_in, .sigma_o(sig32), .sigma_valid(v32));
  rms_estimator #(.N(16)) dut16 (.clk, .rst_n, .in_valid, .x_in, .sigma_o(sig16), .sigma_valid(v16));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(int n, int logn);
    longint s = 0, m, r;
    for (int i = 0; i < n && i < hist.size(); i++) s += hist[i] * hist[i];
    m = s >> logn;
    r = longint'($sqrt(real'(m)));
    while (r * r > m) r--;
    while ((r + 1) * (r + 1) <= m) r++;
    return r;
  endfunction

  task automatic compare();
    checks += 4;
    if (sig32 !== 16'(model(32, 5))) begin
      failures++; if (failures < 10) $display("N=32 sample %0d: got %0d expected %0d", accepted, sig32, model(32, 5));
    end
    if (sig16 !== 16'(model(16, 4))) begin
      failures++; if (failures < 10) $display("N=16 sample %0d: got %0d expected %0d", accepted, sig16, model(16, 4));
    end
    if (v32 !== (accepted >= 32)) begin failures++; $display("N=32 valid wrong after %0d samples", accepted); end
    if (v16 !== (accepted >= 16)) begin failures++; $display("N=16 valid wrong after %0d samples", accepted); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 3000; t++) begin
      in_valid = ($urandom % 5 != 0);
      case ($urandom % 25)
        0:       x_in = -15'sd16384;
        1:       x_in = 15'sd16383;
        default: x_in = gauss_sample(0.5 + (t / 1000));
      endcase
      @(posedge clk);
      if (in_valid) begin
        hist.push_front(longint'(x_in));
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
