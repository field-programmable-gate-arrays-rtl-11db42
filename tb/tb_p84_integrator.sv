// tb_p84_integrator - self-checking test of the cumulative adder.
// acc_out must be the running sum of the enabled inputs plus the present
// input, saturated to the accumulator range. A 10-bit accumulator is used so
// that both saturation limits are reached; the default 24-bit one runs alongside.
module tb_p84_integrator;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [14:0] d_in = '0;
  logic signed [9:0]  acc10;
  logic signed [23:0] acc24;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  longint m10 = 0, m24 = 0;

  p84_integrator #(.ACC_W(10)) dut10 (.clk, .rst_n, .en, .d_in, .acc_out(acc10));
  p84_integrator               dut24 (.clk, .rst_n, .en, .d_in, .acc_out(acc24));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(longint v, int w);
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    longint lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  initial begin
    longint n10, n24;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en   = ($urandom % 2 == 0);
      // slow drift up, then down, so the small accumulator saturates both ways
      d_in = 15'(int'($urandom % 200) - ((t / 500) % 2 == 0 ? 60 : 140));
      #1;
      n10 = sat(m10 + longint'(d_in), 10);
      n24 = sat(m24 + longint'(d_in), 24);
      checks += 2;
      if (longint'(acc10) != n10) begin failures++; if (failures < 10) $display("acc10 %0d expected %0d", acc10, n10); end
      if (longint'(acc24) != n24) begin failures++; if (failures < 10) $display("acc24 %0d expected %0d", acc24, n24); end
      if (n10 == 511) sat_hi++;
      if (n10 == -512) sat_lo++;
      @(posedge clk);
      if (en) begin m10 = n10; m24 = n24; end
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
