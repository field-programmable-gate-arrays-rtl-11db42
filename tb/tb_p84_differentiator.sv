// tb_p84_differentiator - self-checking test of the difference stage.
// d_out must equal d_in - floor(d_prev/2), d_prev being the input at the last
// enabled clock (zero after reset).
module tb_p84_differentiator;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [13:0] d_in = '0;
  logic signed [14:0] d_out;
  int checks = 0, failures = 0, prev = 0;

  p84_differentiator dut (.clk, .rst_n, .en, .d_in, .d_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_half(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en   = ($urandom % 3 == 0);
      d_in = (t % 50 == 0) ? -14'sd8192 : 14'($urandom);
      #1;
      checks++;
      if (int'(d_out) != int'(d_in) - floor_half(prev)) begin
        failures++; if (failures < 10) $display("d_out %0d expected %0d", d_out, int'(d_in) - floor_half(prev));
      end
      @(posedge clk);
      if (en) prev = int'(d_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
