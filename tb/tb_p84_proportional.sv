// tb_p84_proportional - self-checking test of the gain stage.
// On an enabled clock sigma_o must load floor(p_in*K/256) clamped to
// [0, 65535]; otherwise it holds. Default K (16) and K = 40 are checked.
module tb_p84_proportional;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [23:0] p_in = '0;
  logic [15:0] s16, s40;
  int checks = 0, failures = 0;
  longint e16 = 0, e40 = 0;

  p84_proportional             dut16 (.clk, .rst_n, .en, .p_in, .sigma_o(s16));
  p84_proportional #(.K_Q8(40)) dut40 (.clk, .rst_n, .en, .p_in, .sigma_o(s40));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(longint p, longint k);
    longint v = (p * k) >>> 8;
    return (v < 0) ? 0 : (v > 65535) ? 65535 : v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en   = ($urandom % 3 == 0);
      p_in = (t % 4 == 0) ? 24'($urandom) : 24'(int'($urandom % 20000) - 2000);
      @(posedge clk);
      if (en) begin e16 = model(longint'(p_in), 16); e40 = model(longint'(p_in), 40); end
      @(negedge clk);
      checks += 2;
      if (longint'(s16) != e16) begin failures++; if (failures < 10) $display("K16 %0d expected %0d", s16, e16); end
      if (longint'(s40) != e40) begin failures++; if (failures < 10) $display("K40 %0d expected %0d", s40, e40); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
