// tb_p84_error - self-checking test of the frame-count buffer and reference subtractor.
// The error must be count*256 - round(0.159*M*256), computed here in real
// arithmetic, and must change only after a load (M = 16 and M = 128).
module tb_p84_error;
  logic clk = 0, rst_n = 0, en = 0;
  logic [4:0] c16 = '0;
  logic [7:0] c128 = '0;
  logic signed [13:0] e16;
  logic signed [16:0] e128;
  int checks = 0, failures = 0;
  int held16 = 0, held128 = 0;

  p84_error            dut16  (.clk, .rst_n, .en, .count_i(c16),  .err_o(e16));
  p84_error #(.M(128)) dut128 (.clk, .rst_n, .en, .count_i(c128), .err_o(e128));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r16, r128;
    r16  = $rtoi(0.159 * 16.0 * 256.0 + 0.5);
    r128 = $rtoi(0.159 * 128.0 * 256.0 + 0.5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en   = ($urandom % 3 == 0);
      c16  = 5'($urandom % 17);
      c128 = 8'($urandom % 129);
      @(posedge clk);
      if (en) begin held16 = int'(c16); held128 = int'(c128); end
      @(negedge clk);
      checks += 2;
      if (int'(e16) != held16 * 256 - r16) begin
        failures++; if (failures < 10) $display("M=16 err %0d expected %0d", e16, held16 * 256 - r16);
      end
      if (int'(e128) != held128 * 256 - r128) begin
        failures++; if (failures < 10) $display("M=128 err %0d expected %0d", e128, held128 * 256 - r128);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
