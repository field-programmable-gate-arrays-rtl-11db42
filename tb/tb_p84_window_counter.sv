// tb_p84_window_counter - self-checking test of the P84 frame counter.
// With random gaps in in_valid, frame_end must be high exactly while the
// M-th, 2M-th, ... accepted sample is presented (M = 16 and M = 5).
module tb_p84_window_counter;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic fe16, fe5;
  int checks = 0, failures = 0, accepted = 0, frames = 0;

  p84_window_counter          dut16 (.clk, .rst_n, .in_valid, .frame_end(fe16));
  p84_window_counter #(.M(5)) dut5  (.clk, .rst_n, .in_valid, .frame_end(fe5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      #1;
      checks += 2;
      if (fe16 !== (in_valid && (accepted % 16 == 15))) begin failures++; $display("M=16 frame_end wrong at sample %0d", accepted); end
      if (fe5  !== (in_valid && (accepted % 5 == 4)))   begin failures++; $display("M=5 frame_end wrong at sample %0d", accepted); end
      if (fe16) frames++;
      @(posedge clk);
      if (in_valid) accepted++;
    end
    checks++;
    if (frames < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
