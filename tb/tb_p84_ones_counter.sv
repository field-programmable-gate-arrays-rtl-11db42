// tb_p84_ones_counter - self-checking test of the P84 comparator and hit counter.
// Random samples (both signs) against random estimates; count_o must equal
// the hits counted here since the last frame end, including the present
// sample; frame_end comes every 16 accepted samples, as from the frame counter.
module tb_p84_ones_counter;
  logic clk = 0, rst_n = 0, in_valid = 0, frame_end = 0;
  logic signed [14:0] x_in = '0;
  logic [15:0] sigma = '0;
  logic [4:0]  count_o;
  int checks = 0, failures = 0, cnt = 0, accepted = 0;

  p84_ones_counter dut (.clk, .rst_n, .in_valid, .x_in, .sigma, .frame_end, .count_o);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hit;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom % 5 != 0);
      x_in      = 15'($urandom);
      sigma     = ($urandom % 8 == 0) ? 16'($urandom) : 16'($urandom % 600);
      if (t % 7 == 0) x_in = 15'(sigma);            // equal: not a hit
      frame_end = in_valid && (accepted % 16 == 15);
      hit = (in_valid && int'(x_in) > int'(sigma)) ? 1 : 0;
      #1;
      checks++;
      if (count_o !== 5'(cnt + hit)) begin
        failures++;
        if (failures < 10) $display("t=%0d count %0d expected %0d", t, count_o, cnt + hit);
      end
      @(posedge clk);
      cnt = frame_end ? 0 : cnt + hit;
      if (in_valid) accepted++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
