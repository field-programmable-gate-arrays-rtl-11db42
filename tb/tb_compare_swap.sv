// tb_compare_swap - self-checking test of the compare-exchange cell.
// Drives random and equal input pairs and checks low = min, high = max.
module tb_compare_swap;
  localparam int unsigned W = 15;
  logic [W-1:0] in1, in2, low, high;
  int checks = 0, failures = 0;

  compare_swap #(.W(W)) dut (.in1, .in2, .low, .high);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      in1 = W'($urandom);
      in2 = (t % 10 == 0) ? in1 : W'($urandom);
      if (t == 1) begin in1 = '1; in2 = '0; end
      #1;
      checks++;
      if (low !== ((in1 < in2) ? in1 : in2) || high !== ((in1 < in2) ? in2 : in1)) begin
        failures++;
        $display("mismatch in1=%0d in2=%0d low=%0d high=%0d", in1, in2, low, high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
