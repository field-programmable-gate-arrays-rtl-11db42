// tb_sorting_network - self-checking test of the parallel sorting network.
// Checks the 8-input network and the default 32-input one: random vectors
// (some with few distinct values, so ties occur) must come out as the same
// multiset in ascending order, compared with an insertion sort done here.
module tb_sorting_network;
  localparam int unsigned W = 15;
  logic [W-1:0] in8  [8],  out8  [8];
  logic [W-1:0] in32 [32], out32 [32];
  int checks = 0, failures = 0;

  sorting_network #(.N(8), .W(W)) dut8  (.in_vec(in8),  .out_vec(out8));
  sorting_network                 dut32 (.in_vec(in32), .out_vec(out32));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sorted(input logic [W-1:0] vin [], input logic [W-1:0] vout [], input string tag);
    logic [W-1:0] ref_v [];
    logic [W-1:0] tmp;
    int j;
    ref_v = vin;
    for (int i = 1; i < ref_v.size(); i++) begin
      tmp = ref_v[i];
      j = i - 1;
      while (j >= 0 && ref_v[j] > tmp) begin
        ref_v[j+1] = ref_v[j];
        j--;
      end
      ref_v[j+1] = tmp;
    end
    for (int i = 0; i < ref_v.size(); i++) begin
      checks++;
      if (vout[i] !== ref_v[i]) begin
        failures++;
        if (failures < 10) $display("%s: out[%0d]=%0d expected %0d", tag, i, vout[i], ref_v[i]);
      end
    end
  endtask

  initial begin
    logic [W-1:0] a [], b [];
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 8; i++)  in8[i]  = (t % 3 == 0) ? W'($urandom % 4) : W'($urandom);
      for (int i = 0; i < 32; i++) in32[i] = (t % 3 == 0) ? W'($urandom % 6) : W'($urandom);
      if (t == 1) for (int i = 0; i < 32; i++) in32[i] = W'(32 - i);   // reversed
      if (t == 1) for (int i = 0; i < 8; i++)  in8[i]  = W'(8 - i);
      #1;
      a = new[8];  foreach (a[i]) a[i] = in8[i];
      b = new[8];  foreach (b[i]) b[i] = out8[i];
      check_sorted(a, b, "N=8");
      a = new[32]; foreach (a[i]) a[i] = in32[i];
      b = new[32]; foreach (b[i]) b[i] = out32[i];
      check_sorted(a, b, "N=32");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
