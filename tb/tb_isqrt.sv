// tb_isqrt - self-checking test of the integer square root.
// Checks root*root <= radicand < (root+1)^2 for edge values, perfect squares,
// their neighbours and random radicands of the default 30-bit width.
module tb_isqrt;
  localparam int unsigned IN_W = 30;
  logic [IN_W-1:0] radicand;
  logic [14:0]     root;
  int checks = 0, failures = 0;

  isqrt dut (.radicand, .root);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned v);
    longint unsigned r;
    radicand = IN_W'(v);
    #1;
    r = longint'(root);
    checks++;
    if (!(r * r <= v && (r + 1) * (r + 1) > v)) begin
      failures++;
      if (failures < 10) $display("sqrt(%0d) gave %0d", v, root);
    end
  endtask

  initial begin
    longint unsigned s;
    for (int v = 0; v < 300; v++) check(longint'(v));
    check((longint'(1) << IN_W) - 1);
    for (int t = 0; t < 1000; t++) begin
      s = longint'($urandom) % 64'd32768;
      check(s * s);
      if (s > 0) check(s * s - 1);
      check(s * s + 1);
      check(longint'($urandom) & ((longint'(1) << IN_W) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
