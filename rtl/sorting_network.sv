// sorting_network - N-input parallel sorting network (Batcher odd-even merge sort).
//
// The network sorts N unsigned W-bit values in ascending order, out_vec[0]
// lowest and out_vec[N-1] highest, in one combinational pass. It is built from
// compare_swap cells arranged in log2(N)*(log2(N)+1)/2 columns. Column (p, k),
// with p = 1, 2, 4, ... N/2 and k = p, p/2, ... 1, compares element i with
// element i+k when (i - k mod p) mod 2k < k and both lie in the same block of
// 2p elements; every other element passes straight through. For N = 8 this is
// exactly the 19-cell, 6-column network of the reference design; for larger
// N the same rule scales the network, which is how the median estimator gets
// its 32-input default. N must be a power of two, at least 2.
module sorting_network #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] in_vec  [N],
  output logic [W-1:0] out_vec [N]
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned STAGES = LOGN * (LOGN + 1) / 2;


  // 1 when element i is the lower end of a pair in column (p, k).
  function automatic bit is_low(int unsigned i, int unsigned p, int unsigned k);
    int unsigned r;
    r = k % p;
    if (i < r) return 1'b0;
    if (((i - r) % (2 * k)) >= k) return 1'b0;
    if (i + k >= N) return 1'b0;
    return (i / (2 * p)) == ((i + k) / (2 * p));
  endfunction

  // column s -> p: the largest p with p*(p+1)/2 <= s, in log2 form
  function automatic int unsigned col_p(int unsigned s);
    int unsigned sp;
    sp = 0;
    while ((sp + 1) * (sp + 2) / 2 <= s) sp++;
    return 1 << sp;
  endfunction

  function automatic int unsigned col_k(int unsigned s);
    int unsigned sp;
    sp = 0;
    while ((sp + 1) * (sp + 2) / 2 <= s) sp++;
    return (1 << sp) >> (s - sp * (sp + 1) / 2);
  endfunction

  for (genvar s = 0; s < STAGES; s++) begin : g_col
    localparam int unsigned P = col_p(s);
    localparam int unsigned K = col_k(s);
    logic [W-1:0] a [N];   // column input
    logic [W-1:0] y [N];   // column output

    if (s == 0) begin : g_first
      assign a = in_vec;
    end else begin : g_next
      assign a = g_col[s-1].y;
    end

    for (genvar i = 0; i < N; i++) begin : g_e
      if (is_low(i, P, K)) begin : g_cell
        compare_swap #(.W(W)) u_cs (
          .in1 (a[i]),
          .in2 (a[i+K]),
          .low (y[i]),
          .high(y[i+K])
        );
      end else if (!(i >= K && is_low(i - K, P, K))) begin : g_pass
        assign y[i] = a[i];
      end
    end
  end

  assign out_vec = g_col[STAGES-1].y;

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("sorting_network: N must be a power of two");
  end
endmodule
