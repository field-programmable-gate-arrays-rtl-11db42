// isqrt - combinational integer square root, root = floor(sqrt(radicand)).
//
// Restoring digit-by-digit method: one result bit per step, from the most
// significant down, each step a compare and subtract on the remainder. It is
// the square-root unit of the RMS estimator; the method is this design's
// choice. IN_W may be odd; OUT_W = ceil(IN_W/2).
module isqrt #(
  parameter int unsigned IN_W  = 30,
  parameter int unsigned OUT_W = (IN_W + 1) / 2
) (
  input  logic [IN_W-1:0]  radicand,
  output logic [OUT_W-1:0] root
);
  localparam int unsigned EW = 2 * OUT_W;

  logic [EW-1:0] rem, res, one;

  always_comb begin
    rem = EW'(radicand);
    res = '0;
    one = EW'(1) << (EW - 2);
    for (int i = 0; i < OUT_W; i++) begin
      if (rem >= res + one) begin
        rem = rem - (res + one);
        res = (res >> 1) + one;
      end else begin
        res = res >> 1;
      end
      one = one >> 2;
    end
    root = res[OUT_W-1:0];
  end
endmodule
