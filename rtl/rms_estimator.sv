// rms_estimator - moving-window RMS estimator of the noise standard deviation.
//
// sigma = sqrt( (1/N) * sum of x^2 over the last N samples ). The running sum
// is updated recursively, S[n] = x[n]^2 + (S[n-1] - x[n-N]^2): a squarer feeds
// an adder closed through a one-sample register, and an N-deep delay line
// supplies the square that leaves the window. The sum is scaled by 1/N and
// passed through a square root. This square / adder / Z^-1 / Z^-N / subtract /
// 1/N / sqrt chain is the reference structure; the circular-buffer delay line,
// the shift used for 1/N (so N is a power of two), the exact floor square root
// and all widths are this design's choices.
//
// Interface: x_in signed 15-bit, 8 fractional bits, accepted on in_valid.
// Squares carry 16 fractional bits; the root of a 16-fractional-bit mean
// square comes out with 8, so sigma_o is unsigned 16-bit with 8 fractional
// bits, truncated (floor of the exact root of the truncated mean).
// The root has 15 bits, so sigma_o[15] is always 0; the port keeps the
// common 16-bit estimate format of the other estimators.
// Timing: sigma_o is combinational from the running-sum register and reflects
// the sample accepted at the last clock edge. Until N samples have entered,
// the subtracted term is zero (the delay line needs no reset); sigma_valid
// rises with the N-th sample.
module rms_estimator
  import sd_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  output sigma_t  sigma_o,
  output logic    sigma_valid
);
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned SQ_W  = 2 * DATA_W;
  localparam int unsigned SUM_W = SQ_W + LOGN;
  localparam int unsigned RT_W  = (SQ_W + 1) / 2;
  localparam int unsigned PTR_W = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned CNT_W = $clog2(N + 1);

  logic signed [SQ_W-1:0] sq_full;
  logic [SQ_W-1:0]  sq, oldest, leaving;
  logic [SQ_W-1:0]  delay_line [N];
  logic [PTR_W-1:0] ptr;
  logic [CNT_W-1:0] fill;
  logic [SUM_W-1:0] sum;
  logic [SQ_W-1:0]  mean_sq;
  logic [RT_W-1:0]  root;

  assign sq_full = x_in * x_in;
  assign sq      = SQ_W'(sq_full);
  assign oldest  = delay_line[ptr];
  assign leaving = (fill == CNT_W'(N)) ? oldest : '0;

  // Z^-N: circular buffer, read the oldest square and overwrite it
  always_ff @(posedge clk) begin
    if (in_valid) delay_line[ptr] <= sq;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr  <= '0;
      fill <= '0;
      sum  <= '0;
    end else if (in_valid) begin
      ptr  <= (ptr == PTR_W'(N - 1)) ? '0 : ptr + 1'b1;
      if (fill != CNT_W'(N)) fill <= fill + 1'b1;
      sum  <= sum - SUM_W'(leaving) + SUM_W'(sq);
    end
  end

  assign mean_sq = SQ_W'(sum >> LOGN);   // 1/N

  isqrt #(.IN_W(SQ_W), .OUT_W(RT_W)) u_sqrt (
    .radicand(mean_sq),
    .root    (root)
  );

  assign sigma_o     = SIGMA_W'(root);
  assign sigma_valid = (fill == CNT_W'(N));

  initial begin
    assert ((N & (N - 1)) == 0 && N >= 1)
      else $error("rms_estimator: N must be a power of two");
  end
endmodule
