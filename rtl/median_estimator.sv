// median_estimator - moving-window median estimator of the noise standard deviation.
//
// sigma = median(|x|) / 0.6745 over the last N samples. Each accepted sample is
// rectified and shifted into an N-deep serial-to-parallel window register; a
// parallel sorting network orders the window every cycle; the two middle
// outputs are added, halved (the median of an even-sized window) and scaled by
// 1.48 (~1/0.6745). This chain - |x|, window register, sorting network, adder,
// 1/2, x1.48 - is the structure of the reference design; the number formats,
// the rounding and the valid flag are this design's.
//
// Interface: x_in is signed 15-bit with 8 fractional bits, accepted when
// in_valid is high. sigma_o is unsigned 16-bit, 8 fractional bits, rounded
// half-up; GAIN_Q14 is the 1.48 factor in units of 2^-14.
// Timing: everything after the window register is combinational, so sigma_o
// reflects the window including the sample accepted at the last clock edge.
// sigma_valid goes high once N samples have entered (the first full window)
// and stays high until reset. The window resets to zeros. N: power of two.
module median_estimator
  import sd_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned GAIN_Q14 = 24248   // 1.48 * 2^14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  output sigma_t  sigma_o,
  output logic    sigma_valid
);
  localparam int unsigned CNT_W  = $clog2(N + 1);
  localparam int unsigned SUM_W  = DATA_W + 1;
  localparam int unsigned PROD_W = SUM_W + 15;
  localparam int unsigned SHIFT  = 1 + 14;   // 1/2 and the Q14 gain

  logic [DATA_W-1:0] window [N];
  logic [DATA_W-1:0] sorted [N];
  logic [CNT_W-1:0]  fill;

  // serial-to-parallel register of |x|, newest at index 0
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) window[i] <= '0;
      fill <= '0;
    end else if (in_valid) begin
      window[0] <= sample_abs(x_in);
      for (int i = 1; i < N; i++) window[i] <= window[i-1];
      if (fill != CNT_W'(N)) fill <= fill + 1'b1;
    end
  end

  sorting_network #(.N(N), .W(DATA_W)) u_sort (
    .in_vec (window),
    .out_vec(sorted)
  );

  logic [SUM_W-1:0]  mid_sum;
  logic [PROD_W-1:0] prod;
  logic [PROD_W-1:0] scaled;

  always_comb begin
    mid_sum = SUM_W'(sorted[N/2-1]) + SUM_W'(sorted[N/2]);
    prod    = PROD_W'(mid_sum) * PROD_W'(GAIN_Q14);
    scaled  = (prod + (PROD_W'(1) << (SHIFT - 1))) >> SHIFT;
    sigma_o = (scaled > PROD_W'({SIGMA_W{1'b1}})) ? '1 : SIGMA_W'(scaled);
  end

  assign sigma_valid = (fill == CNT_W'(N));
endmodule
