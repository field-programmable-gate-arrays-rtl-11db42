// p84_error - frame-count buffer and probability-reference subtractor of the P84 estimator.
//
// At each frame end the complete hit count is loaded into the buffer. The
// error is buffer - 0.159*M, where 0.159 is the probability that a Gaussian
// sample exceeds one standard deviation: a positive error means too many
// samples lie above the estimate, i.e. the estimate is too low. Because
// 0.159*M is not an integer, the error carries 8 fractional bits and the
// reference is round(PROB_PERMILLE/1000 * M * 256) (this design's choice).
// err_o is combinational from the buffer, signed, in counts with 8 fractional
// bits; the buffer resets to zero.
module p84_error
  import sd_pkg::*;
#(
  parameter int unsigned M             = 16,
  parameter int unsigned PROB_PERMILLE = 159,
  parameter int unsigned CW            = $clog2(M + 1),
  parameter int unsigned ERR_W         = CW + FRAC_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [CW-1:0]           count_i,
  output logic signed [ERR_W-1:0] err_o
);
  localparam int unsigned REF_Q8 = (PROB_PERMILLE * M * (1 << FRAC_W) + 500) / 1000;

  logic [CW-1:0] buffer;

  always_ff @(posedge clk) begin
    if (!rst_n)  buffer <= '0;
    else if (en) buffer <= count_i;
  end

  assign err_o = $signed({1'b0, buffer, FRAC_W'(0)}) - $signed(ERR_W'(REF_Q8));
endmodule
