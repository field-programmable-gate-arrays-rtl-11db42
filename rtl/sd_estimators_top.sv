// sd_estimators_top - three noise standard-deviation estimators on one sample stream.
//
// The median-based, RMS-based and P84-based estimators run side by side on
// the same input, each with its own window size and output, so that they can
// be compared on identical data or one of them picked for an application:
// the median estimator is the fastest and largest, the RMS estimator needs a
// multiplier and a square root, the P84 loop is by far the smallest.
// Default windows are the best-accuracy sizes of each method: 32 samples for
// the median and RMS estimators and a 16-sample frame for the P84 loop.
//
// Interface: x_in signed 15-bit with 8 fractional bits, accepted on in_valid;
// all estimates are unsigned 16-bit with 8 fractional bits. The median and
// RMS outputs follow each accepted sample (valid after a full window); the
// P84 output changes once per frame, flagged by p84_update.
module sd_estimators_top
  import sd_pkg::*;
#(
  parameter int unsigned MED_N    = 32,
  parameter int unsigned RMS_N    = 32,
  parameter int unsigned P84_M    = 16,
  parameter int unsigned P84_K_Q8 = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  output sigma_t  sigma_median,
  output logic    median_valid,
  output sigma_t  sigma_rms,
  output logic    rms_valid,
  output sigma_t  sigma_p84,
  output logic    p84_update
);
  median_estimator #(.N(MED_N)) u_median (
    .clk, .rst_n, .in_valid, .x_in, .sigma_o(sigma_median), .sigma_valid(median_valid)
  );

  rms_estimator #(.N(RMS_N)) u_rms (
    .clk, .rst_n, .in_valid, .x_in, .sigma_o(sigma_rms), .sigma_valid(rms_valid)
  );

  p84_estimator #(.M(P84_M), .K_Q8(P84_K_Q8)) u_p84 (
    .clk, .rst_n, .in_valid, .x_in, .sigma_o(sigma_p84), .update_o(p84_update)
  );
endmodule
