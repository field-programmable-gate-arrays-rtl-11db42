// p84_ones_counter - comparator and hit counter of the P84 estimator (COMP. and Counter 2).
//
// Each accepted sample is compared with the current estimate; a sample
// strictly greater than the estimate is a hit. The counter counts hits in the
// current frame. count_o is the frame's count including the sample now being
// accepted (count register + this hit), so at frame_end it is the complete
// count of the frame; at that edge the register restarts from zero.
// The comparison and the counter replacing the analog low-pass filter are the
// reference behaviour; the signed/unsigned comparison detail is this design's.
module p84_ones_counter
  import sd_pkg::*;
#(
  parameter int unsigned M  = 16,
  parameter int unsigned CW = $clog2(M + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sample_t       x_in,
  input  sigma_t        sigma,
  input  logic          frame_end,
  output logic [CW-1:0] count_o
);
  logic [CW-1:0] cnt;
  logic          hit;

  // sample (signed) > estimate (unsigned): compare in a common signed width
  assign hit     = in_valid && ($signed({{(SIGMA_W + 1 - DATA_W){x_in[DATA_W-1]}}, x_in})
                                > $signed({1'b0, sigma}));
  assign count_o = cnt + CW'(hit);

  always_ff @(posedge clk) begin
    if (!rst_n)         cnt <= '0;
    else if (frame_end) cnt <= '0;
    else if (hit)       cnt <= cnt + 1'b1;
  end
endmodule
