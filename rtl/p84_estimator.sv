// p84_estimator - digital P84 noise standard-deviation estimator.
//
// Idea: for zero-mean Gaussian noise, 15.9 % of the samples exceed +sigma.
// The loop holds an estimate, counts over a frame of M samples how many
// samples exceed it, and moves the estimate until that count is 0.159*M.
//
//   x_in -> COMP (x > sigma) -> Counter 2 (hits in frame) -> Buffer
//        -> error = count - 0.159*M -> differentiator (e - e_prev/2)
//        -> integrator (running sum) -> proportional (K) -> sigma
//
// Counter 1 (p84_window_counter) marks the last sample of each frame; that
// pulse clears Counter 2 and loads the buffer and the differentiator and
// integrator registers. The controller is the series chain of the reference
// design; in effect sigma[k] = sigma[k-1] + K*(e[k] - e[k-1]/2), a PI law.
// The estimate is constant during a frame and changes once per frame.
//
// Interface: x_in signed 15-bit, 8 fractional bits, accepted on in_valid.
// sigma_o unsigned 16-bit, 8 fractional bits; update_o pulses in the cycle
// sigma_o takes a new value.
// Timing (this design's choice): the frame's count is complete at the edge
// that accepts its M-th sample; the proportional register loads one clock
// later, so the first sample of the next frame is still compared with the
// previous estimate. After reset the estimate is 0.
module p84_estimator
  import sd_pkg::*;
#(
  parameter int unsigned M             = 16,
  parameter int unsigned PROB_PERMILLE = 159,
  parameter int unsigned K_Q8          = 16,
  parameter int unsigned ACC_W         = 24
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x_in,
  output sigma_t  sigma_o,
  output logic    update_o
);
  localparam int unsigned CW    = $clog2(M + 1);
  localparam int unsigned ERR_W = CW + 9;

  logic                    frame_end, upd;
  logic [CW-1:0]           count;
  logic signed [ERR_W-1:0] err;
  logic signed [ERR_W:0]   diff;
  logic signed [ACC_W-1:0] integ;

  p84_window_counter #(.M(M)) u_counter1 (
    .clk, .rst_n, .in_valid, .frame_end
  );

  p84_ones_counter #(.M(M), .CW(CW)) u_counter2 (
    .clk, .rst_n, .in_valid, .x_in, .sigma(sigma_o), .frame_end, .count_o(count)
  );

  p84_error #(.M(M), .PROB_PERMILLE(PROB_PERMILLE), .CW(CW), .ERR_W(ERR_W)) u_error (
    .clk, .rst_n, .en(frame_end), .count_i(count), .err_o(err)
  );

  p84_differentiator #(.W(ERR_W)) u_diff (
    .clk, .rst_n, .en(frame_end), .d_in(err), .d_out(diff)
  );

  p84_integrator #(.IN_W(ERR_W + 1), .ACC_W(ACC_W)) u_integ (
    .clk, .rst_n, .en(frame_end), .d_in(diff), .acc_out(integ)
  );

  // the proportional stage loads one clock after the frame end, when the
  // buffer holds the frame's count
  always_ff @(posedge clk) begin
    if (!rst_n) upd <= 1'b0;
    else        upd <= frame_end;
  end

  p84_proportional #(.IN_W(ACC_W), .K_Q8(K_Q8)) u_prop (
    .clk, .rst_n, .en(upd), .p_in(integ), .sigma_o
  );

  assign update_o = upd;
endmodule
