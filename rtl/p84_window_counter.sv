// p84_window_counter - frame counter of the P84 estimator (Counter 1).
//
// Counts accepted samples modulo M. frame_end is high, combinationally, while
// the last (M-th) sample of a frame is being accepted (in_valid and count ==
// M-1); it is the enable of every frame-rate register of the estimator. The
// count of M per frame is the reference behaviour; the exact pulse timing is
// this design's choice. Reset clears the count.
module p84_window_counter #(
  parameter int unsigned M = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic frame_end
);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0] cnt;

  assign frame_end = in_valid && (cnt == CW'(M - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)         cnt <= '0;
    else if (frame_end) cnt <= '0;
    else if (in_valid)  cnt <= cnt + 1'b1;
  end
endmodule
