// p84_differentiator - difference stage of the P84 series controller.
//
// d_out = d_in - d_prev/2, where d_prev is the input of the previous frame,
// held in a register that loads on en (frame end). The subtractor, the 1/2
// gain and the enabled one-frame delay follow the reference controller; the
// arithmetic shift for 1/2 (rounding toward minus infinity) is this design's.
// d_out is combinational; one bit wider than d_in so it cannot overflow.
module p84_differentiator #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] d_in,
  output logic signed [W:0]   d_out
);
  logic signed [W-1:0] d_prev;

  always_ff @(posedge clk) begin
    if (!rst_n)  d_prev <= '0;
    else if (en) d_prev <= d_in;
  end

  assign d_out = (W+1)'(d_in) - (W+1)'(d_prev >>> 1);
endmodule
