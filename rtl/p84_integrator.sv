// p84_integrator - cumulative adder (integral stage) of the P84 series controller.
//
// acc_out = d_in + acc, and acc loads acc_out at each en (frame end), so the
// output is the running sum of all inputs up to and including the current
// frame. The running sum saturates at the signed ACC_W range instead of
// wrapping (this design's choice). acc_out is combinational; acc resets to 0.
module p84_integrator #(
  parameter int unsigned IN_W  = 15,
  parameter int unsigned ACC_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  d_in,
  output logic signed [ACC_W-1:0] acc_out
);
  localparam logic signed [ACC_W:0] MAXV = (ACC_W+1)'({1'b0, {(ACC_W-1){1'b1}}});
  localparam logic signed [ACC_W:0] MINV = -MAXV - 1;

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W:0]   sum;

  assign sum = (ACC_W+1)'(acc) + (ACC_W+1)'(d_in);

  always_comb begin
    if (sum > MAXV)      acc_out = MAXV[ACC_W-1:0];
    else if (sum < MINV) acc_out = MINV[ACC_W-1:0];
    else                 acc_out = sum[ACC_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_out;
  end
endmodule
