// p84_proportional - gain stage of the P84 series controller; holds the estimate.
//
// On en the register loads K * p_in, with K = K_Q8/256, clamped to the
// estimate range: negative products give 0, products above the 16-bit
// estimate range give the maximum. p_in is in counts with 8 fractional bits
// and the result is the estimate in sample units with 8 fractional bits.
// The gain stage is the reference's; K is not given there, and K = 1/16 is
// this design's choice (stable loop for noise levels from about 0.2 to 4).
// sigma_o is registered and resets to 0.
module p84_proportional
  import sd_pkg::*;
#(
  parameter int unsigned IN_W = 24,
  parameter int unsigned K_Q8 = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] p_in,
  output sigma_t                 sigma_o
);
  localparam int unsigned PW = IN_W + 10;

  logic signed [PW-1:0] prod, scaled;
  sigma_t               next;

  always_comb begin
    prod   = PW'(p_in) * $signed(PW'(K_Q8));
    scaled = prod >>> 8;
    if (scaled < 0)                                    next = '0;
    else if (scaled > $signed(PW'({SIGMA_W{1'b1}})))   next = '1;
    else                                               next = SIGMA_W'(scaled);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  sigma_o <= '0;
    else if (en) sigma_o <= next;
  end
endmodule
