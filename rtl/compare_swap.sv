// compare_swap - compare-exchange cell of the parallel sorting network.
//
// The two unsigned inputs are compared (in1 > in2) and routed so that `low`
// carries the smaller and `high` the larger value; on a tie low = in1 and
// high = in2. Purely combinational. The cell and its In1/In2/Low/High naming
// follow the sorting-network description; the tie rule is this design's.
module compare_swap #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] low,
  output logic [W-1:0] high
);
  always_comb begin
    if (in1 > in2) begin
      low  = in2;
      high = in1;
    end else begin
      low  = in1;
      high = in2;
    end
  end
endmodule
