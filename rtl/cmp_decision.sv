// Decision module of the parallel-prefix comparator.
//
// OR-scans the left-bus and right-bus partial results into the final flags:
// abig (L, A > B) is the OR of the left inputs, bbig (R, A < B) the OR of the
// right inputs, and eq (A = B) is 1 when both are 0. The code LR = 11 cannot
// occur when the inputs come from the comparison sets, since at most one bus
// bit in the whole word is 1. In the 64-bit comparator the inputs are the
// per-slice ORs (the 4-bit slices already hold the first two OR levels), so
// this module adds the remaining ceil(log2 W) levels of 2-input ORs. The
// balanced 2-input tree and the gate producing eq are choices of this
// design; only the OR-scan function is prescribed.
//
// Interface: left_in, right_in (W bits) in; abig, bbig, eq out.
// Timing: purely combinational.
module cmp_decision #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] left_in,
  input  logic [W-1:0] right_in,
  output logic         abig,
  output logic         bbig,
  output logic         eq
);
  cmp_or_network #(.W(W)) u_or_left  (.bus(left_in),  .any(abig));
  cmp_or_network #(.W(W)) u_or_right (.bus(right_in), .any(bbig));

  assign eq = ~(abig | bbig);
endmodule
