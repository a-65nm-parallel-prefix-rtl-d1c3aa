// Set 2 of the parallel-prefix comparator: pair-equal flags.
//
// The operands are partitioned into 2-bit pairs. For pair m (bits 2m+1 and
// 2m) a 2-input NOR of the set 1 flags gives C2[m] = ~(D[2m] | D[2m+1]),
// which is 1 when both bits of the pair are equal, i.e. the comparison may
// continue into less significant pairs. The 2-bit grouping (instead of the
// 4-bit grouping of earlier tree comparators) is what limits fan-in to two.
//
// Interface: d (N bits) in, c2 (N/2 bits) out. N must be even.
// Timing: purely combinational, one gate level.
module cmp_set2_nor #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   d,
  output logic [N/2-1:0] c2
);
  always_comb begin
    for (int m = 0; m < N/2; m++) begin
      c2[m] = ~(d[2*m] | d[2*m+1]);
    end
  end
endmodule
