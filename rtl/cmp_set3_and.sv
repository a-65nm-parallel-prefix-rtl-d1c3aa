// Set 3 of the parallel-prefix comparator: prefix-equal chain.
//
// A chain of 2-input AND cells runs from the most significant pair down:
// C3[m] = C2[m] & C3[m+1], with C3[N/2] taken from c3_in. C3[m] is therefore
// 1 only when pair m and every more significant pair are equal. A 0 anywhere
// above stops the comparison for every less significant pair, which is how the
// design avoids transitions below the first differing bit.
//
// The chain form follows the cell equation and the 4-bit slice, where the
// chain enters the slice as 'in' and leaves it as 'next' (c3_in / c3[0]).
// Whether a synthesis tool keeps it as a ripple or rebalances it into a tree
// is its own choice; the function is the same.
//
// Interface: c2 (N/2 bits), c3_in in; c3 (N/2 bits) out, c3[0] is the
// value passed to the next less significant slice.
// Timing: purely combinational, N/2 AND levels as written.
module cmp_set3_and #(
  parameter int unsigned N = 64
) (
  input  logic [N/2-1:0] c2,
  input  logic           c3_in,
  output logic [N/2-1:0] c3
);
  always_comb begin
    logic above;
    above = c3_in;
    for (int m = N/2 - 1; m >= 0; m--) begin
      c3[m] = c2[m] & above;
      above = c3[m];
    end
  end
endmodule
