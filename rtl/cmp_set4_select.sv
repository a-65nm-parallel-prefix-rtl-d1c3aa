// Set 4 of the parallel-prefix comparator: select of the first differing bit.
//
// For every bit a cell decides whether set 5 may put (A[k], B[k]) on the
// buses. Bit k may be passed only if it differs (D[k]) and every more
// significant bit is equal. Inside pair m that is:
//   upper bit 2m+1:  S = C3[m+1] & D[2m+1]                 (2 inputs)
//   lower bit 2m:    S = C3[m+1] & ~D[2m+1] & D[2m]        (3 inputs, one inverted)
// where c3_hi[m] carries C3[m+1], the prefix-equal flag of all pairs above.
// At most one bit of s is ever 1. The cell is built in CMOS as a NAND with
// an output inverter; only its logic function is described here.
//
// Interface: d (N bits), c3_hi (N/2 bits) in; s (N bits) out.
// Timing: purely combinational.
module cmp_set4_select #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   d,
  input  logic [N/2-1:0] c3_hi,
  output logic [N-1:0]   s
);
  always_comb begin
    for (int m = 0; m < N/2; m++) begin
      s[2*m+1] = c3_hi[m] & d[2*m+1];
      s[2*m]   = c3_hi[m] & ~d[2*m+1] & d[2*m];
    end
  end
endmodule
