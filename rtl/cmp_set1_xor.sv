// Set 1 of the parallel-prefix comparator: bitwise difference flags.
//
// One cell per bit position computes the termination flag D[k] = A[k] ^ B[k].
// D[k] is 1 where the operands differ; it feeds set 2 (pair-equal NOR) and
// set 4 (select logic). In silicon this cell is a 6-transistor pass-transistor
// XOR; here only its logic function is described.
//
// Interface: a, b (N bits each) in, d (N bits) out.
// Timing: purely combinational, one gate level.
module cmp_set1_xor #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);
  always_comb d = a ^ b;
endmodule
