// Set 5 of the parallel-prefix comparator: bus drivers.
//
// One two-input, 2-bit-wide multiplexer per bit. When its select s[k] is 1 it
// passes (A[k], B[k]) onto bit k of the left and right bus; otherwise it drives
// the hard-wired code 00. Because s selects only the first differing bit,
// each bus carries at most one 1: left_bus holds it when A is larger, right_bus
// when B is larger, and both are all-zero when A = B.
//
// Interface: a, b, s (N bits each) in; left_bus, right_bus (N bits) out.
// Timing: purely combinational.
module cmp_set5_mux #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] s,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);
  always_comb begin
    for (int k = 0; k < N; k++) begin
      left_bus[k]  = s[k] ? a[k] : 1'b0;
      right_bus[k] = s[k] ? b[k] : 1'b0;
    end
  end
endmodule
