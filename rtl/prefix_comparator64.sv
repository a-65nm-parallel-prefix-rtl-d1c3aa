// 64-bit parallel-prefix tree binary comparator.
//
// Compares two unsigned N-bit operands and raises exactly one of abig
// (A > B), bbig (A < B) and eq (A = B). The comparison resolves from the most
// significant bit towards the least significant one: bits are split into 2-bit
// pairs, each pair reports whether it is equal, and an AND chain of these
// pair-equal flags enables a pair only while everything above it is equal.
// Only the first differing bit is passed onto a left bus (A's bit) and a right
// bus (B's bit); every less significant position drives 00, so each bus holds
// at most a single 1 and an OR-scan of each bus gives the answer.
//
// Structure: N/4 4-bit slices (cmp4_slice) hold the five cell sets and the
// first two OR levels; their set 3 chain is linked slice to slice, entering
// the most significant slice as constant 1. The decision module ORs the
// slice results and derives eq. The value leaving the least significant
// slice is "all bits equal" and is cross-checked against eq by an assertion.
//
// Interface: a, b (N bits) in; abig, bbig, eq out. N must be a multiple of 4.
// Timing: purely combinational, no clock or reset.
module prefix_comparator64 #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         abig,
  output logic         bbig,
  output logic         eq
);
  localparam int unsigned NS = N / 4;

  // chain[j] is the set 3 value entering slice j-1; chain[NS] enters the top slice.
  logic [NS:0]   chain;
  logic [NS-1:0] slice_abig, slice_bbig;

  assign chain[NS] = 1'b1;

  for (genvar j = 0; j < NS; j++) begin : g_slice
    cmp4_slice u_slice (
      .a       (a[4*j +: 4]),
      .b       (b[4*j +: 4]),
      .c3_in   (chain[j+1]),
      .c3_next (chain[j]),
      .abig    (slice_abig[j]),
      .bbig    (slice_bbig[j])
    );
  end

  cmp_decision #(.W(NS)) u_decision (
    .left_in  (slice_abig),
    .right_in (slice_bbig),
    .abig     (abig),
    .bbig     (bbig),
    .eq       (eq)
  );

  // The decision code LR = 11 is impossible, and the end of the prefix chain
  // must agree with the OR-scan on equality.
  always_comb begin
    assert (!(abig && bbig)) else $error("comparator raised both abig and bbig");
    assert (eq == chain[0]) else $error("prefix chain and decision module disagree on equality");
  end
endmodule
