// 4-bit slice of the parallel-prefix comparator.
//
// The repeatable unit of the comparator: sets 1 to 5 for two 2-bit pairs and
// the first two levels of the OR network. Set 3's AND chain enters the slice
// as c3_in ("all more significant bits are equal") and leaves it as c3_next
// ("... and these four bits are equal too"), so slices are chained from the
// most significant end. Within the slice:
//   set 1  d[k]  = a[k] ^ b[k]
//   set 2  c2[m] = ~(d[2m] | d[2m+1])                    m = 0, 1
//   set 3  c3[1] = c2[1] & c3_in,  c3[0] = c2[0] & c3[1] = c3_next
//   set 4  upper pair selects use c3_in, lower pair selects use c3[1]
//   set 5  left/right bus bit = (a[k], b[k]) where selected, else 00
//   OR     abig = OR of the 4 left-bus bits, bbig = OR of the 4 right-bus bits
// abig (bbig) is 1 only if the most significant differing bit of the whole
// word lies in this slice and A (B) holds the 1 there.
//
// Interface: a, b (4 bits), c3_in in; c3_next, abig, bbig out.
// Timing: purely combinational.
module cmp4_slice (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c3_in,
  output logic       c3_next,
  output logic       abig,
  output logic       bbig
);
  logic [3:0] d;
  logic [1:0] c2;
  logic [1:0] c3;
  logic [3:0] s;
  logic [3:0] left_bus, right_bus;

  cmp_set1_xor    #(.N(4)) u_set1 (.a(a), .b(b), .d(d));
  cmp_set2_nor    #(.N(4)) u_set2 (.d(d), .c2(c2));
  cmp_set3_and    #(.N(4)) u_set3 (.c2(c2), .c3_in(c3_in), .c3(c3));
  cmp_set4_select #(.N(4)) u_set4 (.d(d), .c3_hi({c3_in, c3[1]}), .s(s));
  cmp_set5_mux    #(.N(4)) u_set5 (.a(a), .b(b), .s(s),
                                   .left_bus(left_bus), .right_bus(right_bus));

  cmp_or_network #(.W(4)) u_or_left  (.bus(left_bus),  .any(abig));
  cmp_or_network #(.W(4)) u_or_right (.bus(right_bus), .any(bbig));

  assign c3_next = c3[0];
endmodule
