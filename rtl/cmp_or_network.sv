// OR network of the comparator's decision logic.
//
// Reduces one bus to a single bit by a balanced tree of 2-input OR stages,
// ceil(log2 W) levels deep, matching the 2-bit grouping used throughout the
// comparator (the 4-bit slice uses two such levels per bus). In CMOS the
// stages alternate NOR and NAND; only the OR function is described here.
//
// Interface: bus (W bits) in; any out, the OR of all bits.
// Timing: purely combinational.
module cmp_or_network #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] bus,
  output logic         any
);
  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 0;
  localparam int unsigned P      = 1 << LEVELS;  // width padded to a power of two

  always_comb begin
    logic [P-1:0] node;
    node = '0;
    node[W-1:0] = bus;
    // Each pass halves the number of live nodes: node[j] = node[2j] | node[2j+1].
    for (int lvl = 0; lvl < int'(LEVELS); lvl++) begin
      for (int j = 0; j < int'(P >> (lvl + 1)); j++) begin
        node[j] = node[2*j] | node[2*j+1];
      end
    end
    any = node[0];
  end
endmodule
