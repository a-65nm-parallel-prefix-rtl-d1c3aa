// Waveform workload for prefix_comparator64 at its default width.
//
// Reproduces the published transient test of the 64-bit comparator: only the
// least significant bits A0 and B0 change, every other bit of the two operands
// is held equal (0 here; 1 in a second pass), and the outputs step through
// ABIG, BBIG and EQ. The (A0, B0) sequence applied is 10, 01, 00, 11, 10, 01,
// each held for 100 time units. Expected outputs follow from the comparison itself:
// A0 > B0 gives abig, A0 < B0 gives bbig, equal bits give eq. Since only bit 0
// differs, the comparison has to travel the whole set 3 chain through all 16
// slices before it may resolve.
module tb_fig9_sequence;
  logic [63:0] a, b;
  logic abig, bbig, eq;
  int checks = 0, failures = 0;
  logic [1:0] seq [6] = '{2'b10, 2'b01, 2'b00, 2'b11, 2'b10, 2'b01};

  prefix_comparator64 dut (.a(a), .b(b), .abig(abig), .bbig(bbig), .eq(eq));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 6; i++) begin
        logic a0, b0;
        {a0, b0} = seq[i];
        a = {{63{pass[0]}}, a0};
        b = {{63{pass[0]}}, b0};
        #100;
        checks++;
        if (abig !== (a0 & ~b0) || bbig !== (~a0 & b0) || eq !== (a0 == b0)) begin
          failures++;
          $display("FAIL step %0d A0=%b B0=%b got abig=%b bbig=%b eq=%b", i, a0, b0, abig, bbig, eq);
        end
        $display("t=%0t A0=%b B0=%b ABIG=%b BBIG=%b EQ=%b", $time, a0, b0, abig, bbig, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
