// Testbench for cmp4_slice: the 4-bit comparator slice.
// Exhaustive: all 4-bit operand pairs with both values of the incoming chain
// flag (512 cases). Reference: with c3_in = 1 the slice compares its bits as
// unsigned numbers (abig for a > b, bbig for a < b) and passes c3_next = 1 only
// for a = b; with c3_in = 0 every output is 0.
module tb_cmp4_slice;
  logic [3:0] a, b;
  logic       c3_in, c3_next, abig, bbig;
  int checks = 0, failures = 0;

  cmp4_slice dut (.a(a), .b(b), .c3_in(c3_in), .c3_next(c3_next), .abig(abig), .bbig(bbig));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int ia, ib;
      logic eg, el, en;
      {c3_in, a, b} = 9'(v); #1;
      ia = int'(a); ib = int'(b);
      eg = c3_in && (ia > ib);
      el = c3_in && (ia < ib);
      en = c3_in && (ia == ib);
      checks += 3;
      if (abig !== eg || bbig !== el || c3_next !== en) begin
        failures++;
        $display("FAIL in=%b a=%b b=%b got abig=%b bbig=%b next=%b exp %b %b %b",
                 c3_in, a, b, abig, bbig, c3_next, eg, el, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
