// Testbench for cmp_set3_and: set 3 prefix-equal chain.
// Exhaustive over a 16-bit instance (8 pair flags, both values of c3_in) and
// random on the 64-bit default. Reference: c3[m] is 1 exactly when c3_in is 1
// and no pair at index m or above reports a difference.
module tb_cmp_set3_and;
  logic [7:0]  c2s, c3s;
  logic        ins;
  logic [31:0] c2l, c3l;
  logic        inl;
  int checks = 0, failures = 0;

  cmp_set3_and #(.N(16)) dut16 (.c2(c2s), .c3_in(ins), .c3(c3s));
  cmp_set3_and           dut64 (.c2(c2l), .c3_in(inl), .c3(c3l));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ins, c2s} = 9'(v); #1;
      for (int m = 0; m < 8; m++) begin
        logic exp;
        exp = ins;
        for (int j = m; j < 8; j++) if (!c2s[j]) exp = 1'b0;
        checks++;
        if (c3s[m] !== exp) begin
          failures++;
          $display("FAIL N=16 in=%b c2=%b m=%0d c3=%b exp=%b", ins, c2s, m, c3s[m], exp);
        end
      end
    end
    for (int i = 0; i < 300; i++) begin
      // mostly-ones patterns with a single zero so the stop point moves around
      c2l = '1;
      if (i % 4 != 0) c2l[$urandom_range(31, 0)] = 1'b0;
      if (i % 5 == 0) c2l = $urandom;
      inl = (i % 7 != 0);
      #1;
      for (int m = 0; m < 32; m++) begin
        logic exp;
        exp = inl;
        for (int j = m; j < 32; j++) if (!c2l[j]) exp = 1'b0;
        checks++;
        if (c3l[m] !== exp) begin
          failures++;
          $display("FAIL N=64 in=%b c2=%h m=%0d c3=%b exp=%b", inl, c2l, m, c3l[m], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
