// Testbench for cmp_set2_nor: set 2 pair-equal flags.
// Exhaustive over an 8-bit instance (all 256 flag patterns), then random
// patterns on the 64-bit default. Reference: pair m is "equal" when neither of
// its two flags is set.
module tb_cmp_set2_nor;
  logic [7:0]  d8;
  logic [3:0]  c8;
  logic [63:0] d64;
  logic [31:0] c64;
  int checks = 0, failures = 0;

  cmp_set2_nor #(.N(8)) dut8  (.d(d8),  .c2(c8));
  cmp_set2_nor          dut64 (.d(d64), .c2(c64));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v); #1;
      for (int m = 0; m < 4; m++) begin
        logic exp;
        exp = (d8[2*m] == 1'b0) && (d8[2*m+1] == 1'b0);
        checks++;
        if (c8[m] !== exp) begin
          failures++;
          $display("FAIL N=8 d=%b pair %0d c2=%b exp=%b", d8, m, c8[m], exp);
        end
      end
    end
    for (int i = 0; i < 200; i++) begin
      d64 = {$urandom, $urandom};
      if (i % 3 == 0) d64 = d64 & {$urandom, $urandom};  // sparser patterns
      #1;
      for (int m = 0; m < 32; m++) begin
        logic exp;
        exp = (d64[2*m +: 2] == 2'b00);
        checks++;
        if (c64[m] !== exp) begin
          failures++;
          $display("FAIL N=64 d=%h pair %0d c2=%b exp=%b", d64, m, c64[m], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
