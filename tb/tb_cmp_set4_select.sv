// Testbench for cmp_set4_select: set 4 first-difference select.
// Exhaustive over an 8-bit instance (8 flag bits x 4 prefix inputs) and random
// on the 64-bit default. Reference: s[k] is 1 when bit k differs, the prefix
// flag of its pair is 1 and, for the lower bit of a pair, the upper bit of the
// same pair does not differ.
module tb_cmp_set4_select;
  logic [7:0]  d8, s8;
  logic [3:0]  h8;
  logic [63:0] d64, s64;
  logic [31:0] h64;
  int checks = 0, failures = 0;

  cmp_set4_select #(.N(8)) dut8  (.d(d8),  .c3_hi(h8),  .s(s8));
  cmp_set4_select          dut64 (.d(d64), .c3_hi(h64), .s(s64));

  function automatic logic ref_sel(input logic [63:0] d, input logic [31:0] h, input int k);
    if (!h[k/2] || !d[k]) return 1'b0;
    if (k % 2 == 0 && d[k+1]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {h8, d8} = 12'(v); #1;
      for (int k = 0; k < 8; k++) begin
        logic exp;
        exp = ref_sel(64'(d8), 32'(h8), k);
        checks++;
        if (s8[k] !== exp) begin
          failures++;
          $display("FAIL N=8 d=%b h=%b k=%0d s=%b exp=%b", d8, h8, k, s8[k], exp);
        end
      end
    end
    for (int i = 0; i < 200; i++) begin
      d64 = {$urandom, $urandom};
      h64 = $urandom;
      #1;
      for (int k = 0; k < 64; k++) begin
        logic exp;
        exp = ref_sel(d64, h64, k);
        checks++;
        if (s64[k] !== exp) begin
          failures++;
          $display("FAIL N=64 d=%h h=%h k=%0d s=%b exp=%b", d64, h64, k, s64[k], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
