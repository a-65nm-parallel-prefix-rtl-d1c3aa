// Testbench for cmp_or_network: OR-scan tree.
// Exhaustive on the 4-bit default, on a single bit and on an odd width (5), walking-one and
// random checks on a 64-bit instance. Reference: output is 1 iff any input
// bit is 1.
module tb_cmp_or_network;
  logic        b1;
  logic [3:0]  b4;
  logic [4:0]  b5;
  logic [63:0] b64;
  logic        y1, y4, y5, y64;
  int checks = 0, failures = 0;

  cmp_or_network #(.W(1))  dut1  (.bus(b1),  .any(y1));
  cmp_or_network          dut4  (.bus(b4),  .any(y4));
  cmp_or_network #(.W(5))  dut5  (.bus(b5),  .any(y5));
  cmp_or_network #(.W(64)) dut64 (.bus(b64), .any(y64));

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      b1 = 1'(v); #1;
      expect_bit(y1, v != 0, $sformatf("W=1 bus=%b", b1));
    end
    for (int v = 0; v < 16; v++) begin
      b4 = 4'(v); #1;
      expect_bit(y4, v != 0, $sformatf("W=4 bus=%b", b4));
    end
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v); #1;
      expect_bit(y5, v != 0, $sformatf("W=5 bus=%b", b5));
    end
    b64 = '0; #1;
    expect_bit(y64, 1'b0, "W=64 zero");
    for (int k = 0; k < 64; k++) begin
      b64 = 64'(1) << k; #1;
      expect_bit(y64, 1'b1, $sformatf("W=64 one at %0d", k));
    end
    for (int i = 0; i < 50; i++) begin
      b64 = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom}; #1;
      expect_bit(y64, b64 != 0, $sformatf("W=64 bus=%h", b64));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
