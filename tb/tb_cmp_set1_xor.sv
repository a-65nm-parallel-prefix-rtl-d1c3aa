// Testbench for cmp_set1_xor: set 1 difference flags.
// Drives the 64-bit default with corner patterns and random operands and
// checks every flag against a per-bit "differs" reference. Combinational;
// each vector is given 1 ns to settle.
module tb_cmp_set1_xor;
  localparam int unsigned N = 64;
  logic [N-1:0] a, b, d;
  int checks = 0, failures = 0;

  cmp_set1_xor #(.N(N)) dut (.a(a), .b(b), .d(d));

  task automatic check_vec(input logic [N-1:0] va, input logic [N-1:0] vb);
    a = va; b = vb; #1;
    for (int k = 0; k < N; k++) begin
      logic exp;
      exp = (va[k] != vb[k]);
      checks++;
      if (d[k] !== exp) begin
        failures++;
        $display("FAIL bit %0d a=%h b=%h d=%b exp=%b", k, va, vb, d[k], exp);
      end
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
    check_vec('0, '0);
    check_vec('1, '1);
    check_vec('1, '0);
    check_vec('0, '1);
    check_vec({32{2'b10}}, {32{2'b01}});
    check_vec({32{2'b11}}, {32{2'b01}});
    for (int i = 0; i < 200; i++) check_vec({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
