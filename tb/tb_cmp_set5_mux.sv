// Testbench for cmp_set5_mux: set 5 bus drivers.
// Random operands and selects on the 64-bit default, plus all-select and
// no-select cases. Reference: a selected position carries its operand bits,
// an unselected one carries 00 on both buses.
module tb_cmp_set5_mux;
  localparam int unsigned N = 64;
  logic [N-1:0] a, b, s, lb, rb;
  int checks = 0, failures = 0;

  cmp_set5_mux #(.N(N)) dut (.a(a), .b(b), .s(s), .left_bus(lb), .right_bus(rb));

  task automatic check_vec(input logic [N-1:0] va, vb, vs);
    a = va; b = vb; s = vs; #1;
    for (int k = 0; k < N; k++) begin
      logic el, er;
      if (vs[k]) begin el = va[k]; er = vb[k]; end
      else       begin el = 1'b0;  er = 1'b0;  end
      checks += 2;
      if (lb[k] !== el) begin failures++; $display("FAIL left k=%0d a=%h s=%h", k, va, vs); end
      if (rb[k] !== er) begin failures++; $display("FAIL right k=%0d b=%h s=%h", k, vb, vs); end
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
    check_vec('1, '1, '1);
    check_vec('1, '1, '0);
    check_vec('1, '0, '1);
    check_vec('0, '1, '1);
    for (int i = 0; i < 200; i++)
      check_vec({$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
