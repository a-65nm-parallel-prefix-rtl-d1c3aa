// Testbench for cmp_decision: final OR-scan and equality flag.
// Drives the 16-input default with the input patterns the comparator can
// produce (all zero, or a single 1 on one side) and with arbitrary patterns.
// Reference: abig = any left input, bbig = any right input, eq = neither.
module tb_cmp_decision;
  localparam int unsigned W = 16;
  logic [W-1:0] l, r;
  logic abig, bbig, eq;
  int checks = 0, failures = 0;

  cmp_decision #(.W(W)) dut (.left_in(l), .right_in(r), .abig(abig), .bbig(bbig), .eq(eq));

  task automatic check_vec(input logic [W-1:0] vl, vr);
    logic eg, el, ee;
    l = vl; r = vr; #1;
    eg = (vl != 0);
    el = (vr != 0);
    ee = (vl == 0) && (vr == 0);
    checks += 3;
    if (abig !== eg || bbig !== el || eq !== ee) begin
      failures++;
      $display("FAIL l=%b r=%b got %b %b %b exp %b %b %b", vl, vr, abig, bbig, eq, eg, el, ee);
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
    for (int k = 0; k < W; k++) begin
      check_vec(W'(1) << k, '0);
      check_vec('0, W'(1) << k);
    end
    for (int i = 0; i < 100; i++) check_vec(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
