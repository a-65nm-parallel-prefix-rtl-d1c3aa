// End-to-end testbench for prefix_comparator64 at its default width (64 bits).
//
// Every vector is checked against the simulator's own unsigned comparison of
// the two operands; exactly one of abig, bbig, eq must be set. Stimulus:
//  * for every bit position p: operands that agree above p and differ at p,
//    both ways round, with random bits below p (the comparison must stop at p
//    whatever lies below), and random bits above p;
//  * equal operands (the chain runs through all 16 slices);
//  * the 8-bit example operands 0101_1101 / 0110_1001, zero-extended and
//    placed in the top byte;
//  * fully random operands.
// It counts how often each mechanism occurs: the first difference at each of
// the 64 positions, at the upper and at the lower bit of a pair, in each of the
// 16 slices, each of the three outcomes. A mechanism that never occurred is
// a failure.
module tb_prefix_comparator64;
  localparam int unsigned N = 64;
  logic [N-1:0] a, b;
  logic abig, bbig, eq;
  int checks = 0, failures = 0;
  int pos_hits[N];
  int slice_hits[N/4];
  int upper_hits = 0, lower_hits = 0;
  int gt_hits = 0, lt_hits = 0, eq_hits = 0;

  prefix_comparator64 dut (.a(a), .b(b), .abig(abig), .bbig(bbig), .eq(eq));

  task automatic apply(input logic [N-1:0] va, vb);
    logic eg, el, ee;
    int p;
    a = va; b = vb; #1;
    eg = (va > vb);
    el = (va < vb);
    ee = (va == vb);
    checks++;
    if (abig !== eg || bbig !== el || eq !== ee) begin
      failures++;
      $display("FAIL a=%h b=%h got abig=%b bbig=%b eq=%b exp %b %b %b",
               va, vb, abig, bbig, eq, eg, el, ee);
    end
    // Classify by the most significant differing bit.
    p = -1;
    for (int k = N - 1; k >= 0; k--) if (va[k] != vb[k]) begin p = k; break; end
    if (p >= 0) begin
      pos_hits[p]++;
      slice_hits[p/4]++;
      if (p % 2 == 1) upper_hits++; else lower_hits++;
    end
    if (eg) gt_hits++;
    if (el) lt_hits++;
    if (ee) eq_hits++;
  endtask

  function automatic logic [N-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] x, y, below;
    foreach (pos_hits[i]) pos_hits[i] = 0;
    foreach (slice_hits[i]) slice_hits[i] = 0;

    for (int p = 0; p < N; p++) begin
      for (int r = 0; r < 8; r++) begin
        x = rnd64();
        below = (p == 0) ? '0 : ((N'(1) << p) - 1);
        y = x ^ (N'(1) << p);                     // agree above p, differ at p
        y = (y & ~below) | (rnd64() & below);     // unrelated bits below p
        apply(x, y);
        apply(y, x);
      end
    end

    for (int r = 0; r < 50; r++) begin
      x = rnd64();
      apply(x, x);
    end
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);

    apply(64'h5D, 64'h69);
    apply({8'h5D, 56'h0}, {8'h69, 56'h0});
    apply({8'h69, 56'hFF_FFFF_FFFF_FFFF}, {8'h5D, 56'h0});

    for (int r = 0; r < 2000; r++) apply(rnd64(), rnd64());

    for (int p = 0; p < N; p++)
      if (pos_hits[p] == 0) begin failures++; $display("never resolved at bit %0d", p); end
    for (int s = 0; s < N/4; s++)
      if (slice_hits[s] == 0) begin failures++; $display("never resolved in slice %0d", s); end
    if (upper_hits == 0) begin failures++; $display("never resolved at an upper pair bit"); end
    if (lower_hits == 0) begin failures++; $display("never resolved at a lower pair bit"); end
    if (gt_hits == 0 || lt_hits == 0 || eq_hits == 0) begin
      failures++;
      $display("an outcome never occurred: gt=%0d lt=%0d eq=%0d", gt_hits, lt_hits, eq_hits);
    end
    $display("mechanisms: upper-bit stops=%0d lower-bit stops=%0d gt=%0d lt=%0d eq=%0d",
             upper_hits, lower_hits, gt_hits, lt_hits, eq_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
