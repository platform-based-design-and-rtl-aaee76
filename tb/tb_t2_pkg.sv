// tb_t2_pkg: tests the slope quantiser and the pass count of t2_pkg.
//
// slope_bin is compared with the reference bin (from floor(log2)) for all slopes below
// 4096, for every power of two and its neighbours, and for random 32-bit slopes; it
// must never decrease as the slope grows, must give 255 for the infinite slope and at
// most 239 otherwise. passes(n) must be 3n - 2, and 0 for n = 0.
module tb_t2_pkg;
  import t2_pkg::*;
  import t2_ref_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(longint unsigned s);
    int unsigned exp;
    exp = ref_bin(s);
    check(int'(slope_bin(32'(s))) == int'(exp), $sformatf("slope %0d: bin %0d expected %0d", s, slope_bin(32'(s)), exp));
  endtask

  initial begin
    logic [7:0] prev;
    prev = 0;
    for (int s = 0; s < 4096; s++) begin
      one(s);
      check(slope_bin(32'(s)) >= prev, $sformatf("bin decreases at %0d", s));
      prev = slope_bin(32'(s));
    end
    for (int e = 3; e < 32; e++) begin
      one(64'd1 << e);
      one((64'd1 << e) - 1);
      one((64'd1 << e) + 1);
    end
    for (int i = 0; i < 5000; i++) begin
      longint unsigned a, b;
      a = {32'd0, $urandom} % 64'hFFFF_FFFF;
      b = {32'd0, $urandom} % 64'hFFFF_FFFF;
      one(a);
      if (a <= b) check(slope_bin(32'(a)) <= slope_bin(32'(b)), "bins out of slope order");
      check(slope_bin(32'(a)) <= 8'd239, "finite slope in a bin above 239");
    end
    check(slope_bin(32'hFFFF_FFFF) == 8'd255, "infinite slope");
    check(slope_bin(32'hFFFF_FFFE) == 8'd239, "largest finite slope");
    for (int n = 0; n < 16; n++)
      check(int'(passes(4'(n))) == (n == 0 ? 0 : 3 * n - 2), $sformatf("passes(%0d)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
