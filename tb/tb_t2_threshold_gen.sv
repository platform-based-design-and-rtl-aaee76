// tb_t2_threshold_gen: tests the threshold generator against an exhaustive search.
//
// The slope table is a testbench array read combinationally. For random tables (sparse
// and dense, small and large) and every compression ratio code, the reference tries
// every threshold from 256 down and keeps the lowest whose admitted bytes fit the budget
// 16384 >> cr. Checks the threshold, the byte total and the scan time: one cycle to take
// start, one per bin visited, down to the bin that overflows (counted from the clock
// edge that takes start to the one that raises done: 258 - threshold, or 257 when
// everything fits).
module tb_t2_threshold_gen;
  import t2_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [2:0] cr;
  logic [7:0] tbl_raddr;
  logic [23:0] tbl_rdata;
  logic [8:0] thr;
  logic [23:0] bytes;
  int unsigned tbl [256];

  assign tbl_rdata = 24'(tbl[tbl_raddr]);

  t2_threshold_gen #(.TBL_W(24), .TILE_BYTES(16384)) dut (
    .clk, .rst, .start, .cr, .tbl_raddr, .tbl_rdata, .busy, .done, .thr, .bytes
  );

  int checks = 0, failures = 0, cycle = 0;
  int n_all = 0, n_none = 0, n_mid = 0;
  always @(posedge clk) cycle++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(int c);
    longint unsigned budget, tot, kept;
    int exp_thr, t0, lat;
    budget = 16384 >> c;
    exp_thr = 256; kept = 0;
    for (int t = 255; t >= 0; t--) begin
      tot = 0;
      for (int b = t; b < 256; b++) tot += tbl[b];
      if (tot > budget) break;
      exp_thr = t; kept = tot;
    end
    if (exp_thr == 0) n_all++; else if (exp_thr == 256) n_none++; else n_mid++;
    cr = 3'(c);
    start = 1; t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    lat = cycle - t0;
    check(int'(thr) == exp_thr, $sformatf("cr %0d: threshold %0d expected %0d", c, thr, exp_thr));
    check(longint'(bytes) == kept, $sformatf("cr %0d: bytes %0d expected %0d", c, bytes, kept));
    check(lat == (exp_thr == 0 ? 257 : 258 - exp_thr),
          $sformatf("cr %0d: %0d cycles for threshold %0d", c, lat, exp_thr));
    @(negedge clk);
  endtask

  initial begin
    start = 0; cr = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int round = 0; round < 40; round++) begin
      int density, maxv;
      density = $urandom_range(1, 100);
      maxv = (round % 4 == 0) ? 20000 : 300;
      for (int b = 0; b < 256; b++)
        tbl[b] = ($urandom_range(1, 100) <= density) ? $urandom_range(0, maxv) : 0;
      for (int c = 0; c < 8; c++) one(c);
    end
    // empty table: everything fits
    for (int b = 0; b < 256; b++) tbl[b] = 0;
    one(7);
    check(n_all > 0 && n_none > 0 && n_mid > 0, $sformatf("cases all/none/mid %0d %0d %0d", n_all, n_none, n_mid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
