// tb_t2_rd_opt: tests truncation and header building.
//
// The point store is a testbench array of random hulls (decreasing slope bins,
// increasing byte counts, 0..8 points per code-block). For random thresholds, including
// 0 and 256, every header word must carry the byte count and pass count (3n - 2) of the
// last point at or above the threshold and the code-block's zero bit-plane count, in
// code-block order, under random back-pressure. Without back-pressure a code-block of
// n points takes n + 2 cycles (n points, the end test, the hand-over).
module tb_t2_rd_opt;
  import t2_pkg::*;

  localparam int MP = 8, NCB = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, hdr_valid, hdr_ready, busy, done;
  logic [8:0] thr;
  logic [3:0] pt_rcb, hdr_cb;
  logic [2:0] pt_ridx;
  pt_t pt_rdata;
  logic [3:0] npts_rdata;
  logic [7:0] nzb_rdata;
  hdr_t hdr;

  pt_t pts [NCB][MP];
  int  npts [NCB], nzb [NCB];
  assign pt_rdata   = pts[pt_rcb][pt_ridx];
  assign npts_rdata = 4'(npts[pt_rcb]);
  assign nzb_rdata  = 8'(nzb[pt_rcb]);

  t2_rd_opt #(.MAX_PTS(MP), .NUM_CB(NCB), .CB_W(4)) dut (
    .clk, .rst, .start, .thr, .pt_rcb, .pt_ridx, .pt_rdata, .npts_rdata, .nzb_rdata,
    .hdr_valid, .hdr_ready, .hdr, .hdr_cb, .busy, .done
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit backpressure;
  int got, n_trunc = 0;

  task automatic run(int t);
    int t0, exp_cycles;
    got = 0;
    exp_cycles = 1;
    for (int cb = 0; cb < NCB; cb++) exp_cycles += npts[cb] + 2;
    thr = 9'(t);
    start = 1; t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) begin
      hdr_ready = backpressure ? ($urandom_range(0, 2) == 0) : 1'b1;
      #1;
      if (hdr_valid && hdr_ready) begin
        int cdl, ncp;
        cdl = 0; ncp = 0;
        for (int i = 0; i < npts[got]; i++)
          if (int'(pts[got][i].bin) >= t) begin cdl = pts[got][i].rate; ncp = 3 * pts[got][i].nbp - 2; end
        if (ncp != 0 && ncp != 3 * npts[got] - 2) n_trunc++;
        check(int'(hdr_cb) == got, $sformatf("header for cb %0d, expected %0d", hdr_cb, got));
        check(int'(hdr.cdl) == cdl && int'(hdr.ncp) == ncp && int'(hdr.nzb) == nzb[got],
              $sformatf("thr %0d cb %0d: %0d/%0d/%0d expected %0d/%0d/%0d", t, got,
                        hdr.cdl, hdr.ncp, hdr.nzb, cdl, ncp, nzb[got]));
        got++;
      end
      @(negedge clk);
    end
    check(got == NCB, $sformatf("%0d headers", got));
    if (!backpressure) check(cycle - t0 == exp_cycles, $sformatf("%0d cycles, expected %0d", cycle - t0, exp_cycles));
    @(negedge clk);
  endtask

  initial begin
    start = 0; thr = 0; hdr_ready = 1; backpressure = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int round = 0; round < 30; round++) begin
      for (int cb = 0; cb < NCB; cb++) begin
        int r, b;
        npts[cb] = $urandom_range(0, MP);
        nzb[cb] = $urandom_range(0, 7);
        r = 0; b = 255;
        for (int i = 0; i < MP; i++) begin
          r += $urandom_range(1, 200);
          b -= $urandom_range(1, 40);
          if (b < 0) b = 0;
          pts[cb][i] = '{rate: 16'(r), bin: 8'(b), nbp: 4'(i + 1)};
        end
      end
      backpressure = (round % 2 == 1);
      run(round == 0 ? 0 : round == 1 ? 256 : $urandom_range(60, 255));
    end
    check(n_trunc > 0, "no code-block was truncated inside its hull");
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
