// tb_t2_renew_table: tests the slope table renewal and the point store.
//
// Three channel models offer random finished hulls (often at the same time) with random
// code-block numbers. A software table accumulates the same byte counts per slope bin;
// after every round all 256 table entries and the stored points, point counts and zero
// bit-plane counts of every code-block are compared. Also checks that clear takes 256
// cycles and zeroes the table, that each hull is acknowledged exactly once, and that a
// hull of n points is taken in n + 2 cycles.
module tb_t2_renew_table;
  import t2_pkg::*;

  localparam int NCH = 3, MP = 8, NCB = 16;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clear, clear_busy, renewed;
  logic hull_ready [NCH], hull_ack [NCH];
  pt_t  hull_pt [NCH][MP];
  logic [3:0] hull_n [NCH];
  logic [3:0] hull_cb [NCH];
  logic [7:0] hull_nzb [NCH];
  logic [7:0] tbl_raddr;
  logic [23:0] tbl_rdata;
  logic [3:0] pt_rcb;
  logic [2:0] pt_ridx;
  pt_t pt_rdata;
  logic [3:0] npts_rdata;
  logic [7:0] nzb_rdata;

  t2_renew_table #(.NUM_CH(NCH), .MAX_PTS(MP), .NUM_CB(NCB), .CB_W(4), .TBL_W(24)) dut (
    .clk, .rst, .clear, .clear_busy, .hull_ready, .hull_ack, .hull_pt, .hull_n, .hull_cb,
    .hull_nzb, .renewed, .tbl_raddr, .tbl_rdata, .pt_rcb, .pt_ridx, .pt_rdata,
    .npts_rdata, .nzb_rdata
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint unsigned ref_tbl [256];
  pt_t ref_pts [NCB][MP];
  int  ref_n [NCB], ref_nzb [NCB];
  int  acks [NCH];
  int  n_renewed = 0;
  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) if (hull_ack[c] && !rst) acks[c]++;
    if (renewed && !rst) n_renewed++;
  end

  task automatic make_hull(int c, int cb);
    int n, r;
    int b;
    n = $urandom_range(0, MP);
    r = 0;
    b = 255;
    hull_n[c] = 4'(n); hull_cb[c] = 4'(cb); hull_nzb[c] = 8'($urandom_range(0, 15));
    for (int i = 0; i < MP; i++) begin
      r += $urandom_range(0, 300);
      b -= $urandom_range(0, 30);
      if (b < 0) b = 0;
      hull_pt[c][i] = '{rate: 16'(r), bin: 8'(b), nbp: 4'(i + 1)};
    end
    // reference: the code-block's latest hull replaces what was stored for it
    begin
      int prev;
      prev = 0;
      for (int i = 0; i < n; i++) begin
        if (int'(hull_pt[c][i].rate) >= prev)
          ref_tbl[hull_pt[c][i].bin] += longint'(hull_pt[c][i].rate) - prev;
        prev = int'(hull_pt[c][i].rate);
        ref_pts[cb][i] = hull_pt[c][i];
      end
      ref_n[cb] = n;
      ref_nzb[cb] = int'(hull_nzb[c]);
    end
  endtask

  task automatic compare_all(string tag);
    for (int b = 0; b < 256; b++) begin
      tbl_raddr = 8'(b);
      #1;
      check(longint'(tbl_rdata) == ref_tbl[b], $sformatf("%s bin %0d: %0d expected %0d", tag, b, tbl_rdata, ref_tbl[b]));
    end
    for (int cb = 0; cb < NCB; cb++) begin
      pt_rcb = 4'(cb);
      #1;
      check(int'(npts_rdata) == ref_n[cb] && int'(nzb_rdata) == ref_nzb[cb], $sformatf("%s cb %0d count/NZB", tag, cb));
      for (int i = 0; i < ref_n[cb]; i++) begin
        pt_ridx = 3'(i);
        #1;
        check(pt_rdata == ref_pts[cb][i], $sformatf("%s cb %0d point %0d", tag, cb, i));
      end
    end
  endtask

  initial begin
    int t0, tcb;
    clear = 0; tbl_raddr = 0; pt_rcb = 0; pt_ridx = 0;
    for (int c = 0; c < NCH; c++) begin hull_ready[c] = 0; hull_n[c] = 0; hull_cb[c] = 0; hull_nzb[c] = 0; acks[c] = 0; end
    for (int b = 0; b < 256; b++) ref_tbl[b] = 0;
    for (int cb = 0; cb < NCB; cb++) begin ref_n[cb] = 0; ref_nzb[cb] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // clear
    clear = 1; t0 = cycle;
    @(negedge clk);
    clear = 0;
    while (clear_busy) @(negedge clk);
    check(cycle - t0 == 257, $sformatf("clear took %0d cycles, expected 257", cycle - t0));
    // single hull timing
    make_hull(0, 5);
    hull_n[0] = 4'd6;
    begin
      int prev; prev = 0;
      for (int b = 0; b < 256; b++) ref_tbl[b] = 0;
      for (int i = 0; i < 6; i++) begin
        if (int'(hull_pt[0][i].rate) >= prev) ref_tbl[hull_pt[0][i].bin] += longint'(hull_pt[0][i].rate) - prev;
        prev = int'(hull_pt[0][i].rate);
        ref_pts[5][i] = hull_pt[0][i];
      end
      ref_n[5] = 6;
    end
    hull_ready[0] = 1; t0 = cycle;
    while (!hull_ack[0]) @(negedge clk);
    tcb = cycle - t0;
    hull_ready[0] = 0;
    @(negedge clk);
    check(tcb == 6 + 2, $sformatf("hull of 6 points took %0d cycles, expected 8", tcb));
    compare_all("single");
    // random rounds, channels ready together
    for (int round = 0; round < 30; round++) begin
      int cbs [NCH];
      for (int c = 0; c < NCH; c++) begin
        cbs[c] = (round * NCH + c) % NCB;
        hull_ready[c] = ($urandom_range(0, 3) != 0);
        if (hull_ready[c]) make_hull(c, cbs[c]);
      end
      while (hull_ready[0] || hull_ready[1] || hull_ready[2]) begin
        @(negedge clk);
        for (int c = 0; c < NCH; c++) if (hull_ack[c]) hull_ready[c] = 0;
      end
      @(negedge clk);
      compare_all($sformatf("round %0d", round));
    end
    repeat (2) @(negedge clk);
    check(n_renewed == acks[0] + acks[1] + acks[2],
          $sformatf("%0d renewed pulses for %0d hulls", n_renewed, acks[0] + acks[1] + acks[2]));
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
