// tb_t2_slope_calc: tests one slope calculation channel.
//
// Feeds random code-blocks of 8 bit-planes (with points of no gain, of no cost and
// steeper than their predecessor), acknowledges the finished hull like the slope table
// would, and compares the hull (count, accumulated bytes, slope bins, bit-plane counts),
// the code-block number and zero bit-plane count with the reference model. Checks the
// stall rule in RTRD mode against a fixed threshold, and the processing time of a point
// that needs no cancellation: latch + Subtraction + 33 Division + Comparison cycles.
module tb_t2_slope_calc;
  import t2_pkg::*;
  import t2_ref_pkg::*;

  localparam int NBP = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [31:0] dis; logic dis_valid; logic [15:0] rate; logic rate_valid;
  logic cb_done; logic [3:0] cb_id; logic [7:0] cb_nzb;
  logic ready, stall, rtrd_mode, thr_valid;
  logic [8:0] thr;
  logic hull_ready, hull_ack;
  pt_t hull_pt [NBP];
  logic [3:0] hull_n, hull_cb;
  logic [7:0] hull_nzb;

  t2_slope_calc #(.MAX_PTS(NBP), .CB_W(4)) dut (
    .clk, .rst, .dis, .dis_valid, .rate, .rate_valid, .cb_done, .cb_id, .cb_nzb,
    .ready, .stall, .rtrd_mode, .thr_valid, .thr,
    .hull_ready, .hull_ack, .hull_pt, .hull_n, .hull_cb, .hull_nzb
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(longint unsigned d, longint unsigned r);
    while (!ready) @(negedge clk);
    dis = 32'(d); rate = 16'(r); dis_valid = 1; rate_valid = 1;
    @(negedge clk);
    dis_valid = 0; rate_valid = 0;
  endtask

  task automatic run_cb(int id, bit rtrd, int t);
    longint unsigned d[], r[];
    hull_t h;
    int nz;
    bit exp_stall;
    gen_points(NBP, 1 + $urandom_range(0, 30), d, r);
    h = ref_hull(NBP, d, r);
    nz = $urandom_range(0, 7);
    rtrd_mode = rtrd; thr_valid = rtrd; thr = 9'(t);
    exp_stall = 0;
    for (int i = 0; i < h.n; i++) if (int'(h.bin[i]) < t) exp_stall = 1;
    for (int k = 0; k < NBP; k++) begin
      send(d[k], r[k]);
      repeat ($urandom_range(0, 300)) @(negedge clk);
    end
    while (!ready) @(negedge clk);
    cb_done = 1; cb_id = 4'(id); cb_nzb = 8'(nz);
    @(negedge clk);
    cb_done = 0;
    while (!hull_ready) @(negedge clk);
    check(int'(hull_n) == h.n, $sformatf("cb %0d hull size %0d expected %0d", id, hull_n, h.n));
    for (int i = 0; i < h.n && i < NBP; i++) begin
      check(int'(hull_pt[i].rate) == int'(h.r[i]) && int'(hull_pt[i].bin) == int'(h.bin[i])
            && int'(hull_pt[i].nbp) == int'(h.nbp[i]),
            $sformatf("cb %0d point %0d: R %0d bin %0d n %0d expected %0d %0d %0d", id, i,
                      hull_pt[i].rate, hull_pt[i].bin, hull_pt[i].nbp, h.r[i], h.bin[i], h.nbp[i]));
    end
    check(int'(hull_cb) == id && int'(hull_nzb) == nz, "code-block number / NZB");
    // the stall rule only looks at points when they are pushed; a later merge can
    // remove them again, so a stall is required only if the final hull shows one
    if (rtrd && exp_stall) check(stall, $sformatf("cb %0d: no stall", id));
    if (!rtrd) check(!stall, "stall outside RTRD mode");
    repeat ($urandom_range(0, 3)) @(negedge clk);
    hull_ack = 1;
    @(negedge clk);
    hull_ack = 0;
    check(!stall && !hull_ready, "stall and hull cleared after ack");
  endtask

  initial begin
    int t0, lat;
    dis = 0; dis_valid = 0; rate = 0; rate_valid = 0; cb_done = 0; cb_id = 0; cb_nzb = 0;
    rtrd_mode = 0; thr_valid = 0; thr = 0; hull_ack = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // latency of one plain point: from the strobe to the return to Waiting
    t0 = cycle;
    send(1000, 10);
    t0 = cycle;
    while (dut.state == dut.S_WAIT) @(negedge clk);
    while (dut.state != dut.S_WAIT) @(negedge clk);
    lat = cycle - t0;
    // latch, Waiting, Subtraction, 32 quotient bits, Division sees done, Comparison
    check(lat == 36, $sformatf("point latency %0d cycles, expected 36", lat));
    check(dut.sp == 1 && dut.st_s[0] == 100, "first slope 1000/10");
    cb_done = 1; cb_id = 0; @(negedge clk); cb_done = 0;
    while (!hull_ready) @(negedge clk);
    hull_ack = 1; @(negedge clk); hull_ack = 0;
    for (int i = 0; i < 20; i++) run_cb(i % 16, 0, 0);
    for (int i = 0; i < 20; i++) run_cb(i % 16, 1, 60 + $urandom_range(0, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
