// tb_jp2k_t2_coproc: end-to-end test of the coprocessor top at its default size
// (3 channels, 16 code-blocks of 8 bit-planes, 128x128 tile), driven as the host CPU
// would drive it: mode, ratio and start are written over AHB-Lite, STATUS is polled
// until done, and THRESH and BYTES are read back over the bus. The header words land
// in a model of the SSRAM (an associative array indexed by address).
//
// Generates random per-bit-plane (D, R) sequences for every code-block, feeds them on
// the three channels at once (IPCRD mode, several compression ratios) and one code-block
// at a time (RTRD mode), and compares every header word written to the SSRAM port with
// the reference model, as well as the final threshold and byte total. In RTRD mode it
// behaves like Tier-1: it stops coding a code-block when stall is raised, and checks the
// intermediate threshold after each code-block. It also counts how often each
// mechanism happened: dropped, free and merged hull points, stalls, and channels
// competing for the slope table.
module tb_jp2k_t2_coproc;
  import t2_pkg::*;
  import t2_ref_pkg::*;

  localparam int NP = 3, NCB = 16, NBP = 8, TILE = 128 * 128;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic done;
  logic [2:0] cr;
  logic hsel, hwrite, hreadyout, hresp;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans;
  logic [2:0] hsize;
  logic hresetn;
  assign hresetn = !rst;
  logic [31:0] dis [NP];
  logic dis_v [NP];
  logic [15:0] rate [NP];
  logic rate_v [NP];
  logic cb_done [NP];
  logic [3:0] cb_id [NP];
  logic [7:0] cb_nzb [NP];
  logic ready [NP], stall [NP];
  logic [31:0] header_info, address;
  logic ram_en;
  logic [8:0] threshold;
  logic [23:0] bytes_kept;

  jp2k_t2_coproc dut (
    .hclk(clk), .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata,
    .hready(hreadyout), .hrdata, .hreadyout, .hresp,
    .dis_i(dis), .dis_valid_i(dis_v), .rate_i(rate), .rate_valid_i(rate_v),
    .cb_done_i(cb_done), .cb_id_i(cb_id), .cb_nzb_i(cb_nzb),
    .ready_o(ready), .stall_o(stall),
    .header_info, .address, .ram_en, .done
  );

  // SSRAM model: one write per clock
  logic [31:0] ssram [logic [31:0]];
  always @(posedge clk) if (ram_en) ssram[address] = header_info;

  // AHB-Lite master model
  task automatic ahb_write(logic [31:0] a, logic [31:0] d);
    hsel = 1; haddr = a; htrans = 2'b10; hwrite = 1; hsize = 3'b010;
    @(negedge clk);
    hsel = 0; htrans = 2'b00; hwdata = d;
    @(negedge clk);
  endtask
  task automatic ahb_read(logic [31:0] a, output logic [31:0] d);
    hsel = 1; haddr = a; htrans = 2'b10; hwrite = 0; hsize = 3'b010;
    @(negedge clk);
    hsel = 0; htrans = 2'b00;
    #1 d = hrdata;
    @(negedge clk);
  endtask
  int n_polls = 0;

  int checks = 0, failures = 0;
  int n_dropped = 0, n_infinite = 0, n_merged = 0, n_stall = 0, n_contend = 0;
  int n_thr_all = 0, n_thr_part = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // SSRAM write monitor
  logic [31:0] wr_data [NCB];
  int          wr_cnt  [NCB];
  int          wr_bad;
  always @(posedge clk) begin
    if (ram_en) begin
      int idx;
      idx = int'((address - 32'hC202_8000) >> 8);
      if (idx >= 0 && idx < NCB && ((address - 32'hC202_8000) & 32'hFF) == 252) begin
        wr_data[idx] = header_info;
        wr_cnt[idx]++;
      end else wr_bad++;
    end
  end

  // channels competing for the slope table
  always @(posedge clk) begin
    int k;
    k = 0;
    for (int c = 0; c < NP; c++) if (dut.u_tier2.hull_ready[c]) k++;
    if (k > 1) n_contend++;
  end

  logic stall_q [NP];
  always @(posedge clk) begin
    for (int c = 0; c < NP; c++) begin
      if (stall[c] && !stall_q[c]) n_stall++;
      stall_q[c] <= stall[c];
    end
  end

  // per code-block stimulus and what was actually sent
  longint unsigned pd [NCB][], pr [NCB][];
  int              nsent [NCB];
  int              nzb_of [NCB];
  hull_t           hulls [];

  task automatic send_point(int c, longint unsigned d, longint unsigned r);
    int gap;
    while (!ready[c]) @(negedge clk);
    gap = $urandom_range(0, 2);
    if (gap == 0) begin
      dis[c] = 32'(d); rate[c] = 16'(r); dis_v[c] = 1; rate_v[c] = 1;
      @(negedge clk);
      dis_v[c] = 0; rate_v[c] = 0;
    end else begin
      // distortion and rate strobed in different cycles
      dis[c] = 32'(d); dis_v[c] = 1;
      @(negedge clk);
      dis_v[c] = 0;
      repeat (gap) @(negedge clk);
      rate[c] = 16'(r); rate_v[c] = 1;
      @(negedge clk);
      rate_v[c] = 0;
    end
  endtask

  task automatic send_done(int c, int cb);
    while (!ready[c]) @(negedge clk);
    cb_done[c] = 1; cb_id[c] = 4'(cb); cb_nzb[c] = 8'(nzb_of[cb]);
    @(negedge clk);
    cb_done[c] = 0;
  endtask

  // one channel in IPCRD mode: its share of the code-blocks, back to back
  task automatic run_channel_ipcrd(int c);
    for (int cb = c; cb < NCB; cb += NP) begin
      for (int k = 0; k < NBP; k++) begin
        send_point(c, pd[cb][k], pr[cb][k]);
        repeat ($urandom_range(0, 40)) @(negedge clk);
      end
      nsent[cb] = NBP;
      send_done(c, cb);
    end
  endtask

  task automatic make_stimulus();
    for (int cb = 0; cb < NCB; cb++) begin
      gen_points(NBP, 1 + $urandom_range(0, 40), pd[cb], pr[cb]);
      nzb_of[cb] = $urandom_range(0, 7);
      nsent[cb] = 0;
      wr_cnt[cb] = 0;
    end
    wr_bad = 0;
  endtask

  task automatic check_result(string tag);
    int thr;
    longint unsigned kept;
    logic [31:0] rd;
    ahb_read(32'h8, rd); threshold = rd[8:0];
    ahb_read(32'hC, rd); bytes_kept = rd[23:0];
    for (int cb = 0; cb < NCB; cb++) begin
      logic [31:0] a;
      a = 32'hC202_8000 + 32'(cb) * 256 + 252;
      check(ssram.exists(a), $sformatf("%s cb %0d header missing in SSRAM", tag, cb));
      if (ssram.exists(a)) check(ssram[a] == wr_data[cb], "SSRAM holds the last write");
    end
    hulls = new[NCB];
    for (int cb = 0; cb < NCB; cb++) begin
      longint unsigned d1[], r1[];
      d1 = new[nsent[cb]]; r1 = new[nsent[cb]];
      for (int k = 0; k < nsent[cb]; k++) begin d1[k] = pd[cb][k]; r1[k] = pr[cb][k]; end
      hulls[cb] = ref_hull(nsent[cb], d1, r1);
      n_dropped += hulls[cb].dropped;
      n_infinite += hulls[cb].infinite;
      n_merged += hulls[cb].merged;
    end
    thr = ref_threshold(hulls, NCB, longint'(TILE >> cr), kept);
    if (thr == 0) n_thr_all++; else n_thr_part++;
    check(int'(threshold) == thr, $sformatf("%s threshold %0d expected %0d", tag, threshold, thr));
    check(longint'(bytes_kept) == kept, $sformatf("%s bytes %0d expected %0d", tag, bytes_kept, kept));
    check(kept <= longint'(TILE >> cr), $sformatf("%s budget exceeded", tag));
    check(wr_bad == 0, $sformatf("%s %0d writes outside the header slots", tag, wr_bad));
    for (int cb = 0; cb < NCB; cb++) begin
      logic [31:0] exp;
      exp = ref_header(hulls[cb], thr, nzb_of[cb]);
      check(wr_cnt[cb] == 1, $sformatf("%s cb %0d written %0d times", tag, cb, wr_cnt[cb]));
      check(wr_data[cb] == exp, $sformatf("%s cb %0d header %h expected %h", tag, cb, wr_data[cb], exp));
    end
  endtask

  task automatic start_tile(bit m, int c);
    logic [31:0] rd;
    cr = 3'(c);
    ssram.delete();
    ahb_write(32'h0, {25'd0, 3'(c), 2'd0, m, 1'b1});
    do ahb_read(32'h4, rd); while (rd[18:16] != 3'd2);   // Waiting
  endtask

  task automatic wait_done();
    logic [31:0] rd;
    do begin
      ahb_read(32'h4, rd);
      n_polls++;
      repeat (20) @(negedge clk);
    end while (!rd[1]);
    check(done, "done output with STATUS.done");
    check(!rd[0], "not busy when done");
  endtask

  task automatic run_ipcrd(int c);
    make_stimulus();
    start_tile(0, c);
    fork
      run_channel_ipcrd(0);
      run_channel_ipcrd(1);
      run_channel_ipcrd(2);
    join
    wait_done();
    check_result($sformatf("IPCRD cr=%0d", c));
  endtask

  // RTRD: one channel, one code-block after the other, stopping on stall
  task automatic run_rtrd(int c);
    int thr_exp;
    longint unsigned kept;
    make_stimulus();
    start_tile(1, c);
    for (int cb = 0; cb < NCB; cb++) begin
      for (int k = 0; k < NBP; k++) begin
        send_point(0, pd[cb][k], pr[cb][k]);
        nsent[cb] = k + 1;
        repeat (400) @(negedge clk);        // Tier-1 codes the next bit-plane
        threshold = dut.threshold;
        if (stall[0]) begin
          hull_t h;
          longint unsigned d1[], r1[];
          d1 = new[k + 1]; r1 = new[k + 1];
          for (int j = 0; j <= k; j++) begin d1[j] = pd[cb][j]; r1[j] = pr[cb][j]; end
          h = ref_hull(k + 1, d1, r1);
          check(h.n > 0 && int'(h.bin[h.n-1]) < int'(threshold),
                $sformatf("RTRD stall on cb %0d without a point below the threshold", cb));
          break;
        end
      end
      send_done(0, cb);
      repeat (400) @(negedge clk);          // slope table renewed, threshold regenerated
      if (cb < NCB - 1) begin
        hulls = new[cb + 1];
        for (int j = 0; j <= cb; j++) begin
          longint unsigned d1[], r1[];
          d1 = new[nsent[j]]; r1 = new[nsent[j]];
          for (int k = 0; k < nsent[j]; k++) begin d1[k] = pd[j][k]; r1[k] = pr[j][k]; end
          hulls[j] = ref_hull(nsent[j], d1, r1);
        end
        thr_exp = ref_threshold(hulls, cb + 1, longint'(TILE >> c), kept);
        threshold = dut.threshold;
        check(int'(threshold) == thr_exp,
              $sformatf("RTRD intermediate threshold after cb %0d: %0d expected %0d", cb, threshold, thr_exp));
      end
    end
    wait_done();
    check_result($sformatf("RTRD cr=%0d", c));
  endtask

  initial begin
    hsel = 0; haddr = 0; htrans = 0; hwrite = 0; hsize = 3'b010; hwdata = 0; cr = 6;
    for (int c = 0; c < NP; c++) begin
      dis[c] = 0; dis_v[c] = 0; rate[c] = 0; rate_v[c] = 0;
      cb_done[c] = 0; cb_id[c] = 0; cb_nzb[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    run_ipcrd(6);
    run_ipcrd(4);
    run_ipcrd(7);
    run_ipcrd(0);
    run_rtrd(6);
    run_rtrd(5);
    run_ipcrd(5);   // back to IPCRD after a mode switch
    $display("mechanisms: dropped=%0d free=%0d merged=%0d stalls=%0d contention=%0d thr0=%0d thr>0=%0d",
             n_dropped, n_infinite, n_merged, n_stall, n_contend, n_thr_all, n_thr_part);
    check(n_dropped > 0, "no point without distortion gain was seen");
    check(n_infinite > 0, "no point with gain at no byte cost was seen");
    check(n_merged > 0, "no hull merge was seen");
    check(n_stall > 0, "no Tier-1 stall in RTRD mode");
    check(n_contend > 0, "channels never competed for the slope table");
    check(n_thr_all > 0 && n_thr_part > 0, "threshold never both 0 and above 0");
    check(n_polls > 0, "STATUS never polled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
