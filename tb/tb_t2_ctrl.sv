// tb_t2_ctrl: tests the Tier-2 state machine with models of the units it sequences.
//
// For both modes it runs a tile: the clear model stays busy for 256 cycles, 16
// code-blocks are renewed at random intervals (sometimes during a threshold scan), the
// threshold model answers after 20 cycles, the output model after 30 and the FIFO
// drains 3 cycles later. Checks the state order Idle-Init-Waiting-...-Output-Done, one
// clear per tile, one threshold run per tile in IPCRD mode and one per code-block in
// RTRD mode, thr_valid only in RTRD mode after the first threshold, done only after the
// output unit finished and the FIFO is empty, and a restart from Done.
module tb_t2_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, mode, clear, clear_busy, renewed, thr_start, thr_done, thr_valid;
  logic out_start, out_done, fifo_empty, busy, done;
  logic [2:0] state;

  t2_ctrl #(.NUM_CB(16)) dut (
    .clk, .rst, .start, .mode, .clear, .clear_busy, .renewed, .thr_start, .thr_done,
    .thr_valid, .out_start, .out_done, .fifo_empty, .busy, .done, .state_o(state)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // unit models
  int clr_cnt = 0, thr_cnt = 0, out_cnt = 0, n_clear = 0, n_thr = 0, n_out = 0;
  int n_renew_in_thr = 0;
  always @(posedge clk) begin
    if (rst) begin
      clr_cnt <= 0; thr_cnt <= 0; out_cnt <= 0;
    end else begin
      if (clear) begin clr_cnt <= 256; n_clear++; end
      else if (clr_cnt > 0) clr_cnt <= clr_cnt - 1;
      if (thr_start) begin thr_cnt <= 20; n_thr++; end
      else if (thr_cnt > 0) thr_cnt <= thr_cnt - 1;
      if (out_start) begin out_cnt <= 33; n_out++; end
      else if (out_cnt > 0) out_cnt <= out_cnt - 1;
      if (renewed && state == 3'd3) n_renew_in_thr++;
    end
  end
  assign clear_busy = clear || (clr_cnt > 0);
  assign thr_done   = (thr_cnt == 1);
  assign out_done   = (out_cnt == 4);
  assign fifo_empty = (out_cnt <= 1);

  // state trace check
  logic [2:0] prev_state;
  always @(posedge clk) begin
    if (!rst && state != prev_state) begin
      logic ok;
      unique case (prev_state)
        3'd0: ok = (state == 3'd1);
        3'd1: ok = (state == 3'd2);
        3'd2: ok = (state == 3'd3);
        3'd3: ok = (state == 3'd2 || state == 3'd4);
        3'd4: ok = (state == 3'd5);
        3'd5: ok = (state == 3'd1);
        default: ok = 0;
      endcase
      check(ok, $sformatf("state %0d -> %0d", prev_state, state));
      if (state == 3'd5) check(out_cnt == 0 || out_cnt == 1, "done before the output drained");
    end
    prev_state <= state;
    if (!rst && thr_valid) check(mode, "thr_valid in IPCRD mode");
  end

  task automatic tile(bit m);
    n_clear = 0; n_thr = 0; n_out = 0;
    mode = m;
    start = 1;
    @(negedge clk);
    start = 0;
    while (state != 3'd2) @(negedge clk);
    check(n_clear == 1, "one clear per tile");
    for (int cb = 0; cb < 16; cb++) begin
      repeat ($urandom_range(1, 60)) @(negedge clk);
      renewed = 1;
      @(negedge clk);
      renewed = 0;
      if (m && cb == 1) begin
        while (state != 3'd2) @(negedge clk);
        check(thr_valid, "thr_valid after the first RTRD threshold");
      end
    end
    while (!done) @(negedge clk);
    check(n_out == 1, "one output run");
    check(busy == 0, "not busy when done");
    if (m) check(n_thr >= 2 && n_thr <= 16, $sformatf("RTRD: %0d threshold runs", n_thr));
    else   check(n_thr == 1, $sformatf("IPCRD: %0d threshold runs", n_thr));
    repeat (5) @(negedge clk);
    check(done, "done holds");
  endtask

  initial begin
    start = 0; mode = 0; renewed = 0; prev_state = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    check(state == 3'd0 && !busy && !done, "idle after reset");
    tile(0);
    tile(1);
    tile(0);
    tile(1);
    check(n_renew_in_thr > 0, "no renewal arrived during a threshold scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
