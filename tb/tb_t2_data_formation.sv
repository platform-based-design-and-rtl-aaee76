// tb_t2_data_formation: tests the header FIFO and the SSRAM write port.
//
// Pushes random header words with random code-block numbers, back to back and with
// gaps, and checks that every word comes out once,
// in order, as a one-cycle ram_en write at 0xC2028000 + 256*cb + 252, one clock after it
// entered an empty FIFO, and that empty is high only when nothing is left.
module tb_t2_data_formation;
  import t2_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, ram_en, empty;
  hdr_t in_hdr;
  logic [3:0] in_cb;
  logic [31:0] header_info, address;

  t2_data_formation #(.CB_W(4), .DEPTH(4)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_hdr, .in_cb, .header_info, .address, .ram_en, .empty
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] q_data [$];
  logic [31:0] q_addr [$];
  int n_full = 0, n_out = 0;

  always @(negedge clk) if (!rst) begin
    if (ram_en) begin
      n_out++;
      if (q_data.size() == 0) check(0, "write with nothing expected");
      else begin
        logic [31:0] d, a;
        d = q_data.pop_front(); a = q_addr.pop_front();
        check(header_info == d && address == a,
              $sformatf("write %h @%h expected %h @%h", header_info, address, d, a));
      end
    end
    if (in_valid && !in_ready) n_full++;
  end

  initial begin
    int t0;
    in_valid = 0; in_hdr = '0; in_cb = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(empty && !ram_en, "empty after reset");
    // latency into an empty FIFO
    in_valid = 1; in_hdr = 32'h1234_5678; in_cb = 4'd3;
    q_data.push_back(32'h1234_5678); q_addr.push_back(32'hC202_8000 + 3 * 256 + 252);
    t0 = cycle;
    @(negedge clk);
    in_valid = 0;
    check(!empty, "not empty after a push");
    @(negedge clk);
    check(ram_en && cycle - t0 == 2, "word written one clock after entering the FIFO");
    // random traffic; the SSRAM takes a word every clock, so the FIFO drains as fast
    // as it fills
    for (int i = 0; i < 400; i++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_hdr = $urandom;
      in_cb = 4'($urandom_range(0, 15));
      #1;
      if (in_valid && in_ready) begin
        q_data.push_back(in_hdr);
        q_addr.push_back(32'hC202_8000 + 32'(in_cb) * 256 + 252);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (8) @(negedge clk);
    check(q_data.size() == 0 && empty, $sformatf("%0d words left", q_data.size()));
    check(dut.count <= 4, "occupancy within depth");
    check(n_out > 200 && n_full == 0, $sformatf("writes=%0d refused=%0d", n_out, n_full));
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
