// tb_t2_ahb_slave: tests the AHB-Lite register wrapper with a small bus master model.
//
// Issues pipelined single transfers (address phase, then data phase overlapping the next
// address phase), writes CTRL and checks the mode / ratio outputs and the one-cycle
// start pulse, reads back CTRL, STATUS, THRESH and BYTES with random status inputs, and
// checks that IDLE transfers and transfers with HSEL low change nothing. The slave must
// answer every transfer with zero wait states and OKAY.
module tb_t2_ahb_slave;
  logic hclk = 0, hresetn = 0;
  always #5 hclk = ~hclk;

  logic hsel, hwrite, hready, hreadyout, hresp;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans;
  logic [2:0] hsize;
  logic start, mode, busy, done;
  logic [2:0] cr, state;
  logic [8:0] threshold;
  logic [23:0] bytes_kept;

  assign hready = hreadyout;

  t2_ahb_slave #(.TBL_W(24)) dut (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp, .start, .mode, .cr, .busy, .done, .state, .threshold,
    .bytes_kept
  );

  int checks = 0, failures = 0, n_start = 0;
  always @(posedge hclk) if (hresetn && start) n_start++;
  always @(posedge hclk) if (hresetn) begin
    checks++;
    if (!hreadyout || hresp) begin failures++; $display("FAIL: wait state or error"); end
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one transfer: address phase in this cycle, data phase in the next
  task automatic write(logic [31:0] a, logic [31:0] d, logic sel = 1, logic [1:0] tr = 2'b10);
    hsel = sel; haddr = a; htrans = tr; hwrite = 1; hsize = 3'b010;
    @(negedge hclk);
    hsel = 0; htrans = 2'b00; hwdata = d;
    @(negedge hclk);
  endtask

  task automatic read(logic [31:0] a, output logic [31:0] d);
    hsel = 1; haddr = a; htrans = 2'b10; hwrite = 0; hsize = 3'b010;
    @(negedge hclk);
    hsel = 0; htrans = 2'b00;
    #1 d = hrdata;
    @(negedge hclk);
  endtask

  initial begin
    logic [31:0] d;
    hsel = 0; haddr = 0; htrans = 0; hwrite = 0; hsize = 3'b010; hwdata = 0;
    busy = 0; done = 0; state = 0; threshold = 0; bytes_kept = 0;
    repeat (3) @(negedge hclk);
    hresetn = 1;
    @(negedge hclk);
    check(!start && !mode && cr == 3'd6, "reset values");
    for (int i = 0; i < 50; i++) begin
      logic m; logic [2:0] c; logic s;
      int n0;
      m = 1'($urandom); c = 3'($urandom); s = 1'($urandom);
      n0 = n_start;
      write(32'h0, {25'd0, c, 2'd0, m, s});
      check(mode == m && cr == c, "CTRL fields");
      check(start == s, "start follows the write's data phase");
      @(negedge hclk);
      check(n_start == n0 + int'(s), "start pulse count");
      check(!start, "start is a single pulse");
      read(32'h0, d);
      check(d == {25'd0, c, 2'd0, m, 1'b0}, $sformatf("CTRL read %h", d));
      busy = 1'($urandom); done = 1'($urandom); state = 3'($urandom);
      threshold = 9'($urandom); bytes_kept = 24'($urandom);
      read(32'h4, d);
      check(d == {13'd0, state, 14'd0, done, busy}, $sformatf("STATUS read %h", d));
      read(32'h8, d);
      check(d == {23'd0, threshold}, "THRESH read");
      read(32'hC, d);
      check(d == {8'd0, bytes_kept}, "BYTES read");
      // ignored transfers
      write(32'h0, 32'h0000_0073, 1'b1, 2'b00);
      write(32'h0, 32'h0000_0073, 1'b0, 2'b10);
      check(mode == m && cr == c, "IDLE or unselected transfer changed CTRL");
    end
    // back-to-back: write CTRL then read CTRL in the following address phase
    hsel = 1; haddr = 0; htrans = 2'b10; hwrite = 1;
    @(negedge hclk);
    hwdata = 32'h0000_0052; haddr = 32'h4; hwrite = 0;
    @(negedge hclk);
    hsel = 0; htrans = 0;
    check(mode == 1'b1 && cr == 3'd5, "pipelined write");
    @(negedge hclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
