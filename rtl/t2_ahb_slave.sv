// t2_ahb_slave: AHB-Lite slave wrapper through which the host CPU drives the coprocessor.
//
// Zero-wait-state slave with an OKAY response to every transfer. The address phase
// (HSEL, HTRANS NONSEQ/SEQ, HREADY high) is registered; writes take HWDATA in the
// following data phase, reads return the register addressed in the address phase.
// Register map (word offsets, 32-bit accesses):
//   0x00 CTRL    [0] start (write 1: one-clock start pulse, reads 0), [1] mode
//                (1 RTRD-Opt, 0 IPCRD-Opt), [6:4] cr (compression ratio 2^cr)
//   0x04 STATUS  [0] busy, [1] done, [18:16] Tier-2 state, read only
//   0x08 THRESH  [8:0] final slope-bin threshold, read only
//   0x0C BYTES   bytes admitted by the threshold, read only
// The compressed data and the header words themselves go to the SSRAM, where the CPU
// reads them through the memory map. The AHB-Lite slave role of the coprocessor
// follows the document; the register map is this design's.
module t2_ahb_slave #(
  parameter int unsigned TBL_W = 24
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  logic [31:0]      haddr,
  input  logic [1:0]       htrans,
  input  logic             hwrite,
  input  logic [2:0]       hsize,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic [31:0]      hrdata,
  output logic             hreadyout,
  output logic             hresp,
  // coprocessor side
  output logic             start,
  output logic             mode,
  output logic [2:0]       cr,
  input  logic             busy,
  input  logic             done,
  input  logic [2:0]       state,
  input  logic [8:0]       threshold,
  input  logic [TBL_W-1:0] bytes_kept
);
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;

  logic       ap_write, ap_read;
  logic [3:0] ap_addr;
  logic       valid_tr;

  assign valid_tr = hsel && hready && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      ap_write <= 1'b0;
      ap_read  <= 1'b0;
      ap_addr  <= '0;
      start    <= 1'b0;
      mode     <= 1'b0;
      cr       <= 3'd6;
      hrdata   <= '0;
    end else begin
      start    <= 1'b0;
      ap_write <= valid_tr && hwrite;
      ap_read  <= valid_tr && !hwrite;
      if (valid_tr) ap_addr <= haddr[3:0];
      if (ap_write && ap_addr[3:2] == 2'd0) begin
        start <= hwdata[0];
        mode  <= hwdata[1];
        cr    <= hwdata[6:4];
      end
      if (valid_tr && !hwrite) begin
        unique case (haddr[3:2])
          2'd0: hrdata <= {25'd0, cr, 2'd0, mode, 1'b0};
          2'd1: hrdata <= {13'd0, state, 14'd0, done, busy};
          2'd2: hrdata <= {23'd0, threshold};
          default: hrdata <= 32'(bytes_kept);
        endcase
      end
    end
  end

  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  // Only word transfers are supported.
  a_word_only: assert property (@(posedge hclk) disable iff (!hresetn)
    valid_tr |-> hsize == 3'b010);
  // A read is answered in the data phase that follows its address phase.
  a_read_phase: assert property (@(posedge hclk) disable iff (!hresetn)
    valid_tr |=> (ap_read == $past(!hwrite)));
endmodule
