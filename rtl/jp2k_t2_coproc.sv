// jp2k_t2_coproc: JPEG2000 coprocessor rate-control part as seen from the platform -
// the Tier-2 rate control behind an AHB-Lite slave, writing its results to the
// logic module's ZBT SSRAM.
//
// The host CPU sets the mode (RTRD-Opt or IPCRD-Opt) and the compression ratio and
// starts a tile through the AHB-Lite registers (t2_ahb_slave), then polls STATUS for
// done. Meanwhile the Tier-1 entropy coder - not part of this RTL, its channels are
// brought out as ports - reports distortion and rate per bit-plane of each code-block on
// up to NUM_PAIRS channels and can be stalled in RTRD mode. At the end of a tile one
// header word per code-block (CDL, NCP, NZB) is written to the SSRAM at
// 0xC2028000 + 256*cb + 252, from where the CPU builds the packets.
// Everything runs on hclk; hresetn is the AHB active-low reset and resets Tier-2
// synchronously. See t2_tier2 for the channel protocol and timing.
// The split into CPU, AHB-Lite bus, coprocessor and SSRAM follows the document's
// platform; the port set of this top is this design's.
module jp2k_t2_coproc
  import t2_pkg::*;
#(
  parameter int unsigned NUM_PAIRS  = 3,
  parameter int unsigned NUM_CB     = 16,
  parameter int unsigned MAX_PTS    = 8,
  parameter int unsigned TILE_BYTES = 128 * 128,
  parameter int unsigned CB_W       = $clog2(NUM_CB)
) (
  input  logic             hclk,
  input  logic             hresetn,
  // AHB-Lite slave port
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
  // Tier-1 channels
  input  logic [D_W-1:0]   dis_i        [NUM_PAIRS],
  input  logic             dis_valid_i  [NUM_PAIRS],
  input  logic [R_W-1:0]   rate_i       [NUM_PAIRS],
  input  logic             rate_valid_i [NUM_PAIRS],
  input  logic             cb_done_i    [NUM_PAIRS],
  input  logic [CB_W-1:0]  cb_id_i      [NUM_PAIRS],
  input  logic [7:0]       cb_nzb_i     [NUM_PAIRS],
  output logic             ready_o      [NUM_PAIRS],
  output logic             stall_o      [NUM_PAIRS],
  // ZBT SSRAM write port
  output logic [31:0]      header_info,
  output logic [31:0]      address,
  output logic             ram_en,
  // interrupt-style status
  output logic             done
);
  localparam int unsigned TBL_W = 24;

  logic             rst, start, mode, busy;
  logic [2:0]       cr, state;
  logic [BIN_W:0]   threshold;
  logic [TBL_W-1:0] bytes_kept;

  assign rst = !hresetn;

  t2_ahb_slave #(.TBL_W(TBL_W)) u_ahb (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp,
    .start, .mode, .cr, .busy, .done, .state, .threshold, .bytes_kept
  );

  t2_tier2 #(
    .NUM_PAIRS(NUM_PAIRS), .NUM_CB(NUM_CB), .MAX_PTS(MAX_PTS),
    .TILE_BYTES(TILE_BYTES), .TBL_W(TBL_W), .CB_W(CB_W)
  ) u_tier2 (
    .clk (hclk), .rst, .mode, .cr, .start, .busy, .done,
    .dis_i, .dis_valid_i, .rate_i, .rate_valid_i,
    .cb_done_i, .cb_id_i, .cb_nzb_i, .ready_o, .stall_o,
    .header_info, .address, .ram_en,
    .threshold, .bytes_kept, .state
  );
endmodule
