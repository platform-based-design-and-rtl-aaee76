// t2_tier2: EBCOT Tier-2 rate control of the JPEG2000 coprocessor.
//
// Tier-1 (bit-plane coder plus arithmetic coder) reports, at the end of every coded
// bit-plane of a code-block, the accumulated distortion reduction and the accumulated
// byte count of that code-block. From these Tier-2 picks, for every code-block, how many
// bit-planes go into the code-stream so that the whole tile fits in a byte budget set by
// the compression ratio while keeping the steepest rate-distortion segments:
//   slope calculation (NUM_PAIRS channels) -> renew slope table -> threshold generator
//   -> R & D optimized (truncation, header words) -> data formation (SSRAM writes),
// sequenced by t2_ctrl. Two modes share the hardware:
//   mode = 0, IPCRD-Opt: for the QCB-based wavelet transform, which delivers three
//     code-blocks at once (three channels); the threshold is found once, when all
//     NUM_CB code-blocks are done, from the table of all their slopes.
//   mode = 1, RTRD-Opt: for the conventional transform, which delivers code-blocks one
//     by one (channel 0 only), most important first; a threshold is found after every
//     code-block, and a channel raises stall_o as soon as a new bit-plane falls below
//     it, so Tier-1 can stop coding that code-block early.
// Interface: per channel c, dis_i/dis_valid_i and rate_i/rate_valid_i per bit-plane,
// then cb_done_i with the code-block number cb_id_i and its zero bit-plane count
// cb_nzb_i; ready_o says the channel can take a point. The header words appear on
// header_info / address with ram_en, one per code-block, during the Output state.
// start begins a tile (mode and cr are sampled throughout; keep them stable); done stays
// high once all headers are written. Synchronous, active-high reset.
// Port names and widths follow the Tier-2 pin list (Mode, CR 3 bit, Distortion 32 bit,
// Rate 16 bit, Header_Info, Address, RAM_EN); start, done, the code-block end signals,
// ready and stall are additions of this design, as the pin list gives no control or
// Tier-1 flow signals.
module t2_tier2
  import t2_pkg::*;
#(
  parameter int unsigned NUM_PAIRS  = 3,          // slope calculation channels
  parameter int unsigned NUM_CB     = 16,         // code-blocks per tile (128x128, 32x32)
  parameter int unsigned MAX_PTS    = 8,          // bit-planes per code-block
  parameter int unsigned TILE_BYTES = 128 * 128,  // tile size in bytes (8 bit/pixel)
  parameter int unsigned TBL_W      = 24,
  parameter int unsigned CB_W       = $clog2(NUM_CB)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 mode,
  input  logic [2:0]           cr,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // Tier-1 channels
  input  logic [D_W-1:0]       dis_i        [NUM_PAIRS],
  input  logic                 dis_valid_i  [NUM_PAIRS],
  input  logic [R_W-1:0]       rate_i       [NUM_PAIRS],
  input  logic                 rate_valid_i [NUM_PAIRS],
  input  logic                 cb_done_i    [NUM_PAIRS],
  input  logic [CB_W-1:0]      cb_id_i      [NUM_PAIRS],
  input  logic [7:0]           cb_nzb_i     [NUM_PAIRS],
  output logic                 ready_o      [NUM_PAIRS],
  output logic                 stall_o      [NUM_PAIRS],
  // SSRAM write port
  output logic [31:0]          header_info,
  output logic [31:0]          address,
  output logic                 ram_en,
  // status
  output logic [BIN_W:0]       threshold,
  output logic [TBL_W-1:0]     bytes_kept,
  output logic [2:0]           state
);
  localparam int unsigned N_W = $clog2(MAX_PTS + 1);
  localparam int unsigned I_W = $clog2(MAX_PTS);

  logic clear, clear_busy, renewed;
  logic thr_start, thr_done, thr_valid;
  logic out_start, out_done, fifo_empty;

  logic             hull_ready [NUM_PAIRS];
  logic             hull_ack   [NUM_PAIRS];
  pt_t              hull_pt    [NUM_PAIRS][MAX_PTS];
  logic [N_W-1:0]   hull_n     [NUM_PAIRS];
  logic [CB_W-1:0]  hull_cb    [NUM_PAIRS];
  logic [7:0]       hull_nzb   [NUM_PAIRS];

  logic [BIN_W-1:0] tbl_raddr;
  logic [TBL_W-1:0] tbl_rdata;
  logic [CB_W-1:0]  pt_rcb;
  logic [I_W-1:0]   pt_ridx;
  pt_t              pt_rdata;
  logic [N_W-1:0]   npts_rdata;
  logic [7:0]       nzb_rdata;

  logic             hdr_valid, hdr_ready;
  hdr_t             hdr;
  logic [CB_W-1:0]  hdr_cb;

  t2_ctrl #(.NUM_CB(NUM_CB)) u_ctrl (
    .clk, .rst, .start, .mode,
    .clear, .clear_busy, .renewed,
    .thr_start, .thr_done, .thr_valid,
    .out_start, .out_done, .fifo_empty,
    .busy, .done, .state_o(state)
  );

  for (genvar c = 0; c < NUM_PAIRS; c++) begin : g_ch
    t2_slope_calc #(.MAX_PTS(MAX_PTS), .CB_W(CB_W)) u_slope (
      .clk, .rst,
      .dis        (dis_i[c]),
      .dis_valid  (dis_valid_i[c]),
      .rate       (rate_i[c]),
      .rate_valid (rate_valid_i[c]),
      .cb_done    (cb_done_i[c]),
      .cb_id      (cb_id_i[c]),
      .cb_nzb     (cb_nzb_i[c]),
      .ready      (ready_o[c]),
      .stall      (stall_o[c]),
      .rtrd_mode  (mode),
      .thr_valid  (thr_valid),
      .thr        (threshold),
      .hull_ready (hull_ready[c]),
      .hull_ack   (hull_ack[c]),
      .hull_pt    (hull_pt[c]),
      .hull_n     (hull_n[c]),
      .hull_cb    (hull_cb[c]),
      .hull_nzb   (hull_nzb[c])
    );
  end

  t2_renew_table #(
    .NUM_CH(NUM_PAIRS), .MAX_PTS(MAX_PTS), .NUM_CB(NUM_CB), .CB_W(CB_W), .TBL_W(TBL_W)
  ) u_table (
    .clk, .rst, .clear, .clear_busy,
    .hull_ready, .hull_ack, .hull_pt, .hull_n, .hull_cb, .hull_nzb,
    .renewed,
    .tbl_raddr, .tbl_rdata,
    .pt_rcb, .pt_ridx, .pt_rdata, .npts_rdata, .nzb_rdata
  );

  t2_threshold_gen #(.TBL_W(TBL_W), .TILE_BYTES(TILE_BYTES)) u_thr (
    .clk, .rst,
    .start (thr_start),
    .cr,
    .tbl_raddr, .tbl_rdata,
    .busy  (),
    .done  (thr_done),
    .thr   (threshold),
    .bytes (bytes_kept)
  );

  t2_rd_opt #(.MAX_PTS(MAX_PTS), .NUM_CB(NUM_CB), .CB_W(CB_W)) u_rd (
    .clk, .rst,
    .start (out_start),
    .thr   (threshold),
    .pt_rcb, .pt_ridx, .pt_rdata, .npts_rdata, .nzb_rdata,
    .hdr_valid, .hdr_ready, .hdr, .hdr_cb,
    .busy  (),
    .done  (out_done)
  );

  t2_data_formation #(.CB_W(CB_W)) u_df (
    .clk, .rst,
    .in_valid (hdr_valid),
    .in_ready (hdr_ready),
    .in_hdr   (hdr),
    .in_cb    (hdr_cb),
    .header_info, .address, .ram_en,
    .empty    (fifo_empty)
  );
endmodule
