// t2_renew_table: "renew slope table" unit of Tier-2, with the slope table memory and
// the store of every code-block's hull points.
//
// The slope table holds, for each of the 256 slope bins, the number of bytes that all
// finished code-blocks would add to the code-stream if every segment with that slope were
// kept. When a slope calculation channel holds the finished hull of a code-block
// (hull_ready), this unit walks its points in order, one per clock: the segment bytes
// dR = R(i) - R(i-1) are added to table[bin(i)], and the point is copied into the point
// store at [code-block][i] for the later truncation. Then the point count and zero
// bit-plane count of that code-block are recorded, hull_ack is pulsed to the channel and
// renewed pulses once. Channels are served one at a time, lowest index first, so three
// channels finishing together are renewed back to back.
//
// clear (Init) zeroes the table and the per-code-block point and zero bit-plane counts, one table entry
// per clock (256 cycles); clear_busy is high meanwhile. All reads are combinational
// (the threshold generator reads the table, the truncation unit the point store).
// Accumulating bytes per slope value at each code-block end follows the rate-control
// method; the sizes of the table and store and the serial walk are this design's.
module t2_renew_table
  import t2_pkg::*;
#(
  parameter int unsigned NUM_CH  = 3,    // slope calculation channels
  parameter int unsigned MAX_PTS = 8,    // hull points per code-block
  parameter int unsigned NUM_CB  = 16,   // code-blocks per tile
  parameter int unsigned CB_W    = 4,
  parameter int unsigned TBL_W   = 24    // bytes per table entry
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  output logic                 clear_busy,
  // from the slope calculation channels
  input  logic                 hull_ready [NUM_CH],
  output logic                 hull_ack   [NUM_CH],
  input  pt_t                  hull_pt    [NUM_CH][MAX_PTS],
  input  logic [$clog2(MAX_PTS+1)-1:0] hull_n [NUM_CH],
  input  logic [CB_W-1:0]      hull_cb    [NUM_CH],
  input  logic [7:0]           hull_nzb   [NUM_CH],
  output logic                 renewed,
  // slope table read port
  input  logic [BIN_W-1:0]     tbl_raddr,
  output logic [TBL_W-1:0]     tbl_rdata,
  // point store read port
  input  logic [CB_W-1:0]      pt_rcb,
  input  logic [$clog2(MAX_PTS)-1:0] pt_ridx,
  output pt_t                  pt_rdata,
  output logic [$clog2(MAX_PTS+1)-1:0] npts_rdata,
  output logic [7:0]           nzb_rdata
);
  localparam int unsigned N_W  = $clog2(MAX_PTS + 1);
  localparam int unsigned I_W  = $clog2(MAX_PTS);
  localparam int unsigned CH_W = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;

  logic [TBL_W-1:0] tbl [NBINS];
  pt_t              pts [NUM_CB][MAX_PTS];
  logic [N_W-1:0]   npts [NUM_CB];
  logic [7:0]       nzbs [NUM_CB];

  typedef enum logic [1:0] {R_IDLE, R_CLEAR, R_WALK, R_ACK} rstate_t;
  rstate_t          state;
  logic [BIN_W-1:0] clr_idx;
  logic [CH_W-1:0]  ch;
  logic [N_W-1:0]   idx;
  logic [R_W-1:0]   prev_r;

  // current point of the walk
  pt_t              cur;
  logic [R_W:0]     seg;
  logic [TBL_W-1:0] add;
  logic             any_ready;
  logic [CH_W-1:0]  pick;

  always_comb begin
    cur = hull_pt[ch][idx[I_W-1:0]];
    seg = {1'b0, cur.rate} - {1'b0, prev_r};
    add = seg[R_W] ? '0 : TBL_W'(seg[R_W-1:0]);
    any_ready = 1'b0;
    pick = '0;
    for (int c = NUM_CH - 1; c >= 0; c--) begin
      if (hull_ready[c]) begin
        any_ready = 1'b1;
        pick = CH_W'(c);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= R_IDLE;
      clr_idx <= '0;
      ch      <= '0;
      idx     <= '0;
      prev_r  <= '0;
      renewed <= 1'b0;
    end else begin
      renewed <= 1'b0;
      unique case (state)
        R_IDLE: begin
          if (clear) begin
            clr_idx <= '0;
            state   <= R_CLEAR;
          end else if (any_ready) begin
            ch     <= pick;
            idx    <= '0;
            prev_r <= '0;
            state  <= R_WALK;
          end
        end
        R_CLEAR: begin
          tbl[clr_idx] <= '0;
          if (clr_idx < BIN_W'(NUM_CB)) begin
            npts[clr_idx[CB_W-1:0]] <= '0;
            nzbs[clr_idx[CB_W-1:0]] <= '0;
          end
          clr_idx <= clr_idx + 1'b1;
          if (clr_idx == BIN_W'(NBINS - 1)) state <= R_IDLE;
        end
        R_WALK: begin
          if (idx == hull_n[ch]) begin
            npts[hull_cb[ch]] <= hull_n[ch];
            nzbs[hull_cb[ch]] <= hull_nzb[ch];
            state <= R_ACK;
          end else begin
            tbl[cur.bin] <= tbl[cur.bin] + add;
            pts[hull_cb[ch]][idx[I_W-1:0]] <= cur;
            prev_r <= cur.rate;
            idx    <= idx + 1'b1;
          end
        end
        R_ACK: begin
          renewed <= 1'b1;
          state   <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int c = 0; c < NUM_CH; c++)
      hull_ack[c] = (state == R_ACK) && (ch == CH_W'(c));
  end

  assign clear_busy = (state == R_CLEAR) || clear;
  assign tbl_rdata  = tbl[tbl_raddr];
  assign pt_rdata   = pts[pt_rcb][pt_ridx];
  assign npts_rdata = npts[pt_rcb];
  assign nzb_rdata  = nzbs[pt_rcb];
endmodule
