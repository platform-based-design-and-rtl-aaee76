// t2_rd_opt: "R & D optimized" unit of Tier-2 - truncates every code-block at the
// threshold and builds its header word.
//
// For each code-block in number order it walks the stored hull points, one per clock.
// The hull slopes decrease along a code-block, so the truncation point is the last
// point whose slope bin is >= thr. Its accumulated byte count becomes the code-block
// data length (CDL), its bit-plane count n gives the number of coding passes kept
// (NCP = 3n - 2, the first coded bit-plane having only a cleanup pass), and the zero
// bit-plane count (NZB) is copied. A code-block with no point above the threshold gets
// CDL = NCP = 0. The header word is handed to the data formation FIFO with a
// valid/ready handshake; the walk waits while the FIFO is full.
//
// Timing: start pulse; per code-block (points + 2) cycles plus FIFO back-pressure;
// done pulses after the last header was accepted. Truncating at the threshold and
// updating CDL/NCP/NZB follow the document's method; the walk is this design's.
module t2_rd_opt
  import t2_pkg::*;
#(
  parameter int unsigned MAX_PTS = 8,
  parameter int unsigned NUM_CB  = 16,
  parameter int unsigned CB_W    = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [BIN_W:0]       thr,
  // point store read port
  output logic [CB_W-1:0]      pt_rcb,
  output logic [$clog2(MAX_PTS)-1:0] pt_ridx,
  input  pt_t                  pt_rdata,
  input  logic [$clog2(MAX_PTS+1)-1:0] npts_rdata,
  input  logic [7:0]           nzb_rdata,
  // header words to the data formation FIFO
  output logic                 hdr_valid,
  input  logic                 hdr_ready,
  output hdr_t                 hdr,
  output logic [CB_W-1:0]      hdr_cb,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned N_W = $clog2(MAX_PTS + 1);
  localparam int unsigned I_W = $clog2(MAX_PTS);

  typedef enum logic [1:0] {O_IDLE, O_WALK, O_PUSH} ostate_t;
  ostate_t        state;
  logic [CB_W:0]  cb;
  logic [N_W-1:0] idx;
  logic [15:0]    cdl;
  logic [7:0]     ncp;

  assign pt_rcb  = cb[CB_W-1:0];
  assign pt_ridx = idx[I_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= O_IDLE;
      cb    <= '0;
      idx   <= '0;
      cdl   <= '0;
      ncp   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        O_IDLE: if (start) begin
          cb    <= '0;
          idx   <= '0;
          cdl   <= '0;
          ncp   <= '0;
          state <= O_WALK;
        end
        O_WALK: begin
          if (idx == npts_rdata) begin
            state <= O_PUSH;
          end else begin
            if ({1'b0, pt_rdata.bin} >= thr) begin
              cdl <= pt_rdata.rate;
              ncp <= passes(pt_rdata.nbp);
            end
            idx <= idx + 1'b1;
          end
        end
        O_PUSH: if (hdr_ready) begin
          idx <= '0;
          cdl <= '0;
          ncp <= '0;
          if (cb == (CB_W+1)'(NUM_CB - 1)) begin
            done  <= 1'b1;
            state <= O_IDLE;
          end else begin
            cb    <= cb + 1'b1;
            state <= O_WALK;
          end
        end
        default: state <= O_IDLE;
      endcase
    end
  end

  assign hdr_valid = (state == O_PUSH);
  assign hdr       = '{cdl: cdl, ncp: ncp, nzb: nzb_rdata};
  assign hdr_cb    = cb[CB_W-1:0];
  assign busy      = (state != O_IDLE);
endmodule
