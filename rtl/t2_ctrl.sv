// t2_ctrl: top-level finite state machine of Tier-2.
//
//   Idle      nothing to do; start begins a tile.
//   Init      the slope table and the per-code-block records are cleared.
//   Waiting   the slope calculation channels take D and R from Tier-1 on their own
//             (their Subtraction / Division / Comparison steps run inside each channel);
//             every renewed slope table is counted here. In RTRD mode (mode = 1) each
//             renewal also triggers a new threshold, which the channels use to stall
//             Tier-1 on code-blocks that can no longer contribute.
//   Threshold the threshold generator scans the table (intermediate in RTRD mode, and
//             once more, final, when all NUM_CB code-blocks are done, in both modes).
//   Output    truncation and header output (R & D optimized + data formation).
//   Done      done is high until the next start.
// In IPCRD mode (mode = 0) the threshold is only generated once all code-blocks are
// done. thr_valid tells the channels that an intermediate threshold exists; it drops
// when the final threshold run begins.
// The states and the two flows follow the document's Tier-2 description; the separate
// Threshold state and moving the per-point states into the channels are this design's.
module t2_ctrl
#(
  parameter int unsigned NUM_CB = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic mode,          // 1: RTRD-Opt, 0: IPCRD-Opt
  // Init
  output logic clear,
  input  logic clear_busy,
  // Waiting
  input  logic renewed,
  // Threshold
  output logic thr_start,
  input  logic thr_done,
  output logic thr_valid,
  // Output
  output logic out_start,
  input  logic out_done,
  input  logic fifo_empty,
  // status
  output logic busy,
  output logic done,
  output logic [2:0] state_o
);
  typedef enum logic [2:0] {
    IDLE, INIT, WAITING, THRESHOLD, OUTPUT, DONE
  } state_t;
  state_t state;

  localparam int unsigned C_W = $clog2(NUM_CB + 1);
  logic [C_W-1:0] cb_cnt;
  logic           regen, final_thr, out_fin;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      cb_cnt    <= '0;
      regen     <= 1'b0;
      final_thr <= 1'b0;
      out_fin   <= 1'b0;
      thr_valid <= 1'b0;
    end else begin
      if (renewed && state != IDLE && state != INIT) begin
        cb_cnt <= cb_cnt + 1'b1;
        regen  <= mode;
      end
      unique case (state)
        IDLE: if (start) begin
          cb_cnt    <= '0;
          regen     <= 1'b0;
          thr_valid <= 1'b0;
          state     <= INIT;
        end
        INIT: if (!clear_busy) state <= WAITING;
        WAITING: begin
          if (cb_cnt == C_W'(NUM_CB)) begin
            final_thr <= 1'b1;
            thr_valid <= 1'b0;
            state     <= THRESHOLD;
          end else if (regen && !renewed) begin
            regen     <= 1'b0;
            final_thr <= 1'b0;
            state     <= THRESHOLD;
          end
        end
        THRESHOLD: if (thr_done) begin
          if (final_thr) begin
            out_fin <= 1'b0;
            state   <= OUTPUT;
          end else begin
            thr_valid <= 1'b1;
            state     <= WAITING;
          end
        end
        OUTPUT: begin
          if (out_done) out_fin <= 1'b1;
          if (out_fin && fifo_empty) state <= DONE;
        end
        DONE: if (start) begin
          cb_cnt    <= '0;
          regen     <= 1'b0;
          thr_valid <= 1'b0;
          state     <= INIT;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // one-cycle start strobes on state entry
  state_t state_d;
  always_ff @(posedge clk) begin
    if (rst) state_d <= IDLE;
    else     state_d <= state;
  end

  assign clear     = (state == INIT) && (state_d != INIT);
  assign thr_start = (state == THRESHOLD) && (state_d != THRESHOLD);
  assign out_start = (state == OUTPUT) && (state_d != OUTPUT);
  assign busy      = (state != IDLE) && (state != DONE);
  assign done      = (state == DONE);
  assign state_o   = state;
endmodule
