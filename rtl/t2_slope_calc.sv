// t2_slope_calc: slope calculation unit for one code-block channel of Tier-2.
//
// After each coded bit-plane the entropy coder reports the accumulated distortion
// reduction D and the accumulated byte count R of the code-block (each with its own
// valid strobe; they may arrive in either order). The unit keeps the convex hull of the
// code-block's (R, D) points on a small stack and, for every new point:
//   Subtraction: dD and dR against the last point on the hull (the origin if none);
//   Division:    slope = dD / dR with a bit-serial divider (infinite if dR <= 0);
//   Comparison:  convex hull cancellation - a point with dD <= 0 is dropped; if the new
//                slope is >= the slope of the hull point below it, that point is popped
//                and the slope is recomputed (Subtraction again), so that the slopes on
//                the stack always decrease strictly; otherwise the point is pushed.
// When cb_done arrives (with the code-block number and its zero bit-plane count) the
// hull is offered to the slope-table unit (hull_ready) until hull_ack, then cleared.
// In RTRD mode, once a threshold exists, a pushed point whose slope bin is below the
// threshold raises stall: Tier-1 may stop coding this code-block, as further bit-planes
// cannot make it into the code-stream. The stall stays up until the hull is taken.
//
// Timing: a point takes 1 cycle to latch, 1 for Subtraction, N+1 for Division (N = 32)
// and 1 for Comparison, plus Subtraction/Division/Comparison again per cancelled point.
// ready is high while no point is pending and no hull is held; a new point may be
// presented while ready (one more may be queued while the previous one is processed).
// The steps and the three cancellation rules follow the rate-control method; the
// stack, the bin threshold compare and the handshake are choices of this design.
module t2_slope_calc
  import t2_pkg::*;
#(
  parameter int unsigned MAX_PTS = 8,   // bit-planes (hull points) per code-block
  parameter int unsigned CB_W    = 4    // code-block number width
) (
  input  logic                 clk,
  input  logic                 rst,
  // from Tier-1
  input  logic [D_W-1:0]       dis,
  input  logic                 dis_valid,
  input  logic [R_W-1:0]       rate,
  input  logic                 rate_valid,
  input  logic                 cb_done,
  input  logic [CB_W-1:0]      cb_id,
  input  logic [7:0]           cb_nzb,
  output logic                 ready,
  output logic                 stall,
  // control
  input  logic                 rtrd_mode,
  input  logic                 thr_valid,
  input  logic [BIN_W:0]       thr,
  // hull hand-over to the slope table
  output logic                 hull_ready,
  input  logic                 hull_ack,
  output pt_t                  hull_pt [MAX_PTS],
  output logic [$clog2(MAX_PTS+1)-1:0] hull_n,
  output logic [CB_W-1:0]      hull_cb,
  output logic [7:0]           hull_nzb
);
  localparam int unsigned SP_W = $clog2(MAX_PTS + 1);
  localparam int unsigned I_W  = (MAX_PTS > 1) ? $clog2(MAX_PTS) : 1;

  typedef enum logic [2:0] {S_WAIT, S_SUB, S_DIV, S_CMP, S_HOLD} state_t;
  state_t state;

  logic [D_W-1:0] st_d [MAX_PTS];
  logic [R_W-1:0] st_r [MAX_PTS];
  logic [S_W-1:0] st_s [MAX_PTS];
  logic [NBP_W-1:0] st_nbp [MAX_PTS];
  logic [SP_W-1:0] sp;
  logic [SP_W-1:0] top;     // sp - 1
  logic [I_W-1:0]  top_i, sp_i;

  logic           d_have, r_have, done_pend;
  logic [D_W-1:0] d_in, cur_d;
  logic [R_W-1:0] r_in, cur_r;
  logic [NBP_W-1:0] nbp_cnt, cur_nbp;
  logic [S_W-1:0] slope;

  // previous hull point
  logic [D_W-1:0] prev_d;
  logic [R_W-1:0] prev_r;
  logic [S_W-1:0] prev_s;
  logic [D_W:0]   dd;
  logic [R_W:0]   dr;
  logic           div_start, div_done;
  logic [S_W-1:0] div_q;

  always_comb begin
    prev_d = '0;
    prev_r = '0;
    prev_s = SLOPE_INF;
    top   = sp - 1'b1;
    top_i = top[I_W-1:0];
    sp_i  = sp[I_W-1:0];
    if (sp != 0) begin
      prev_d = st_d[top_i];
      prev_r = st_r[top_i];
      prev_s = st_s[top_i];
    end
    dd = {1'b0, cur_d} - {1'b0, prev_d};
    dr = {1'b0, cur_r} - {1'b0, prev_r};
  end

  assign div_start = (state == S_SUB) && !dd[D_W] && (dd[D_W-1:0] != 0)
                     && !dr[R_W] && (dr[R_W-1:0] != 0);

  t2_div #(.N_W(S_W), .M_W(R_W)) u_div (
    .clk, .rst,
    .start    (div_start),
    .dividend (dd[D_W-1:0]),
    .divisor  (dr[R_W-1:0]),
    .busy     (),
    .done     (div_done),
    .quotient (div_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_WAIT;
      sp        <= '0;
      d_have    <= 1'b0;
      r_have    <= 1'b0;
      done_pend <= 1'b0;
      d_in      <= '0;
      r_in      <= '0;
      cur_d     <= '0;
      cur_r     <= '0;
      cur_nbp   <= '0;
      nbp_cnt   <= '0;
      slope     <= '0;
      stall     <= 1'b0;
      hull_cb   <= '0;
      hull_nzb  <= '0;
    end else begin
      if (dis_valid) begin d_in <= dis; d_have <= 1'b1; end
      if (rate_valid) begin r_in <= rate; r_have <= 1'b1; end
      if (cb_done) begin
        done_pend <= 1'b1;
        hull_cb   <= cb_id;
        hull_nzb  <= cb_nzb;
      end
      unique case (state)
        S_WAIT: begin
          if (d_have && r_have) begin
            d_have  <= dis_valid;
            r_have  <= rate_valid;
            cur_d   <= d_in;
            cur_r   <= r_in;
            cur_nbp <= nbp_cnt + 1'b1;
            nbp_cnt <= nbp_cnt + 1'b1;
            state   <= S_SUB;
          end else if (done_pend) begin
            state <= S_HOLD;
          end
        end
        S_SUB: begin
          if (dd[D_W] || dd[D_W-1:0] == 0) begin
            state <= S_WAIT;                 // no distortion gain: drop the point
          end else if (dr[R_W] || dr[R_W-1:0] == 0) begin
            slope <= SLOPE_INF;              // gain at no byte cost
            state <= S_CMP;
          end else begin
            state <= S_DIV;
          end
        end
        S_DIV: begin
          if (div_done) begin
            slope <= div_q;
            state <= S_CMP;
          end
        end
        S_CMP: begin
          if (sp != 0 && slope >= prev_s) begin
            sp    <= sp - 1'b1;              // merge with the point below
            state <= S_SUB;
          end else begin
            if (sp < SP_W'(MAX_PTS)) begin
              st_d[sp_i]   <= cur_d;
              st_r[sp_i]   <= cur_r;
              st_s[sp_i]   <= slope;
              st_nbp[sp_i] <= cur_nbp;
              sp         <= sp + 1'b1;
            end
            if (rtrd_mode && thr_valid && ({1'b0, slope_bin(slope)} < thr))
              stall <= 1'b1;
            state <= S_WAIT;
          end
        end
        S_HOLD: begin
          if (hull_ack) begin
            sp        <= '0;
            nbp_cnt   <= '0;
            stall     <= 1'b0;
            done_pend <= cb_done;
            state     <= S_WAIT;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  assign ready      = !d_have && !r_have && !done_pend;
  assign hull_ready = (state == S_HOLD);
  assign hull_n     = sp;
  always_comb begin
    for (int i = 0; i < MAX_PTS; i++) begin
      hull_pt[i].rate = st_r[i];
      hull_pt[i].bin  = slope_bin(st_s[i]);
      hull_pt[i].nbp  = st_nbp[i];
    end
  end

  // Tier-1 may not overwrite a D or R that has not been taken yet, nor end a
  // code-block while the previous hull is still waiting for the slope table.
  a_no_d_overrun: assert property (@(posedge clk) disable iff (rst)
    (dis_valid && d_have) |-> (state == S_WAIT && r_have));
  a_no_r_overrun: assert property (@(posedge clk) disable iff (rst)
    (rate_valid && r_have) |-> (state == S_WAIT && d_have));
  a_no_done_overrun: assert property (@(posedge clk) disable iff (rst)
    cb_done |-> (!done_pend || (state == S_HOLD && hull_ack)));
endmodule
