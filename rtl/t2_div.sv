// t2_div: sequential unsigned divider used for the R-D slope (delta D / delta R).
//
// Restoring division, one quotient bit per clock: a start pulse loads the dividend
// and divisor, busy stays high for N_W cycles and done pulses for one cycle with the
// quotient valid from then until the next start. The divisor must be non-zero (the
// slope unit never starts a division by zero). Bit-serial division is a choice of this
// design; the rate-control method only asks for a slope per hull point.
module t2_div #(
  parameter int unsigned N_W = 32,  // dividend and quotient width
  parameter int unsigned M_W = 16   // divisor width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N_W-1:0] dividend,
  input  logic [M_W-1:0] divisor,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quotient
);
  logic [M_W:0]           rem_q;
  logic [N_W-1:0]         quo_q;
  logic [M_W-1:0]         dsr_q;
  logic [$clog2(N_W+1)-1:0] cnt_q;
  logic [M_W:0]           trial;
  logic [M_W:0]           shifted;

  always_comb begin
    shifted = {rem_q[M_W-1:0], quo_q[N_W-1]};
    trial   = shifted - {1'b0, dsr_q};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rem_q <= '0;
      quo_q <= '0;
      dsr_q <= '0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        rem_q <= '0;
        quo_q <= dividend;
        dsr_q <= divisor;
        cnt_q <= '0;
      end else if (busy) begin
        if (!trial[M_W]) begin
          rem_q <= trial;
          quo_q <= {quo_q[N_W-2:0], 1'b1};
        end else begin
          rem_q <= shifted;
          quo_q <= {quo_q[N_W-2:0], 1'b0};
        end
        if (cnt_q == ($bits(cnt_q))'(N_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  assign quotient = quo_q;
endmodule
