// t2_threshold_gen: threshold generator of Tier-2.
//
// Finds the truncation threshold from the slope table in one downward pass, with no
// iterative search: starting at the steepest bin it adds up the bytes of each bin and
// stops at the first bin whose bytes would make the total exceed the byte budget. The
// threshold is then that bin + 1: every segment whose slope bin is >= the threshold is
// kept, and those segments together use at most budget bytes. If the whole table fits,
// the threshold is 0 (keep everything); if even the steepest bin does not fit it is 256
// (keep nothing). bytes reports the total that the threshold admits.
//
// The byte budget is the tile size in bytes divided by the compression ratio, a power of
// two 2^cr: budget = TILE_BYTES >> cr (128x128 8-bit tile at ratio 64 gives 256 bytes).
// Timing: start pulse, then one table entry per clock; done pulses after at most 256
// cycles and thr / bytes hold until the next start. Reading the table in slope order
// until the budget is used follows the rate-control method; the power-of-two ratio
// coding of the 3-bit cr input is this design's choice.
module t2_threshold_gen
  import t2_pkg::*;
#(
  parameter int unsigned TBL_W      = 24,
  parameter int unsigned TILE_BYTES = 128 * 128   // 128x128 tile, 8 bits per pixel
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [2:0]       cr,          // compression ratio = 2^cr
  output logic [BIN_W-1:0] tbl_raddr,
  input  logic [TBL_W-1:0] tbl_rdata,
  output logic             busy,
  output logic             done,
  output logic [BIN_W:0]   thr,
  output logic [TBL_W-1:0] bytes
);
  logic [TBL_W-1:0] budget;
  logic [BIN_W-1:0] b;
  logic [TBL_W:0]   acc_next;

  assign tbl_raddr = b;
  assign acc_next  = {1'b0, bytes} + {1'b0, tbl_rdata};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      thr    <= '0;
      bytes  <= '0;
      budget <= '0;
      b      <= '1;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        bytes  <= '0;
        b      <= '1;
        budget <= TBL_W'(TILE_BYTES >> cr);
      end else if (busy) begin
        if (acc_next > {1'b0, budget}) begin
          thr  <= {1'b0, b} + 1'b1;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bytes <= acc_next[TBL_W-1:0];
          b     <= b - 1'b1;
          if (b == 0) begin
            thr  <= '0;
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
