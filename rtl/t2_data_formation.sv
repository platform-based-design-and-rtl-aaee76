// t2_data_formation: data formation unit of Tier-2 - a small FIFO of header words and
// the SSRAM write port that places them in the coprocessor's memory map.
//
// Header words arrive with their code-block number (valid/ready). Each leaves the FIFO
// as one write: ram_en high for one clock with header_info and address, where
//   address = HDR_BASE + cb * CB_REC_BYTES + HDR_OFS.
// Every code-block owns a 256-byte record in the rate/distortion/header area that
// starts at 0xC2028000 (16 code-blocks fill it up to 0xC2029000); the header takes one
// fixed 4-byte word of it. Because the address follows the code-block number, the words
// land in code-block order whatever order they were produced in; the entropy-coded bytes
// themselves stay where the entropy coder wrote them, and the CDL in each header says
// how many of them the code-stream uses. The SSRAM is a ZBT part that takes one write
// per clock, so the write port has no back-pressure.
//
// Timing: a word written into an empty FIFO is output on the next clock; one word per
// clock leaves while the FIFO is not empty. empty tells when all words are out.
// The memory map and the FIFO structure follow the document; the FIFO depth and the
// header's offset inside the record are this design's choices.
module t2_data_formation
  import t2_pkg::*;
#(
  parameter int unsigned CB_W         = 4,
  parameter int unsigned DEPTH        = 4,
  parameter logic [31:0] HDR_BASE     = 32'hC202_8000,
  parameter int unsigned CB_REC_BYTES = 256,
  parameter int unsigned HDR_OFS      = 252
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  output logic            in_ready,
  input  hdr_t            in_hdr,
  input  logic [CB_W-1:0] in_cb,
  output logic [31:0]     header_info,
  output logic [31:0]     address,
  output logic            ram_en,
  output logic            empty
);
  localparam int unsigned A_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  hdr_t            mem_hdr [DEPTH];
  logic [CB_W-1:0] mem_cb  [DEPTH];
  logic [A_W-1:0]  wp, rp;
  logic [A_W:0]    count;
  logic            push, pop;

  assign in_ready = (count < (A_W+1)'(DEPTH));
  assign push     = in_valid && in_ready;
  assign pop      = (count != 0);
  assign empty    = (count == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      wp          <= '0;
      rp          <= '0;
      count       <= '0;
      ram_en      <= 1'b0;
      header_info <= '0;
      address     <= '0;
    end else begin
      ram_en <= 1'b0;
      if (push) begin
        mem_hdr[wp] <= in_hdr;
        mem_cb[wp]  <= in_cb;
        wp          <= (wp == A_W'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) begin
        ram_en      <= 1'b1;
        header_info <= mem_hdr[rp];
        address     <= HDR_BASE + 32'(mem_cb[rp]) * CB_REC_BYTES + HDR_OFS;
        rp          <= (rp == A_W'(DEPTH - 1)) ? '0 : rp + 1'b1;
      end
      count <= count + (A_W+1)'(push) - (A_W+1)'(pop);
    end
  end
endmodule
