// t2_pkg: types, sizes and small functions shared by the Tier-2 rate-control blocks.
//
// Rate control works on "hull points": the end of each coded bit-plane of a code-block,
// described by the accumulated distortion reduction D (32 bit) and the accumulated byte
// count R (16 bit) reported by the entropy coder. The R-D slope dD/dR of a point is an
// unsigned 32-bit integer quotient; the slope table is indexed by a logarithmic 8-bit
// "slope bin" of that slope (3 mantissa bits per octave), so 256 table entries cover the
// whole 32-bit range and the bin order follows the slope order. Bin 255 is reserved for
// points that reduce distortion at no byte cost (infinite slope).
//
// The 32-bit header word written per code-block packs the code-block data length (CDL),
// the number of coding passes kept (NCP) and the number of all-zero bit-planes (NZB).
// The widths of D, R and the header come from the Tier-2 pin list; the bin mapping, the
// header layout and the pass count rule are choices of this design.
package t2_pkg;

  localparam int unsigned D_W     = 32;   // distortion width
  localparam int unsigned R_W     = 16;   // rate (byte count) width
  localparam int unsigned S_W     = 32;   // slope width
  localparam int unsigned BIN_W   = 8;    // slope bin width
  localparam int unsigned NBINS   = 1 << BIN_W;
  localparam int unsigned NBP_W   = 4;    // bit-plane counter width
  localparam logic [BIN_W-1:0] BIN_INF = '1;
  localparam logic [S_W-1:0]   SLOPE_INF = '1;

  // One point of a code-block's convex hull, as stored for truncation.
  typedef struct packed {
    logic [R_W-1:0]   rate;  // accumulated bytes up to the end of this bit-plane
    logic [BIN_W-1:0] bin;   // slope bin of the segment ending here
    logic [NBP_W-1:0] nbp;   // number of bit-planes coded up to here
  } pt_t;

  // Header word of one code-block.
  typedef struct packed {
    logic [15:0] cdl;  // code-block data length in bytes
    logic [7:0]  ncp;  // number of coding passes kept
    logic [7:0]  nzb;  // number of all-zero most significant bit-planes
  } hdr_t;

  // Logarithmic slope quantiser: slopes 0..7 map to themselves; above that, the
  // position e of the leading one (3..31) and the three bits below it give
  // bin = 8*(e-2) + mantissa, which is monotonic and at most 239.
  function automatic logic [BIN_W-1:0] slope_bin(input logic [S_W-1:0] s);
    logic [BIN_W-1:0] b;
    logic [S_W-1:0]   m;
    b = s[BIN_W-1:0];
    if (s == SLOPE_INF) begin
      b = BIN_INF;
    end else if (s >= 8) begin
      for (int e = 3; e < S_W; e++) begin
        if (s[e]) begin
          m = s >> (e - 3);
          b = BIN_W'(8 * (e - 2)) + BIN_W'(m[2:0]);
        end
      end
    end
    return b;
  endfunction

  // Coding passes in the first n coded bit-planes: the first holds only the
  // cleanup pass, every later one all three passes.
  function automatic logic [7:0] passes(input logic [NBP_W-1:0] n);
    return (n == 0) ? 8'd0 : 8'(3 * n - 2);
  endfunction

endpackage
