// t2_ref_pkg: reference model of the Tier-2 rate control for the testbenches.
//
// Written independently of the RTL: the slope bin is derived from floor(log2(s)), the
// convex hull is rebuilt from scratch over the point list, and the threshold is found by
// trying every candidate threshold from 256 down. Also holds a generator of plausible
// per-bit-plane (D, R) sequences with the irregularities that exercise each hull
// cancellation rule.
package t2_ref_pkg;

  localparam int MAXP = 16;

  typedef struct {
    int          n;
    int unsigned r   [MAXP];
    int unsigned bin [MAXP];
    int unsigned nbp [MAXP];
    int          dropped;   // points with no distortion gain
    int          infinite;  // slopes found infinite (gain at no byte cost)
    int          merged;    // hull points removed by a steeper successor
  } hull_t;

  function automatic int unsigned ref_bin(longint unsigned s);
    int e;
    if (s == 64'hFFFF_FFFF) return 255;
    if (s < 8) return int'(s);
    e = 0;
    while ((s >> (e + 1)) != 0) e++;
    return 8 * (e - 2) + int'((s >> (e - 3)) % 8);
  endfunction

  // Hull of one code-block from its accumulated (D, R) per bit-plane.
  function automatic hull_t ref_hull(int n, longint unsigned d[], longint unsigned r[]);
    hull_t h;
    longint unsigned sd[MAXP], sr[MAXP], ss[MAXP];
    int sp;
    longint dd, dr;
    longint unsigned s;
    int unsigned snbp[MAXP];
    bit placed;
    h.n = 0; h.dropped = 0; h.infinite = 0; h.merged = 0;
    sp = 0;
    for (int k = 0; k < n; k++) begin
      placed = 0;
      while (!placed) begin
        dd = longint'(d[k]) - (sp > 0 ? longint'(sd[sp-1]) : 0);
        dr = longint'(r[k]) - (sp > 0 ? longint'(sr[sp-1]) : 0);
        if (dd <= 0) begin
          h.dropped++;
          placed = 1;
        end else begin
          if (dr <= 0) begin
            s = 64'hFFFF_FFFF;
            h.infinite++;
          end else begin
            s = longint'(dd) / longint'(dr);
            if (s > 64'hFFFF_FFFF) s = 64'hFFFF_FFFF;
          end
          if (sp > 0 && s >= ss[sp-1]) begin
            sp--;
            h.merged++;
          end else begin
            sd[sp] = d[k]; sr[sp] = r[k]; ss[sp] = s; snbp[sp] = k + 1;
            sp++;
            placed = 1;
          end
        end
      end
    end
    h.n = sp;
    for (int i = 0; i < sp; i++) begin
      h.r[i]   = int'(sr[i]);
      h.bin[i] = ref_bin(ss[i]);
      h.nbp[i] = snbp[i];
    end
    return h;
  endfunction

  // Bytes a hull contributes at slope bins >= thr.
  function automatic longint unsigned hull_bytes(hull_t h, int thr);
    longint unsigned tot, prev;
    tot = 0; prev = 0;
    for (int i = 0; i < h.n; i++) begin
      if (int'(h.bin[i]) >= thr && h.r[i] > prev) tot += h.r[i] - prev;
      prev = h.r[i];
    end
    return tot;
  endfunction

  // Lowest threshold whose admitted bytes fit the budget.
  function automatic int ref_threshold(hull_t hs[], int ncb, longint unsigned budget,
                                       output longint unsigned kept);
    longint unsigned tot;
    int best;
    best = 256; kept = 0;
    for (int t = 256; t >= 0; t--) begin
      tot = 0;
      for (int c = 0; c < ncb; c++) tot += hull_bytes(hs[c], t);
      if (tot <= budget) begin best = t; kept = tot; end
      else break;
    end
    return best;
  endfunction

  // Header word {CDL, NCP, NZB} of one code-block at threshold thr.
  function automatic logic [31:0] ref_header(hull_t h, int thr, int nzb);
    int unsigned cdl, ncp;
    cdl = 0; ncp = 0;
    for (int i = 0; i < h.n; i++) begin
      if (int'(h.bin[i]) >= thr) begin
        cdl = h.r[i];
        ncp = 3 * h.nbp[i] - 2;
      end
    end
    return {cdl[15:0], ncp[7:0], nzb[7:0]};
  endfunction

  // Random accumulated (D, R) for n bit-planes: the distortion gain per bit-plane
  // roughly halves from one bit-plane to the next while the byte cost grows, with
  // occasional planes of no gain, of no cost, or steeper than the one before.
  task automatic gen_points(int n, int scale, ref longint unsigned d[], ref longint unsigned r[]);
    longint unsigned acc_d, acc_r, gd, gr;
    int kind;
    d = new[n];
    r = new[n];
    acc_d = 0; acc_r = 0;
    gd = longint'(scale) * (64 + $urandom_range(0, 64)) * 4096;
    for (int k = 0; k < n; k++) begin
      gr = 2 + 3 * k * k + $urandom_range(0, 6 * (k + 1));
      kind = $urandom_range(0, 9);
      if (kind == 0 && k > 0) begin
        d[k] = acc_d - $urandom_range(0, 10);        // no gain
        r[k] = acc_r + gr;
      end else if (kind == 1 && k > 0) begin
        d[k] = acc_d + gd / 8;                        // gain for free
        r[k] = acc_r;
      end else if (kind == 2 && k > 0) begin
        d[k] = acc_d + gd * 3;                        // steeper than before
        r[k] = acc_r + gr;
      end else begin
        d[k] = acc_d + gd;
        r[k] = acc_r + gr;
      end
      acc_d = d[k]; acc_r = r[k];
      gd = gd / 2 + $urandom_range(0, 3);
    end
  endtask

endpackage
