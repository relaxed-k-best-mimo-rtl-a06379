// rkb_ref_pkg: reference model pieces shared by the core and top-level
// testbenches: random channels and received vectors, the exact integer
// metric of the detector's number format, a depth-first exhaustive search
// (within the radius) for the maximum-likelihood leaf, and bit helpers.
package rkb_ref_pkg;
  import rkb_pkg::*;

  typedef struct {
    lval_t [NT-1:0][NT-1:0] l;
    sval_t [NT-1:0]         shat;
    sym_t  [NT-1:0]         tx;
    logic [MW-1:0]          r2;
  } job_t;

  // Random lower-triangular L (diagonal real, positive, LF fraction bits),
  // random transmitted symbols, s-hat = s + noise of the given amplitude
  // (in units of 2^-SF).
  function automatic job_t make_job(input int noise, input int r2, input int dmin, input int dmax);
    job_t j;
    for (int a = 0; a < NT; a++)
      for (int b = 0; b < NT; b++) begin
        j.l[a][b].re = (b < a) ? LW'($urandom_range(2 ** 13) - 2 ** 12) :
                       (b == a) ? LW'($urandom_range(dmax, dmin)) : '0;
        j.l[a][b].im = (b < a) ? LW'($urandom_range(2 ** 13) - 2 ** 12) : '0;
      end
    for (int a = 0; a < NT; a++) begin
      j.tx[a] = QB'($urandom);
      j.shat[a].re = SW'(idx2lvl(j.tx[a][5:3]) * 2048 + $urandom_range(2 * noise) - noise);
      j.shat[a].im = SW'(idx2lvl(j.tx[a][2:0]) * 2048 + $urandom_range(2 * noise) - noise);
    end
    j.r2 = MW'(r2);
    return j;
  endfunction

  // Metric increment at depth d for symbols s[0..d], as the hardware does it.
  function automatic int lam(input job_t j, input int d, input sym_t [NT-1:0] s);
    logic signed [127:0] pre, pim, sq;
    pre = 0; pim = 0;
    for (int b = 0; b <= d; b++) begin
      logic signed [127:0] er, ei;
      er = 128'(j.shat[b].re) - 128'(idx2lvl(s[b][5:3])) * 2048;
      ei = 128'(j.shat[b].im) - 128'(idx2lvl(s[b][2:0])) * 2048;
      pre += 128'(j.l[d][b].re) * er - 128'(j.l[d][b].im) * ei;
      pim += 128'(j.l[d][b].re) * ei + 128'(j.l[d][b].im) * er;
    end
    sq = (pre * pre + pim * pim) >>> MSHIFT;
    return (sq > 511) ? 511 : int'(sq);
  endfunction

  // Depth-first search of every path within the radius; returns the best
  // leaf metric (or -1) and the leaf, and counts the admissible leaves.
  function automatic void ml_search(input job_t j, input int d, input int g, inout sym_t [NT-1:0] s,
                                    inout int best, inout sym_t [NT-1:0] bs, inout int nleaf);
    for (int k = 0; k < NPTS; k++) begin
      int g2;
      s[d] = {lvl2idx(PT_I[k]), lvl2idx(PT_Q[k])};
      g2 = g + lam(j, d, s);
      if (g2 <= int'(j.r2)) begin
        if (d == NT - 1) begin
          nleaf++;
          if (best < 0 || g2 < best) begin best = g2; bs = s; end
        end else ml_search(j, d + 1, g2, s, best, bs, nleaf);
      end
    end
  endfunction

  function automatic logic [NT*QB-1:0] bits_of(input sym_t [NT-1:0] s);
    logic [NT*QB-1:0] r;
    for (int a = 0; a < NT; a++) r[a*QB +: QB] = sym_bits(s[a]);
    return r;
  endfunction

  function automatic sym_t [NT-1:0] syms_of(input logic [NT*QB-1:0] bits);
    sym_t [NT-1:0] s;
    for (int a = 0; a < NT; a++) begin
      logic [2:0] gi, gq, i, q;
      gi = bits[a*QB + 3 +: 3];
      gq = bits[a*QB +: 3];
      i = {gi[2], gi[2] ^ gi[1], gi[2] ^ gi[1] ^ gi[0]};
      q = {gq[2], gq[2] ^ gq[1], gq[2] ^ gq[1] ^ gq[0]};
      s[a] = {i, q};
    end
    return s;
  endfunction

  function automatic int path_metric(input job_t j, input sym_t [NT-1:0] s);
    int g;
    g = 0;
    for (int d = 0; d < NT; d++) g += lam(j, d, s);
    return g;
  endfunction
endpackage
