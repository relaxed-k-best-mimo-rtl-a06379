// pc_block: survivor precalculation shared by the PS blocks of a core.
//
// For a survivor path of depth `depth` (symbols s_0..s_{depth-1} fixed and
// accumulated metric Gamma) it computes, once for all its extensions:
//   1. P_c = sum_{j<depth} l_{depth,j} (shat_j - s_j) + l_{depth,depth} shat_depth
//      (complex, exact fixed point);
//   2. the valid circle region: circle c (radius rho_c, in units of the
//      constellation grid) can hold an admissible point only if the distance
//      from P_c to the circle l_ii*rho_c is below sqrt(D), D being the metric
//      budget (r^2 - Gamma + 1) << MSHIFT. With R = l_ii*rho_c*2^SF,
//      X = R^2, Y = |P_c|^2 and A = X + Y - D this is tested without square
//      roots or division as  A < 0  or  A^2 < 4*X*Y;
//   3. on every circle the zigzag start point, the point with the largest
//      projection onto P_c (the closest point of the circle, since l_ii is
//      real and positive), and the initial direction, counter-clockwise when
//      P_c lies counter-clockwise of that point (cross product >= 0).
// Pipeline: 3 clocks from in_valid to out_valid, one survivor per clock.
// Operations 1-3 are the ones published for the PC block; the exact
// integer circle test (in place of scaling P_c by a precomputed 1/l_ii) and
// the projection-based closest-point search (equivalent to locating P_c in
// a partition of the plane by the bisecting lines) are this design's choices.
module pc_block
  import rkb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  path_t                in_path,
  input  logic [1:0]           depth,
  input  lval_t [NT-1:0][NT-1:0] lmat,   // lmat[i][j] = l_ij, lower triangular
  input  sval_t [NT-1:0]       shat,
  input  logic [MW-1:0]        r2,
  output logic                 out_valid,
  output pcout_t               out
);

  localparam int WW  = 160;                // wide intermediate width
  localparam int SDW = SW + 2;             // shat_j - s_j width
  typedef logic signed [WW-1:0] wide_t;

  // ---------------- stage 1: P_c ----------------
  pcval_t pc_c;
  always_comb begin
    logic signed [PCW-1:0] acc_re, acc_im;
    acc_re = '0;
    acc_im = '0;
    for (int j = 0; j < NT; j++) begin
      logic signed [SDW-1:0] dre, dim;
      lval_t l;
      l = lmat[depth][j];
      dre = '0;
      dim = '0;
      if (j < int'(depth)) begin
        dre = SDW'(shat[j].re) - (SDW'(idx2lvl(in_path.sym[j][5:3])) <<< SF);
        dim = SDW'(shat[j].im) - (SDW'(idx2lvl(in_path.sym[j][2:0])) <<< SF);
        acc_re += PCW'(l.re) * PCW'(dre) - PCW'(l.im) * PCW'(dim);
        acc_im += PCW'(l.re) * PCW'(dim) + PCW'(l.im) * PCW'(dre);
      end else if (j == int'(depth)) begin
        acc_re += PCW'(l.re) * PCW'(shat[j].re);
        acc_im += PCW'(l.re) * PCW'(shat[j].im);
      end
    end
    pc_c.re = acc_re;
    pc_c.im = acc_im;
  end

  logic          v1;
  path_t         p1;
  logic [1:0]    d1;
  pcval_t        pc1;
  logic [LW-1:0] lii1;
  logic [MW-1:0] r2_1;

  // ---------------- stage 2: squares, budget, closest points ----------------
  wide_t y2_c, r2s_c, dbud_c;
  always_comb begin
    y2_c   = wide_t'(pc1.re) * wide_t'(pc1.re) + wide_t'(pc1.im) * wide_t'(pc1.im);
    r2s_c  = (wide_t'(lii1) <<< SF) * (wide_t'(lii1) <<< SF);
    dbud_c = (wide_t'(r2_1) - wide_t'(p1.metric) + 1) <<< MSHIFT;
  end

  logic [NCIRC-1:0][3:0] start_c;
  logic [NCIRC-1:0]      dir_c;
  always_comb begin
    for (int c = 0; c < NCIRC; c++) begin
      logic signed [PCW+4:0] best, dotp, crs;
      int bk;
      best = '0;
      bk = 0;
      for (int k = 0; k < CIRC_N[c]; k++) begin
        dotp = (PCW+5)'(pc1.re) * (PCW+5)'(PT_I[CIRC_OFF[c] + k]) +
               (PCW+5)'(pc1.im) * (PCW+5)'(PT_Q[CIRC_OFF[c] + k]);
        if (k == 0 || dotp > best) begin
          best = dotp;
          bk = k;
        end
      end
      crs = (PCW+5)'(pc1.im) * (PCW+5)'(PT_I[CIRC_OFF[c] + bk]) -
            (PCW+5)'(pc1.re) * (PCW+5)'(PT_Q[CIRC_OFF[c] + bk]);
      start_c[c] = 4'(bk);
      dir_c[c]   = (crs >= 0);
    end
  end

  logic                  v2;
  path_t                 p2;
  logic [1:0]            d2;
  pcval_t                pc2;
  logic [LW-1:0]         lii2;
  wide_t                 y2, r2s2, dbud2;
  logic [NCIRC-1:0][3:0] start2;
  logic [NCIRC-1:0]      dir2;

  // ---------------- stage 3: valid circle region ----------------
  logic [NCIRC-1:0] valid_c;
  always_comb begin
    for (int c = 0; c < NCIRC; c++) begin
      wide_t x, a;
      x = wide_t'(CIRC_R2[c]) * r2s2;
      a = x + y2 - dbud2;
      if (dbud2 <= 0)      valid_c[c] = 1'b0;
      else if (a < 0)      valid_c[c] = 1'b1;
      else                 valid_c[c] = (a * a) < ((x * y2) <<< 2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    p1   <= in_path;
    d1   <= depth;
    pc1  <= pc_c;
    lii1 <= lmat[depth][depth].re;
    r2_1 <= r2;

    p2     <= p1;
    d2     <= d1;
    pc2    <= pc1;
    lii2   <= lii1;
    y2     <= y2_c;
    r2s2   <= r2s_c;
    dbud2  <= dbud_c;
    start2 <= start_c;
    dir2   <= dir_c;

    out.path  <= p2;
    out.depth <= d2;
    out.pc    <= pc2;
    out.lii   <= lii2;
    out.valid <= valid_c;
    out.start <= start2;
    out.dir   <= dir2;
  end

endmodule
