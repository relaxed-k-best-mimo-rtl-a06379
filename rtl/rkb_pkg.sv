// rkb_pkg: shared types, constants and helper functions of the relaxed
// K-best 4x4 64-QAM MIMO detector.
//
// The detector searches an NT-depth tree. At depth i a survivor path that
// already fixed symbols s_0..s_{i-1} is extended by the point s_i of a
// 64-QAM constellation; the metric increment is |P_c - l_ii*s_i|^2 where
// P_c = sum_{j<i} l_ij*(shat_j - s_j) + l_ii*shat_i.
//
// Number formats (widths follow the detector core published with the
// algorithm: 8-bit path metric, 15-bit L entries, 16-bit s-hat entries;
// the binary point positions are this design's choice):
//   * constellation points are the odd integers -7..7 on each axis;
//   * s-hat components are signed SW-bit numbers with SF fraction bits;
//   * L components are signed LW-bit numbers with LF fraction bits; the
//     diagonal l_ii is real and positive;
//   * a metric increment is |d|^2 >> MSHIFT, saturated to MW bits, where
//     d = P_c - l_ii*(s<<SF) is computed exactly, so a metric LSB is
//     2^-MF in squared constellation units.
// The 64 constellation points are grouped on the 9 circles centred on the
// origin (squared radii 2,10,18,26,34,50,58,74,98), and numbered
// counter-clockwise from angle 0 within each circle.
package rkb_pkg;

  localparam int NT      = 4;    // transmit antennas = tree depth
  localparam int QB      = 6;    // bits per 64-QAM symbol
  localparam int NCIRC   = 9;    // concentric circles of 64-QAM
  localparam int NPTS    = 64;   // constellation points
  localparam int MAXCP   = 12;   // most points on one circle
  localparam int MW      = 8;    // path metric width
  localparam int LW      = 15;   // L entry component width
  localparam int SW      = 16;   // s-hat component width
  localparam int SF      = 11;   // s-hat fraction bits (assumed)
  localparam int LF      = 12;   // L fraction bits (assumed, sets MSHIFT)
  localparam int MF      = 4;    // metric fraction bits (assumed)
  localparam int MSHIFT  = 2*SF + 2*LF - MF;  // metric scaling shift
  localparam int PCW     = 36;   // width of a P_c component
  localparam int DW      = 38;   // width of d = P_c - l_ii*s
  localparam int LLRW    = MW + 1;

  typedef logic [QB-1:0] sym_t;  // {I index, Q index}, level = 2*idx-7

  typedef struct packed {
    logic signed [LW-1:0] re;
    logic signed [LW-1:0] im;
  } lval_t;

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } sval_t;

  typedef struct packed {
    logic signed [PCW-1:0] re;
    logic signed [PCW-1:0] im;
  } pcval_t;

  // One tree path: the symbols fixed so far and its accumulated metric.
  typedef struct packed {
    sym_t [NT-1:0]   sym;
    logic [MW-1:0]   metric;
  } path_t;

  // Result of the PC block for one survivor: everything a PS block needs.
  typedef struct packed {
    path_t                        path;
    logic [1:0]                   depth;
    pcval_t                       pc;
    logic [LW-1:0]                lii;
    logic [NCIRC-1:0]             valid;   // valid circle table
    logic [NCIRC-1:0][3:0]        start;   // zigzag start point per circle
    logic [NCIRC-1:0]             dir;     // 1: first step counter-clockwise
  } pcout_t;

  // One-clock event flags a core reports, for monitoring and testing.
  typedef struct packed {
    logic handover;   // a sorter segment filled and handed its range over
    logic reopen;     // a path overwrote an entry of a reopened segment
    logic drop;       // a path fell above every sorter threshold
    logic term;       // a PE terminated a circle (radius exceeded)
    logic multireq;   // several PS blocks requested at once
    logic kcut;       // survivor fetching stopped at K with paths left
    logic undef;      // an L-value came from the best/worst fallback
  } evt_t;

  // Squared radius, point count and first table index of each circle.
  localparam int CIRC_R2  [NCIRC] = '{2, 10, 18, 26, 34, 50, 58, 74, 98};
  localparam int CIRC_N   [NCIRC] = '{4, 8, 4, 8, 8, 12, 8, 8, 4};
  localparam int CIRC_OFF [NCIRC] = '{0, 4, 12, 16, 24, 32, 44, 52, 60};

  // Constellation points, circle by circle, counter-clockwise from angle 0.
  localparam int PT_I [NPTS] = '{
     1,-1,-1, 1,   3, 1,-1,-3,-3,-1, 1, 3,   3,-3,-3, 3,
     5, 1,-1,-5,-5,-1, 1, 5,   5, 3,-3,-5,-5,-3, 3, 5,
     7, 5, 1,-1,-5,-7,-7,-5,-1, 1, 5, 7,   7, 3,-3,-7,-7,-3, 3, 7,
     7, 5,-5,-7,-7,-5, 5, 7,   7,-7,-7, 7};
  localparam int PT_Q [NPTS] = '{
     1, 1,-1,-1,   1, 3, 3, 1,-1,-3,-3,-1,   3, 3,-3,-3,
     1, 5, 5, 1,-1,-5,-5,-1,   3, 5, 5, 3,-3,-5,-5,-3,
     1, 5, 7, 7, 5, 1,-1,-5,-7,-7,-5,-1,   3, 7, 7, 3,-3,-7,-7,-3,
     5, 7, 7, 5,-5,-7,-7,-5,   7, 7,-7,-7};

  // Level (-7..7) <-> 3-bit index.
  function automatic logic [2:0] lvl2idx(input int lvl);
    return 3'((lvl + 7) / 2);
  endfunction

  function automatic int idx2lvl(input logic [2:0] idx);
    return 2 * int'(idx) - 7;
  endfunction

  // Symbol of point p of circle c.
  function automatic sym_t circ_sym(input int c, input int p);
    int k;
    k = CIRC_OFF[c] + p;
    return {lvl2idx(PT_I[k]), lvl2idx(PT_Q[k])};
  endfunction

  // Gray-mapped bits of a symbol: {gray(I index), gray(Q index)} (assumed).
  function automatic logic [QB-1:0] sym_bits(input sym_t s);
    logic [2:0] i, q;
    i = s[5:3];
    q = s[2:0];
    return {i ^ (i >> 1), q ^ (q >> 1)};
  endfunction

endpackage
