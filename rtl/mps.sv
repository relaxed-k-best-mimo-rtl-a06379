// mps: modulation point selection of a PS block (improved PSK enumeration).
//
// Holds three tables for the survivor being extended, all loaded from the
// PC block's result by `load`:
//   VCT  - valid circle table: one bit per 64-QAM circle still enumerated;
//   NMPT - next modulation point table: next point index on each circle;
//   ZSDT - zigzag search direction table: present direction on each circle.
// Every clock it feeds the PE one point of the valid circle selected by the
// valid circle pointer, steps that circle's zigzag (start point, then one
// step one way, two steps back, three steps forward, ... so the points are
// visited in order of growing angular distance from the start) and moves
// the pointer on to the next valid circle, so consecutive points come from
// different circles and a deep PE pipeline never fills with points beyond a
// circle's admissible arc. A circle leaves the VCT when the PE requests its
// termination (first point outside the radius) or when all its points were
// fed. `idle` is high when the VCT is empty.
// The tables, the alternation among circles and the termination follow the
// published MPS; the table encodings are this design's choice.
module mps
  import rkb_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [NCIRC-1:0]       load_valid,
  input  logic [NCIRC-1:0][3:0]  load_start,
  input  logic [NCIRC-1:0]       load_dir,
  input  logic                   term_valid,
  input  logic [3:0]             term_circ,
  output logic                   out_valid,
  output sym_t                   out_sym,
  output logic [3:0]             out_circ,
  output logic                   idle
);

  logic [NCIRC-1:0]       vct;
  logic [NCIRC-1:0][3:0]  nmpt;
  logic [NCIRC-1:0]       zsdt;
  logic [NCIRC-1:0][3:0]  cnt;
  logic [3:0]             ptr;

  // Constellation ROM: symbol of each table index.
  function automatic sym_t rom(input int k);
    return {lvl2idx(PT_I[k]), lvl2idx(PT_Q[k])};
  endfunction

  // Selected circle: first valid circle at or after the pointer.
  logic [3:0] sel;
  logic       any;
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = NCIRC - 1; i >= 0; i--) begin
      int c;
      c = (int'(ptr) + i) % NCIRC;
      if (vct[c]) begin
        sel = 4'(c);
        any = 1'b1;
      end
    end
  end

  // Next zigzag point of the selected circle.
  int n_pts, nxt_i;
  always_comb begin
    n_pts = 4;
    for (int c = 0; c < NCIRC; c++) if (int'(sel) == c) n_pts = CIRC_N[c];
    nxt_i = int'(nmpt[sel]) + (zsdt[sel] ? 1 : -1) * (int'(cnt[sel]) + 1);
    for (int r = 0; r < 3; r++) begin
      if (nxt_i < 0) nxt_i += n_pts;
      if (nxt_i >= n_pts) nxt_i -= n_pts;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vct <= '0; nmpt <= '0; zsdt <= '0; cnt <= '0; ptr <= '0;
    end else if (load) begin
      vct  <= load_valid;
      nmpt <= load_start;
      zsdt <= load_dir;
      cnt  <= '0;
      ptr  <= '0;
    end else begin
      if (any) begin
        nmpt[sel] <= 4'(nxt_i);
        zsdt[sel] <= ~zsdt[sel];
        cnt[sel]  <= cnt[sel] + 1'b1;
        if (int'(cnt[sel]) + 1 == n_pts) vct[sel] <= 1'b0;
        ptr       <= (sel == 4'(NCIRC - 1)) ? '0 : sel + 1'b1;
      end
      if (term_valid) vct[term_circ] <= 1'b0;
    end
  end

  always_comb begin
    out_valid = any && !load;
    out_circ  = sel;
    out_sym   = '0;
    for (int k = 0; k < NPTS; k++)
      for (int c = 0; c < NCIRC; c++)
        if (int'(sel) == c && CIRC_OFF[c] + int'(nmpt[sel]) == k) out_sym = rom(k);
  end

  assign idle = !any;

endmodule
