// pe: path extension unit of a PS block.
//
// For each modulation point fed by the MPS it computes the extended path
// metric Gamma' = Gamma + |P_c - l_ii*s|^2 and checks it against the radius
// r^2. A point that passes leaves as an extended path (the survivor's
// symbols with s placed at the current depth) towards the sorter; a point
// that fails raises a termination request for its circle, so that the MPS
// feeds no further points of that circle.
//
// Pipeline (LAT = 3 clocks from in_valid to out_valid/term_valid, one point
// accepted every clock):
//   1. d = P_c - l_ii*(s << SF), real and imaginary parts;
//   2. Lambda = (re(d)^2 + im(d)^2) >> MSHIFT, saturated to MW+1 bits;
//   3. Gamma' = Gamma + Lambda and the radius check Gamma' <= r^2.
// The survivor context (pc, lii, path, depth, r2) must stay constant while
// points of that survivor are in the pipeline; the PS block guarantees it.
// The deep pipelining and the termination request follow the published PS
// design; the stage split is this design's choice.
module pe
  import rkb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  sym_t            in_sym,
  input  logic [3:0]      in_circ,
  input  pcval_t          pc,
  input  logic [LW-1:0]   lii,
  input  path_t           path,
  input  logic [1:0]      depth,
  input  logic [MW-1:0]   r2,
  output logic            out_valid,
  output path_t           out_path,
  output logic            term_valid,
  output logic [3:0]      term_circ,
  output logic            busy
);

  localparam int SQW = 2 * DW + 1;

  // Stage 1
  logic                 v1;
  sym_t                 s1;
  logic [3:0]           c1;
  logic signed [DW-1:0] dre1, dim1;
  // Stage 2
  logic                 v2;
  sym_t                 s2;
  logic [3:0]           c2;
  logic [MW:0]          lam2;

  logic signed [DW-1:0] ps_re, ps_im;
  always_comb begin
    ps_re = DW'(signed'({1'b0, lii}) * DW'(idx2lvl(in_sym[5:3]))) <<< SF;
    ps_im = DW'(signed'({1'b0, lii}) * DW'(idx2lvl(in_sym[2:0]))) <<< SF;
  end

  logic [SQW-1:0] sq;
  logic [SQW-1:0] sq_sh;
  assign sq    = SQW'(dre1 * dre1) + SQW'(dim1 * dim1);
  assign sq_sh = sq >> MSHIFT;

  logic [MW+1:0] gam;
  assign gam = {2'b00, path.metric} + {1'b0, lam2};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0; term_valid <= 1'b0;
    end else begin
      v1         <= in_valid;
      v2         <= v1;
      out_valid  <= v2 && (gam <= {2'b00, r2});
      term_valid <= v2 && (gam >  {2'b00, r2});
    end
  end

  always_ff @(posedge clk) begin
    s1   <= in_sym;
    c1   <= in_circ;
    dre1 <= DW'(pc.re) - ps_re;
    dim1 <= DW'(pc.im) - ps_im;
    s2   <= s1;
    c2   <= c1;
    lam2 <= (sq_sh > SQW'(2 ** (MW + 1) - 1)) ? '1 : (MW+1)'(sq_sh);
    out_path            <= path;
    out_path.sym[depth] <= s2;
    out_path.metric     <= MW'(gam);
    term_circ           <= c2;
  end

  assign busy = v1 || v2 || out_valid || term_valid;

endmodule
