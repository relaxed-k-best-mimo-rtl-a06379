// rkb_detector: relaxed K-best soft-output MIMO detector, 4x4, 64-QAM.
//
// Top level. NCORES identical recursive detector cores work in parallel and
// independently, each on a different received vector, so the throughput
// scales with the number of cores. A job (lower-triangular L of the
// channel's Cholesky factor, s-hat = (H*H)^-1 H* y, radius r^2 and a tag)
// is taken on in_valid && in_ready and handed to the lowest-numbered idle
// core; in_ready is high while any core is idle. Finished results (NT*QB
// L-values, hard decisions, an empty flag, the job's tag) are collected
// round-robin from the cores and offered on out_valid until out_ready.
// Since cores finish in a data-dependent order, results may leave out of
// order; the tag identifies them. The channel decomposition and the s-hat
// computation are not part of the detector and happen before it.
// `evt` ORs the cores' monitoring events.
// The array of independent cores follows the published detector; NCORES
// is sized from its area and throughput estimate, and the dispatch and
// collection logic is this design's choice.
module rkb_detector
  import rkb_pkg::*;
#(
  parameter int NCORES    = 13,
  parameter int BETA      = 8,
  parameter int NSEG      = 16,
  parameter int MEM_DEPTH = 128,
  parameter int K         = 64,
  parameter int TAGW      = 8,
  localparam int NB       = NT * QB,
  localparam int CIW      = (NCORES > 1) ? $clog2(NCORES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  lval_t [NT-1:0][NT-1:0]  in_l,
  input  sval_t [NT-1:0]          in_shat,
  input  logic [MW-1:0]           in_r2,
  input  logic [TAGW-1:0]         in_tag,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [NB-1:0][LLRW-1:0] out_llr,
  output logic [NB-1:0]           out_hard,
  output logic                    out_empty,
  output logic [TAGW-1:0]         out_tag,
  output logic [NCORES-1:0]       core_busy,
  output evt_t                    evt
);

  logic [NCORES-1:0] c_in_valid, c_in_ready, c_out_valid, c_out_ready, c_empty;
  logic signed [NCORES-1:0][NB-1:0][LLRW-1:0] c_llr;
  logic [NCORES-1:0][NB-1:0]   c_hard;
  logic [NCORES-1:0][TAGW-1:0] c_tag;
  evt_t [NCORES-1:0]           c_evt;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    detector_core #(.BETA(BETA), .NSEG(NSEG), .MEM_DEPTH(MEM_DEPTH), .K(K), .TAGW(TAGW)) u_core (
      .clk(clk), .rst_n(rst_n),
      .in_valid(c_in_valid[c]), .in_ready(c_in_ready[c]),
      .in_l(in_l), .in_shat(in_shat), .in_r2(in_r2), .in_tag(in_tag),
      .out_valid(c_out_valid[c]), .out_ready(c_out_ready[c]),
      .out_llr(c_llr[c]), .out_hard(c_hard[c]), .out_empty(c_empty[c]), .out_tag(c_tag[c]),
      .evt(c_evt[c])
    );
  end

  // Dispatch: lowest-numbered idle core.
  logic [CIW-1:0] isel;
  always_comb begin
    isel = '0;
    for (int c = NCORES - 1; c >= 0; c--) if (c_in_ready[c]) isel = CIW'(c);
  end
  assign in_ready = |c_in_ready;
  always_comb begin
    c_in_valid = '0;
    if (in_valid && in_ready) c_in_valid[isel] = 1'b1;
  end
  assign core_busy = ~c_in_ready;

  // Collection: round-robin from the core after the last one served.
  logic [CIW-1:0] rr, osel;
  always_comb begin
    osel = '0;
    for (int i = NCORES - 1; i >= 0; i--) begin
      int c;
      c = (int'(rr) + i) % NCORES;
      if (c_out_valid[c]) osel = CIW'(c);
    end
  end
  assign out_valid = |c_out_valid;
  assign out_llr   = c_llr[osel];
  assign out_hard  = c_hard[osel];
  assign out_empty = c_empty[osel];
  assign out_tag   = c_tag[osel];
  always_comb begin
    c_out_ready = '0;
    if (out_valid) c_out_ready[osel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (out_valid && out_ready) rr <= CIW'((int'(osel) + 1) % NCORES);
  end

  always_comb begin
    evt = '0;
    for (int c = 0; c < NCORES; c++) evt |= c_evt[c];
  end

  // Output handshake: a result must stay until taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);

endmodule
