// ps_block: path extension block (MPS + PE) of a detector core.
//
// A PS block extends one survivor at a time. While it has no work it holds
// `req` high; the PC side answers with `ack` while it drives that
// survivor's precalculated data (P_c, l_ii, valid circles, zigzag starts and
// directions, the path) on the shared bus `bus`. The block latches the
// data, drops `req`, loads the MPS tables and then feeds one modulation
// point per clock through the PE. Paths that pass the radius check leave on
// out_valid/out_path to this block's own approximate sorter; failing points
// terminate their circle in the MPS. Once the MPS has no valid circle left
// and the PE pipeline is empty, `req` rises again. Because good survivors
// have more admissible points than bad ones, the time per survivor varies,
// hence the data-driven request/acknowledge link.
// The MPS/PE split and the Req/Ack protocol follow the published design;
// the one-clock ack-to-load timing is this design's choice.
module ps_block
  import rkb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] r2,
  output logic          req,
  input  logic          ack,
  input  pcout_t        bus,
  output logic          out_valid,
  output path_t         out_path,
  output logic          idle,
  output logic          term_evt
);

  pcout_t ctx;
  logic   busy;

  logic       mps_valid, mps_idle;
  sym_t       mps_sym;
  logic [3:0] mps_circ;
  logic       term_valid, pe_busy;
  logic [3:0] term_circ;

  mps u_mps (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (ack),
    .load_valid (bus.valid),
    .load_start (bus.start),
    .load_dir   (bus.dir),
    .term_valid (term_valid),
    .term_circ  (term_circ),
    .out_valid  (mps_valid),
    .out_sym    (mps_sym),
    .out_circ   (mps_circ),
    .idle       (mps_idle)
  );

  pe u_pe (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (mps_valid),
    .in_sym     (mps_sym),
    .in_circ    (mps_circ),
    .pc         (ctx.pc),
    .lii        (ctx.lii),
    .path       (ctx.path),
    .depth      (ctx.depth),
    .r2         (r2),
    .out_valid  (out_valid),
    .out_path   (out_path),
    .term_valid (term_valid),
    .term_circ  (term_circ),
    .busy       (pe_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
    end else if (ack) begin
      busy <= 1'b1;
    end else if (busy && mps_idle && !pe_busy) begin
      busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) if (ack) ctx <= bus;

  assign req      = !busy;
  assign idle     = !busy;
  assign term_evt = term_valid;

  // Protocol: the PC side acknowledges only a pending request.
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n) ack |-> req);

endmodule
