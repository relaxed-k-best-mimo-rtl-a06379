// detector_core: recursive relaxed K-best detector core.
//
// One core detects one received vector at a time by iterating over the NT
// tree depths. At each depth the survivors of the previous depth are read
// out of the approximate sorters (segment by segment, at most K of them) by
// the survivor read controller and fed to the PC block; the precalculated
// survivors queue on the PC bus, from where the BETA PS blocks take them
// with Req/Ack as each becomes free; every PS block enumerates the
// admissible points of its survivor and writes the extended paths into its
// own approximate sorter. A depth ends when the read controller is done,
// the PC pipeline and queue are empty and every PS block is idle; the
// sorter banks then swap roles. The first depth starts from the single
// root path (metric 0). After the last depth the read controller sends the
// final survivors to the output generator instead, which produces the
// L-values and hard decisions.
//
// Interface: a job (L matrix, s-hat, r^2, tag) is taken on in_valid &&
// in_ready (in_ready is high only while the core is idle); the result is
// offered on out_valid until out_ready. Latency depends on the channel and
// noise, since the number of admissible points does. `evt` reports internal
// events for monitoring.
// The structure (one PC, BETA PS blocks with one sorter each, read
// controller, output generator) follows the published core; the control
// sequencing and the credit-based throttle of the read controller are this
// design's choices.
module detector_core
  import rkb_pkg::*;
#(
  parameter int BETA      = 8,
  parameter int NSEG      = 16,
  parameter int MEM_DEPTH = 128,
  parameter int K         = 64,
  parameter int QDEPTH    = 8,
  parameter int TAGW      = 8,
  localparam int NB       = NT * QB,
  localparam int SEGSZ    = MEM_DEPTH / NSEG,
  localparam int CW       = $clog2(SEGSZ + 1)
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
  output evt_t                    evt
);

  typedef enum logic [2:0] {S_IDLE, S_ROOT, S_RUN, S_FINAL, S_RESULT} state_t;
  state_t state;

  lval_t [NT-1:0][NT-1:0] lmat;
  sval_t [NT-1:0]         shat;
  logic [MW-1:0]          r2;
  logic [TAGW-1:0]        tag;
  logic [1:0]             depth;
  logic                   src_done;
  logic [$clog2(QDEPTH+1):0] inflight;

  // ---------------- PC block and bus ----------------
  logic   pc_in_valid, pc_out_valid;
  path_t  pc_in_path;
  pcout_t pc_out, bus;
  logic [BETA-1:0] req, ack;
  logic [$clog2(QDEPTH):0] qcount;
  logic   multireq;

  pc_block u_pc (
    .clk(clk), .rst_n(rst_n), .in_valid(pc_in_valid), .in_path(pc_in_path),
    .depth(depth), .lmat(lmat), .shat(shat), .r2(r2),
    .out_valid(pc_out_valid), .out(pc_out)
  );

  pc_bus #(.BETA(BETA), .DEPTH(QDEPTH)) u_bus (
    .clk(clk), .rst_n(rst_n), .in_valid(pc_out_valid), .in_data(pc_out),
    .req(req), .ack(ack), .bus(bus), .count(qcount), .multi_req_evt(multireq)
  );

  // ---------------- PS blocks and sorters ----------------
  localparam int SEGW = $clog2(NSEG);
  localparam int EW   = $clog2(SEGSZ);
  logic                              srt_clear, srt_swap;
  logic [BETA-1:0]                   rd_en;
  logic [SEGW-1:0]                   rd_seg;
  logic [EW-1:0]                     rd_entry;
  path_t [BETA-1:0]                  rd_path;
  logic [BETA-1:0][NSEG-1:0][CW-1:0] rd_cnt;
  logic [BETA-1:0]                   ps_idle, e_hand, e_reop, e_drop, e_term;

  for (genvar b = 0; b < BETA; b++) begin : g_ps
    logic  x_valid;
    path_t x_path;
    ps_block u_ps (
      .clk(clk), .rst_n(rst_n), .r2(r2), .req(req[b]), .ack(ack[b]), .bus(bus),
      .out_valid(x_valid), .out_path(x_path), .idle(ps_idle[b]), .term_evt(e_term[b])
    );
    approx_sorter #(.NSEG(NSEG), .MEM_DEPTH(MEM_DEPTH)) u_sorter (
      .clk(clk), .rst_n(rst_n), .r2(r2), .clear(srt_clear), .swap(srt_swap),
      .wr_valid(x_valid), .wr_path(x_path),
      .rd_en(rd_en[b]), .rd_seg(rd_seg), .rd_entry(rd_entry), .rd_path(rd_path[b]),
      .rd_cnt(rd_cnt[b]),
      .handover_evt(e_hand[b]), .reopen_evt(e_reop[b]), .drop_evt(e_drop[b])
    );
  end

  // ---------------- survivor read controller ----------------
  logic  rc_start, rc_allow, rc_valid, rc_done, kcut;
  path_t rc_path;

  survivor_read_ctrl #(.BETA(BETA), .NSEG(NSEG), .MEM_DEPTH(MEM_DEPTH), .K(K)) u_rc (
    .clk(clk), .rst_n(rst_n), .start(rc_start), .allow(rc_allow), .cnt(rd_cnt),
    .rd_en(rd_en), .rd_seg(rd_seg), .rd_entry(rd_entry), .rd_path(rd_path),
    .out_valid(rc_valid), .out_path(rc_path), .done(rc_done), .kcut_evt(kcut)
  );

  // ---------------- output generator ----------------
  logic og_start, og_finish, og_res, undef;
  output_gen u_og (
    .clk(clk), .rst_n(rst_n), .start(og_start),
    .in_valid(rc_valid && state == S_FINAL), .in_path(rc_path),
    .finish(og_finish), .res_valid(og_res),
    .llr(out_llr), .hard(out_hard), .empty(out_empty), .undef_evt(undef)
  );

  // ---------------- control ----------------
  logic depth_end;
  assign depth_end = (state == S_RUN) && src_done && (inflight == '0) && (&ps_idle);

  always_comb begin
    pc_in_valid = 1'b0;
    pc_in_path  = rc_path;
    if (state == S_ROOT) begin
      pc_in_valid = 1'b1;
      pc_in_path  = '0;
    end else if (state == S_RUN && rc_valid) begin
      pc_in_valid = 1'b1;
    end
  end

  assign in_ready  = (state == S_IDLE);
  assign srt_clear = (state == S_ROOT);
  assign srt_swap  = depth_end;
  assign rc_start  = depth_end;
  assign og_start  = depth_end && (depth == 2'(NT - 1));
  assign og_finish = (state == S_FINAL) && rc_done;
  // Throttle: never more survivors in the PC pipeline and queue than fit.
  assign rc_allow  = (state == S_FINAL) || (inflight < ($clog2(QDEPTH+1)+1)'(QDEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      depth     <= '0;
      src_done  <= 1'b0;
      inflight  <= '0;
      out_valid <= 1'b0;
    end else begin
      inflight <= inflight
                  + (($clog2(QDEPTH+1)+1)'((state == S_ROOT) || (state == S_RUN && rd_en != '0)))
                  - (($clog2(QDEPTH+1)+1)'(ack != '0));
      case (state)
        S_IDLE: if (in_valid) begin
          state <= S_ROOT;
          depth <= '0;
        end
        S_ROOT: begin
          state    <= S_RUN;
          src_done <= 1'b1;
        end
        S_RUN: begin
          if (rc_done) src_done <= 1'b1;
          if (depth_end) begin
            src_done <= 1'b0;
            if (depth == 2'(NT - 1)) state <= S_FINAL;
            else                     depth <= depth + 1'b1;
          end
        end
        S_FINAL: if (og_res) begin
          state     <= S_RESULT;
          out_valid <= 1'b1;
        end
        S_RESULT: if (out_ready) begin
          state     <= S_IDLE;
          out_valid <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && in_valid) begin
      lmat <= in_l;
      shat <= in_shat;
      r2   <= in_r2;
      tag  <= in_tag;
    end
  end
  assign out_tag = tag;

  assign evt.handover = |e_hand;
  assign evt.reopen   = |e_reop;
  assign evt.drop     = |e_drop;
  assign evt.term     = |e_term;
  assign evt.multireq = multireq;
  assign evt.kcut     = kcut;
  assign evt.undef    = undef;

endmodule
