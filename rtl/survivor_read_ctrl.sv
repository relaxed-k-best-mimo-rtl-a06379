// survivor_read_ctrl: picks the survivors of a depth out of the sorters.
//
// After `start`, it reads from the read banks of the BETA approximate
// sorters, taking segment S_1 first: one path at a time, going round all
// the memories (entry 0 of every memory that has one, then entry 1, ...),
// until K paths have been fetched or every S_1 entry has been fetched, then
// S_2 in the same way, and so on. Memories whose segment holds fewer entries
// are skipped, and a segment is left as soon as its fullest memory is
// exhausted, so every clock either issues a read or moves on. Paths within a
// segment are taken in no particular metric order: this is the approximate
// part of the sort.
// Reads are issued only while `allow` is high (the consumer's space). A
// fetched path appears on out_valid/out_path one clock after its read.
// `done` pulses once after the last path has been delivered. `kcut_evt`
// marks a stop at K paths with paths left over.
// The fetch order follows the published read controller; the skipping of
// empty slots is this design's choice.
module survivor_read_ctrl
  import rkb_pkg::*;
#(
  parameter int BETA      = 8,
  parameter int NSEG      = 16,
  parameter int MEM_DEPTH = 128,
  parameter int K         = 64,
  localparam int SEGSZ    = MEM_DEPTH / NSEG,
  localparam int SEGW     = $clog2(NSEG),
  localparam int EW       = $clog2(SEGSZ),
  localparam int CW       = $clog2(SEGSZ + 1),
  localparam int BW       = $clog2(BETA)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic                              allow,
  input  logic [BETA-1:0][NSEG-1:0][CW-1:0] cnt,
  output logic [BETA-1:0]                   rd_en,
  output logic [SEGW-1:0]                   rd_seg,
  output logic [EW-1:0]                     rd_entry,
  input  path_t [BETA-1:0]                  rd_path,
  output logic                              out_valid,
  output path_t                             out_path,
  output logic                              done,
  output logic                              kcut_evt
);

  logic                 run;
  logic [SEGW:0]        seg;
  logic [CW-1:0]        ent;
  logic [BW-1:0]        mem;
  logic [$clog2(K+1)-1:0] nfetch;
  logic                 rv;
  logic [BW-1:0]        rmem;

  // Fullest memory of the present segment.
  logic [CW-1:0] maxcnt;
  always_comb begin
    maxcnt = '0;
    for (int b = 0; b < BETA; b++)
      if (seg < (SEGW+1)'(NSEG) && cnt[b][SEGW'(seg)] > maxcnt) maxcnt = cnt[b][SEGW'(seg)];
  end

  // Next memory, at or after `mem`, holding entry `ent` of the segment.
  logic          hit;
  logic [BW-1:0] hmem;
  always_comb begin
    hit  = 1'b0;
    hmem = '0;
    for (int b = BETA - 1; b >= 0; b--)
      if (b >= int'(mem) && seg < (SEGW+1)'(NSEG) && ent < cnt[b][SEGW'(seg)]) begin
        hit  = 1'b1;
        hmem = BW'(b);
      end
  end

  logic finished;
  assign finished = (nfetch == ($clog2(K+1))'(K)) || (seg == (SEGW+1)'(NSEG));

  logic issue;
  assign issue = run && allow && !finished && hit;

  always_comb begin
    rd_en = '0;
    if (issue) rd_en[hmem] = 1'b1;
  end
  assign rd_seg   = SEGW'(seg);
  assign rd_entry = EW'(ent);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; seg <= '0; ent <= '0; mem <= '0; nfetch <= '0;
      rv <= 1'b0; done <= 1'b0;
    end else begin
      rv   <= issue;
      done <= 1'b0;
      if (start) begin
        run <= 1'b1; seg <= '0; ent <= '0; mem <= '0; nfetch <= '0;
      end else if (run) begin
        if (finished) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else if (issue) begin
          nfetch <= nfetch + 1'b1;
          if (int'(hmem) == BETA - 1) begin
            mem <= '0;
            ent <= ent + 1'b1;
          end else begin
            mem <= hmem + 1'b1;
          end
        end else if (!hit) begin
          mem <= '0;
          if (ent + 1'b1 >= maxcnt) begin
            ent <= '0;
            seg <= seg + 1'b1;
          end else begin
            ent <= ent + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) if (issue) rmem <= hmem;

  assign out_valid = rv;
  assign out_path  = rd_path[rmem];

  // Stopped at K with entries still unread in this or a later segment.
  logic left;
  always_comb begin
    left = 1'b0;
    for (int b = 0; b < BETA; b++)
      for (int j = 0; j < NSEG; j++)
        if ((SEGW+1)'(j) > seg && cnt[b][j] != '0) left = 1'b1;
    if (hit) left = 1'b1;
  end
  assign kcut_evt = run && (nfetch == ($clog2(K+1))'(K)) && left;

endmodule
