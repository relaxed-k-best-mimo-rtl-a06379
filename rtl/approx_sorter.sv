// approx_sorter: memory-based distributed and approximate sorter of one PS
// block.
//
// Paths are not sorted, only binned. The metric range [0, r^2] is split by
// thresholds t_i = i*r^2/NSEG (i = 1..NSEG) into NSEG ranges, and each memory
// bank is split into NSEG equal segments S_1..S_NSEG. A path with metric m is
// written into the segment S_j whose range (u_{j-1}, u_j] holds m, at the
// address held by that segment's write counter. The upper bounds u_j start
// at t_j and are registers: when S_j fills up, u_j is overwritten with
// u_{j-1}, so S_j takes no more paths and its range is handed over to
// S_{j+1}. If S_{j+1} had already filled, it is thereby reopened and better
// paths overwrite its oldest entries from the start of the segment. A path
// above u_NSEG is dropped. u_0 stands below every metric (it is -1 here so
// that metric 0 is kept, the threshold comparisons being on integers).
//
// There are two single-port banks. One (the write bank) collects the paths
// extended at the current depth while the survivor read controller reads
// the survivors of the previous depth from the other. `swap` exchanges the
// roles at a depth boundary and empties the new write bank (counters
// cleared, thresholds reloaded from r2); `clear` empties both banks.
//
// Interface: wr_valid/wr_path take one path per clock. rd_en with
// rd_seg/rd_entry reads the read bank; rd_path is valid one clock later.
// rd_cnt gives the number of valid entries of each segment of the read bank.
// All of the above follows the published scheme; the -1 for u_0, the write
// pointer wrap on reopen and the event outputs are this design's choices.
module approx_sorter
  import rkb_pkg::*;
#(
  parameter int NSEG      = 16,
  parameter int MEM_DEPTH = 128,
  localparam int SEGSZ    = MEM_DEPTH / NSEG,
  localparam int SEGW     = $clog2(NSEG),
  localparam int EW       = $clog2(SEGSZ),
  localparam int CW       = $clog2(SEGSZ + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [MW-1:0]         r2,
  input  logic                  clear,
  input  logic                  swap,
  input  logic                  wr_valid,
  input  path_t                 wr_path,
  input  logic                  rd_en,
  input  logic [SEGW-1:0]       rd_seg,
  input  logic [EW-1:0]         rd_entry,
  output path_t                 rd_path,
  output logic [NSEG-1:0][CW-1:0] rd_cnt,
  output logic                  handover_evt,
  output logic                  reopen_evt,
  output logic                  drop_evt
);

  localparam int UW = MW + 2;
  typedef logic signed [UW-1:0] thr_t;

  logic                          wbank;
  logic [1:0][NSEG-1:0][CW-1:0]  cnt;
  logic [NSEG-1:0][EW-1:0]       wptr;
  thr_t                          u [NSEG+1];   // u[0] is constant -1

  // Threshold t_i for segment i (1..NSEG).
  function automatic thr_t thr(input int i, input logic [MW-1:0] rr);
    return thr_t'((i * int'(rr)) / NSEG);
  endfunction

  // Segment that takes metric m: the first j with m <= u_j.
  logic            hit;
  logic [SEGW-1:0] wseg;
  always_comb begin
    hit  = 1'b0;
    wseg = '0;
    for (int j = NSEG; j >= 1; j--) begin
      if (thr_t'({2'b00, wr_path.metric}) <= u[j]) begin
        hit  = 1'b1;
        wseg = SEGW'(j - 1);
      end
    end
  end

  assign u[0] = thr_t'(-1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      cnt   <= '0;
      wptr  <= '0;
      for (int j = 1; j <= NSEG; j++) u[j] <= '0;
    end else if (clear || swap) begin
      if (clear) begin
        cnt <= '0;
      end else begin
        wbank       <= ~wbank;
        cnt[~wbank] <= '0;
      end
      wptr <= '0;
      for (int j = 1; j <= NSEG; j++) u[j] <= thr(j, r2);
    end else if (wr_valid && hit) begin
      wptr[wseg] <= wptr[wseg] + 1'b1;
      if (cnt[wbank][wseg] != CW'(SEGSZ))
        cnt[wbank][wseg] <= cnt[wbank][wseg] + 1'b1;
      if (wptr[wseg] == EW'(SEGSZ - 1)) begin
        // Segment full: hand its range over to the next segment.
        for (int j = 1; j <= NSEG; j++)
          if (j == int'(wseg) + 1) u[j] <= u[j-1];
      end
    end
  end

  assign handover_evt = wr_valid && hit && !clear && !swap && (wptr[wseg] == EW'(SEGSZ - 1));
  assign reopen_evt   = wr_valid && hit && !clear && !swap && (cnt[wbank][wseg] == CW'(SEGSZ));
  assign drop_evt     = wr_valid && !hit && !clear && !swap;

  assign rd_cnt = cnt[~wbank];

  // Two single-port banks: the write bank writes, the other one reads.
  localparam int AW = $clog2(MEM_DEPTH);
  logic [1:0][$bits(path_t)-1:0] bank_rdata;
  logic rsel;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic          is_w;
    logic [AW-1:0] addr;
    assign is_w = (wbank == 1'(b));
    assign addr = is_w ? AW'({wseg, wptr[wseg]}) : AW'({rd_seg, rd_entry});
    sp_ram #(.DEPTH(MEM_DEPTH), .WIDTH($bits(path_t))) u_ram (
      .clk   (clk),
      .en    (is_w ? (wr_valid && hit && !clear && !swap) : rd_en),
      .we    (is_w),
      .addr  (addr),
      .wdata (wr_path),
      .rdata (bank_rdata[b])
    );
  end

  always_ff @(posedge clk) if (rd_en) rsel <= ~wbank;
  assign rd_path = path_t'(bank_rdata[rsel]);

endmodule
