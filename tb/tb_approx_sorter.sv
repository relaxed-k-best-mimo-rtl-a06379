// tb_approx_sorter: writes random paths into the write bank, swaps banks and
// reads every segment back. A behavioural model of the segment/threshold
// scheme (ranges (u_{j-1},u_j], hand-over when a segment fills, reopen with
// overwrite from the segment start) predicts every segment's contents and
// count. Also counts hand-over, reopen and drop events and checks the
// one-clock read latency.
module tb_approx_sorter;
  import rkb_pkg::*;
  localparam int NSEG = 16, MEM_DEPTH = 128, SEGSZ = 8;

  logic clk = 0, rst_n = 0;
  logic [MW-1:0] r2;
  logic clear = 0, swap = 0, wr_valid = 0, rd_en = 0;
  path_t wr_path, rd_path;
  logic [3:0] rd_seg = '0;
  logic [2:0] rd_entry = '0;
  logic [NSEG-1:0][3:0] rd_cnt;
  logic handover_evt, reopen_evt, drop_evt;
  int checks = 0, failures = 0;
  int n_hand = 0, n_reopen = 0, n_drop = 0;

  approx_sorter #(.NSEG(NSEG), .MEM_DEPTH(MEM_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (handover_evt) n_hand++;
    if (reopen_evt) n_reopen++;
    if (drop_evt) n_drop++;
  end

  // Model state.
  int mu [NSEG+1];
  path_t mmem [NSEG][SEGSZ];
  int mcnt [NSEG], mptr [NSEG];

  task automatic model_reset(input int rr);
    mu[0] = -1;
    for (int j = 1; j <= NSEG; j++) mu[j] = (j * rr) / NSEG;
    for (int j = 0; j < NSEG; j++) begin mcnt[j] = 0; mptr[j] = 0; end
  endtask

  task automatic model_write(input path_t p);
    int m;
    m = int'(p.metric);
    for (int j = 1; j <= NSEG; j++) begin
      if (m > mu[j-1] && m <= mu[j]) begin
        mmem[j-1][mptr[j-1]] = p;
        if (mcnt[j-1] < SEGSZ) mcnt[j-1]++;
        mptr[j-1]++;
        if (mptr[j-1] == SEGSZ) begin
          mptr[j-1] = 0;
          mu[j] = mu[j-1];
        end
        return;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_path = '0;
    r2 = 8'd200;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      int rr, nw;
      rr = (round % 2 == 0) ? 200 : 60 + round * 10;
      nw = 40 + round * 60;
      r2 = MW'(rr);
      @(negedge clk);
      if (round == 0) clear = 1; else swap = 1;
      model_reset(rr);
      @(negedge clk);
      clear = 0; swap = 0;
      for (int i = 0; i < nw; i++) begin
        path_t p;
        p.sym = (NT*QB)'($urandom);
        // Bias towards small metrics so the lower segments overflow.
        p.metric = MW'(($urandom_range(3) == 0) ? $urandom_range(rr + 20) : $urandom_range(rr / 3));
        wr_valid = 1; wr_path = p;
        model_write(p);
        @(negedge clk);
        if ($urandom_range(4) == 0) begin wr_valid = 0; @(negedge clk); end
      end
      wr_valid = 0;
      @(negedge clk);
      swap = 1;
      @(negedge clk);
      swap = 0;
      // The written bank is now the read bank.
      for (int j = 0; j < NSEG; j++) begin
        checks++;
        if (int'(rd_cnt[j]) != mcnt[j]) begin
          failures++;
          $display("round %0d seg %0d count %0d want %0d", round, j, rd_cnt[j], mcnt[j]);
        end
        for (int e = 0; e < mcnt[j]; e++) begin
          rd_en = 1; rd_seg = 4'(j); rd_entry = 3'(e);
          @(negedge clk);
          rd_en = 0;
          checks++;
          if (rd_path !== mmem[j][e]) begin
            failures++;
            $display("round %0d seg %0d entry %0d: %h want %h", round, j, e, rd_path, mmem[j][e]);
          end
        end
      end
    end
    checks++;
    if (n_hand == 0 || n_reopen == 0 || n_drop == 0) begin
      failures++;
      $display("events: handover %0d reopen %0d drop %0d", n_hand, n_reopen, n_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
