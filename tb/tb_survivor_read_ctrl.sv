// tb_survivor_read_ctrl: random segment fill counts for eight memories, a
// memory model answering reads one clock later with a path that encodes
// its (memory, segment, entry) address, and a randomly throttled `allow`.
// The delivered sequence must equal the reference order: segment by
// segment, entry by entry, memory by memory, stopping after K paths.
module tb_survivor_read_ctrl;
  import rkb_pkg::*;
  localparam int BETA = 8, NSEG = 16, MEM_DEPTH = 128, K = 64;
  logic clk = 0, rst_n = 0, start = 0, allow = 0;
  logic [BETA-1:0][NSEG-1:0][3:0] cnt;
  logic [BETA-1:0] rd_en;
  logic [3:0] rd_seg;
  logic [2:0] rd_entry;
  path_t [BETA-1:0] rd_path;
  logic out_valid, done, kcut_evt;
  path_t out_path;
  int checks = 0, failures = 0, n_kcut = 0, n_short = 0;

  survivor_read_ctrl #(.BETA(BETA), .NSEG(NSEG), .MEM_DEPTH(MEM_DEPTH), .K(K)) dut (.*);
  always #5 clk = ~clk;

  function automatic path_t tag(input int b, input int j, input int e);
    path_t p;
    p = '0;
    p.sym = (NT*QB)'({b[7:0], j[7:0], e[7:0]});
    p.metric = MW'(b * 16 + e);
    return p;
  endfunction

  always @(posedge clk)
    for (int b = 0; b < BETA; b++)
      if (rd_en[b]) rd_path[b] <= tag(b, int'(rd_seg), int'(rd_entry));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    path_t expq [$];
    int ndone, waitc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int dens;
      dens = $urandom_range(8);
      for (int b = 0; b < BETA; b++)
        for (int j = 0; j < NSEG; j++)
          cnt[b][j] = ($urandom_range(8) < dens) ? 4'($urandom_range(8)) : 4'd0;
      expq.delete();
      for (int j = 0; j < NSEG; j++)
        for (int e = 0; e < 8; e++)
          for (int b = 0; b < BETA; b++)
            if (e < int'(cnt[b][j]) && expq.size() < K) expq.push_back(tag(b, j, e));
      if (expq.size() < K) n_short++;
      start = 1;
      @(negedge clk);
      start = 0;
      ndone = 0;
      waitc = 0;
      while (ndone == 0 && waitc < 5000) begin
        allow = ($urandom_range(3) != 0);
        @(posedge clk);
        if (kcut_evt) n_kcut++;
        if (out_valid) begin
          checks++;
          if (expq.size() == 0 || out_path !== expq[0]) begin
            failures++;
            $display("t%0d got %h want %h", t, out_path, (expq.size() != 0) ? expq[0] : '0);
          end
          if (expq.size() != 0) void'(expq.pop_front());
        end
        if (done) ndone++;
        @(negedge clk);
        waitc++;
      end
      checks++;
      if (expq.size() != 0 || ndone != 1) begin failures++; $display("t%0d left %0d done %0d", t, expq.size(), ndone); end
    end
    checks++;
    if (n_kcut == 0 || n_short == 0) begin failures++; $display("kcut %0d short %0d", n_kcut, n_short); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
