// tb_ps_block: plays the PC side of the Req/Ack link. For random survivors
// it computes P_c, closest points and directions itself (brute force over
// the circles) and hands them over on the bus with an acknowledge. Every
// extended path the block emits is recomputed and must be admissible
// (metric <= r^2) and unique; every point of the guaranteed zigzag prefix
// of each circle (up to its first point outside the radius) must appear.
// Also checks that the block feeds one point per clock: the time from
// acknowledge to the next request is at most the points examined plus the
// pipeline drain.
module tb_ps_block;
  import rkb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [MW-1:0] r2;
  logic req, ack = 0, out_valid, idle, term_evt;
  pcout_t bus;
  path_t out_path;
  int checks = 0, failures = 0, n_term = 0;

  ps_block dut (.*);
  always #5 clk = ~clk;

  path_t got [$];
  int n_examined;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin got.push_back(out_path); n_examined++; end
    if (rst_n && term_evt) begin n_term++; n_examined++; end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int metric_of(input pcout_t b, input int k);
    logic signed [127:0] dr, di, sq;
    dr = 128'(b.pc.re) - 128'(b.lii) * 128'(PT_I[k]) * 2048;
    di = 128'(b.pc.im) - 128'(b.lii) * 128'(PT_Q[k]) * 2048;
    sq = (dr * dr + di * di) >>> MSHIFT;
    if (sq > 511) sq = 511;
    return int'(sq) + int'(b.path.metric);
  endfunction

  initial begin
    bus = '0;
    r2 = 8'd160;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      int li, cyc, npass;
      bit admissible [NPTS];
      li = $urandom_range(2 ** 13, 2 ** 11);
      bus.lii = LW'(li);
      bus.depth = 2'($urandom_range(3));
      bus.path.sym = (NT*QB)'($urandom);
      bus.path.metric = MW'($urandom_range(60));
      bus.pc.re = PCW'(longint'(li) * 2048 * ($urandom_range(14) - 7) + longint'($urandom_range(2 ** 22)) - 2 ** 21);
      bus.pc.im = PCW'(longint'(li) * 2048 * ($urandom_range(14) - 7) + longint'($urandom_range(2 ** 22)) - 2 ** 21);
      bus.valid = '1;
      for (int c = 0; c < NCIRC; c++) begin
        int bk, bm;
        bm = 1 << 30; bk = 0;
        for (int k = 0; k < CIRC_N[c]; k++)
          if (metric_of(bus, CIRC_OFF[c] + k) < bm) begin bm = metric_of(bus, CIRC_OFF[c] + k); bk = k; end
        bus.start[c] = 4'(bk);
        // Direction: towards the nearer neighbour.
        bus.dir[c] = metric_of(bus, CIRC_OFF[c] + (bk + 1) % CIRC_N[c]) <=
                     metric_of(bus, CIRC_OFF[c] + (bk + CIRC_N[c] - 1) % CIRC_N[c]);
      end
      got.delete();
      n_examined = 0;
      while (!req) @(negedge clk);
      ack = 1;
      @(negedge clk);
      ack = 0;
      cyc = 0;
      #1;
      while (!req) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > n_examined + 6) begin failures++; $display("slow: %0d clocks for %0d points", cyc, n_examined); end
      // Every emitted path admissible, correct and unique.
      npass = 0;
      for (int k = 0; k < NPTS; k++) admissible[k] = metric_of(bus, k) <= int'(r2);
      foreach (got[i]) begin
        int k;
        k = -1;
        for (int m = 0; m < NPTS; m++)
          if (got[i].sym[bus.depth] == {lvl2idx(PT_I[m]), lvl2idx(PT_Q[m])}) k = m;
        checks++;
        if (k < 0 || !admissible[k] || int'(got[i].metric) != metric_of(bus, k)) begin
          failures++;
          $display("t%0d bad path %h", t, got[i]);
        end else admissible[k] = 0;  // a second copy would now fail
        for (int j = 0; j < NT; j++)
          if (j != int'(bus.depth)) begin
            checks++;
            if (got[i].sym[j] !== bus.path.sym[j]) failures++;
          end
      end
      // Guaranteed zigzag prefix: must all have been emitted.
      for (int c = 0; c < NCIRC; c++) begin
        for (int n = 0; n < CIRC_N[c]; n++) begin
          int m, k;
          m = (n + 1) / 2;
          k = int'(bus.start[c]) + (((n % 2) == 1) == bus.dir[c] ? m : -m);
          k = CIRC_OFF[c] + ((k % CIRC_N[c]) + CIRC_N[c]) % CIRC_N[c];
          if (metric_of(bus, k) > int'(r2)) break;
          checks++;
          if (admissible[k]) begin failures++; $display("t%0d missing point %0d", t, k); end
        end
      end
    end
    checks++;
    if (n_term == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
