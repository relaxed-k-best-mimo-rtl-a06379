// tb_output_gen: streams random lists of final survivors (1..K, including
// lists where all survivors share some bits and an empty list) into the
// output generator and compares the L-values, hard decisions and empty
// flag with a reference computed here from the whole list, and checks the
// result arrives one clock after `finish` (one survivor per clock in).
module tb_output_gen;
  import rkb_pkg::*;
  localparam int NB = NT * QB;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, finish = 0;
  path_t in_path;
  logic res_valid, empty, undef_evt;
  logic signed [NB-1:0][LLRW-1:0] llr;
  logic [NB-1:0] hard;
  int checks = 0, failures = 0, n_undef = 0;

  output_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] bits_of(input path_t p);
    logic [NB-1:0] r;
    for (int a = 0; a < NT; a++) begin
      int li, lq;
      li = int'(p.sym[a][5:3]); lq = int'(p.sym[a][2:0]);
      // Gray code of each 3-bit level index.
      r[a*QB +: QB] = {3'(li ^ (li >> 1)), 3'(lq ^ (lq >> 1))};
    end
    return r;
  endfunction

  initial begin
    path_t lst [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n, best, worst, bi;
      sym_t common;
      n = (t == 5) ? 0 : $urandom_range(64, 1);
      common = QB'($urandom);
      lst.delete();
      for (int i = 0; i < n; i++) begin
        path_t p;
        p.sym = (NT*QB)'({$urandom, $urandom});
        if (t % 3 == 0) p.sym[1] = common;   // all agree on antenna 1's bits
        p.metric = MW'($urandom_range(255));
        lst.push_back(p);
      end
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (lst[i]) begin
        in_valid = 1; in_path = lst[i];
        @(negedge clk);
      end
      in_valid = 0;
      finish = 1;
      @(negedge clk);
      finish = 0;
      checks++;
      if (!res_valid) begin failures++; $display("no result"); end
      if (undef_evt) n_undef++;
      best = 1000; worst = -1; bi = 0;
      foreach (lst[i]) begin
        if (int'(lst[i].metric) < best) begin best = int'(lst[i].metric); bi = i; end
        if (int'(lst[i].metric) > worst) worst = int'(lst[i].metric);
      end
      checks++;
      if (empty !== (n == 0) || (n > 0 && hard !== bits_of(lst[bi]))) begin
        failures++;
        $display("t%0d hard %h empty %0d", t, hard, empty);
      end
      for (int b = 0; b < NB; b++) begin
        int g0, g1, want;
        g0 = 1000; g1 = 1000;
        foreach (lst[i]) begin
          logic [NB-1:0] bb;
          bb = bits_of(lst[i]);
          if (bb[b] && int'(lst[i].metric) < g1) g1 = int'(lst[i].metric);
          if (!bb[b] && int'(lst[i].metric) < g0) g0 = int'(lst[i].metric);
        end
        if (n == 0) want = 0;
        else if (g0 < 1000 && g1 < 1000) want = g0 - g1;
        else if (g1 < 1000) want = worst - best;
        else want = best - worst;
        checks++;
        if (int'(signed'(llr[b])) != want) begin
          failures++;
          $display("t%0d bit %0d llr %0d want %0d", t, b, signed'(llr[b]), want);
        end
      end
    end
    checks++;
    if (n_undef == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
