// tb_pe: feeds random survivors and modulation points to the path extension
// pipeline and compares every result (pass with the extended path and its
// metric, or a termination request for the circle) with a wide-integer
// reference, including the 3-clock latency.
module tb_pe;
  import rkb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  sym_t in_sym;
  logic [3:0] in_circ;
  pcval_t pc;
  logic [LW-1:0] lii;
  path_t path;
  logic [1:0] depth;
  logic [MW-1:0] r2;
  logic out_valid, term_valid, busy;
  path_t out_path;
  logic [3:0] term_circ;
  int checks = 0, failures = 0, n_pass = 0, n_term = 0;

  pe dut (.*);
  always #5 clk = ~clk;

  // Expected results, indexed by issue cycle.
  typedef struct { bit pass; path_t p; logic [3:0] c; } exp_t;
  exp_t expq [$];
  int cyc = 0, issue_cyc [$];
  always @(posedge clk) cyc++;

  function automatic exp_t ref_pe(input sym_t s, input logic [3:0] c);
    exp_t e;
    logic signed [127:0] dr, di, sq, lam, g;
    dr = 128'(pc.re) - ((128'(signed'({1'b0, lii})) * 128'(idx2lvl(s[5:3]))) * 128'(2 ** SF));
    di = 128'(pc.im) - ((128'(signed'({1'b0, lii})) * 128'(idx2lvl(s[2:0]))) * 128'(2 ** SF));
    sq = dr * dr + di * di;
    lam = sq >>> MSHIFT;
    if (lam > 511) lam = 511;
    g = lam + 128'(path.metric);
    e.pass = (g <= 128'(r2));
    e.p = path;
    e.p.sym[depth] = s;
    e.p.metric = MW'(g);
    e.c = c;
    return e;
  endfunction

  always @(posedge clk) begin
    if (rst_n && (out_valid || term_valid)) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = expq.pop_front();
        if (cyc - issue_cyc.pop_front() != 3) begin
          failures++;
          $display("latency wrong");
        end
        if (out_valid) n_pass++; else n_term++;
        if (out_valid !== e.pass || term_valid !== !e.pass ||
            (e.pass && out_path !== e.p) || (!e.pass && term_circ !== e.c)) begin
          failures++;
          $display("mismatch: pass %0d/%0d path %h/%h", out_valid, e.pass, out_path, e.p);
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int sv = 0; sv < 200; sv++) begin
      // A survivor: P_c near l_ii times a constellation point.
      int li;
      li = $urandom_range(2 ** 14 - 1, 2 ** 11);
      lii = LW'(li);
      pc.re = PCW'(longint'(li) * longint'(2 * $urandom_range(7) - 7) * 2048 + longint'($urandom_range(2 ** 24)) - 2 ** 23);
      pc.im = PCW'(longint'(li) * longint'(2 * $urandom_range(7) - 7) * 2048 + longint'($urandom_range(2 ** 24)) - 2 ** 23);
      depth = 2'($urandom_range(3));
      path.sym = (NT*QB)'($urandom);
      path.metric = MW'($urandom_range(100));
      r2 = MW'($urandom_range(255, 60));
      for (int k = 0; k < 16; k++) begin
        in_valid = ($urandom_range(5) != 0);
        in_sym = QB'($urandom);
        in_circ = 4'($urandom_range(8));
        if (in_valid) begin
          expq.push_back(ref_pe(in_sym, in_circ));
          issue_cyc.push_back(cyc + 1);
        end
        @(negedge clk);
      end
      in_valid = 0;
      while (busy) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0 || n_pass == 0 || n_term == 0) begin
      failures++;
      $display("left %0d pass %0d term %0d", expq.size(), n_pass, n_term);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
