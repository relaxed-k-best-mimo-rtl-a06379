// tb_mps: loads random valid-circle tables, start points and directions,
// sends random termination requests, and checks every point the MPS feeds:
// one per clock while any circle is valid, circles taken in turn from the
// valid circle pointer, and on each circle the zigzag order
// k0, k0+d, k0-d, k0+2d, k0-2d, ... until the circle is exhausted or
// terminated. Also checks that an unterminated circle yields all its points.
module tb_mps;
  import rkb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load = 0;
  logic [NCIRC-1:0] load_valid, load_dir;
  logic [NCIRC-1:0][3:0] load_start;
  logic term_valid = 0;
  logic [3:0] term_circ = '0;
  logic out_valid, idle;
  sym_t out_sym;
  logic [3:0] out_circ;
  int checks = 0, failures = 0, n_term = 0;

  mps dut (.*);
  always #5 clk = ~clk;

  // Model.
  bit m_act [NCIRC];
  int m_cnt [NCIRC];
  int m_ptr;
  bit terminated [NCIRC];

  function automatic int zig(input int c, input int n);
    int m, k;
    m = (n + 1) / 2;
    k = int'(load_start[c]) + ((n % 2 == 1) == load_dir[c] ? m : -m);
    k = ((k % CIRC_N[c]) + CIRC_N[c]) % CIRC_N[c];
    return k;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      load_valid = NCIRC'($urandom);
      if (t % 10 == 0) load_valid = '0;
      for (int c = 0; c < NCIRC; c++) begin
        load_start[c] = 4'($urandom_range(CIRC_N[c] - 1));
        load_dir[c] = 1'($urandom);
        m_act[c] = load_valid[c];
        m_cnt[c] = 0;
        terminated[c] = 0;
      end
      m_ptr = 0;
      load = 1;
      @(negedge clk);
      load = 0;
      #1;
      forever begin
        int exp_c;
        bit anyact;
        anyact = 0;
        exp_c = -1;
        for (int i = 0; i < NCIRC; i++)
          if (exp_c < 0 && m_act[(m_ptr + i) % NCIRC]) exp_c = (m_ptr + i) % NCIRC;
        anyact = (exp_c >= 0);
        checks++;
        if (out_valid !== anyact || idle !== !anyact) begin
          failures++;
          $display("t%0d valid %0d expected %0d circ %0d cnt %0d", t, out_valid, anyact, exp_c, m_cnt[exp_c]);
        end
        if (!anyact) break;
        checks++;
        if (int'(out_circ) != exp_c || out_sym !== circ_sym(exp_c, zig(exp_c, m_cnt[exp_c]))) begin
          failures++;
          $display("t%0d circle %0d/%0d point %h/%h", t, out_circ, exp_c, out_sym,
                   circ_sym(exp_c, zig(exp_c, m_cnt[exp_c])));
        end
        // Random termination request for some circle.
        term_valid = ($urandom_range(5) == 0);
        term_circ = 4'($urandom_range(NCIRC - 1));
        m_cnt[exp_c]++;
        if (m_cnt[exp_c] == CIRC_N[exp_c]) m_act[exp_c] = 0;
        m_ptr = (exp_c + 1) % NCIRC;
        if (term_valid) begin
          if (m_act[term_circ]) n_term++;
          m_act[term_circ] = 0;
          terminated[term_circ] = 1;
        end
        @(negedge clk);
        term_valid = 0;
        #1;
      end
      for (int c = 0; c < NCIRC; c++) begin
        checks++;
        if (load_valid[c] && !terminated[c] && m_cnt[c] != CIRC_N[c]) failures++;
      end
    end
    checks++;
    if (n_term == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
