// tb_pc_block: random channels, s-hat vectors and survivors at every depth.
// Checks, against floating-point and brute-force references computed here:
// P_c (as G_i - sum l_ij s_j, a different arrangement of the same sum), the
// valid circle mask (distance from P_c to each scaled circle against the
// remaining metric budget, and that no admissible point lies on an excluded
// circle), the closest point of each circle and the zigzag start direction,
// and the 3-clock latency.
module tb_pc_block;
  import rkb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  path_t in_path;
  logic [1:0] depth;
  lval_t [NT-1:0][NT-1:0] lmat;
  sval_t [NT-1:0] shat;
  logic [MW-1:0] r2;
  logic out_valid;
  pcout_t out;
  int checks = 0, failures = 0, n_excl = 0, n_valid = 0;

  pc_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sq(input real x); return x * x; endfunction
  function automatic real fabs(input real x); return (x < 0.0) ? -x : x; endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      longint gre, gim, pre, pim;
      real lii, pabs, dbud, pcr, pci;
      // Channel: l_ij with LF fraction bits, diagonal real positive.
      for (int i = 0; i < NT; i++)
        for (int j = 0; j < NT; j++) begin
          lmat[i][j].re = (j < i) ? LW'($urandom_range(2 ** 13) - 2 ** 12) : (j == i) ? LW'($urandom_range(2 ** 14 - 1, 2 ** 11)) : '0;
          lmat[i][j].im = (j < i) ? LW'($urandom_range(2 ** 13) - 2 ** 12) : '0;
        end
      for (int j = 0; j < NT; j++) begin
        shat[j].re = SW'($urandom_range(2 ** 15) - 2 ** 14);
        shat[j].im = SW'($urandom_range(2 ** 15) - 2 ** 14);
      end
      in_path.sym = (NT*QB)'($urandom);
      in_path.metric = MW'($urandom_range(80));
      r2 = MW'($urandom_range(255, 80));
      depth = 2'(t % NT);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      for (int k = 0; k < 1; k++) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("early output"); end
      end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("no output after 3 clocks"); continue; end
      // P_c = G_d - sum_{j<d} l_dj s_j
      gre = 0; gim = 0;
      for (int j = 0; j <= int'(depth); j++) begin
        gre += longint'(lmat[depth][j].re) * longint'(shat[j].re) - longint'(lmat[depth][j].im) * longint'(shat[j].im);
        gim += longint'(lmat[depth][j].re) * longint'(shat[j].im) + longint'(lmat[depth][j].im) * longint'(shat[j].re);
      end
      pre = gre; pim = gim;
      for (int j = 0; j < int'(depth); j++) begin
        longint sr, si;
        sr = longint'(idx2lvl(in_path.sym[j][5:3])) * 2048;
        si = longint'(idx2lvl(in_path.sym[j][2:0])) * 2048;
        pre -= longint'(lmat[depth][j].re) * sr - longint'(lmat[depth][j].im) * si;
        pim -= longint'(lmat[depth][j].re) * si + longint'(lmat[depth][j].im) * sr;
      end
      checks++;
      if (out.pc.re !== PCW'(pre) || out.pc.im !== PCW'(pim) || out.path !== in_path || out.depth !== depth) begin
        failures++;
        $display("P_c %0d %0d want %0d %0d", out.pc.re, out.pc.im, pre, pim);
      end
      pcr = real'(pre); pci = real'(pim);
      lii = real'(lmat[depth][depth].re) * 2048.0;
      pabs = $sqrt(sq(pcr) + sq(pci));
      dbud = real'(int'(r2) - int'(in_path.metric) + 1) * (2.0 ** MSHIFT);
      for (int c = 0; c < NCIRC; c++) begin
        real dist2, best, dd, ang;
        bit want;
        int bk;
        dist2 = sq(lii * $sqrt(real'(CIRC_R2[c])) - pabs);
        want = dist2 < dbud;
        // Skip cases too close to the boundary for floating point.
        if (fabs(dist2 - dbud) > 1e-6 * dbud) begin
          checks++;
          if (out.valid[c] !== want) begin
            failures++;
            $display("t%0d circle %0d valid %0d want %0d", t, c, out.valid[c], want);
          end
        end
        if (want) n_valid++; else n_excl++;
        // Closest point and direction.
        best = 1e300; bk = 0;
        for (int k = 0; k < CIRC_N[c]; k++) begin
          dd = sq(pcr - lii * PT_I[CIRC_OFF[c] + k]) + sq(pci - lii * PT_Q[CIRC_OFF[c] + k]);
          if (dd < best) begin best = dd; bk = k; end
        end
        dd = sq(pcr - lii * PT_I[CIRC_OFF[c] + out.start[c]]) + sq(pci - lii * PT_Q[CIRC_OFF[c] + out.start[c]]);
        checks++;
        if (dd > best * (1.0 + 1e-9)) begin
          failures++;
          $display("t%0d circle %0d start %0d want %0d", t, c, out.start[c], bk);
        end
        ang = $atan2(pci, pcr) - $atan2(real'(PT_Q[CIRC_OFF[c] + out.start[c]]), real'(PT_I[CIRC_OFF[c] + out.start[c]]));
        while (ang > 3.14159265358979) ang -= 2.0 * 3.14159265358979;
        while (ang <= -3.14159265358979) ang += 2.0 * 3.14159265358979;
        if (fabs(ang) > 1e-9) begin
          checks++;
          if (out.dir[c] !== (ang > 0)) begin
            failures++;
            $display("t%0d circle %0d dir %0d", t, c, out.dir[c]);
          end
        end
        // No admissible point may sit on an excluded circle.
        for (int k = 0; k < CIRC_N[c]; k++) begin
          dd = sq(pcr - lii * PT_I[CIRC_OFF[c] + k]) + sq(pci - lii * PT_Q[CIRC_OFF[c] + k]);
          if (dd < dbud * (1.0 - 1e-9)) begin
            checks++;
            if (!out.valid[c]) begin failures++; $display("admissible point excluded"); end
          end
        end
      end
    end
    checks++;
    if (n_excl == 0 || n_valid == 0) begin failures++; $display("valid %0d excluded %0d", n_valid, n_excl); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
