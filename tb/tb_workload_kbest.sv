// tb_workload_kbest: the detector's evaluation workload. Three detector
// cores of default size except for K (64, 48 and 32) detect the same
// uncoded 4x4 64-QAM vectors sent over flat Rayleigh channels at
// Eb/N0 = 17.7, 17.2, 16.7 and 16.2 dB. Eb/N0 is taken as Es/N0 +
// 10log10(Nr/(R Nt q)) with code rate R = 1/2, so Es/N0 is 4.77 dB higher.
// Es = 42 is the mean energy of the odd-integer constellation.
//
// For every vector the bench does the channel preprocessing in floating
// point:
//   * G = H^H H, factored as L^H L with L lower triangular and a real,
//     positive diagonal (Cholesky of G with rows and columns reversed);
//   * s-hat = G^-1 H^H y, by two triangular solves;
//   * r^2 = 2 alpha Nr sigma^2 with alpha = 6 (sigma^2 = N0/2), in metric
//     units.
// Channels whose L or s-hat do not fit the input number formats (|l| < 4,
// |s-hat| < 16) are drawn again and counted.
//
// Checks, for each core and vector:
//   * the tag returns;
//   * the result is empty only when no leaf lies within the radius;
//   * otherwise the hard decision is an admissible leaf no better than
//     the maximum-likelihood (ML) one;
//   * every L-value sign agrees with its hard bit.
// The bench prints for each K and Eb/N0 the bit errors against the
// transmitted and the ML bits, and the average clocks per vector with the
// throughput this gives at 270 MHz.
module tb_workload_kbest;
  import rkb_pkg::*;
  import rkb_ref_pkg::*;
  localparam int NB    = NT * QB;
  localparam int NK    = 3;
  localparam int NVEC  = 60;
  localparam int NSNR  = 4;
  localparam int KVAL [NK]   = '{64, 48, 32};
  localparam real EBN0 [NSNR] = '{17.7, 17.2, 16.7, 16.2};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  lval_t [NT-1:0][NT-1:0] in_l;
  sval_t [NT-1:0] in_shat;
  logic [MW-1:0] in_r2;
  logic [7:0] in_tag;
  logic [NK-1:0] in_ready, out_valid, out_empty;
  logic [7:0] out_tag [NK];
  logic signed [NB-1:0][LLRW-1:0] out_llr [NK];
  logic [NB-1:0] out_hard [NK];
  evt_t evt [NK];
  int checks = 0, failures = 0, redraws = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < NK; k++) begin : g_k
    detector_core #(.K(KVAL[k])) u_core (
      .clk, .rst_n, .in_valid, .in_ready(in_ready[k]), .in_l, .in_shat, .in_r2, .in_tag,
      .out_valid(out_valid[k]), .out_ready, .out_llr(out_llr[k]), .out_hard(out_hard[k]),
      .out_empty(out_empty[k]), .out_tag(out_tag[k]), .evt(evt[k]));
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Standard normal sample (Box-Muller).
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1000000, 1))) / 1000001.0;
    u2 = (real'($urandom_range(1000000, 0))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // One transmitted vector over a random channel at noise variance n0
  // (complex). Returns 0 when L or s-hat would not fit the formats.
  function automatic bit make_vec(input real n0, output job_t j);
    real hr [NT][NT], hi [NT][NT], yr [NT], yi [NT];
    real gr [NT][NT], gi [NT][NT], cr [NT][NT], ci [NT][NT];
    real lr [NT][NT], li [NT][NT], br [NT], bi [NT], zr [NT], zi [NT], xr [NT], xi [NT];
    real sr, si, r2;
    for (int a = 0; a < NT; a++) begin
      j.tx[a] = QB'($urandom);
      for (int b = 0; b < NT; b++) begin
        hr[a][b] = gauss() * $sqrt(0.5);
        hi[a][b] = gauss() * $sqrt(0.5);
      end
    end
    for (int a = 0; a < NT; a++) begin
      yr[a] = gauss() * $sqrt(n0 / 2.0);
      yi[a] = gauss() * $sqrt(n0 / 2.0);
      for (int b = 0; b < NT; b++) begin
        real s_r, s_i;
        s_r = real'(idx2lvl(j.tx[b][5:3]));
        s_i = real'(idx2lvl(j.tx[b][2:0]));
        yr[a] += hr[a][b] * s_r - hi[a][b] * s_i;
        yi[a] += hr[a][b] * s_i + hi[a][b] * s_r;
      end
    end
    // G = H^H H with rows and columns reversed, then its Cholesky factor C.
    for (int a = 0; a < NT; a++)
      for (int b = 0; b < NT; b++) begin
        gr[a][b] = 0.0; gi[a][b] = 0.0;
        for (int k = 0; k < NT; k++) begin
          int p, q;
          p = NT - 1 - a; q = NT - 1 - b;
          gr[a][b] += hr[k][p] * hr[k][q] + hi[k][p] * hi[k][q];
          gi[a][b] += hr[k][p] * hi[k][q] - hi[k][p] * hr[k][q];
        end
      end
    for (int c = 0; c < NT; c++) begin
      sr = gr[c][c];
      for (int k = 0; k < c; k++) sr -= cr[c][k] * cr[c][k] + ci[c][k] * ci[c][k];
      cr[c][c] = $sqrt(sr); ci[c][c] = 0.0;
      for (int r = c + 1; r < NT; r++) begin
        sr = gr[r][c]; si = gi[r][c];
        for (int k = 0; k < c; k++) begin
          // subtract C[r][k] * conj(C[c][k])
          sr -= cr[r][k] * cr[c][k] + ci[r][k] * ci[c][k];
          si -= ci[r][k] * cr[c][k] - cr[r][k] * ci[c][k];
        end
        cr[r][c] = sr / cr[c][c]; ci[r][c] = si / cr[c][c];
      end
      for (int r = 0; r < c; r++) begin cr[r][c] = 0.0; ci[r][c] = 0.0; end
    end
    // L[a][b] = conj(C[NT-1-b][NT-1-a]), so that G = L^H L.
    for (int a = 0; a < NT; a++)
      for (int b = 0; b < NT; b++) begin
        lr[a][b] = cr[NT-1-b][NT-1-a];
        li[a][b] = -ci[NT-1-b][NT-1-a];
      end
    // b = H^H y; L^H z = b (backwards); L x = z (forwards).
    for (int a = 0; a < NT; a++) begin
      br[a] = 0.0; bi[a] = 0.0;
      for (int k = 0; k < NT; k++) begin
        br[a] += hr[k][a] * yr[k] + hi[k][a] * yi[k];
        bi[a] += hr[k][a] * yi[k] - hi[k][a] * yr[k];
      end
    end
    for (int a = NT - 1; a >= 0; a--) begin
      sr = br[a]; si = bi[a];
      for (int k = a + 1; k < NT; k++) begin
        // subtract conj(L[k][a]) * z[k]
        sr -= lr[k][a] * zr[k] + li[k][a] * zi[k];
        si -= lr[k][a] * zi[k] - li[k][a] * zr[k];
      end
      zr[a] = sr / lr[a][a]; zi[a] = si / lr[a][a];
    end
    for (int a = 0; a < NT; a++) begin
      sr = zr[a]; si = zi[a];
      for (int k = 0; k < a; k++) begin
        sr -= lr[a][k] * xr[k] - li[a][k] * xi[k];
        si -= lr[a][k] * xi[k] + li[a][k] * xr[k];
      end
      xr[a] = sr / lr[a][a]; xi[a] = si / lr[a][a];
    end
    for (int a = 0; a < NT; a++) begin
      if (xr[a] >= 15.99 || xr[a] <= -15.99 || xi[a] >= 15.99 || xi[a] <= -15.99) return 0;
      j.shat[a].re = SW'($rtoi(xr[a] * 2048.0));
      j.shat[a].im = SW'($rtoi(xi[a] * 2048.0));
      for (int b = 0; b < NT; b++) begin
        if (lr[a][b] >= 3.99 || lr[a][b] <= -3.99 || li[a][b] >= 3.99 || li[a][b] <= -3.99) return 0;
        j.l[a][b].re = (b <= a) ? LW'($rtoi(lr[a][b] * 4096.0)) : '0;
        j.l[a][b].im = (b < a) ? LW'($rtoi(li[a][b] * 4096.0)) : '0;
      end
    end
    r2 = 2.0 * 6.0 * real'(NT) * (n0 / 2.0) * 16.0;
    j.r2 = (r2 >= 255.0) ? MW'(255) : MW'($rtoi(r2));
    return 1;
  endfunction

  initial begin
    int cyc [NK];
    int err_tx [NK], err_ml [NK], ncyc [NK];
    job_t j;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int sn = 0; sn < NSNR; sn++) begin
      real n0;
      n0 = 42.0 / (10.0 ** ((EBN0[sn] + 10.0 * $log10(real'(NT) * 0.5 * real'(QB) / real'(NT))) / 10.0));
      for (int k = 0; k < NK; k++) begin err_tx[k] = 0; err_ml[k] = 0; ncyc[k] = 0; end
      for (int v = 0; v < NVEC; v++) begin
        int best, nleaf, t;
        logic [NK-1:0] seen;
        sym_t [NT-1:0] s, bs;
        while (!make_vec(n0, j)) redraws++;
        best = -1; nleaf = 0;
        ml_search(j, 0, 0, s, best, bs, nleaf);
        t = sn * NVEC + v;
        in_l = j.l; in_shat = j.shat; in_r2 = j.r2; in_tag = 8'(t);
        in_valid = 1;
        #1;
        while (in_ready != '1) begin @(negedge clk); #1; end
        @(negedge clk);
        in_valid = 0;
        seen = '0;
        for (int k = 0; k < NK; k++) cyc[k] = 0;
        out_ready = 1;
        while (seen != '1) begin
          for (int k = 0; k < NK; k++) begin
            if (!seen[k]) cyc[k]++;
            if (out_valid[k] && !seen[k]) begin
              seen[k] = 1'b1;
              ncyc[k] += cyc[k];
              checks++;
              if (out_tag[k] !== 8'(t)) begin failures++; $display("K=%0d: tag", KVAL[k]); end
              checks++;
              if (out_empty[k] && nleaf > 0) begin
                failures++;
                $display("K=%0d vec %0d: empty with %0d leaves in radius", KVAL[k], t, nleaf);
              end
              if (out_empty[k]) err_tx[k] += NB;
              else begin
                int dm;
                dm = path_metric(j, syms_of(out_hard[k]));
                checks++;
                if (dm > int'(j.r2) || dm < best) begin
                  failures++;
                  $display("K=%0d vec %0d: leaf metric %0d ML %0d", KVAL[k], t, dm, best);
                end
                err_tx[k] += $countones(out_hard[k] ^ bits_of(j.tx));
                if (nleaf > 0) err_ml[k] += $countones(out_hard[k] ^ bits_of(bs));
                for (int b = 0; b < NB; b++) begin
                  checks++;
                  if ((signed'(out_llr[k][b]) > 0 && !out_hard[k][b]) ||
                      (signed'(out_llr[k][b]) < 0 && out_hard[k][b])) begin
                    failures++;
                    $display("K=%0d vec %0d: bit %0d llr %0d hard %0d", KVAL[k], t, b,
                             signed'(out_llr[k][b]), out_hard[k][b]);
                  end
                end
              end
            end
          end
          @(negedge clk);
        end
        out_ready = 0;
      end
      for (int k = 0; k < NK; k++)
        $display("Eb/N0 %4.1f dB r2=%0d K=%0d: bit errors %0d vs sent, %0d vs ML of %0d bits; %0d clocks/vector = %5.2f Mb/s at 270 MHz",
                 EBN0[sn], j.r2, KVAL[k], err_tx[k], err_ml[k], NVEC * NB, ncyc[k] / NVEC,
                 real'(NB) * 270.0 * real'(NVEC) / real'(ncyc[k]));
    end
    $display("channels drawn again because L or s-hat did not fit: %0d", redraws);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
