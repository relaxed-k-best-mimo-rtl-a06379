// tb_detector_core: end-to-end runs of one detector core at its default
// size (BETA=8, 16 segments, 128-entry banks, K=64) on random channels.
// An exhaustive in-radius search gives the maximum-likelihood leaf. Checks:
// low-noise vectors are detected exactly (hard decisions = transmitted =
// ML bits); for every vector the hard decisions are an admissible leaf no
// better than ML, the L-value signs agree with the hard decisions, the
// result is empty exactly when no leaf lies within the radius (tested with
// a tiny radius), and the tag returns. Counts each internal mechanism
// (segment hand-over, reopen, drop, circle termination, simultaneous PS
// requests, stop at K, L-value fallback) and fails if one never happened.
module tb_detector_core;
  import rkb_pkg::*;
  import rkb_ref_pkg::*;
  localparam int NB = NT * QB;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_empty;
  lval_t [NT-1:0][NT-1:0] in_l;
  sval_t [NT-1:0] in_shat;
  logic [MW-1:0] in_r2;
  logic [7:0] in_tag, out_tag;
  logic signed [NB-1:0][LLRW-1:0] out_llr;
  logic [NB-1:0] out_hard;
  evt_t evt;
  int checks = 0, failures = 0;
  int n_evt [7];
  string evt_name [7] = '{"undef", "kcut", "multireq", "term", "drop", "reopen", "handover"};

  detector_core dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk)
    if (rst_n) for (int i = 0; i < 7; i++) if (evt[i]) n_evt[i]++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(input job_t j, input int t, input bit exact);
    int best, nleaf, cyc, dm;
    sym_t [NT-1:0] s, bs;
    best = -1; nleaf = 0;
    ml_search(j, 0, 0, s, best, bs, nleaf);
    in_l = j.l; in_shat = j.shat; in_r2 = j.r2; in_tag = 8'(t);
    in_valid = 1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
    cyc = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (out_tag !== 8'(t)) begin failures++; $display("tag"); end
    checks++;
    if (out_empty !== (nleaf == 0)) begin
      failures++;
      $display("job %0d: empty %0d but %0d leaves in radius", t, out_empty, nleaf);
    end
    if (nleaf > 0 && !out_empty) begin
      dm = path_metric(j, syms_of(out_hard));
      checks++;
      if (dm > int'(j.r2) || dm < best) begin failures++; $display("job %0d: leaf metric %0d ML %0d", t, dm, best); end
      if (exact) begin
        checks++;
        if (out_hard !== bits_of(bs) || out_hard !== bits_of(j.tx)) begin
          failures++;
          $display("job %0d: hard %h ML %h tx %h", t, out_hard, bits_of(bs), bits_of(j.tx));
        end
      end
      for (int b = 0; b < NB; b++) begin
        checks++;
        if ((signed'(out_llr[b]) > 0 && !out_hard[b]) || (signed'(out_llr[b]) < 0 && out_hard[b])) begin
          failures++;
          $display("job %0d: bit %0d llr %0d hard %0d", t, b, signed'(out_llr[b]), out_hard[b]);
        end
      end
    end
    $display("job %0d: %0d clocks, %0d leaves in radius, ML metric %0d", t, cyc, nleaf, best);
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Low noise, moderate radius: exact detection.
    for (int t = 0; t < 4; t++) run_job(make_job(200, 64, 3000, 6000), t, 1);
    // Tiny radius and large noise: nothing admissible.
    run_job(make_job(2000, 1, 6000, 8000), 4, 0);
    // Large radius, weak diagonal: many admissible points, sorter overflow.
    for (int t = 5; t < 8; t++) run_job(make_job(900, 255, 3000, 4500), t, 0);
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (n_evt[i] == 0) begin failures++; $display("mechanism %s never happened", evt_name[i]); end
      else $display("mechanism %s: %0d", evt_name[i], n_evt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
