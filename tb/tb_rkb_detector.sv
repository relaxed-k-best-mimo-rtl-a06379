// tb_rkb_detector: end-to-end test of the whole detector at its default
// size (13 cores of 8 PS blocks, 16 segments, 128-entry banks, K=64).
// Streams 40 received vectors back to back, so that every core is busy and
// the input stalls, while the result side applies random back-pressure.
// Low-noise vectors must be detected exactly (hard decisions = transmitted
// bits = ML leaf of an exhaustive in-radius search); for all vectors the
// hard decisions must be an admissible leaf no better than ML, L-value
// signs must agree with them, an empty result must come exactly when no
// leaf is within the radius, and every tag must come back once. Counts the
// mechanisms (input stall with all cores busy, out-of-order completion,
// output back-pressure, and every core-internal event) and fails if one
// never happened.
module tb_rkb_detector;
  import rkb_pkg::*;
  import rkb_ref_pkg::*;
  localparam int NB = NT * QB, NJOB = 40;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_empty;
  lval_t [NT-1:0][NT-1:0] in_l;
  sval_t [NT-1:0] in_shat;
  logic [MW-1:0] in_r2;
  logic [7:0] in_tag, out_tag;
  logic signed [NB-1:0][LLRW-1:0] out_llr;
  logic [NB-1:0] out_hard;
  logic [12:0] core_busy;
  evt_t evt;
  int checks = 0, failures = 0;
  int n_evt [7];
  string evt_name [7] = '{"undef", "kcut", "multireq", "term", "drop", "reopen", "handover"};
  int n_stall = 0, n_ooo = 0, n_bp = 0, n_done = 0, last_tag = -1;
  job_t jobs [NJOB];
  int ml_best [NJOB], ml_leaves [NJOB];
  sym_t [NT-1:0] ml_syms [NJOB];
  bit exact [NJOB], seen [NJOB];

  rkb_detector dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk)
    if (rst_n) begin
      for (int i = 0; i < 7; i++) if (evt[i]) n_evt[i]++;
      if (in_valid && !in_ready && &core_busy) n_stall++;
      if (out_valid && !out_ready) n_bp++;
    end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: %0d results", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result side.
  initial begin
    forever begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      #1;
      if (out_valid && out_ready && rst_n) begin
        int t, dm;
        t = int'(out_tag);
        n_done++;
        if (t < last_tag) n_ooo++;
        last_tag = t;
        checks++;
        if (t >= NJOB || seen[t]) begin failures++; $display("bad or repeated tag %0d", t); end
        else begin
          seen[t] = 1;
          checks++;
          if (out_empty !== (ml_leaves[t] == 0)) begin
            failures++;
            $display("job %0d: empty %0d, %0d leaves", t, out_empty, ml_leaves[t]);
          end
          if (!out_empty && ml_leaves[t] > 0) begin
            dm = path_metric(jobs[t], syms_of(out_hard));
            checks++;
            if (dm > int'(jobs[t].r2) || dm < ml_best[t]) begin
              failures++;
              $display("job %0d: leaf metric %0d ML %0d", t, dm, ml_best[t]);
            end
            if (exact[t]) begin
              checks++;
              if (out_hard !== bits_of(ml_syms[t]) || out_hard !== bits_of(jobs[t].tx)) begin
                failures++;
                $display("job %0d: hard %h tx %h", t, out_hard, bits_of(jobs[t].tx));
              end
            end
            for (int b = 0; b < NB; b++) begin
              checks++;
              if ((signed'(out_llr[b]) > 0 && !out_hard[b]) || (signed'(out_llr[b]) < 0 && out_hard[b]))
                failures++;
            end
          end
        end
      end
    end
  end

  initial begin
    for (int t = 0; t < NJOB; t++) begin
      sym_t [NT-1:0] s;
      case (t % 4)
        0, 1: begin jobs[t] = make_job(200, 64, 3000, 6000); exact[t] = 1; end
        2: begin jobs[t] = make_job(900, 255, 3000, 4500); exact[t] = 0; end
        default: begin jobs[t] = make_job(2000, (t % 8 == 3) ? 1 : 120, 4000, 8000); exact[t] = 0; end
      endcase
      ml_best[t] = -1; ml_leaves[t] = 0;
      ml_search(jobs[t], 0, 0, s, ml_best[t], ml_syms[t], ml_leaves[t]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NJOB; t++) begin
      in_l = jobs[t].l; in_shat = jobs[t].shat; in_r2 = jobs[t].r2; in_tag = 8'(t);
      in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 0;
    while (n_done < NJOB) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (n_stall == 0) begin failures++; $display("input never stalled"); end
    checks++;
    if (n_ooo == 0) begin failures++; $display("no out-of-order completion"); end
    checks++;
    if (n_bp == 0) begin failures++; $display("no output back-pressure"); end
    $display("stall %0d out-of-order %0d back-pressure %0d", n_stall, n_ooo, n_bp);
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (n_evt[i] == 0) begin failures++; $display("mechanism %s never happened", evt_name[i]); end
      else $display("mechanism %s: %0d", evt_name[i], n_evt[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
