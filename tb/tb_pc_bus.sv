// tb_pc_bus: pushes numbered survivors into the queue at random times while
// eight modelled PS blocks raise requests at random and drop them after
// their acknowledge. Checks that acknowledges go only to requesters, one per
// clock, that survivors reach the PS blocks in queue order, that the choice
// is round-robin (the first requester after the last one served), and that
// `count` tracks the queue fill.
module tb_pc_bus;
  import rkb_pkg::*;
  localparam int BETA = 8, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pcout_t in_data;
  logic [BETA-1:0] req = '0, ack;
  pcout_t bus;
  logic [3:0] count;
  logic multi_req_evt;
  int checks = 0, failures = 0, n_multi = 0;
  int pushed = 0, served = 0, model_cnt = 0, last = BETA - 1;

  pc_bus #(.BETA(BETA), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      in_valid = (model_cnt < DEPTH) && ($urandom_range(2) != 0);
      in_data = '0;
      in_data.path.metric = MW'(pushed);
      in_data.pc.re = PCW'(pushed);
      for (int b = 0; b < BETA; b++)
        if (!req[b] && $urandom_range(6) == 0) req[b] = 1'b1;
      #1;
      checks++;
      if (count != 4'(model_cnt)) begin failures++; $display("count %0d want %0d", count, model_cnt); end
      checks++;
      if ((ack & ~req) != '0 || $countones(ack) > 1) begin failures++; $display("bad ack %b req %b", ack, req); end
      if (multi_req_evt) n_multi++;
      if (ack != '0) begin
        int exp_b;
        exp_b = -1;
        for (int i = 1; i <= BETA; i++)
          if (exp_b < 0 && req[(last + i) % BETA]) exp_b = (last + i) % BETA;
        checks++;
        if (!ack[exp_b] || bus.pc.re != PCW'(served)) begin
          failures++;
          $display("ack %b expected %0d data %0d want %0d", ack, exp_b, bus.pc.re, served);
        end
        last = exp_b;
        served++;
        model_cnt--;
      end else begin
        checks++;
        if (req != '0 && model_cnt != 0) begin failures++; $display("no ack despite request"); end
      end
      if (in_valid) begin pushed++; model_cnt++; end
      @(negedge clk);
      req = req & ~ack;
    end
    checks++;
    if (n_multi == 0 || served < 1000) begin failures++; $display("multi %0d served %0d", n_multi, served); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
