// tb_sp_ram: checks write-then-read of every word of the single-port memory
// and the one-clock read latency, against a shadow array kept by the bench.
module tb_sp_ram;
  localparam int DEPTH = 128, WIDTH = 32;
  logic clk = 0, en = 0, we = 0;
  logic [6:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  sp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      en = 1; we = 1; addr = 7'(i); wdata = $urandom; shadow[i] = wdata;
      @(negedge clk);
    end
    for (int r = 0; r < 300; r++) begin
      int a;
      a = $urandom_range(DEPTH-1);
      if ($urandom_range(3) == 0) begin
        en = 1; we = 1; addr = 7'(a); wdata = $urandom; shadow[a] = wdata;
        @(negedge clk);
      end else begin
        en = 1; we = 0; addr = 7'(a);
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata !== shadow[a]) begin
          failures++;
          $display("read %0d: got %h want %h", a, rdata, shadow[a]);
        end
        // Data must hold while the memory is idle.
        @(negedge clk);
        checks++;
        if (rdata !== shadow[a]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
