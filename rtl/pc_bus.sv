// pc_bus: data-driven link from the PC block to the PS blocks of a core.
//
// Precalculated survivors from the PC pipeline wait in a small queue. The
// head of the queue is driven on a bus shared by all PS blocks. When one or
// more PS blocks hold `req`, one of them is chosen round-robin, receives
// `ack` for one clock (it latches the bus in that clock) and the head is
// popped. At most one acknowledge is given per clock.
// The shared broadcast bus with Req/Ack handshake follows the published
// core structure; the queue, its depth and the round-robin choice are this
// design's own. `count` lets the core throttle survivor fetching so that the
// queue never overflows.
module pc_bus
  import rkb_pkg::*;
#(
  parameter int BETA  = 8,
  parameter int DEPTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pcout_t            in_data,
  input  logic [BETA-1:0]   req,
  output logic [BETA-1:0]   ack,
  output pcout_t            bus,
  output logic [AW:0]       count,
  output logic              multi_req_evt
);

  pcout_t          q [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [$clog2(BETA)-1:0] rr;
  logic            pop;
  logic [$clog2(BETA)-1:0] gsel;
  logic            gany;

  always_comb begin
    gsel = '0;
    gany = 1'b0;
    for (int i = BETA - 1; i >= 0; i--) begin
      if (req[(int'(rr) + i) % BETA]) begin
        gsel = ($clog2(BETA))'((int'(rr) + i) % BETA);
        gany = 1'b1;
      end
    end
  end

  assign pop = gany && (count != '0);
  always_comb begin
    ack = '0;
    if (pop) ack[gsel] = 1'b1;
  end
  assign bus = q[rd_ptr];
  assign multi_req_evt = pop && ((req & (req - 1'b1)) != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      rr     <= '0;
    end else begin
      if (in_valid) wr_ptr <= wr_ptr + 1'b1;
      if (pop) begin
        rd_ptr <= rd_ptr + 1'b1;
        rr     <= ($clog2(BETA))'((int'(gsel) + 1) % BETA);
      end
      count <= count + (AW+1)'(in_valid) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) if (in_valid) q[wr_ptr] <= in_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && !pop && count == (AW+1)'(DEPTH)));
  a_one_ack: assert property (@(posedge clk) disable iff (!rst_n) (ack & (ack - 1'b1)) == '0);

endmodule
