// sp_ram: single-port memory block of the approximate sorter.
//
// One access per clock: a write when we=1, otherwise a read whose data
// appears on rdata one clock later (synchronous read, as a single-port SRAM
// macro behaves). The detector core uses two of these per sorter, one
// collecting the paths of the current depth while the other hands out the
// survivors of the previous depth. Written as an array so a synthesis flow
// can map it to an SRAM macro; contents are not reset.
module sp_ram #(
  parameter int DEPTH = 128,
  parameter int WIDTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
