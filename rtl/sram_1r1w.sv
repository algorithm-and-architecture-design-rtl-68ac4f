// Two-port on-chip SRAM: one synchronous read port and one write port.
//
// The read data appears one cycle after the read address (registered
// output, like an ordinary SRAM macro).  A write and a read of the same
// address in the same cycle return the old contents, which is what the
// in-place deblocking schedule relies on: a word is read out and the
// filtered word for the same location is written back later.  Written as
// an array so that synthesis can map it to a memory macro.
module sram_1r1w #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
