// Single-port synchronous SRAM: one read or write per cycle.
//
// Used for the intra coder's source buffer (96 x 32 bits: the current
// macroblock, 4 pixels per word, row by row) and for each bank of the
// coefficient buffer (104 x 64 bits).  A read returns its data one cycle
// after the address; a write does not change rdata.  Written as an array
// so that synthesis can map it to a memory macro.
module sram_sp #(
  parameter int unsigned DEPTH = 96,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
