// DC register: the sixteen DC coefficients of an Intra16x16 macroblock
// (or the four of a chroma component) held next to a 4x4 transform.
//
// In Intra16x16 coding the (0,0) coefficient of every 4x4 block is taken
// out and transformed once more by a 4x4 Hadamard.  Keeping those values
// in a small register next to the transform, instead of holding all AC
// coefficients of the macroblock until the DC transform is done, is what
// lets the AC blocks be reconstructed without a macroblock-sized buffer.
// The forward side collects one DC per block as the blocks leave the
// DCT and hands them to the Hadamard pass four at a time; the inverse
// side is loaded from the inverse Hadamard four at a time and hands one
// DC to each block entering the inverse DCT.
//
// Storage is 16 entries of W bits, entry 4*r + c for block row r and
// block column c.  Two write ports (one entry, or one column word) and
// two combinational read ports (one entry, one column word).  A column
// word c holds entries (0,c)..(3,c) with row k in element k, which is the
// word order the transforms use for a block fed as columns.  Both writes
// in the same cycle to the same entry: the column write wins.  Reset
// clears all entries.
//
// Placing a DC register at both the forward and the inverse transform
// follows the document; the entry order, the port set and the reset are
// this design's own choices.
module dc_register #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           elem_we,     // write one entry
  input  logic [3:0]     elem_idx,    // 4*row + col
  input  logic [W-1:0]   elem_din,
  input  logic           col_we,      // write one column word
  input  logic [1:0]     col_widx,
  input  logic [4*W-1:0] col_din,
  input  logic [3:0]     elem_sel,    // entry read (combinational)
  output logic [W-1:0]   elem_dout,
  input  logic [1:0]     col_sel,     // column read (combinational)
  output logic [4*W-1:0] col_dout
);

  logic [W-1:0] dc [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) dc[i] <= '0;
    end else begin
      if (elem_we) dc[elem_idx] <= elem_din;
      if (col_we)
        for (int k = 0; k < 4; k++) dc[4*k + int'(col_widx)] <= col_din[W*k +: W];
    end
  end

  assign elem_dout = dc[elem_sel];

  always_comb begin
    for (int k = 0; k < 4; k++) col_dout[W*k +: W] = dc[4*k + int'(col_sel)];
  end

endmodule
