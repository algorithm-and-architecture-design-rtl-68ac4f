// Boundary reconstruction unit: turns the inverse-transform output back
// into pixels and keeps the samples the next 4x4 blocks are predicted from.
//
// The inverse transform delivers the residual of a 4x4 block one column
// per cycle, scaled by 64.  For each column this unit adds the matching
// column of the prediction and clips:
//     pix = clip(0, 255, pred + ((res + 32) >>> 6))
// four pixels per cycle.  The reconstructed pixels leave registered, one
// cycle after the input.  While a block passes, column 3 is kept as the
// block's right boundary (the left neighbours I..L of the block to its
// right) and row 3 as its bottom boundary (the upper neighbours A..D of
// the block below); bnd_valid pulses when both are complete, in the cycle
// after column 3 came in.
//
// Interface: in_valid / in_line (column index) / in_res (element i = row
// i, RW-bit signed) / in_pred (pixel i = row i, bits 8i+7:8i).  Outputs
// out_* carry the pixels in the same packing; bnd_right packs rows 0..3
// of column 3, bnd_bottom columns 0..3 of row 3.
//
// That the reconstruction path produces the boundary samples for the next
// block follows the document; the column order, the registered outputs
// and the packing are this design's own choices.
module boundary_recon #(
  parameter int unsigned RW = 20
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [1:0]      in_line,
  input  logic [4*RW-1:0] in_res,
  input  logic [31:0]     in_pred,
  output logic            out_valid,
  output logic [1:0]      out_line,
  output logic [31:0]     out_pix,
  output logic            bnd_valid,
  output logic [31:0]     bnd_right,
  output logic [31:0]     bnd_bottom
);

  logic [31:0] pix;

  function automatic logic [7:0] recon(logic signed [RW-1:0] r, logic [7:0] p);
    logic signed [RW+1:0] v;
    v = (RW+2)'($signed({2'b00, p})) + ((RW+2)'(r) + (RW+2)'(32) >>> 6);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  always_comb begin
    for (int k = 0; k < 4; k++)
      pix[8*k +: 8] = recon(in_res[RW*k +: RW], in_pred[8*k +: 8]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_line <= '0; out_pix <= '0;
      bnd_valid <= 1'b0; bnd_right <= '0; bnd_bottom <= '0;
    end else begin
      out_valid <= in_valid;
      bnd_valid <= in_valid && in_line == 2'd3;
      if (in_valid) begin
        out_line <= in_line;
        out_pix  <= pix;
        bnd_bottom[8*int'(in_line) +: 8] <= pix[31:24];
        if (in_line == 2'd3) bnd_right <= pix;
      end
    end
  end

endmodule
