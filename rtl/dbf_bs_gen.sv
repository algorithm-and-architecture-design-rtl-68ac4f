// Boundary-strength decision for one edge between two 4x4 luma blocks.
//
// Evaluates the conditions of the boundary-strength table from the top
// down and returns the first that holds: 4 if either block is intra and
// the edge is a macroblock edge, 3 if either is intra, 2 if either has
// coded residual coefficients, 1 if the motion vectors differ by one luma
// sample or more (4 in quarter-sample units) in either component or the
// blocks use different reference pictures, 0 otherwise.  Chroma edges use
// the strength of the co-located luma edge.  Combinational.
module dbf_bs_gen
  import dbf_pkg::*;
#(
  parameter int unsigned MVW = 14   // motion vector component width, quarter samples
) (
  input  logic                  p_intra,
  input  logic                  q_intra,
  input  logic                  mb_edge,   // edge lies on a macroblock boundary
  input  logic                  p_coded,   // block has non-zero coefficients
  input  logic                  q_coded,
  input  logic signed [MVW-1:0] p_mvx, p_mvy,
  input  logic signed [MVW-1:0] q_mvx, q_mvy,
  input  logic [3:0]            p_ref,     // reference picture index
  input  logic [3:0]            q_ref,
  output bs_t                   bs
);

  logic signed [MVW:0] dx, dy;
  logic mv_far;

  always_comb begin
    dx     = (MVW+1)'(p_mvx) - (MVW+1)'(q_mvx);
    dy     = (MVW+1)'(p_mvy) - (MVW+1)'(q_mvy);
    mv_far = (dx >= 4) || (dx <= -4) || (dy >= 4) || (dy <= -4);
    if ((p_intra || q_intra) && mb_edge) bs = 3'd4;
    else if (p_intra || q_intra)         bs = 3'd3;
    else if (p_coded || q_coded)         bs = 3'd2;
    else if (mv_far || (p_ref != q_ref)) bs = 3'd1;
    else                                 bs = 3'd0;
  end

endmodule
