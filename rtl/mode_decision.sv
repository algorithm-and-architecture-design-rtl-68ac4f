// Cost generation and mode decision unit.
//
// Accumulates the cost of one candidate prediction mode from the
// transformed residual and keeps the best mode seen so far.  The cost is
//   cost = mode_cost + sum over 4x4 blocks of (sum_ij w(i,j)*|F(i,j)|) >> 5
// where F is the 4x4 integer (DCT) transform of the residual and
// w = 32 where i and j are both even, 20 where both are odd and 25
// otherwise.  The weights approximate the scaling that the inverse
// quantiser applies, so the cost tracks the DCT energy better than a
// Hadamard SATD.  The multiplications are shifts and adds
// (32x = x<<5, 25x = (x<<4)+(x<<3)+x, 20x = (x<<4)+(x<<2)).
//
// A mode may cover one 4x4 block (Intra4x4) or several (Intra16x16,
// chroma): words are accumulated from the word marked first of the mode
// to the word marked last.  At the last word the total is compared with
// the best register and, if strictly smaller, replaces it (so among equal
// costs the earlier mode wins).  clear empties the best register.
//
// Interface: one line of four coefficients per cycle with its index
// (weights are symmetric, row or column does not matter), the mode number
// and its mode cost.  result_valid pulses one cycle after the last word
// with that mode's cost; best_mode/best_cost update in the same cycle.
module mode_decision
  import intra_pkg::*;
#(
  parameter int unsigned CW = 20,   // coefficient width (signed)
  parameter int unsigned SW = 24    // cost width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            in_valid,
  input  logic            first,     // first word of this mode
  input  logic            blk_last,  // last word of a 4x4 block
  input  logic            last,      // last word of this mode
  input  logic [1:0]      line,
  input  logic [4*CW-1:0] coef,
  input  logic [3:0]      mode,
  input  logic [SW-1:0]   mode_cost,
  output logic            result_valid,
  output logic [SW-1:0]   result_cost,
  output logic [3:0]      best_mode,
  output logic [SW-1:0]   best_cost,
  output logic            best_valid
);

  logic [SW-1:0] blk_acc, mode_acc, line_sum, blk_sum, total;

  function automatic logic [SW-1:0] weigh(logic [CW-1:0] v, logic [1:0] cls);
    logic [SW-1:0] a;
    a = ($signed(v) < 0) ? SW'(-$signed(v)) : SW'(v);
    case (cls)
      2'd0:    return a << 5;
      2'd1:    return (a << 4) + (a << 2);
      default: return (a << 4) + (a << 3) + a;
    endcase
  endfunction

  always_comb begin
    line_sum = '0;
    for (int k = 0; k < 4; k++)
      line_sum = line_sum + weigh(coef[CW*k +: CW], pos_class(line, 2'(k)));
    blk_sum = (first ? '0 : blk_acc) + line_sum;
    total   = (first ? '0 : mode_acc) + (blk_last ? (blk_sum >> 5) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_acc <= '0; mode_acc <= '0;
      result_valid <= 1'b0; result_cost <= '0;
      best_mode <= '0; best_cost <= '0; best_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (clear) best_valid <= 1'b0;
      if (in_valid) begin
        blk_acc  <= blk_last ? '0 : blk_sum;
        mode_acc <= total;
        if (last) begin
          result_valid <= 1'b1;
          result_cost  <= total + mode_cost;
          if (!best_valid || (total + mode_cost) < best_cost || clear) begin
            best_valid <= 1'b1;
            best_cost  <= total + mode_cost;
            best_mode  <= mode;
          end
        end
      end
    end
  end

endmodule
