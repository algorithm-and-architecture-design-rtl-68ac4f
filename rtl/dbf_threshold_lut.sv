// Quantiser-dependent thresholds of the deblocking filter.
//
// Given indexA and indexB (0..51; the average QP of the two blocks at an
// edge plus the slice offsets, clipped), returns alpha, beta and the
// clipping value tc0 for boundary strengths 1 to 3.  The three tables are
// those of the H.264/AVC standard (alpha, beta and tC0 tables); the
// filter that uses them is described in dbf_edge_filter.  Purely
// combinational: one look-up per cycle, written as case statements so
// that synthesis builds them as ROM logic.
module dbf_threshold_lut
  import dbf_pkg::*;
(
  input  logic [5:0] index_a,   // 0..51 (larger values are treated as 51)
  input  logic [5:0] index_b,   // 0..51
  input  bs_t        bs,        // tc0 is looked up for bs 1..3, 0 otherwise
  output logic [7:0] alpha,
  output logic [4:0] beta,
  output logic [4:0] tc0
);

  function automatic logic [7:0] alpha_of(logic [5:0] i);
    case (i)
      6'd16: return 8'd4;   6'd17: return 8'd4;   6'd18: return 8'd5;
      6'd19: return 8'd6;   6'd20: return 8'd7;   6'd21: return 8'd8;
      6'd22: return 8'd9;   6'd23: return 8'd10;  6'd24: return 8'd12;
      6'd25: return 8'd13;  6'd26: return 8'd15;  6'd27: return 8'd17;
      6'd28: return 8'd20;  6'd29: return 8'd22;  6'd30: return 8'd25;
      6'd31: return 8'd28;  6'd32: return 8'd32;  6'd33: return 8'd36;
      6'd34: return 8'd40;  6'd35: return 8'd45;  6'd36: return 8'd50;
      6'd37: return 8'd56;  6'd38: return 8'd63;  6'd39: return 8'd71;
      6'd40: return 8'd80;  6'd41: return 8'd90;  6'd42: return 8'd101;
      6'd43: return 8'd113; 6'd44: return 8'd127; 6'd45: return 8'd144;
      6'd46: return 8'd162; 6'd47: return 8'd182; 6'd48: return 8'd203;
      6'd49: return 8'd226; 6'd50: return 8'd255; 6'd51: return 8'd255;
      default: return (i > 6'd51) ? 8'd255 : 8'd0;
    endcase
  endfunction

  function automatic logic [4:0] beta_of(logic [5:0] i);
    if (i < 6'd16) return 5'd0;
    else if (i > 6'd51) return 5'd18;
    case (i)
      6'd16, 6'd17, 6'd18:         return 5'd2;
      6'd19, 6'd20, 6'd21, 6'd22:  return 5'd3;
      6'd23, 6'd24, 6'd25:         return 5'd4;
      6'd26, 6'd27:                return 5'd6;
      6'd28, 6'd29:                return 5'd7;
      default:                     return 5'((i - 6'd30) / 6'd2 + 6'd8);
    endcase
  endfunction

  // tC0 for bs = 1, 2, 3 packed as {bs3, bs2, bs1}, 5 bits each.
  function automatic logic [14:0] tc0_of(logic [5:0] i);
    case (i)
      6'd17, 6'd18, 6'd19, 6'd20: return {5'd1, 5'd0, 5'd0};
      6'd21, 6'd22:               return {5'd1, 5'd1, 5'd0};
      6'd23, 6'd24, 6'd25, 6'd26: return {5'd1, 5'd1, 5'd1};
      6'd27, 6'd28, 6'd29, 6'd30: return {5'd2, 5'd1, 5'd1};
      6'd31, 6'd32:               return {5'd3, 5'd2, 5'd1};
      6'd33:                      return {5'd3, 5'd2, 5'd2};
      6'd34:                      return {5'd4, 5'd2, 5'd2};
      6'd35, 6'd36:               return {5'd4, 5'd3, 5'd2};
      6'd37:                      return {5'd5, 5'd3, 5'd3};
      6'd38, 6'd39:               return {5'd6, 5'd4, 5'd3};
      6'd40:                      return {5'd7, 5'd5, 5'd4};
      6'd41:                      return {5'd8, 5'd5, 5'd4};
      6'd42:                      return {5'd9, 5'd6, 5'd4};
      6'd43:                      return {5'd10, 5'd7, 5'd5};
      6'd44:                      return {5'd11, 5'd8, 5'd6};
      6'd45:                      return {5'd13, 5'd8, 5'd6};
      6'd46:                      return {5'd14, 5'd10, 5'd7};
      6'd47:                      return {5'd16, 5'd11, 5'd8};
      6'd48:                      return {5'd18, 5'd12, 5'd9};
      6'd49:                      return {5'd20, 5'd13, 5'd10};
      6'd50:                      return {5'd23, 5'd15, 5'd11};
      default:                    return (i > 6'd50) ? {5'd25, 5'd17, 5'd13} : 15'd0;
    endcase
  endfunction

  logic [14:0] tc_row;

  always_comb begin
    alpha  = alpha_of(index_a);
    beta   = beta_of(index_b);
    tc_row = tc0_of(index_a);
    case (bs)
      3'd1:    tc0 = tc_row[4:0];
      3'd2:    tc0 = tc_row[9:5];
      3'd3:    tc0 = tc_row[14:10];
      default: tc0 = 5'd0;
    endcase
  end

endmodule
