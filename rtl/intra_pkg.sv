// Shared types of the intra coding datapath.
package intra_pkg;

  // Prediction class: 4x4 luma, 16x16 luma, 8x8 chroma.
  typedef enum logic [1:0] {CLS_I4 = 2'd0, CLS_I16 = 2'd1, CLS_C8 = 2'd2} pred_cls_e;

  // Intra 4x4 prediction modes (numbering of the standard).
  typedef enum logic [3:0] {
    I4_V = 4'd0, I4_H = 4'd1, I4_DC = 4'd2, I4_DDL = 4'd3, I4_DDR = 4'd4,
    I4_VR = 4'd5, I4_HD = 4'd6, I4_VL = 4'd7, I4_HU = 4'd8
  } i4_mode_e;

  // Intra 16x16 modes (3 = plane, not supported by this design).
  localparam logic [3:0] I16_V = 4'd0, I16_H = 4'd1, I16_DC = 4'd2, I16_PLANE = 4'd3;
  // Chroma 8x8 modes (3 = plane, not supported by this design).
  localparam logic [3:0] C8_DC = 4'd0, C8_H = 4'd1, C8_V = 4'd2, C8_PLANE = 4'd3;

  // Class of a coefficient position in a 4x4 block for the quantiser
  // tables and the cost weights: 0 = both indices even, 1 = both odd,
  // 2 = mixed.
  function automatic logic [1:0] pos_class(logic [1:0] i, logic [1:0] j);
    if (!i[0] && !j[0]) return 2'd0;
    if (i[0] && j[0])   return 2'd1;
    return 2'd2;
  endfunction

endpackage
