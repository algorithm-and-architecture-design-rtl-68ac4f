// Quantisation / inverse quantisation unit, four coefficients per cycle.
//
// Forward:  level = sign(M) * ((|M| * quant_coef + qp_const) >> q_bits)
// Inverse:  rec   = level * dequant_coef << qp_per
// with qp_per = QP / 6, qp_rem = QP % 6, q_bits = 15 + qp_per and, for
// intra coding, qp_const = 2^q_bits / 3.  quant_coef and dequant_coef
// come from two small tables indexed by qp_rem and by the class of the
// coefficient position: both indices even, both odd, or mixed.  The
// table values are those of the standard's reference quantiser.  For the
// DC coefficients of Intra16x16 and chroma (dc = 1) the forward path uses
// the (0,0) factor with q_bits+1 and 2*qp_const; the inverse path then
// returns level * dequant_coef(0,0) << qp_per and leaves the DC-specific
// rounding to the caller.
//
// Zero inputs are guarded: a zero coefficient (or level) is not fed to
// the multipliers, which then see a constant operand and do not toggle.
//
// Interface: one line of a 4x4 block per cycle (line = its index; the
// position class is symmetric, so it may be a row or a column).  The
// inverse path works on the levels just produced, as the reconstruction
// loop of an encoder does.  Both results are registered: they are valid
// one cycle after in_valid.
module quant_unit
  import intra_pkg::*;
#(
  parameter int unsigned CW = 20,   // coefficient width (signed)
  parameter int unsigned LW = 16    // level width (signed)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [5:0]        qp,
  input  logic              dc,
  input  logic [1:0]        line,
  input  logic [4*CW-1:0]   coef,
  output logic              out_valid,
  output logic [4*LW-1:0]   level,
  output logic [4*CW-1:0]   dequant
);

  function automatic logic [13:0] qcoef(logic [2:0] rem, logic [1:0] cls);
    case ({rem, cls})
      {3'd0, 2'd0}: return 14'd13107; {3'd0, 2'd1}: return 14'd5243; {3'd0, 2'd2}: return 14'd8066;
      {3'd1, 2'd0}: return 14'd11916; {3'd1, 2'd1}: return 14'd4660; {3'd1, 2'd2}: return 14'd7490;
      {3'd2, 2'd0}: return 14'd10082; {3'd2, 2'd1}: return 14'd4194; {3'd2, 2'd2}: return 14'd6554;
      {3'd3, 2'd0}: return 14'd9362;  {3'd3, 2'd1}: return 14'd3647; {3'd3, 2'd2}: return 14'd5825;
      {3'd4, 2'd0}: return 14'd8192;  {3'd4, 2'd1}: return 14'd3355; {3'd4, 2'd2}: return 14'd5243;
      {3'd5, 2'd0}: return 14'd7282;  {3'd5, 2'd1}: return 14'd2893; {3'd5, 2'd2}: return 14'd4559;
      default:      return 14'd0;
    endcase
  endfunction

  function automatic logic [4:0] dqcoef(logic [2:0] rem, logic [1:0] cls);
    case ({rem, cls})
      {3'd0, 2'd0}: return 5'd10; {3'd0, 2'd1}: return 5'd16; {3'd0, 2'd2}: return 5'd13;
      {3'd1, 2'd0}: return 5'd11; {3'd1, 2'd1}: return 5'd18; {3'd1, 2'd2}: return 5'd14;
      {3'd2, 2'd0}: return 5'd13; {3'd2, 2'd1}: return 5'd20; {3'd2, 2'd2}: return 5'd16;
      {3'd3, 2'd0}: return 5'd14; {3'd3, 2'd1}: return 5'd23; {3'd3, 2'd2}: return 5'd18;
      {3'd4, 2'd0}: return 5'd16; {3'd4, 2'd1}: return 5'd25; {3'd4, 2'd2}: return 5'd20;
      {3'd5, 2'd0}: return 5'd18; {3'd5, 2'd1}: return 5'd29; {3'd5, 2'd2}: return 5'd23;
      default:      return 5'd0;
    endcase
  endfunction

  logic [3:0]  qp_per;
  logic [2:0]  qp_rem;
  logic [4:0]  q_bits;
  logic [23:0] qp_const;
  logic [4*LW-1:0] level_d;
  logic [4*CW-1:0] deq_d;

  always_comb begin
    qp_per   = 4'(qp / 6);
    qp_rem   = 3'(qp % 6);
    q_bits   = 5'd15 + 5'(qp_per) + (dc ? 5'd1 : 5'd0);
    qp_const = 24'(((32'd1 << (5'd15 + 5'(qp_per))) / 32'd3) << (dc ? 1 : 0));
    for (int k = 0; k < 4; k++) begin
      logic signed [CW-1:0] m;
      logic [CW-1:0]        am;
      logic [1:0]           cls;
      logic [CW+14:0]       prod;
      logic [CW+14:0]       mag;
      logic signed [LW-1:0] lv;
      logic signed [CW-1:0] dq;
      cls  = dc ? 2'd0 : pos_class(line, 2'(k));
      m    = $signed(coef[CW*k +: CW]);
      am   = (m < 0) ? CW'(-m) : CW'(m);
      // guarded multiply: a zero operand keeps the multiplier idle
      prod = (am != '0) ? (CW+15)'(am) * (CW+15)'(qcoef(qp_rem, cls)) : '0;
      mag  = (am != '0) ? (prod + (CW+15)'(qp_const)) >> q_bits : '0;
      level_d[LW*k +: LW] = (m < 0) ? LW'(-$signed({1'b0, mag})) : LW'(mag);
      lv   = $signed(level_d[LW*k +: LW]);
      dq   = (lv != '0) ? CW'((CW'(lv) * $signed({1'b0, dqcoef(qp_rem, cls)})) <<< qp_per) : '0;
      deq_d[CW*k +: CW] = dq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; level <= '0; dequant <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        level   <= level_d;
        dequant <= deq_d;
      end
    end
  end

endmodule
