// Scanning phase of the CAVLC unit.
//
// Takes the quantised levels of one 4x4 block, four per cycle as they
// come out of the coefficient buffer, and hands the non-zero ones to the
// encoding phase in inverse zigzag order, one per cycle, skipping the
// zeros.  Along with each level it gives run_before (zeros between this
// coefficient and the next non-zero one at a lower scan position) and
// zeros_left (zeros at lower scan positions), and, once per block, the
// three block statistics the coeff_token and total_zeros codes are
// chosen by: TotalCoeff, TrailingOnes (consecutive +-1 levels from the
// high-frequency end, at most 3) and TotalZeros.
//
// How it works: the four words are written into a 16-entry register in
// zigzag order (the zigzag position of every (row, column) is a constant).
// A mask of the non-zero entries is kept; each scan cycle a priority
// encoder picks the highest remaining scan index, a second one the next
// lower non-zero index, and the picked bit is cleared.  A block with N
// non-zero levels therefore takes N scan cycles (none for an empty block).
//
// Interface and timing: in_valid/in_line/in_data carry row in_line of the
// block (in_data[16k +: 16] = column k, signed); all four rows must be
// sent, in any order with row 3 last, and in_ready is low while a block is being
// scanned.  The cycle after row 3, blk_valid pulses with the statistics
// and, if the block has levels, scanning starts: out_valid for N cycles
// with out_level, out_run_before, out_zeros_left and out_last on the
// lowest-frequency coefficient.
//
// The two phases, the skipping of zeros, the inverse zigzag order and the
// reorder / coefficient register / find-leading-one structure follow the
// document; widths, the handshake and the per-block timing are this
// design's.  The encoding phase (the coeff_token, level,
// total_zeros and run_before code tables and the bit packer) is not part
// of this module.
module cavlc_scan #(
  parameter int unsigned LW = 16    // level width (signed)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [1:0]    in_line,
  input  logic [4*LW-1:0] in_data,
  output logic          blk_valid,
  output logic [4:0]    total_coeff,
  output logic [1:0]    trailing_ones,
  output logic [3:0]    total_zeros,
  output logic          out_valid,
  output logic [LW-1:0] out_level,
  output logic [3:0]    out_run_before,
  output logic [3:0]    out_zeros_left,
  output logic          out_last
);

  // zigzag scan index of position (row, column)
  function automatic logic [3:0] zz(logic [1:0] r, logic [1:0] c);
    case ({r, c})
      4'h0: return 4'd0;  4'h1: return 4'd1;  4'h2: return 4'd5;  4'h3: return 4'd6;
      4'h4: return 4'd2;  4'h5: return 4'd4;  4'h6: return 4'd7;  4'h7: return 4'd12;
      4'h8: return 4'd3;  4'h9: return 4'd8;  4'ha: return 4'd11; 4'hb: return 4'd13;
      4'hc: return 4'd9;  4'hd: return 4'd10; 4'he: return 4'd14; default: return 4'd15;
    endcase
  endfunction

  logic [LW-1:0] coef [16];
  logic [15:0]   nz;          // non-zero entries not yet scanned
  logic          scanning;
  logic [3:0]    zl;          // zeros at lower scan positions than the next output

  // highest set bit of the mask, and the highest below it
  logic [3:0] hi, lo;
  logic       has_lo;
  logic [15:0] below;
  always_comb begin
    hi = '0;
    for (int i = 0; i < 16; i++) if (nz[i]) hi = 4'(i);
    below = nz & ~(16'd1 << hi);
    lo = '0; has_lo = 1'b0;
    for (int i = 0; i < 16; i++) if (below[i]) begin lo = 4'(i); has_lo = 1'b1; end
  end

  assign in_ready       = !scanning;
  assign out_valid      = scanning;
  assign out_level      = coef[hi];
  assign out_last       = !has_lo;
  assign out_run_before = has_lo ? 4'(hi - lo - 4'd1) : zl;
  assign out_zeros_left = zl;

  // statistics of the block just loaded
  logic [15:0] nz_new;
  logic [4:0]  tc_new;
  logic [1:0]  t1_new;
  logic [3:0]  tz_new;
  logic [LW-1:0] coef_new [16];
  always_comb begin
    logic [4:0] top;
    logic       run_on;
    for (int i = 0; i < 16; i++) coef_new[i] = coef[i];
    for (int k = 0; k < 4; k++) coef_new[zz(in_line, 2'(k))] = in_data[LW*k +: LW];
    tc_new = '0; top = '0;
    for (int i = 0; i < 16; i++) begin
      nz_new[i] = (coef_new[i] != '0);
      if (nz_new[i]) begin tc_new = tc_new + 5'd1; top = 5'(i + 1); end
    end
    tz_new = 4'(top - tc_new);
    t1_new = '0; run_on = 1'b1;
    for (int i = 15; i >= 0; i--)
      if (nz_new[i] && run_on) begin
        if ((coef_new[i] == LW'(1) || coef_new[i] == {LW{1'b1}}) && t1_new != 2'd3) t1_new = t1_new + 2'd1;
        else run_on = 1'b0;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) coef[i] <= '0;
      nz <= '0; scanning <= 1'b0; zl <= '0;
      blk_valid <= 1'b0; total_coeff <= '0; trailing_ones <= '0; total_zeros <= '0;
    end else begin
      blk_valid <= 1'b0;
      if (in_valid && in_ready) begin
        for (int i = 0; i < 16; i++) coef[i] <= coef_new[i];
        if (in_line == 2'd3) begin
          nz            <= nz_new;
          blk_valid     <= 1'b1;
          total_coeff   <= tc_new;
          trailing_ones <= t1_new;
          total_zeros   <= tz_new;
          zl            <= tz_new;
          scanning      <= (tc_new != '0);
        end
      end else if (scanning) begin
        nz       <= nz & ~(16'd1 << hi);
        zl       <= has_lo ? 4'(zl - (hi - lo - 4'd1)) : zl;
        if (!has_lo) scanning <= 1'b0;
      end
    end
  end

endmodule
