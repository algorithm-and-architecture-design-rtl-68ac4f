// H.264/AVC deblocking filter and intra-coding datapath, side by side.
//
// Part 1, deblocking: the boundary strength of all 32 luma edges of the
// current macroblock is derived from per-block coding information by 32
// dbf_bs_gen instances and fed to the in-place deblocking filter dbf_v2,
// which reads and writes the frame store through its 32-bit ports.  Edges
// on the left/top picture border (or with filtering disabled) are given
// strength 0 with filter_left / filter_top.
//
// Part 2, intra coding: the macroblock to be coded sits in the 96x32
// source buffer.  For each candidate mode the predictor generation unit
// produces four predicted pixels per cycle, the residual (source - pred)
// goes through the forward transform (integer DCT or Hadamard), and the
// coefficients feed both the mode decision unit (cost and best mode) and
// the Q/IQ unit.  Quantised levels can be stored in the ping-pong
// coefficient buffer for the entropy coder; dequantised values go through
// the inverse transform and leave as the reconstructed residual (x64).
// The three-step Intra4x4 mode selector is brought out with its own
// request/cost ports so that a controller can use it to pick the modes to
// cost.  The entropy-coder side of the coefficient buffer feeds the
// scanning phase of the CAVLC unit (cavlc_scan, on ec_scan), whose output
// is brought out for the code tables and bit packer.  The macroblock-level
// controller, the boundary pixel buffer and the CAVLC encoding phase are
// outside this module: their signals are ports.
//
// The residual enters the transform as columns (the predictor is asked
// for columns), so the transform returns coefficient rows and the inverse
// transform, fed those rows, applies its horizontal pass first as the
// standard requires; the reconstructed residual leaves as columns.  The
// source buffer therefore holds each 4x4 block as four column words
// (pixel k of a word = row k); the address map is the controller's.
// src_raddr is presented one cycle before the matching res_valid and
// pred_* inputs (synchronous read).  With fwd_direct the transform takes
// fwd_data instead of the residual: this is how the 4x4 DC coefficients
// of Intra16x16 / chroma are sent through the Hadamard transform.  The
// inverse transform input keeps the low 16 bits of each dequantised
// value.
//
// DC registers (dc_register) sit at both transforms.  The forward one
// collects the DC of each DCT block (fwd_dc_cap; entry = the block's
// position within the pass, so Intra16x16 blocks are sent in raster
// order) and feeds them to the Hadamard pass (fwd_direct + fwd_dc_sel).
// The inverse one is loaded from the inverse Hadamard output
// (inv_dc_load) and puts each block's DC back into the inverse DCT
// (inv_dc_sub), so the AC blocks of a macroblock need not be held while
// the DCs are transformed.
//
// Reconstruction: boundary_recon adds the prediction, delayed to match
// the 9-cycle path from forward-transform input to inverse-transform
// output, to the reconstructed residual and clips, giving the pixels
// (recon_*) and the right-column / bottom-row boundary samples of each
// block (bnd_*) that the controller writes to its boundary buffer.  The
// delay assumes the words of a block pass without a stall, which the
// transform's handshake guarantees.
//
// Alignment glue: the mode number, mode cost and block count of the block
// entering the forward transform are captured and handed to the mode
// decision unit when that block leaves the transform (one block of
// latency).
module h264_top
  import dbf_pkg::*;
  import intra_pkg::*;
#(
  parameter int unsigned MVW = 14,
  parameter int unsigned SW  = 24
) (
  input  logic        clk,
  input  logic        rst_n,

  // ---------------- deblocking filter ----------------
  input  logic        dbf_start,
  output logic        dbf_busy,
  output logic        dbf_done,
  input  logic        filter_left,           // left macroblock edge is filtered
  input  logic        filter_top,            // top macroblock edge is filtered
  input  logic        cur_intra,             // macroblock coding types
  input  logic        left_intra,
  input  logic        top_intra,
  input  logic [15:0] cur_coded,             // 4x4 blocks with coefficients, raster order
  input  logic [3:0]  left_coded,            // right column of the left macroblock
  input  logic [3:0]  top_coded,             // bottom row of the upper macroblock
  input  logic signed [MVW-1:0] cur_mvx [16], cur_mvy [16],
  input  logic signed [MVW-1:0] left_mvx [4], left_mvy [4],
  input  logic signed [MVW-1:0] top_mvx [4],  top_mvy [4],
  input  logic [3:0]  cur_ref [16],
  input  logic [3:0]  left_ref [4],
  input  logic [3:0]  top_ref [4],
  input  logic [5:0]  qp_y  [3],
  input  logic [5:0]  qp_cb [3],
  input  logic [5:0]  qp_cr [3],
  input  logic signed [4:0] offset_a,
  input  logic signed [4:0] offset_b,
  output logic        dbf_in_req,
  output comp_e       dbf_in_comp,
  output logic [2:0]  dbf_in_by,
  output logic [2:0]  dbf_in_bx,
  output logic [1:0]  dbf_in_row,
  input  word_t       dbf_in_data,
  output logic        dbf_out_valid,
  output comp_e       dbf_out_comp,
  output logic [2:0]  dbf_out_by,
  output logic [2:0]  dbf_out_bx,
  output logic [1:0]  dbf_out_row,
  output word_t       dbf_out_data,

  // ---------------- intra coding ----------------
  // source buffer (written by the host, read for the residual)
  input  logic        src_we,
  input  logic [6:0]  src_waddr,
  input  logic [31:0] src_wdata,
  input  logic        src_re,
  input  logic [6:0]  src_raddr,
  // predictor control for the word read from the source buffer last cycle
  input  logic        res_valid,             // residual word enters the transform
  output logic        res_ready,
  input  pred_cls_e   pred_cls,
  input  logic [3:0]  pred_mode,
  input  logic [1:0]  pred_line,             // column of the 4x4 block
  input  logic [1:0]  pred_blk_x,
  input  logic [1:0]  pred_blk_y,
  input  logic        top_avail,
  input  logic        left_avail,
  input  logic [7:0]  nb_top  [8],
  input  logic [7:0]  nb_left [4],
  input  logic [7:0]  nb_m,
  input  logic [7:0]  mb_top  [16],
  input  logic [7:0]  mb_left [16],
  output logic        pred_mode_ok,
  input  logic        hadamard,              // forward transform is a Hadamard
  input  logic        fwd_direct,            // 1: transform fwd_data instead of the residual
  input  logic [63:0] fwd_data,              // e.g. the 4x4 DC coefficients for the Hadamard pass
  input  logic        inv_hadamard,          // inverse transform is a Hadamard
  // DC registers of the forward and inverse transforms (Intra16x16 DCs)
  input  logic        fwd_dc_cap,            // keep the DC of each block leaving the DCT
  input  logic        fwd_dc_sel,            // with fwd_direct: take the kept DCs, not fwd_data
  input  logic        inv_dc_load,           // keep the inverse Hadamard output as block DCs
  input  logic        inv_dc_sub,            // give each inverse-DCT block its kept DC
  // mode decision
  input  logic        md_clear,
  input  logic [4:0]  md_blocks,             // 4x4 blocks per mode (1, 4 or 16)
  input  logic [SW-1:0] md_mode_cost,
  output logic        md_result_valid,
  output logic [SW-1:0] md_result_cost,
  output logic [3:0]  md_best_mode,
  output logic [SW-1:0] md_best_cost,
  // quantiser and coefficient buffer
  input  logic [5:0]  qp,
  input  logic        q_dc,
  input  logic        coef_we,               // store the levels of this pass
  input  logic        coef_dc,
  input  logic [6:0]  coef_waddr,
  input  logic        coef_swap,
  input  logic        ec_re,                 // entropy coder side
  input  logic        ec_dc,
  input  logic [6:0]  ec_raddr,
  output logic [63:0] ec_rdata,
  input  logic        ec_scan,               // pass the word read now to the CAVLC scanner
  output logic        scan_ready,            // scanner can take a block
  output logic        scan_blk_valid,
  output logic [4:0]  scan_total_coeff,
  output logic [1:0]  scan_trailing_ones,
  output logic [3:0]  scan_total_zeros,
  output logic        scan_valid,
  output logic [15:0] scan_level,
  output logic [3:0]  scan_run_before,
  output logic [3:0]  scan_zeros_left,
  output logic        scan_last,
  // reconstructed residual (x64), one column per cycle
  output logic        rec_valid,
  output logic [1:0]  rec_line,
  output logic [79:0] rec_data,
  // reconstructed pixels and boundary samples for the next blocks
  output logic        recon_valid,
  output logic [1:0]  recon_line,
  output logic [31:0] recon_pix,
  output logic        bnd_valid,
  output logic [31:0] bnd_right,             // column 3 of the block, rows 0..3
  output logic [31:0] bnd_bottom,            // row 3 of the block, columns 0..3
  // three-step Intra4x4 mode selector
  input  logic        sel_start,
  output logic        sel_req_valid,
  output logic [3:0]  sel_req_mode,
  input  logic        sel_cost_valid,
  input  logic [SW-1:0] sel_cost,
  output logic        sel_done,
  output logic [3:0]  sel_best_mode,
  output logic [SW-1:0] sel_best_cost
);

  // =============== boundary strength ===============
  bs_t bs_v [4][4];
  bs_t bs_h [4][4];

  for (genvar e = 0; e < 4; e++) begin : g_edge
    for (genvar r = 0; r < 4; r++) begin : g_seg
      // vertical edge e, block row r: p = block (r, e-1), q = block (r, e)
      bs_t bsv_raw, bsh_raw;
      dbf_bs_gen #(.MVW(MVW)) u_bsv (
        .p_intra (e == 0 ? left_intra : cur_intra),
        .q_intra (cur_intra),
        .mb_edge (e == 0),
        .p_coded (e == 0 ? left_coded[r] : cur_coded[4*r + e - 1]),
        .q_coded (cur_coded[4*r + e]),
        .p_mvx   (e == 0 ? left_mvx[r] : cur_mvx[4*r + e - 1]),
        .p_mvy   (e == 0 ? left_mvy[r] : cur_mvy[4*r + e - 1]),
        .q_mvx   (cur_mvx[4*r + e]),
        .q_mvy   (cur_mvy[4*r + e]),
        .p_ref   (e == 0 ? left_ref[r] : cur_ref[4*r + e - 1]),
        .q_ref   (cur_ref[4*r + e]),
        .bs      (bsv_raw)
      );
      // horizontal edge e, block column r: p = block (e-1, r), q = block (e, r)
      dbf_bs_gen #(.MVW(MVW)) u_bsh (
        .p_intra (e == 0 ? top_intra : cur_intra),
        .q_intra (cur_intra),
        .mb_edge (e == 0),
        .p_coded (e == 0 ? top_coded[r] : cur_coded[4*(e-1) + r]),
        .q_coded (cur_coded[4*e + r]),
        .p_mvx   (e == 0 ? top_mvx[r] : cur_mvx[4*(e-1) + r]),
        .p_mvy   (e == 0 ? top_mvy[r] : cur_mvy[4*(e-1) + r]),
        .q_mvx   (cur_mvx[4*e + r]),
        .q_mvy   (cur_mvy[4*e + r]),
        .p_ref   (e == 0 ? top_ref[r] : cur_ref[4*(e-1) + r]),
        .q_ref   (cur_ref[4*e + r]),
        .bs      (bsh_raw)
      );
      assign bs_v[e][r] = (e == 0 && !filter_left) ? 3'd0 : bsv_raw;
      assign bs_h[e][r] = (e == 0 && !filter_top)  ? 3'd0 : bsh_raw;
    end
  end

  dbf_v2 u_dbf (
    .clk(clk), .rst_n(rst_n), .start(dbf_start), .busy(dbf_busy), .done(dbf_done),
    .bs_v(bs_v), .bs_h(bs_h), .qp_y(qp_y), .qp_cb(qp_cb), .qp_cr(qp_cr),
    .offset_a(offset_a), .offset_b(offset_b),
    .in_req(dbf_in_req), .in_comp(dbf_in_comp), .in_by(dbf_in_by), .in_bx(dbf_in_bx),
    .in_row(dbf_in_row), .in_data(dbf_in_data),
    .out_valid(dbf_out_valid), .out_comp(dbf_out_comp), .out_by(dbf_out_by),
    .out_bx(dbf_out_bx), .out_row(dbf_out_row), .out_data(dbf_out_data)
  );

  // =============== intra coding datapath ===============
  logic [31:0] src_rdata;
  logic [7:0]  pred [4];
  logic [63:0] res_word;

  sram_sp #(.DEPTH(96), .WIDTH(32)) u_src_buf (
    .clk(clk), .en(src_we || src_re), .we(src_we),
    .addr(src_we ? src_waddr : src_raddr), .wdata(src_wdata), .rdata(src_rdata)
  );

  intra_pred_gen u_pred (
    .cls(pred_cls), .mode(pred_mode), .line(pred_line), .col_order(1'b1),
    .blk_x(pred_blk_x), .blk_y(pred_blk_y), .top_avail(top_avail), .left_avail(left_avail),
    .nb_top(nb_top), .nb_left(nb_left), .nb_m(nb_m), .top(mb_top), .left(mb_left),
    .pred(pred), .mode_ok(pred_mode_ok)
  );

  always_comb begin
    for (int k = 0; k < 4; k++)
      res_word[16*k +: 16] = 16'($signed({1'b0, src_rdata[8*k +: 8]}) - $signed({1'b0, pred[k]}));
  end

  logic        ft_valid;
  logic [1:0]  ft_line;
  logic [79:0] ft_data;

  // Tag of the block inside the forward transform: mode, mode cost, and
  // the block's position within its mode.
  logic [1:0]    in_cnt;
  logic [4:0]    in_blk, out_blk, in_nblk, out_nblk;
  logic [3:0]    in_mode, out_mode;
  logic [SW-1:0] in_cost, out_cost;
  logic          take;

  // Forward DC register: entry out_blk takes coefficient (0,0) of each
  // block leaving the DCT (word 0, element 0) while fwd_dc_cap is set; the
  // Hadamard pass reads it back one column word per input word.
  logic [63:0] fwd_in, fdc_col;
  logic [15:0] fdc_unused;

  dc_register #(.W(16)) u_fwd_dc (
    .clk(clk), .rst_n(rst_n),
    .elem_we(fwd_dc_cap && ft_valid && ft_line == 2'd0), .elem_idx(out_blk[3:0]),
    .elem_din(ft_data[15:0]),
    .col_we(1'b0), .col_widx(2'd0), .col_din('0),
    .elem_sel(4'd0), .elem_dout(fdc_unused), .col_sel(in_cnt), .col_dout(fdc_col)
  );

  assign fwd_in = !fwd_direct ? res_word : (fwd_dc_sel ? fdc_col : fwd_data);

  transform4x4 #(.INVERSE(1'b0), .IW(16), .OW(20)) u_fwd (
    .clk(clk), .rst_n(rst_n), .hadamard(hadamard),
    .in_valid(res_valid), .in_ready(res_ready), .in_data(fwd_in),
    .out_valid(ft_valid), .out_line(ft_line), .out_data(ft_data)
  );

  assign take = res_valid && res_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt <= '0; in_blk <= '0; out_blk <= '0; in_nblk <= 5'd1; out_nblk <= 5'd1;
      in_mode <= '0; out_mode <= '0; in_cost <= '0; out_cost <= '0;
    end else begin
      if (md_clear) in_blk <= '0;
      if (take) begin
        in_cnt <= in_cnt + 2'd1;
        if (in_cnt == 2'd0 && in_blk == 5'd0) begin
          in_mode <= pred_mode; in_cost <= md_mode_cost; in_nblk <= md_blocks;
        end
        if (in_cnt == 2'd3) begin
          out_mode <= in_mode;
          out_cost <= in_cost;
          out_nblk <= in_nblk;
          out_blk  <= in_blk;
          in_blk   <= (in_blk + 5'd1 == in_nblk) ? 5'd0 : in_blk + 5'd1;
        end
      end
    end
  end

  mode_decision #(.CW(20), .SW(SW)) u_md (
    .clk(clk), .rst_n(rst_n), .clear(md_clear), .in_valid(ft_valid),
    .first(out_blk == 5'd0 && ft_line == 2'd0),
    .blk_last(ft_line == 2'd3),
    .last(out_blk + 5'd1 == out_nblk && ft_line == 2'd3),
    .line(ft_line), .coef(ft_data), .mode(out_mode), .mode_cost(out_cost),
    .result_valid(md_result_valid), .result_cost(md_result_cost),
    .best_mode(md_best_mode), .best_cost(md_best_cost), .best_valid()
  );

  logic        q_valid;
  logic [63:0] q_level;
  logic [79:0] q_deq;
  logic        cw_pending;
  logic [6:0]  cw_addr;
  logic        cw_dc;

  quant_unit #(.CW(20), .LW(16)) u_quant (
    .clk(clk), .rst_n(rst_n), .in_valid(ft_valid), .qp(qp), .dc(q_dc),
    .line(ft_line), .coef(ft_data), .out_valid(q_valid), .level(q_level), .dequant(q_deq)
  );

  // the write request for the coefficient buffer travels with the quantiser
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw_pending <= 1'b0; cw_addr <= '0; cw_dc <= 1'b0;
    end else begin
      cw_pending <= coef_we && ft_valid;
      cw_addr    <= coef_waddr;
      cw_dc      <= coef_dc;
    end
  end

  coef_pingpong_buf #(.DEPTH(104), .WIDTH(64), .DC_BASE(96)) u_coef_buf (
    .clk(clk), .rst_n(rst_n), .swap(coef_swap),
    .wr_en(cw_pending && q_valid), .wr_we(1'b1), .wr_dc(cw_dc), .wr_addr(cw_addr),
    .wr_data(q_level), .wr_rdata(),
    .rd_en(ec_re), .rd_dc(ec_dc), .rd_addr(ec_raddr), .rd_data(ec_rdata), .wr_bank()
  );

  // CAVLC scanning phase on the entropy-coder side of the buffer: the
  // word read at address a arrives one cycle later as line a[1:0] of its
  // block (every block occupies four consecutive words).
  logic       scan_in_valid;
  logic [1:0] scan_in_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_in_valid <= 1'b0; scan_in_line <= '0;
    end else begin
      scan_in_valid <= ec_re && ec_scan;
      scan_in_line  <= ec_raddr[1:0];
    end
  end

  cavlc_scan #(.LW(16)) u_scan (
    .clk(clk), .rst_n(rst_n), .in_valid(scan_in_valid), .in_ready(scan_ready),
    .in_line(scan_in_line), .in_data(ec_rdata),
    .blk_valid(scan_blk_valid), .total_coeff(scan_total_coeff), .trailing_ones(scan_trailing_ones),
    .total_zeros(scan_total_zeros), .out_valid(scan_valid), .out_level(scan_level),
    .out_run_before(scan_run_before), .out_zeros_left(scan_zeros_left), .out_last(scan_last)
  );

  // Inverse DC register.  With inv_dc_load each inverse Hadamard output
  // word (column rec_line of the DC block) is stored with the standard's
  // DC scaling (x + 2) >>> 2 (the quantiser's DC dequantisation leaves it
  // out).  With inv_dc_sub the (0,0) input of each inverse-DCT block is
  // replaced by its entry, selected by the block's position tag q_blk.
  logic [1:0]  q_line;
  logic [3:0]  q_blk;
  logic [63:0] idc_din, idc_unused;
  logic [15:0] idc_elem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_line <= '0; q_blk <= '0;
    end else if (ft_valid) begin
      q_line <= ft_line;
      q_blk  <= out_blk[3:0];
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++)
      idc_din[16*k +: 16] = 16'(($signed(rec_data[20*k +: 20]) + 20'sd2) >>> 2);
  end

  dc_register #(.W(16)) u_inv_dc (
    .clk(clk), .rst_n(rst_n),
    .elem_we(1'b0), .elem_idx(4'd0), .elem_din('0),
    .col_we(inv_dc_load && rec_valid), .col_widx(rec_line), .col_din(idc_din),
    .elem_sel(q_blk), .elem_dout(idc_elem), .col_sel(2'd0), .col_dout(idc_unused)
  );

  logic [63:0] iq_word;
  always_comb begin
    for (int k = 0; k < 4; k++) iq_word[16*k +: 16] = q_deq[20*k +: 16];
    if (inv_dc_sub && q_line == 2'd0) iq_word[15:0] = idc_elem;
  end

  transform4x4 #(.INVERSE(1'b1), .IW(16), .OW(20)) u_inv (
    .clk(clk), .rst_n(rst_n), .hadamard(inv_hadamard),
    .in_valid(q_valid), .in_ready(), .in_data(iq_word),
    .out_valid(rec_valid), .out_line(rec_line), .out_data(rec_data)
  );

  // Boundary reconstruction.  A residual column leaves the inverse
  // transform a fixed 9 cycles after it entered the forward transform
  // (4 words in, 1 Q/IQ register, 4 words in again), so the prediction of
  // that column is delayed by a 9-stage shift register and added there.
  localparam int unsigned REC_LAT = 9;
  logic [31:0] pred_dly [REC_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(REC_LAT); i++) pred_dly[i] <= '0;
    end else begin
      pred_dly[0] <= {pred[3], pred[2], pred[1], pred[0]};
      for (int i = 1; i < int'(REC_LAT); i++) pred_dly[i] <= pred_dly[i-1];
    end
  end

  boundary_recon #(.RW(20)) u_recon (
    .clk(clk), .rst_n(rst_n), .in_valid(rec_valid), .in_line(rec_line), .in_res(rec_data),
    .in_pred(pred_dly[REC_LAT-1]), .out_valid(recon_valid), .out_line(recon_line), .out_pix(recon_pix),
    .bnd_valid(bnd_valid), .bnd_right(bnd_right), .bnd_bottom(bnd_bottom)
  );

  // =============== three-step Intra4x4 mode selector ===============
  fast_i4_mode_sel #(.SW(SW)) u_sel (
    .clk(clk), .rst_n(rst_n), .start(sel_start),
    .req_valid(sel_req_valid), .req_mode(sel_req_mode),
    .cost_valid(sel_cost_valid), .cost(sel_cost),
    .done(sel_done), .best_mode(sel_best_mode), .best_cost(sel_best_cost), .busy()
  );

endmodule
