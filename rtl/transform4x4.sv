// 4x4 integer transform unit: forward DCT/DHT or inverse DCT/DHT.
//
// Two 1-D transforms around a 4x4 transpose register.  A block enters as
// four words (4 values each, one per cycle); each word goes through the
// first 1-D transform into the transpose register.  Once the four words
// are in, the transpose register hands out the perpendicular lines,
// which go through the second 1-D transform to the output, one word per
// cycle.  The next block may enter while the previous one leaves, so a
// continuous stream runs at one block per four cycles; the first output
// word comes out in the cycle after the last input word.
//
// The forward and the Hadamard transforms share one butterfly
// (s03 = x0+x3, d03 = x0-x3, s12 = x1+x2, d12 = x1-x2); they differ only
// in whether the odd outputs use 2*d or d.  The inverse DCT and the
// (self-inverse) Hadamard share the inverse butterfly the same way.  The
// inverse DCT uses the halving (>>1) of the standard; its output is the
// residual times 64, before the final (x+32)>>6 of reconstruction.  The
// Hadamard output is likewise left unscaled (the standard's halving of
// the 16x16 DC transform is left to the quantiser's DC path).
//
// Orientation: if the input words are the rows of X, the output words are
// the columns of the result (element i = row i); given columns, it returns
// rows.  For bit-exact inverse transforms feed the rows first.
//
// Handshake: in_valid/in_ready per word; words of a block must arrive in
// four consecutive cycles.  in_ready is low only while a block is half
// read out and no new block is under way.  out_valid marks output words,
// out_line = index of the output word in its block.
module transform4x4 #(
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned IW = 16,    // input element width (signed)
  parameter int unsigned OW = 20     // output element width (signed)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hadamard,   // 1: DHT, 0: DCT (held for a whole block)
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [4*IW-1:0]    in_data,
  output logic               out_valid,
  output logic [1:0]         out_line,
  output logic [4*OW-1:0]    out_data
);

  typedef logic signed [OW-1:0] v_t;

  function automatic logic [4*OW-1:0] tr1d(logic [4*OW-1:0] w, logic had);
    v_t x0, x1, x2, x3, a, b, c, d;
    logic [4*OW-1:0] r;
    x0 = v_t'(w[0 +: OW]); x1 = v_t'(w[OW +: OW]);
    x2 = v_t'(w[2*OW +: OW]); x3 = v_t'(w[3*OW +: OW]);
    if (!INVERSE || had) begin
      // forward butterfly; the Hadamard is its own inverse
      a = x0 + x3; b = x0 - x3; c = x1 + x2; d = x1 - x2;
      r[0 +: OW]    = a + c;
      r[2*OW +: OW] = a - c;
      r[OW +: OW]   = had ? (b + d) : ((b <<< 1) + d);
      r[3*OW +: OW] = had ? (b - d) : (b - (d <<< 1));
    end else begin
      // inverse butterfly with the standard's halving
      a = x0 + x2; b = x0 - x2;
      c = (x1 >>> 1) - x3;
      d = x1 + (x3 >>> 1);
      r[0 +: OW]    = a + d;
      r[OW +: OW]   = b + c;
      r[2*OW +: OW] = b - c;
      r[3*OW +: OW] = a - d;
    end
    return r;
  endfunction

  logic [4*OW-1:0] in_ext, t_din, t_dout;
  logic [1:0] wr_cnt, rd_cnt;
  logic       have, dir, shift, had_q;

  always_comb begin
    for (int k = 0; k < 4; k++)
      in_ext[OW*k +: OW] = OW'($signed(in_data[IW*k +: IW]));
    t_din = tr1d(in_ext, hadamard);
  end

  assign in_ready = !(have && rd_cnt != 2'd0) || (wr_cnt != 2'd0);
  assign shift    = (in_valid && in_ready) || have;
  assign out_valid = have;
  assign out_line  = rd_cnt;
  assign out_data  = tr1d(t_dout, had_q);

  transpose_reg4x4 #(.EW(OW)) u_tr (
    .clk(clk), .rst_n(rst_n), .shift(shift), .dir(dir), .din(t_din), .dout(t_dout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_cnt <= '0; rd_cnt <= '0; have <= 1'b0; dir <= 1'b0; had_q <= 1'b0;
    end else begin
      if (have) begin
        rd_cnt <= rd_cnt + 2'd1;
        if (rd_cnt == 2'd3) have <= 1'b0;
      end
      if (in_valid && in_ready) begin
        wr_cnt <= wr_cnt + 2'd1;
        if (wr_cnt == 2'd3) begin
          have   <= 1'b1;
          rd_cnt <= 2'd0;
          dir    <= ~dir;
          had_q  <= hadamard;
        end
      end
    end
  end

  // A block, once started, must be delivered in four consecutive cycles.
  a_burst: assert property (@(posedge clk) disable iff (!rst_n)
                            (wr_cnt != 2'd0) |-> in_valid)
    else $error("transform4x4: block input interrupted");

endmodule
