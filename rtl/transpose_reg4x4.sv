// 4x4 transpose register.
//
// A 4x4 array of registers that can shift in two directions.  With
// dir = 0 it shifts vertically: the top row leaves at dout and din enters
// as the bottom row.  With dir = 1 it shifts horizontally: the left column
// leaves at dout (element i = row i) and din enters as the right column.
// Four words written in one direction come out as the four words of the
// transposed block when read in the other direction, and the block read
// out is replaced by the block written in at the same time.  Alternating
// dir from one block to the next therefore transposes a continuous
// stream of 4x4 blocks with four cycles of latency and no idle cycles.
// The deblocking filter uses it to turn rows into columns and back; the
// transform unit uses it between its two 1-D passes.
module transpose_reg4x4 #(
  parameter int unsigned EW = 8     // bits per element
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,    // move by one word
  input  logic            dir,      // 0: rows, 1: columns
  input  logic [4*EW-1:0] din,
  output logic [4*EW-1:0] dout
);

  logic [EW-1:0] a [4][4];   // a[row][col]

  always_comb begin
    for (int k = 0; k < 4; k++)
      dout[EW*k +: EW] = dir ? a[k][0] : a[0][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) a[i][j] <= '0;
    end else if (shift) begin
      if (!dir) begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 4; j++) a[i][j] <= a[i+1][j];
        for (int j = 0; j < 4; j++) a[3][j] <= din[EW*j +: EW];
      end else begin
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 3; j++) a[i][j] <= a[i][j+1];
          a[i][3] <= din[EW*i +: EW];
        end
      end
    end
  end

endmodule
