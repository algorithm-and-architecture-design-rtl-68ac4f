// 4x4 block shift register.
//
// Holds one 4x4 block as four words (rows or columns).  Each enabled cycle
// the oldest word leaves at dout and, if push is set, din enters at the
// tail, so a block pushed word by word comes out four shifts later in the
// same order.  The deblocking filter keeps here the block that sits on the
// q side of one edge and on the p side of the next, so its once-filtered
// pixels are reused without a memory access.  dout is the registered head
// (valid without a cycle of latency); a shift reads it and moves on.
module shift_reg4x4 #(
  parameter int unsigned EW = 8     // bits per pixel
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,      // advance by one word
  input  logic [4*EW-1:0] din,
  output logic [4*EW-1:0] dout
);

  logic [4*EW-1:0] mem [4];

  assign dout = mem[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) mem[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < 3; i++) mem[i] <= mem[i+1];
      mem[3] <= din;
    end
  end

endmodule
