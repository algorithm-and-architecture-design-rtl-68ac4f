// Ping-pong coefficient buffer between the coding loop and the entropy coder.
//
// Two single-port banks of DEPTH x WIDTH bits.  The coding loop writes the
// quantised levels of the current macroblock into one bank while the
// entropy coder reads the previous macroblock from the other; swap
// (one cycle, at a macroblock boundary) exchanges the roles.  Each bank
// is split into an AC part and a DC part (addresses DC_BASE and up) so
// that the Intra16x16 DC levels can be rewritten on their own when that
// mode wins.  The write side may also read its own bank (wr_en, wr_we low),
// which the coding loop needs for the DC rewrite.  Read data arrive one cycle
// after the address.
module coef_pingpong_buf #(
  parameter int unsigned DEPTH   = 104,
  parameter int unsigned WIDTH   = 64,
  parameter int unsigned DC_BASE = 96,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap,
  // coding-loop side
  input  logic             wr_en,
  input  logic             wr_we,
  input  logic             wr_dc,      // address is relative to the DC part
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  output logic [WIDTH-1:0] wr_rdata,
  // entropy-coder side
  input  logic             rd_en,
  input  logic             rd_dc,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  output logic             wr_bank     // bank the coding loop owns
);

  logic [AW-1:0]    a_addr [2];
  logic             a_en [2], a_we [2];
  logic [WIDTH-1:0] a_rdata [2];
  logic             sel_q;              // bank read last cycle by each side

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank <= 1'b0;
      sel_q   <= 1'b0;
    end else begin
      if (swap) wr_bank <= ~wr_bank;
      sel_q <= wr_bank;
    end
  end

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (b == int'(wr_bank)) begin
        a_en[b]   = wr_en;
        a_we[b]   = wr_we;
        a_addr[b] = wr_addr + (wr_dc ? AW'(DC_BASE) : '0);
      end else begin
        a_en[b]   = rd_en;
        a_we[b]   = 1'b0;
        a_addr[b] = rd_addr + (rd_dc ? AW'(DC_BASE) : '0);
      end
    end
  end

  assign wr_rdata = a_rdata[sel_q];
  assign rd_data  = a_rdata[~sel_q];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_bank (
      .clk(clk), .en(a_en[b]), .we(a_we[b]), .addr(a_addr[b]),
      .wdata(wr_data), .rdata(a_rdata[b])
    );
  end

endmodule
