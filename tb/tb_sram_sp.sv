// Testbench of the single-port SRAM at its default size (96 x 32): fills
// it, then random reads, writes and idle cycles against a model.  Read
// data must appear one cycle after the address and stay unchanged on
// write and idle cycles.
module tb_sram_sp;

  localparam int DEPTH = 96, WIDTH = 32, AW = $clog2(DEPTH);

  logic clk = 0;
  always #5 clk = ~clk;

  logic en, we;
  logic [AW-1:0] addr;
  logic [WIDTH-1:0] wdata, rdata;

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] last_rd;
  bit               have_rd = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("[%0t] %s", $time, msg);
    end
  endtask

  initial begin
    int op;
    en = 0; we = 0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      en = 1; we = 1; addr = AW'(a); wdata = $urandom; model[a] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 20000; n++) begin
      op = $urandom_range(0, 2);
      addr = AW'($urandom_range(0, DEPTH - 1));
      en = (op != 2); we = (op == 1); wdata = $urandom;
      @(negedge clk);
      if (op == 0) begin last_rd = model[addr]; have_rd = 1; end
      if (op == 1) model[addr] = wdata;
      if (have_rd)
        check(rdata == last_rd, $sformatf("rdata %h expected %h", rdata, last_rd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
