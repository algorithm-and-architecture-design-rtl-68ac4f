// Testbench of the 1R/1W SRAM: random simultaneous reads and writes
// against a model; a read returns the contents before a same-cycle write.
module tb_sram_1r1w;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re, we;
  logic [3:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  logic [31:0] model [16];
  logic [31:0] exp_q;
  logic exp_v;
  int checks = 0, failures = 0;

  sram_1r1w #(.DEPTH(16), .WIDTH(32)) dut (.*);

  initial begin
    re = 0; we = 0; raddr = '0; waddr = '0; wdata = '0; exp_v = 0;
    // initialise every word
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); we = 1; waddr = 4'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata != exp_q) begin
          failures++;
          if (failures < 10) $display("rdata %h expected %h", rdata, exp_q);
        end
      end
      re = $urandom_range(0, 1); we = $urandom_range(0, 1);
      raddr = 4'($urandom); waddr = (n % 5 == 0) ? raddr : 4'($urandom); wdata = $urandom;
      exp_v = re; exp_q = model[raddr];
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
