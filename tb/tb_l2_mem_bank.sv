// tb_l2_mem_bank: checks the start-up contents formula, synchronous reads
// (data one cycle after the address), writes, and a read of one word in the
// cycle it is written (old data returned).
module tb_l2_mem_bank;
  localparam int unsigned BLOCKS = 4, BANK_ID = 3, AW = $clog2(BLOCKS * 128);
  logic clk = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [31:0] rdata, wdata = '0;
  logic we = 0;
  int checks = 0, failures = 0;
  logic [31:0] model [BLOCKS * 128];

  l2_mem_bank #(.BLOCKS(BLOCKS), .BANK_ID(BANK_ID)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int a = 0; a < BLOCKS * 128; a++) model[a] = {8'(BANK_ID), 24'(a)};
    @(negedge clk);
    for (int a = 0; a < BLOCKS * 128; a += 37) begin
      raddr = AW'(a);
      @(negedge clk);
      chk(rdata, model[a], "init");
    end
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(BLOCKS * 128 - 1);
      we = 1; waddr = AW'(a); wdata = $urandom; raddr = AW'(a);
      @(negedge clk);
      chk(rdata, model[a], "read during write");
      model[a] = wdata;
      we = 0;
      raddr = AW'($urandom_range(BLOCKS * 128 - 1));
      @(negedge clk);
      chk(rdata, model[raddr], "read");
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
