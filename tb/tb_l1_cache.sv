// tb_l1_cache: fills lines through the kernel port, then checks hit/miss
// detection, reads, writes (and the modified bit they set), victim
// reporting, invalidation of a matching and a non-matching block, clean and
// initialisation, against a reference model kept in the testbench.
module tb_l1_cache;
  localparam int LINES = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset at once
  logic cpu_en = 0, cpu_we = 0;
  logic [15:0] cpu_block = '0, k_block = '0, victim_block;
  logic [6:0] cpu_word = '0, k_word = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata, k_wdata = '0, k_rdata;
  logic cpu_hit, cpu_miss, victim_valid, victim_modified;
  logic k_init = 0, k_inval = 0, k_tag_set = 0, k_clean = 0, k_we = 0;
  int checks = 0, failures = 0;

  l1_cache #(.LINES(LINES)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [31:0] pat(input int blk, input int w);
    return {16'(blk), 16'(w * 3 + 1)};
  endfunction

  task automatic fill(input int blk);
    @(negedge clk);
    k_block = 16'(blk); k_tag_set = 1;
    @(negedge clk);
    k_tag_set = 0;
    for (int w = 0; w < 128; w++) begin
      k_we = 1; k_word = 7'(w); k_wdata = pat(blk, w);
      @(negedge clk);
    end
    k_we = 0;
  endtask

  task automatic probe(input int blk, input int w, input bit exp_hit);
    cpu_en = 1; cpu_we = 0; cpu_block = 16'(blk); cpu_word = 7'(w);
    #1;
    chk({31'd0, cpu_hit}, {31'd0, exp_hit}, $sformatf("hit blk %0d", blk));
    chk({31'd0, cpu_miss}, {31'd0, !exp_hit}, $sformatf("miss blk %0d", blk));
    @(negedge clk);
    if (exp_hit) chk(cpu_rdata, pat(blk, w), "read data");
    cpu_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    probe(5, 0, 0);                        // empty cache
    fill(5);                               // line 1
    fill(2);                               // line 2
    probe(5, 7, 1);
    probe(2, 127, 1);
    probe(9, 7, 0);                        // same line as 5, other tag
    // victim info for block 9 -> line 1 holds 5, clean
    cpu_block = 16'd9; #1;
    chk({31'd0, victim_valid}, 32'd1, "victim valid");
    chk({31'd0, victim_modified}, 32'd0, "victim clean");
    chk({16'd0, victim_block}, 32'd5, "victim block");
    // write hit
    @(negedge clk);
    cpu_en = 1; cpu_we = 1; cpu_block = 16'd5; cpu_word = 7'd7; cpu_wdata = 32'hCAFE0007;
    @(negedge clk);
    cpu_we = 0; cpu_en = 0; cpu_block = 16'd9; #1;
    chk({31'd0, victim_modified}, 32'd1, "modified after write");
    // read back via kernel port (write-back path)
    k_block = 16'd5; k_word = 7'd7;
    @(negedge clk);
    chk(k_rdata, 32'hCAFE0007, "kernel read of written word");
    // write miss changes nothing
    cpu_en = 1; cpu_we = 1; cpu_block = 16'd13; cpu_word = 7'd7; cpu_wdata = 32'h0BAD0BAD;
    @(negedge clk);
    cpu_en = 0; cpu_we = 0;
    k_block = 16'd5; k_word = 7'd7;
    @(negedge clk);
    chk(k_rdata, 32'hCAFE0007, "write miss ignored");
    // clean
    k_block = 16'd5; k_clean = 1;
    @(negedge clk);
    k_clean = 0; cpu_block = 16'd5; #1;
    chk({31'd0, victim_modified}, 32'd0, "clean");
    // invalidate non-matching block on line 1 keeps the line
    @(negedge clk);
    k_block = 16'd9; k_inval = 1;
    @(negedge clk);
    k_inval = 0;
    probe(5, 1, 1);
    // invalidate matching block
    k_block = 16'd5; k_inval = 1;
    @(negedge clk);
    k_inval = 0;
    probe(5, 1, 0);
    probe(2, 3, 1);
    // initialise clears everything
    k_init = 1;
    @(negedge clk);
    k_init = 0;
    probe(2, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
