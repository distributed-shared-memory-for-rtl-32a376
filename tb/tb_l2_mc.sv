// tb_l2_mc: the memory controller with a data array, driven directly with
// request packets on port 0 and write-back packets on port 1. One block
// goes through every directory transition of the protocol, and each packet
// the controller sends is compared flit by flit with the packet worked out
// here:
//   read of an I/S block -> data from the bank; exclusivity on a shared
//   block -> invalidation multicasts up and down the labels, then a grant
//   with data; read of an M block -> write-back request to the owner (T);
//   read of a T block -> forwarded to the owner when the reader is nearer
//   the owner, held when it is nearer the bank; write-back -> S, held read
//   served with the new data; exclusivity on an M block -> ownership moved
//   and WB_EXCL_REQUEST to the old owner; eviction write-back -> I; a
//   write-back from a PE that does not own the block is ignored.
module tb_l2_mc;
  import dsm_pkg::*;
  localparam int W = 4, H = 4, N = 16, BLOCKS = 4;
  localparam logic [7:0] ME = 8'h11;        // (1,1), label 6
  localparam int AW = $clog2(BLOCKS * 128);
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset at once
  logic [1:0] intr;
  logic in0_valid, in0_ready, in1_valid, in1_ready;
  flit_t in0_data, in1_data;
  logic out0_valid, out0_ready, out1_valid, out1_ready;
  flit_t out0_data, out1_data;
  logic [AW-1:0] mem_raddr, mem_waddr;
  logic [31:0] mem_rdata, mem_wdata;
  logic mem_we;
  mc_events_t events;
  int checks = 0, failures = 0;
  int ev_inv = 0, ev_wbr = 0, ev_wbx = 0, ev_fwd = 0, ev_blk = 0, ev_wb = 0;

  l2_mc #(.W(W), .H(H), .BLOCKS(BLOCKS), .MY_ADDR(ME), .T_POLICY(2)) dut (.*);
  l2_mem_bank #(.BLOCKS(BLOCKS), .BANK_ID(0)) u_mem (
    .clk, .raddr(mem_raddr), .rdata(mem_rdata), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata));
  always #5 clk = ~clk;

  flit_t q0[$], q1[$];
  flit_t r0[$], r1[$];
  flit_t pk0[$][$], pk1[$][$];

  int rd0 = 0, rd1 = 0;   // next flit to offer; advanced with nonblocking writes
  assign in0_valid = rd0 < q0.size();
  assign in0_data  = in0_valid ? q0[rd0] : '0;
  assign in1_valid = rd1 < q1.size();
  assign in1_data  = in1_valid ? q1[rd1] : '0;
  assign intr      = {in1_valid, in0_valid};

  always @(negedge clk) begin
    out0_ready <= $urandom_range(3) != 0;
    out1_ready <= $urandom_range(3) != 0;
  end

  function automatic bit complete(input flit_t p[$]);
    int sp;
    if (p.size() == 0) return 0;
    sp = p[0][15] ? 2 : 1;
    return p.size() > sp && p.size() == sp + 1 + int'(p[sp]);
  endfunction

  always @(posedge clk) begin
    if (in0_valid && in0_ready) rd0 <= rd0 + 1;
    if (in1_valid && in1_ready) rd1 <= rd1 + 1;
    if (out0_valid && out0_ready) begin
      r0.push_back(out0_data);
      if (complete(r0)) begin pk0.push_back(r0); r0.delete(); end
    end
    if (out1_valid && out1_ready) begin
      r1.push_back(out1_data);
      if (complete(r1)) begin pk1.push_back(r1); r1.delete(); end
    end
    ev_inv += int'(events.inv_multicast);
    ev_wbr += int'(events.wb_request);
    ev_wbx += int'(events.wb_excl);
    ev_fwd += int'(events.t_forward);
    ev_blk += int'(events.t_blocked);
    ev_wb  += int'(events.wb_received);
  end

  function automatic int lab(input logic [7:0] a);
    int x, y;
    x = a[7:4]; y = a[3:0];
    return (y % 2 == 0) ? y * W + x : y * W + (W - 1 - x);
  endfunction

  task automatic request(input service_e s, input logic [7:0] src, input int blk);
    q0.push_back({2'b01, 6'd0, ME});
    q0.push_back(16'd4);
    q0.push_back(s);
    q0.push_back(flit_t'(src));
    q0.push_back(flit_t'(blk));
    q0.push_back(16'h0077);
  endtask

  task automatic writeback(input service_e s, input logic [7:0] src, input int blk, input logic [31:0] seed);
    q1.push_back({2'b00, 6'd0, ME});
    q1.push_back(16'd260);
    q1.push_back(s);
    q1.push_back(flit_t'(src));
    q1.push_back(flit_t'(blk));
    q1.push_back(16'h0077);
    for (int w = 0; w < 128; w++) begin
      q1.push_back(16'((seed + w) >> 16));
      q1.push_back(16'(seed + w));
    end
  endtask

  // Expected packets.
  function automatic void ctrl_pkt(output flit_t p[$], input logic [7:0] tgt, input service_e s,
                                   input logic [7:0] src, input int blk);
    p = '{{2'b01, 6'd0, tgt}, 16'd4, s, flit_t'(src), flit_t'(blk), 16'h0077};
  endfunction
  function automatic void data_pkt(output flit_t p[$], input logic [7:0] tgt, input service_e s,
                                   input int blk, input logic [31:0] base);
    p = '{{2'b00, 6'd0, tgt}, 16'd260, s, flit_t'(ME), flit_t'(blk), 16'h0077};
    for (int w = 0; w < 128; w++) begin
      p.push_back(16'((base + w) >> 16));
      p.push_back(16'(base + w));
    end
  endfunction
  function automatic void inv_pkt(output flit_t p[$], input bit up, input logic [15:0] mask, input int blk);
    p = '{{2'b11, up, 13'd0}, mask, 16'd4, SVC_INVALIDATE_BLOCK, flit_t'(ME), flit_t'(blk), 16'h0077};
  endfunction

  task automatic expect_pkt(input int ch, input flit_t e[$], input string what);
    int t;
    for (t = 0; t < 3000; t++) begin
      if ((ch == 0 && pk0.size() > 0) || (ch == 1 && pk1.size() > 0)) break;
      @(posedge clk);
    end
    checks++;
    if (t == 3000) begin failures++; $display("FAIL %s: no packet", what); return; end
    if (ch == 0) begin
      if (pk0[0] != e) begin failures++; $display("FAIL %s: got %p", what, pk0[0][0:5]); end
      void'(pk0.pop_front());
    end else begin
      if (pk1[0] != e) begin failures++; $display("FAIL %s: got %p", what, pk1[0][0:5]); end
      void'(pk1.pop_front());
    end
  endtask

  task automatic expect_silence(input int cycles, input string what);
    repeat (cycles) @(posedge clk);
    checks++;
    if (pk0.size() + pk1.size() != 0) begin failures++; $display("FAIL %s: unexpected packet", what); end
  endtask

  localparam logic [7:0] A = 8'h20, B = 8'h01, C = 8'h33, D = 8'h30, E = 8'h32, F = 8'h10;
  flit_t e[$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1, 2: reads of an uncached block
    request(SVC_READ_REQUEST, A, 1);
    data_pkt(e, A, SVC_READ_BLOCK, 1, 128);      expect_pkt(1, e, "read A");
    request(SVC_READ_REQUEST, B, 1);
    data_pkt(e, B, SVC_READ_BLOCK, 1, 128);      expect_pkt(1, e, "read B");
    // 3: write miss by C on a block shared by A (label 2) and B (label 7)
    request(SVC_ASK_EXCLUSIVITY, C, 1);
    inv_pkt(e, 1, 16'h0080, 1);                   expect_pkt(0, e, "invalidate up");
    inv_pkt(e, 0, 16'h0004, 1);                   expect_pkt(0, e, "invalidate down");
    data_pkt(e, C, SVC_GRANT_EXCLUSIVITY, 1, 128); expect_pkt(1, e, "grant with data to C");
    // 4: read of the M block by D -> write-back request to C on D's behalf
    request(SVC_READ_REQUEST, D, 1);
    ctrl_pkt(e, C, SVC_WB_REQUEST, D, 1);         expect_pkt(0, e, "wb request");
    // 5: E is next to C: forwarded
    request(SVC_READ_REQUEST, E, 1);
    ctrl_pkt(e, C, SVC_READ_FORWARD, E, 1);       expect_pkt(0, e, "T forward");
    // 6: F is next to the bank: held
    request(SVC_READ_REQUEST, F, 1);
    expect_silence(300, "T hold");
    // 7: write-back arrives -> F served with the new data
    writeback(SVC_WRITE_BACK, C, 1, 32'hA000_0000);
    data_pkt(e, F, SVC_READ_BLOCK, 1, 32'hA000_0000); expect_pkt(1, e, "held read served");
    // 8: D (a sharer) asks exclusivity: C(12), E(11) up, F(1) down
    request(SVC_ASK_EXCLUSIVITY, D, 1);
    inv_pkt(e, 1, 16'h1800, 1);                   expect_pkt(0, e, "invalidate up 2");
    inv_pkt(e, 0, 16'h0002, 1);                   expect_pkt(0, e, "invalidate down 2");
    ctrl_pkt(e, D, SVC_GRANT_EXCLUSIVITY, ME, 1); expect_pkt(0, e, "grant to sharer D");
    // 9: A asks exclusivity on D's modified block -> handed over directly
    request(SVC_ASK_EXCLUSIVITY, A, 1);
    ctrl_pkt(e, D, SVC_WB_EXCL_REQUEST, A, 1);    expect_pkt(0, e, "wb excl request");
    // 10: A evicts the block -> I; B reads A's data from the bank
    writeback(SVC_WRITE_BACK, A, 1, 32'hB000_0100);
    wait (ev_wb == 2);
    request(SVC_READ_REQUEST, B, 1);
    data_pkt(e, B, SVC_READ_BLOCK, 1, 32'hB000_0100); expect_pkt(1, e, "read after eviction");
    // 11: stale write-back from a non-owner is ignored
    writeback(SVC_WRITE_BACK, E, 1, 32'hDEAD_0000);
    repeat (400) @(posedge clk);
    request(SVC_READ_REQUEST, C, 1);
    data_pkt(e, C, SVC_READ_BLOCK, 1, 32'hB000_0100); expect_pkt(1, e, "stale write-back ignored");
    // another block is untouched
    request(SVC_READ_REQUEST, C, 2);
    data_pkt(e, C, SVC_READ_BLOCK, 2, 256);       expect_pkt(1, e, "other block");
    // event counters
    checks++;
    if (ev_inv != 4 || ev_wbr != 1 || ev_wbx != 1 || ev_fwd != 1 || ev_blk != 1 || ev_wb != 2) begin
      failures++;
      $display("FAIL events inv=%0d wbr=%0d wbx=%0d fwd=%0d blk=%0d wb=%0d", ev_inv, ev_wbr, ev_wbx, ev_fwd, ev_blk, ev_wb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
